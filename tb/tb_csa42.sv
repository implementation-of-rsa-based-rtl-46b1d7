// tb_csa42: self-checking test of the registered 4-2 carry-save adder.
// Random x1..x4 are applied with en high; one clock edge later sum + carry
// must equal x1+x2+x3+x4 (mod 2^W) with carry bit 0 clear. Also checks that
// the register holds while en is low, that clr empties it, and that rst
// clears it asynchronously.
module tb_csa42;
  localparam int unsigned W = 45;

  logic clk = 0, rst = 0, en = 0, clr = 0;
  logic [W-1:0] x1, x2, x3, x4, s, c, hold_s, hold_c;
  logic [W+1:0] ref_sum;
  int checks = 0, failures = 0;

  csa42 #(.W(W)) dut (.clk(clk), .rst(rst), .en(en), .clr(clr),
                      .x1(x1), .x2(x2), .x3(x3), .x4(x4), .sum(s), .carry(c));

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("csa42 failure: %s (s=%h c=%h)", what, s, c);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x1 = rnd(); x2 = rnd(); x3 = rnd(); x4 = rnd();
    #1 rst = 1;
    #1;
    check(s == '0 && c == '0, "reset value");
    @(negedge clk); rst = 0;
    for (int i = 0; i < 1000; i++) begin
      x1 = rnd(); x2 = rnd(); x3 = rnd(); x4 = rnd();
      if (i % 7 == 0) begin x1 = '1; x2 = '1; x3 = '1; x4 = '1; end
      en = 1;
      ref_sum = {2'b0, x1} + {2'b0, x2} + {2'b0, x3} + {2'b0, x4};
      hold_s = s;
      @(posedge clk); #1;
      check(W'(s + c) == ref_sum[W-1:0] && c[0] == 1'b0, "sum after one clock");
      // hold
      en = 0; hold_s = s; hold_c = c;
      x1 = rnd(); x2 = rnd();
      @(posedge clk); #1;
      check(s == hold_s && c == hold_c, "hold with en low");
      @(negedge clk);
    end
    en = 1; clr = 1;
    @(posedge clk); #1;
    check(s == '0 && c == '0, "synchronous clear");
    clr = 0;
    @(posedge clk); #1;
    check(s != '0 || c != '0, "load after clear");
    #2 rst = 1; #1;
    check(s == '0 && c == '0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_serial_adder: self-checking test of the bit-serial final adder.
// Adds random operand pairs (and all-ones / zero corners) with LEN = 40 and
// checks the sum modulo 2^LEN, that done comes exactly LEN cycles after the
// start cycle, and that a new addition can start in the done cycle.
module tb_serial_adder;
  localparam int unsigned LEN = 40;

  logic clk = 0, rst = 0, start = 0;
  logic [LEN-1:0] x, y, sum;
  logic busy, done;
  logic [LEN:0] ref_sum;
  int checks = 0, failures = 0, cyc;

  serial_adder #(.LEN(LEN)) dut (.clk(clk), .rst(rst), .start(start), .x(x), .y(y),
                                 .busy(busy), .done(done), .sum(sum));

  always #5 clk = ~clk;

  function automatic logic [LEN-1:0] rnd();
    logic [LEN-1:0] v;
    for (int i = 0; i < LEN; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("serial_adder failure: %s x=%h y=%h sum=%h", what, x, y, sum);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      x = rnd(); y = rnd();
      if (i == 0) begin x = '1; y = one(); end
      if (i == 1) begin x = '0; y = '0; end
      ref_sum = {1'b0, x} + {1'b0, y};
      start = 1;
      cyc = 0;
      @(negedge clk);
      start = 0;
      x = rnd(); y = rnd();        // operands are only read in the start cycle
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      check(sum == ref_sum[LEN-1:0], "sum");
      check(cyc == LEN, "latency");
      if (i % 2 == 1) @(negedge clk);  // alternate back-to-back and idle gaps
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [LEN-1:0] one();
    return LEN'(1);
  endfunction
endmodule

// tb_csa: self-checking test of the 3:2 carry-save adder.
// Drives random and corner-case vectors (all ones, single bits) into a
// 67-bit instance and checks that sum + carry equals x + y + z modulo 2^W,
// that carry bit 0 is 0 and that sum is the bitwise XOR of the inputs.
module tb_csa;
  localparam int unsigned W = 67;

  logic [W-1:0] x, y, z, s, c;
  logic [W+1:0] ref_sum;
  int checks = 0, failures = 0;

  csa #(.W(W)) dut (.x(x), .y(y), .z(z), .sum(s), .carry(c));

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  task automatic check_one(input logic [W-1:0] a, b, d);
    x = a; y = b; z = d;
    #1;
    ref_sum = {2'b0, a} + {2'b0, b} + {2'b0, d};
    checks++;
    if (W'(s + c) !== ref_sum[W-1:0] || c[0] !== 1'b0 || s !== (a ^ b ^ d)) begin
      failures++;
      $display("csa mismatch: x=%h y=%h z=%h s=%h c=%h", a, b, d, s, c);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0, '0, '0);
    check_one('1, '1, '1);
    check_one('1, '0, W'(1));
    for (int i = 0; i < W; i++) check_one(W'(1) << i, W'(1) << i, W'(1) << i);
    for (int i = 0; i < 2000; i++) check_one(rnd(), rnd(), rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

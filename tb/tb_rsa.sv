// tb_rsa: end-to-end self-checking test of the RSA processing unit.
// NB = EB = 32. Each run draws an odd modulus N, a message M < N and an
// exponent E, computes the Montgomery constant 2^(2*(NB+2)) mod N and the
// expected M^E mod N by plain square-and-multiply on wide integers, and
// compares them with the unit's result. It also checks the latency against
// (NM+1)*(NB+2)+2 cycles, NM being the number of Montgomery multiplications
// the exponent calls for, and counts how often each step of the algorithm
// ran: preprocessing, squaring, multiplication, a 0 exponent bit (squaring
// with no multiplication), postprocessing, final addition, a one-bit
// exponent (no loop at all), and a sum equal to N folded to 0. Exponents
// include 1, 3, 2^16+1, full-length random ones and all ones; moduli include
// ones with a square factor so that M^E mod N = 0 happens.
module tb_rsa
  import rsa_pkg::*;
;
  localparam int unsigned NB = 32;
  localparam int unsigned EB = NB;
  localparam int unsigned WW = 2 * NB + 8;

  logic clk = 0, rst = 0, start = 0;
  logic [NB-1:0] msg, modulus, r2c, result;
  logic [EB-1:0] exponent;
  logic busy, done;
  int checks = 0, failures = 0;
  int n_pre = 0, n_sqr = 0, n_mul = 0, n_zero = 0, n_post = 0, n_add = 0, n_k1 = 0, n_fold = 0;

  rsa #(.NB(NB), .EB(EB)) dut (.clk(clk), .rst(rst), .start(start), .msg(msg),
                               .exponent(exponent), .modulus(modulus), .r2_const(r2c),
                               .busy(busy), .done(done), .result(result));

  always #5 clk = ~clk;

  // mechanism counters, from the controller's launch decisions
  always @(posedge clk) begin
    if (dut.mm_start) begin
      case (dut.nxt_op)
        OP_PRE:  n_pre++;
        OP_SQR:  n_sqr++;
        OP_MUL:  n_mul++;
        OP_POST: n_post++;
        default: ;
      endcase
      if (dut.op_q == OP_SQR && dut.nxt_op != OP_MUL) n_zero++;
      if (dut.op_q == OP_PRE && dut.nxt_op == OP_POST) n_k1++;
    end
    if (dut.add_start) n_add++;
    if (dut.add_done && dut.add_sum == {2'b00, dut.n_q}) n_fold++;
  end

  function automatic logic [NB-1:0] modexp(input logic [NB-1:0] m, input logic [EB-1:0] e,
                                           input logic [NB-1:0] n);
    logic [WW-1:0] r, b, nn;
    nn = WW'(n);
    r  = WW'(1) % nn;
    b  = WW'(m) % nn;
    for (int i = 0; i < int'(EB); i++) begin
      if (e[i]) r = (r * b) % nn;
      b = (b * b) % nn;
    end
    return NB'(r);
  endfunction

  function automatic int num_mults(input logic [EB-1:0] e);
    int k = 0, ones = 0;
    for (int i = 0; i < int'(EB); i++) if (e[i]) k = i + 1;
    for (int i = 0; i < k - 1; i++) if (e[i]) ones++;
    return 2 + (k - 1) + ones;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("rsa failure: %s M=%h E=%h N=%h result=%h", what, msg, exponent, modulus, result);
    end
  endtask

  task automatic run_one(input logic [NB-1:0] m, input logic [EB-1:0] e, input logic [NB-1:0] n);
    logic [WW-1:0] c;
    logic [NB-1:0] expect_r;
    int cyc, lat;
    c = (WW'(1) << (2 * (NB + 2))) % WW'(n);
    msg = m; exponent = e; modulus = n; r2c = NB'(c);
    expect_r = modexp(m, e, n);
    lat = (num_mults(e) + 1) * (NB + 2) + 2;
    start = 1;
    @(negedge clk);
    start = 0;
    msg = ~m; exponent = ~e; modulus = ~n;   // inputs are captured at start
    cyc = 1;
    while (!done && cyc < 100000) begin
      @(negedge clk);
      cyc++;
    end
    msg = m; exponent = e; modulus = n;
    check(result == expect_r, "result");
    check(cyc == lat, $sformatf("latency %0d, expected %0d", cyc, lat));
  endtask

  function automatic logic [NB-1:0] rnd_odd(input int t);
    logic [NB-1:0] v;
    v = NB'({$urandom, $urandom}) | NB'(1);
    if (t % 2 == 0) v[NB-1] = 1'b1;
    return v;
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NB-1:0] n, m;
    logic [EB-1:0] e;
    #1 rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int t = 0; t < 200; t++) begin
      n = rnd_odd(t);
      if (n < 3) n = 3;
      m = NB'({$urandom, $urandom}) % n;
      case (t % 6)
        0: e = 1;
        1: e = 3;
        2: e = 65537;
        3: e = '1;
        default: e = EB'({$urandom, $urandom}) | EB'(1);
      endcase
      if (t == 7) m = 0;
      if (t == 8) m = n - 1;
      run_one(m, e, n);
      if (t % 3 == 0) repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    // moduli p^2*q with M a multiple of p*q: M^E mod N = 0 for E >= 2
    for (int t = 0; t < 40; t++) begin
      int p, q;
      p = (t % 2 == 0) ? 3 : 5;
      q = 7 + 2 * (t % 5);
      n = NB'(p * p * q);
      m = NB'(p * q);
      e = EB'(2 + t);
      run_one(m, e, n);
    end
    $display("steps: pre=%0d sqr=%0d mul=%0d zero_bit=%0d post=%0d add=%0d one_bit_exp=%0d fold=%0d",
             n_pre, n_sqr, n_mul, n_zero, n_post, n_add, n_k1, n_fold);
    checks++;
    if (n_pre == 0 || n_sqr == 0 || n_mul == 0 || n_zero == 0 || n_post == 0 || n_add == 0 ||
        n_k1 == 0 || n_fold == 0) begin
      failures++;
      $display("rsa failure: a step of the algorithm never ran");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

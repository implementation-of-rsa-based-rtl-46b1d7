// tb_rsa_512: the RSA unit built for a 512-bit key (512-bit modulus, 512-bit
// exponent register), the smaller of the two key sizes, run end to end.
// Two operations on one random 512-bit odd modulus: an encryption with the
// 17-bit public exponent 2^16+1 and a decryption-sized operation with a random
// full-length 512-bit exponent. Each result is compared with M^E mod N from
// plain square-and-multiply on wide integers, and each latency with
// (NM+1)*(n+2)+2 cycles, NM being the number of Montgomery multiplications.
// The cycle counts are printed next to the average-case estimate
// 1.5*(k+1)*(n+2) for a k-bit exponent.
module tb_rsa_512;
  localparam int unsigned NB = 512;
  localparam int unsigned EB = 512;
  localparam int unsigned WW = 2 * NB + 8;

  logic clk = 0, rst = 0, start = 0;
  logic [NB-1:0] msg, modulus, r2c, result;
  logic [EB-1:0] exponent;
  logic busy, done;
  int checks = 0, failures = 0;

  rsa #(.NB(NB), .EB(EB)) dut (.clk(clk), .rst(rst), .start(start), .msg(msg), .exponent(exponent),
           .modulus(modulus), .r2_const(r2c), .busy(busy), .done(done), .result(result));

  always #5 clk = ~clk;

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

  function automatic int exp_len(input logic [EB-1:0] e);
    int k = 0;
    for (int i = 0; i < int'(EB); i++) if (e[i]) k = i + 1;
    return k;
  endfunction

  function automatic int num_mults(input logic [EB-1:0] e);
    int k, ones = 0;
    k = exp_len(e);
    for (int i = 0; i < k - 1; i++) if (e[i]) ones++;
    return 2 + (k - 1) + ones;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("rsa failure: %s", what);
    end
  endtask

  task automatic run_one(input string name, input logic [NB-1:0] m, input logic [EB-1:0] e,
                         input logic [NB-1:0] n);
    logic [WW-1:0] c;
    logic [NB-1:0] expect_r;
    int cyc, lat, k;
    c = (WW'(1) << (2 * (NB + 2))) % WW'(n);
    msg = m; exponent = e; modulus = n; r2c = NB'(c);
    expect_r = modexp(m, e, n);
    lat = (num_mults(e) + 1) * (NB + 2) + 2;
    k = exp_len(e);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 4000000) begin
      @(negedge clk);
      cyc++;
    end
    check(result == expect_r, {name, ": result"});
    check(cyc == lat, $sformatf("%s: latency %0d, expected %0d", name, cyc, lat));
    $display("%s: n=%0d k=%0d multiplications=%0d cycles=%0d (1.5(k+1)(n+2) = %0d)",
             name, NB, k, num_mults(e), cyc, (3 * (k + 1) * (NB + 2)) / 2);
  endtask

  function automatic logic [NB-1:0] rnd_vec();
    logic [NB-1:0] v;
    for (int i = 0; i < int'(NB); i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NB-1:0] n, m;
    logic [EB-1:0] d;
    #1 rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    n = rnd_vec();
    n[0] = 1'b1;
    n[NB-1] = 1'b1;
    m = rnd_vec() % n;
    d = EB'(rnd_vec());
    d[EB-1] = 1'b1;
    run_one("encrypt", m, EB'(65537), n);
    run_one("decrypt", m, d, n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

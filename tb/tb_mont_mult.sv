// tb_mont_mult: self-checking test of the carry-save Montgomery multiplier.
// NB = 32 (L = 34 steps). For random odd moduli N < 2^NB (top bit set or
// not) it draws A, B < 2N, splits each randomly into two carry-save halves,
// and checks that the result R = r0 + r1 satisfies R * 2^L == A * B (mod N)
// and R < 2N, that done comes exactly L cycles after the start cycle, and
// that results chain: half of the runs feed the previous result back as the
// next operand, with start given in the done cycle. Corner cases: A or B zero,
// A = B = 2N-1, N = 1 and N = 2^NB - 1.
module tb_mont_mult;
  localparam int unsigned NB = 32;
  localparam int unsigned W  = NB + 3;
  localparam int unsigned L  = NB + 2;
  localparam int unsigned PW = 2 * W + L;

  logic clk = 0, rst = 0, start = 0;
  logic [W-1:0]  a0, a1, b0, b1, r0, r1;
  logic [NB-1:0] n;
  logic busy, done;
  int checks = 0, failures = 0, cyc;

  mont_mult #(.NB(NB)) dut (.clk(clk), .rst(rst), .start(start), .a0(a0), .a1(a1),
                            .b0(b0), .b1(b1), .n(n), .busy(busy), .done(done),
                            .r0(r0), .r1(r1));

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd_below(input logic [W:0] lim);
    logic [63:0] v;
    v = {$urandom, $urandom};
    return W'(v % 64'(lim));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("mont_mult failure: %s n=%h a=%h+%h b=%h+%h r=%h+%h", what, n, a0, a1, b0, b1, r0, r1);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PW-1:0] pa, pb, pr, pn;
  logic [W:0]    a_val, b_val, lim;
  bit            chain;

  initial begin
    #1 rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chain = 0;
    for (int t = 0; t < 600; t++) begin
      if (!chain) begin
        n = {$urandom} | 32'h1;
        if (t % 3 == 0) n[NB-1] = 1'b1;
        if (t == 1) n = 1;
        if (t == 2) n = '1;
      end
      lim = 2 * (W + 1)'(n);
      if (chain) begin
        a0 = r0; a1 = r1;          // previous result, carry-save, fed back
      end else begin
        a_val = (W + 1)'(rnd_below(lim));
        if (t == 3) a_val = '0;
        if (t == 4) a_val = lim - 1;
        a0 = rnd_below(a_val + 1); a1 = W'(a_val) - a0;
      end
      b_val = (W + 1)'(rnd_below(lim));
      if (t == 5) b_val = '0;
      if (t == 4) b_val = lim - 1;
      b0 = rnd_below(b_val + 1); b1 = W'(b_val) - b0;
      pa = PW'(a0) + PW'(a1);
      pb = PW'(b0) + PW'(b1);
      pn = PW'(n);
      start = 1;
      @(negedge clk);
      start = 0;
      a0 = ~a0; a1 = ~a1;            // A is only read in the start cycle
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      pr = PW'(r0) + PW'(r1);
      check(((pr << L) % pn) == ((pa * pb) % pn), "congruence");
      check(pr < 2 * pn, "range below 2N");
      check(cyc == L, "latency of NB+2 cycles");
      chain = (t % 2 == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

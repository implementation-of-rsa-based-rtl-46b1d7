// mont_mult: carry-save Montgomery modular multiplier (4-2 CSA based).
//
// Computes R0 + R1 == (A0 + A1) * (B0 + B1) * 2^-L  (mod N),  L = NB + 2,
// with both operands and the result in carry-save form, so a result can be fed
// straight back as an operand and no carry-propagate addition is needed
// between multiplications. If A0+A1 < 2N, B0+B1 < 2N and N < 2^NB is odd, the
// result is < 2N again, which is what makes the feedback safe.
//
// Each clock performs one radix-2 step, in three parts that all settle in the
// same cycle:
//   P0  a one-bit serial adder turns the carry-save multiplier A0+A1 into its
//       binary bit a_i (carry kept in a flip-flop);
//   P1  a registered 4-2 CSA accumulates a_i*(B0+B1) into the running product;
//       the bit that drops off its low end, T, is a bit of the low half of A*B;
//   P2  a second registered 4-2 CSA accumulates the Montgomery sum
//       P = (P + q*N + T) / 2 with q = parity(P + T), which makes P + q*N + T
//       even so the halving is exact in carry-save form.
// Both accumulators are stored unshifted, as the published 4-2 CSA
// stores them; the division by two is the wiring >>1 on the way back in.
// This three-part split, the 4-2 CSAs and the carry-save operands and result
// follow the published design. This design's own choices: L = NB+2 steps instead of NB
// (the published Montgomery factor is 2^-n), because only with 2^L >= 4N is a
// carry-save result < 2N guaranteed without a final subtraction; and the last
// of the L steps is merged with the closing 4-2 CSA that adds the two
// accumulators: since bit L-1 of A is 0 that step only has to add q*N to
// the four vectors and halve, done by a 4-2 CSA plus one 3:2 CSA. The constant
// to enter the Montgomery domain is therefore 2^(2L) mod N.
//
// Interface and timing: pulse start for one cycle with a0/a1/b0/b1/n valid.
// a0/a1 are read only in that cycle; b0/b1 and n must stay unchanged for the
// whole operation. The operation occupies exactly L = NB+2 cycles, the start
// cycle included; done pulses in the cycle after, when r0/r1 already hold the
// result, and they keep it until the next operation ends. start may be given
// again in the done cycle, so operations run back to back every L cycles.
// rst is asynchronous and active high.
module mont_mult #(
  parameter int unsigned NB = 1024,          // modulus length n in bits
  localparam int unsigned W  = NB + 3,       // carry-save vector width
  localparam int unsigned L  = NB + 2,       // radix-2 steps per multiplication
  localparam int unsigned CW = $clog2(L + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [W-1:0]  a0,
  input  logic [W-1:0]  a1,
  input  logic [W-1:0]  b0,
  input  logic [W-1:0]  b1,
  input  logic [NB-1:0] n,
  output logic          busy,
  output logic          done,
  output logic [W-1:0]  r0,
  output logic [W-1:0]  r1
);

  logic [CW-1:0] cnt;
  logic          last, step;
  logic [W-1:0]  a0s, a1s;       // multiplier shift registers (P0)
  logic          ac;             // P0 carry
  logic          abit0, abit1, acin, a_i, ac_n;

  logic [W-1:0]  nw;
  logic [W-1:0]  s0, c0, s1, c1; // accumulator registers, unshifted
  logic [W-1:0]  x1, x2, x3, x4; // P1 inputs
  logic [W-1:0]  y1, y2, y3, y4; // P2 inputs
  logic          t, q;

  logic [W-1:0]  u_s, u_c, v_s, v_c, f_s, f_c, fq;
  logic          qf;

  assign nw   = W'(n);
  assign last = busy && (cnt == CW'(L - 1));
  assign step = start || (busy && !last);

  // ---------------- P0: serial conversion of A to binary ----------------
  always_comb begin
    abit0 = start ? a0[0] : a0s[0];
    abit1 = start ? a1[0] : a1s[0];
    acin  = start ? 1'b0  : ac;
  end

  full_adder u_p0 (.a(abit0), .b(abit1), .ci(acin), .s(a_i), .co(ac_n));

  // ---------------- P1: product accumulation ----------------
  always_comb begin
    x1 = s0 >> 1;
    x2 = c0 >> 1;
    x3 = a_i ? b0 : '0;
    x4 = a_i ? b1 : '0;
    // bit 0 of the 4-input sum has no incoming carry
    t  = x1[0] ^ x2[0] ^ x3[0] ^ x4[0];
  end

  csa42 #(.W(W)) u_p1 (
    .clk(clk), .rst(rst), .en(step), .clr(last),
    .x1(x1), .x2(x2), .x3(x3), .x4(x4),
    .sum(s0), .carry(c0)
  );

  // ---------------- P2: Montgomery reduction ----------------
  always_comb begin
    y1 = s1 >> 1;
    y2 = c1 >> 1;
    q  = y1[0] ^ y2[0] ^ t;
    y3 = q ? nw : '0;
    y4 = W'(t);
  end

  csa42 #(.W(W)) u_p2 (
    .clk(clk), .rst(rst), .en(step), .clr(last),
    .x1(y1), .x2(y2), .x3(y3), .x4(y4),
    .sum(s1), .carry(c1)
  );

  // ---------------- closing step: merge accumulators ----------------
  // (x1 + x2 + y1 + y2 + qf*N) / 2, kept in carry-save form.
  csa #(.W(W)) u_fa (.x(x1),  .y(x2),  .z(y1), .sum(u_s), .carry(u_c));
  csa #(.W(W)) u_fb (.x(u_s), .y(u_c), .z(y2), .sum(v_s), .carry(v_c));

  assign qf = v_s[0];           // v_c[0] is 0
  assign fq = qf ? nw : '0;

  csa #(.W(W)) u_fc (.x(v_s), .y(v_c), .z(fq), .sum(f_s), .carry(f_c));

  // ---------------- sequencing and result register ----------------
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      a0s  <= '0;
      a1s  <= '0;
      ac   <= 1'b0;
      r0   <= '0;
      r1   <= '0;
    end else begin
      done <= last;
      if (start) begin
        busy <= 1'b1;
        cnt  <= CW'(1);
        a0s  <= a0 >> 1;
        a1s  <= a1 >> 1;
        ac   <= ac_n;
      end else if (last) begin
        busy <= 1'b0;
        cnt  <= '0;
        ac   <= 1'b0;
        r0   <= f_s >> 1;       // f_s[0] == 0 and f_c[0] == 0: exact halving
        r1   <= f_c >> 1;
      end else if (busy) begin
        cnt  <= cnt + 1'b1;
        a0s  <= a0s >> 1;
        a1s  <= a1s >> 1;
        ac   <= ac_n;
      end
    end
  end

  // ---------------- rules of use ----------------
  logic [W:0] a_sum, b_sum;
  assign a_sum = {1'b0, a0} + {1'b0, a1};
  assign b_sum = {1'b0, b0} + {1'b0, b1};

  a_start_idle : assert property (@(posedge clk) disable iff (rst) start |-> !busy)
    else $error("mont_mult: start while busy");
  a_n_odd : assert property (@(posedge clk) disable iff (rst) start |-> n[0])
    else $error("mont_mult: modulus must be odd");
  a_a_range : assert property (@(posedge clk) disable iff (rst) start |-> (a_sum >> (NB + 1)) == '0)
    else $error("mont_mult: A0+A1 >= 2^(NB+1)");
  a_b_range : assert property (@(posedge clk) disable iff (rst) start |-> (b_sum >> (NB + 1)) == '0)
    else $error("mont_mult: B0+B1 >= 2^(NB+1)");
  a_even : assert property (@(posedge clk) disable iff (rst) last |-> (f_s[0] == 1'b0 && f_c[0] == 1'b0))
    else $error("mont_mult: odd closing sum");

endmodule

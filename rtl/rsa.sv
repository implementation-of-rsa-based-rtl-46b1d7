// rsa: RSA processing unit, result = M^E mod N.
//
// Left-to-right square-and-multiply exponentiation in the Montgomery domain,
// run on one carry-save Montgomery multiplier (mont_mult) and finished by one
// bit-serial adder (serial_adder):
//   M'  = MM(M, C)                 preprocessing, C = 2^(2L) mod N, L = NB+2
//   R   = M'
//   for each exponent bit e_i below the leading 1, from the top:
//     R = MM(R, R);  if e_i: R = MM(R, M')
//   R'  = MM(R, 1)                 postprocessing, leaves the domain
//   result = R'1 + R'2             final bit-serial addition
// Every intermediate value, M' and R included, stays in carry-save form (two
// vectors); only the last step produces a binary number. This sequence and its
// cycle budget (n+2 cycles for every multiplication and for the final
// addition) follow the published design. This design's own choices: the Montgomery
// factor 2^-(NB+2) and hence the constant C = 2^(2*(NB+2)) mod N, which the
// user supplies; the leading 1 of E is found by a priority encoder when the
// operation starts, so E may have any length up to EB bits; and a result
// equal to N (possible only when M^E mod N is 0) is returned as 0.
//
// Interface and timing: with busy low, pulse start for one cycle with msg,
// exponent, modulus and r2_const valid; they are captured then. Requirements:
// modulus odd, msg < modulus, r2_const = 2^(2*(NB+2)) mod modulus, exponent
// nonzero. done pulses for one cycle (NM+1)*(NB+2)+2 cycles after the start
// cycle, where NM = 2 + (k-1) + (number of 1s below the leading 1 of E) is the
// number of multiplications and k the length of E; result holds the value
// from then until the next operation ends. busy is high from the cycle after
// start until done. rst is asynchronous, active high.
module rsa
  import rsa_pkg::*;
#(
  parameter int unsigned NB = 1024,          // modulus (key) length n
  parameter int unsigned EB = NB,            // exponent register length
  localparam int unsigned W  = NB + 3,
  localparam int unsigned IW = $clog2(EB) > 0 ? $clog2(EB) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [NB-1:0] msg,
  input  logic [EB-1:0] exponent,
  input  logic [NB-1:0] modulus,
  input  logic [NB-1:0] r2_const,
  output logic          busy,
  output logic          done,
  output logic [NB-1:0] result
);

  // index of the most significant 1 (0 if none)
  function automatic logic [IW-1:0] lead_one(input logic [EB-1:0] e);
    lead_one = '0;
    for (int i = 0; i < int'(EB); i++)
      if (e[i]) lead_one = IW'(i);
  endfunction

  op_e           op_q, nxt_op;
  logic          launch_q, launch;
  logic [IW-1:0] idx_q, nxt_idx, lead_q;
  logic [NB-1:0] m_q, n_q, c_q;
  logic [EB-1:0] e_q;
  logic [W-1:0]  mp0, mp1;               // M' in carry-save form

  logic          mm_start, mm_busy, mm_done;
  logic [W-1:0]  a0, a1, b0, b1, r0, r1;
  logic          add_start, add_busy, add_done;
  logic [NB+1:0] add_sum;
  logic          accept;

  assign accept = start && op_q == OP_IDLE;

  // ---------------- next step of the exponentiation ----------------
  always_comb begin
    nxt_op  = op_q;
    nxt_idx = idx_q;
    launch  = launch_q;
    if (mm_done) begin
      launch = 1'b1;
      unique case (op_q)
        OP_PRE: begin
          if (lead_q == '0) nxt_op = OP_POST;
          else begin
            nxt_op  = OP_SQR;
            nxt_idx = lead_q - 1'b1;
          end
        end
        OP_SQR, OP_MUL: begin
          if (op_q == OP_SQR && e_q[idx_q]) nxt_op = OP_MUL;
          else if (idx_q == '0)             nxt_op = OP_POST;
          else begin
            nxt_op  = OP_SQR;
            nxt_idx = idx_q - 1'b1;
          end
        end
        OP_POST: nxt_op = OP_ADD;
        default: launch = 1'b0;
      endcase
    end else if (add_done) begin
      nxt_op = OP_IDLE;
    end
  end

  assign mm_start  = launch && (nxt_op inside {OP_PRE, OP_SQR, OP_MUL, OP_POST});
  assign add_start = launch && (nxt_op == OP_ADD);

  // ---------------- operand selection ----------------
  always_comb begin
    a0 = r0;
    a1 = r1;
    b0 = r0;
    b1 = r1;
    unique case (nxt_op)
      OP_PRE: begin
        a0 = W'(m_q);
        a1 = '0;
        b0 = W'(c_q);
        b1 = '0;
      end
      OP_MUL: begin
        b0 = mp0;
        b1 = mp1;
      end
      OP_POST: begin
        b0 = W'(1);
        b1 = '0;
      end
      default: ;
    endcase
  end

  mont_mult #(.NB(NB)) u_mm (
    .clk(clk), .rst(rst), .start(mm_start),
    .a0(a0), .a1(a1), .b0(b0), .b1(b1), .n(n_q),
    .busy(mm_busy), .done(mm_done), .r0(r0), .r1(r1)
  );

  serial_adder #(.LEN(NB + 2)) u_add (
    .clk(clk), .rst(rst), .start(add_start),
    .x(r0[NB+1:0]), .y(r1[NB+1:0]),
    .busy(add_busy), .done(add_done), .sum(add_sum)
  );

  // ---------------- registers ----------------
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      op_q     <= OP_IDLE;
      launch_q <= 1'b0;
      idx_q    <= '0;
      lead_q   <= '0;
      m_q      <= '0;
      n_q      <= '0;
      c_q      <= '0;
      e_q      <= '0;
      mp0      <= '0;
      mp1      <= '0;
      done     <= 1'b0;
      result   <= '0;
    end else begin
      done     <= 1'b0;
      launch_q <= 1'b0;
      op_q     <= nxt_op;
      idx_q    <= nxt_idx;
      if (accept) begin
        op_q     <= OP_PRE;
        launch_q <= 1'b1;
        m_q      <= msg;
        n_q      <= modulus;
        c_q      <= r2_const;
        e_q      <= exponent;
        lead_q   <= lead_one(exponent);
      end
      if (mm_done && op_q == OP_PRE) begin
        mp0 <= r0;
        mp1 <= r1;
      end
      if (add_done) begin
        done   <= 1'b1;
        result <= (add_sum == {2'b00, n_q}) ? '0 : add_sum[NB-1:0];
      end
    end
  end

  assign busy = (op_q != OP_IDLE);

  a_n_odd : assert property (@(posedge clk) disable iff (rst) accept |-> modulus[0])
    else $error("rsa: modulus must be odd");
  a_m_range : assert property (@(posedge clk) disable iff (rst) accept |-> msg < modulus)
    else $error("rsa: message must be below the modulus");
  a_e_nonzero : assert property (@(posedge clk) disable iff (rst) accept |-> exponent != '0)
    else $error("rsa: exponent must be nonzero");
  a_one_unit : assert property (@(posedge clk) disable iff (rst) !(mm_busy && add_busy))
    else $error("rsa: multiplier and adder active together");
  a_result_range : assert property (@(posedge clk) disable iff (rst) add_done |-> add_sum <= {2'b00, n_q})
    else $error("rsa: result above the modulus");

endmodule

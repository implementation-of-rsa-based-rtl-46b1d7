// csa42: registered 4-2 carry-save adder.
//
// Two 3:2 carry-save adders in series reduce x1..x4 to a sum and a carry
// vector (first x1+x2+x3, then that pair plus x4); both are stored in a
// register, so the carry-save sum of the four inputs appears on sum/carry one
// clock edge after it is presented. The two-CSA structure, the register and
// its clock and reset follow the published design.
// en (load) and clr (synchronous clear, wins over en) are this design's
// additions so that the Montgomery multiplier can hold and restart its
// accumulators; rst is an asynchronous, active-high clear.
//
// Timing: sum/carry <= carry-save(x1+x2+x3+x4) on a rising clk edge with en=1.
module csa42 #(
  parameter int unsigned W = 1027
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         clr,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  input  logic [W-1:0] x4,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] s_a, c_a, sum_d, carry_d;

  csa #(.W(W)) u_csa_a (.x(x1),  .y(x2),  .z(x3), .sum(s_a),   .carry(c_a));
  csa #(.W(W)) u_csa_b (.x(s_a), .y(c_a), .z(x4), .sum(sum_d), .carry(carry_d));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sum   <= '0;
      carry <= '0;
    end else if (clr) begin
      sum   <= '0;
      carry <= '0;
    end else if (en) begin
      sum   <= sum_d;
      carry <= carry_d;
    end
  end

endmodule

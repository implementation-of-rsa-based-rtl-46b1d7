// serial_adder: bit-serial adder for the final carry-save to binary step.
//
// sum = x + y (mod 2^LEN), computed one bit per clock with a single full
// adder and a carry flip-flop, least significant bit first. The operands are
// read in full only in the start cycle, which already adds bit 0; shift
// registers supply the remaining bits and the result is shifted in from the
// top, so after LEN cycles bit 0 of the sum sits in sum[0]. This is how the
// design spends the published n+2-cycle budget on the final addition of the two
// carry-save halves (LEN = n+2); the published design gives only the step and its
// cycle count, the serial structure is this design's choice.
//
// Interface and timing: pulse start with x/y valid; the operation takes
// exactly LEN cycles including the start cycle; done pulses in the cycle
// after, with sum valid; sum holds until the next start. rst is asynchronous,
// active high. The carry out of the top bit is dropped.
module serial_adder #(
  parameter int unsigned LEN = 1026,
  localparam int unsigned CW = $clog2(LEN + 1)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [LEN-1:0] x,
  input  logic [LEN-1:0] y,
  output logic           busy,
  output logic           done,
  output logic [LEN-1:0] sum
);

  logic [LEN-1:0] xs, ys;
  logic [CW-1:0]  cnt;
  logic           cy, xb, yb, cin, sb, cout, last, step;

  assign last = (start && LEN == 1) || (busy && cnt == CW'(LEN - 1));
  assign step = start || busy;

  always_comb begin
    xb  = start ? x[0] : xs[0];
    yb  = start ? y[0] : ys[0];
    cin = start ? 1'b0 : cy;
  end

  full_adder u_fa (.a(xb), .b(yb), .ci(cin), .s(sb), .co(cout));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      xs   <= '0;
      ys   <= '0;
      cy   <= 1'b0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      sum  <= '0;
    end else begin
      done <= step && last;
      if (step) begin
        sum <= {sb, sum[LEN-1:1]};
        cy  <= cout;
        xs  <= (start ? x : xs) >> 1;
        ys  <= (start ? y : ys) >> 1;
      end
      if (step && last) begin
        busy <= 1'b0;
        cnt  <= '0;
      end else if (start) begin
        busy <= 1'b1;
        cnt  <= CW'(1);
      end else if (busy) begin
        cnt  <= cnt + 1'b1;
      end
    end
  end

  a_start_idle : assert property (@(posedge clk) disable iff (rst) start |-> !busy)
    else $error("serial_adder: start while busy");

endmodule

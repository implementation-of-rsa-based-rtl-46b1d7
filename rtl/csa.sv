// csa: 3:2 carry-save adder.
//
// Reduces three W-bit vectors x, y, z to two vectors, sum and carry, with
// sum + carry == x + y + z (mod 2^W). Every bit position is one full adder:
// its sum bit goes to sum[i] and its carry bit goes to carry[i+1], so no carry
// ripples from one position to the next and the delay is one full adder
// whatever W is. carry[0] is always 0, and the carry out of the top position
// is dropped (the sum is taken modulo 2^W), so the top majority bit is unused.
// One full adder per bit is the published structure of the carry-save adder;
// writing the W full adders as bitwise vector equations is this design's
// choice. Purely combinational.
module csa #(
  parameter int unsigned W = 1027
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] maj;

  always_comb begin
    sum   = x ^ y ^ z;
    maj   = (x & y) | (x & z) | (y & z);
    carry = {maj[W-2:0], 1'b0};
  end

endmodule

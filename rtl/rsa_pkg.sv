// Shared types of the RSA processing unit.
//
// op_e names the step of the square-and-multiply exponentiation that the
// controller in rsa.sv is running: the preprocessing multiplication that maps
// the message into the Montgomery domain, one squaring per exponent bit, one
// multiplication for every exponent bit that is 1, the postprocessing
// multiplication by 1 that leaves the Montgomery domain, and the final
// bit-serial addition that turns the carry-save result into a binary number.
// The step names follow the published description of the algorithm; the
// encoding is this design's own.
package rsa_pkg;

  typedef enum logic [2:0] {
    OP_IDLE = 3'd0,  // waiting for start
    OP_PRE  = 3'd1,  // M' = MM(M, C)
    OP_SQR  = 3'd2,  // R  = MM(R, R)
    OP_MUL  = 3'd3,  // R  = MM(R, M')
    OP_POST = 3'd4,  // R' = MM(R, 1)
    OP_ADD  = 3'd5   // result = R1' + R2', bit-serial
  } op_e;

endpackage

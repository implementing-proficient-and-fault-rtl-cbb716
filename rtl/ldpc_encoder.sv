// ldpc_encoder: systematic encoder of the (15,7) EG-LDPC code.
//
// The seven information bits i0..i6 are copied unchanged to c0..c6. Each parity
// bit c7..c14 is the XOR of the information bits that have a one in the
// matching column of X, where G = [I : X] is the systematic generator matrix
// (ldpc_pkg::G_SYS). For this code X holds 30 ones, so built from two-input
// gates the encoder needs 30 - 8 = 22 XOR gates, as in the reference design.
// Purely combinational: cw follows info in the same cycle.
module ldpc_encoder
  import ldpc_pkg::*;
(
  input  info_t info,   // information vector, bit r = i_r
  output cw_t   cw      // code-word, bit j = c_j
);

  always_comb begin
    cw[K-1:0] = info;
    for (int j = 0; j < P; j++) cw[K + j] = ^(info & x_col(j));
  end

endmodule

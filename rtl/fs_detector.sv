// fs_detector: fault-secure detector for the (15,7) EG-LDPC code.
//
// Computes the syndrome S = c * H^T: syndrome bit r is the 4-input XOR of the
// code bits where row r of the circulant parity-check matrix has a one
// (columns r, r+1, r+3, r+7 mod 15). The error flag is the 15-input OR of the
// syndrome bits, so it is raised for any word that is not a code-word. Because
// every word of weight below 5 that is not zero leaves a nonzero syndrome, any
// combination of up to four bit errors in the checked word is detected.
// Purely combinational; the modules that use it place the pipeline registers.
module fs_detector
  import ldpc_pkg::*;
(
  input  cw_t  cw,        // word to check
  output cw_t  syndrome,  // bit r = parity-check sum of row r of H
  output logic err        // 1 when any syndrome bit is 1
);

  always_comb begin
    for (int r = 0; r < N; r++) syndrome[r] = ^(cw & h_row(r));
    err = |syndrome;
  end

endmodule

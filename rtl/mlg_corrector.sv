// mlg_corrector: parallel, pipelined one-step majority-logic corrector for the
// (15,7) EG-LDPC code.
//
// For every code bit j the corrector forms the J = 4 parity-check sums that
// are orthogonal on j (the rows of H that contain j; no other bit appears in
// more than one of them) and inverts c_j when at least 3 of the 4 sums are 1.
// With up to two erroneous bits, an erroneous bit sees at least 3 failing sums
// and a correct bit at most 2, so every pattern of one or two errors is fixed
// in a single pass without iteration. Each bit has its own copy of the logic
// (its own four sums and its own majority gate), the parallel form of the
// one-bit serial corrector, so a fault in one bit's logic can corrupt only
// that bit.
//
// Timing: two register stages, one word accepted and one delivered every
// cycle, no back-pressure. Stage 1 registers the 60 check sums with the word,
// stage 2 registers the corrected word. in_tag travels with the word.
// fault_mask models a transient upset in the corrector: it is XORed into the
// corrected word that the stage-2 register captures at the next clock edge
// (the word then in stage 1); tie it to zero in normal use. The two-stage split is a choice of this design.
module mlg_corrector
  import ldpc_pkg::*;
#(
  parameter int TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  cw_t              in_cw,
  input  logic [TAG_W-1:0] in_tag,
  input  cw_t              fault_mask,
  output logic             out_valid,
  output cw_t              out_cw,      // corrected word
  output logic             out_fixed,   // 1 when at least one bit was inverted
  output logic [TAG_W-1:0] out_tag
);

  // Stage 1: orthogonal check sums, sums[j][t] = row orth_row(j,t) . cw
  logic [N-1:0][J-1:0] sums_d, sums_q;
  cw_t                 cw1_q;
  logic                v1_q;
  logic [TAG_W-1:0]    tag1_q;

  always_comb begin
    for (int j = 0; j < N; j++)
      for (int t = 0; t < J; t++)
        sums_d[j][t] = ^(in_cw & h_row(orth_row(j, t)));
  end

  // Stage 2: majority of the four sums decides whether bit j is inverted
  cw_t flip;
  always_comb begin
    for (int j = 0; j < N; j++)
      flip[j] = $countones(sums_q[j]) > J / 2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1_q      <= in_valid;
      out_valid <= v1_q;
    end
  end

  always_ff @(posedge clk) begin
    sums_q    <= sums_d;
    cw1_q     <= in_cw;
    tag1_q    <= in_tag;
    out_cw    <= cw1_q ^ flip ^ fault_mask;
    out_fixed <= |flip;
    out_tag   <= tag1_q;
  end

endmodule

// fs_decoder: read path of the fault-secure memory system.
//
// Every word retrieved from memory goes first through the parallel one-step
// majority-logic corrector and then through a fault-secure detector. A stored
// word with up to two flipped bits leaves the corrector as a valid code-word,
// so the detector after it stays silent; it raises out_err only when the
// corrector or the detector itself suffered a transient fault, or when the
// stored word held more errors than the code can correct. The caller decides
// what to do with a flagged word (the system replays the read).
//
// Timing: fully pipelined, one word in and one out per cycle, latency 3 cycles
// (two corrector stages and one detector stage). in_tag travels with the word.
// cor_fault_mask is passed to the corrector to model an upset there; tie it to
// zero in normal use. The pipeline register after the detector is a choice of
// this design.
module fs_decoder
  import ldpc_pkg::*;
#(
  parameter int TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  cw_t              in_cw,
  input  logic [TAG_W-1:0] in_tag,
  input  cw_t              cor_fault_mask,
  output logic             out_valid,
  output cw_t              out_cw,     // corrected code-word
  output info_t            out_info,   // information bits c0..c6 of out_cw
  output logic             out_fixed,  // corrector inverted at least one bit
  output logic             out_err,    // detector after the corrector fired
  output logic [TAG_W-1:0] out_tag
);

  logic             c_valid, c_fixed;
  cw_t              c_cw;
  logic [TAG_W-1:0] c_tag;
  logic             det_err;

  mlg_corrector #(.TAG_W(TAG_W)) u_corr (
    .clk, .rst_n,
    .in_valid, .in_cw, .in_tag,
    .fault_mask(cor_fault_mask),
    .out_valid(c_valid), .out_cw(c_cw),
    .out_fixed(c_fixed), .out_tag(c_tag)
  );

  fs_detector u_det (.cw(c_cw), .syndrome(), .err(det_err));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= c_valid;
  end

  always_ff @(posedge clk) begin
    out_cw    <= c_cw;
    out_fixed <= c_fixed;
    out_err   <= det_err;
    out_tag   <= c_tag;
  end

  assign out_info = out_cw[K-1:0];

endmodule

// fs_encoder: fault-secure encoder.
//
// An accepted information vector is encoded by ldpc_encoder and the code-word
// is held in a register. In the next cycle a fault-secure detector checks the
// held word; only a word with a zero syndrome is offered to the memory. When
// the detector fires (a transient fault hit the encoder or its register) the
// encoding is redone from the held information bits and the new word is
// checked again, so a faulty code-word is never written.
//
// Interface: ready/valid on both sides. in_* carries a write request (address
// and information bits); out_* carries the checked code-word and its address
// to the memory write port. fault_mask models a transient fault in the
// encoder: it is XORed into the code-word whenever one is captured (first
// encoding or re-encoding); tie it to zero in normal use. retry pulses for
// one cycle each time an encoding is redone. pending is high while a word is
// held (not yet written), so that the memory side can hold back a read of
// out_addr until the write has landed.
//
// Timing: a word captured at edge t is checked during cycle t+1 and written at
// the end of that cycle if the memory accepts it, so one write every cycle
// is sustained; each redo adds one cycle. The number of redos is not bounded
// (faults are taken as transient). The one-entry register and the handshake
// are choices of this design.
module fs_encoder
  import ldpc_pkg::*;
#(
  parameter int ADDR_W = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [ADDR_W-1:0] in_addr,
  input  info_t             in_info,
  input  cw_t               fault_mask,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [ADDR_W-1:0] out_addr,
  output cw_t               out_cw,
  output logic              pending,    // a word for out_addr is held
  output logic              retry
);

  logic              full_q;
  info_t             info_q;
  logic [ADDR_W-1:0] addr_q;
  cw_t               cw_q;
  cw_t               enc_cw;
  logic              det_err;
  logic              redo;

  fs_detector u_det (.cw(cw_q), .syndrome(), .err(det_err));

  assign redo      = full_q && det_err;
  assign out_valid = full_q && !det_err;
  assign in_ready  = !full_q || (out_valid && out_ready);
  assign out_addr  = addr_q;
  assign out_cw    = cw_q;
  assign retry     = redo;
  assign pending   = full_q;

  // One encoder, fed from the held vector when redoing
  ldpc_encoder u_enc (.info(redo ? info_q : in_info), .cw(enc_cw));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) full_q <= 1'b0;
    else if (redo)                   full_q <= 1'b1;
    else if (in_valid && in_ready)   full_q <= 1'b1;
    else if (out_valid && out_ready) full_q <= 1'b0;
  end

  always_ff @(posedge clk) begin
    if (redo) begin
      cw_q <= enc_cw ^ fault_mask;
    end else if (in_valid && in_ready) begin
      cw_q   <= enc_cw ^ fault_mask;
      info_q <= in_info;
      addr_q <= in_addr;
    end
  end

endmodule

// fs_memory_top: fault-tolerant memory system built on the (15,7) EG-LDPC code.
//
// Write path: a write request (address, 7 information bits) enters the
// fault-secure encoder, which encodes it, checks the code-word with its own
// detector and redoes the encoding until the check passes; only then is the
// 15-bit code-word stored. Read path: the stored word is read, pipelined
// through the parallel majority-logic corrector (fixes up to two flipped bits)
// and then through a second detector, which fires only if the corrector or
// detector logic itself suffered a transient fault (or the word was beyond
// correction). A flagged read is replayed from memory, up to MAX_RETRY times;
// if it is still flagged, the response carries rsp_fail. A scrubber
// periodically reads each word through the same path and writes the corrected
// word back when the corrector changed it, so soft errors do not accumulate.
//
// Read arbitration (one read per cycle): replay, then scrub, then user read;
// rd_ready is low while a replay or scrub read takes the port, and while the
// encoder still holds an unwritten word for the address being read (so a
// read always sees every write accepted before it). Write port:
// scrub write-back has priority over the encoder. User read latency is 4
// cycles from the accepting edge to rsp_valid (memory 1, corrector 2,
// detector 1); a replay adds 5. Responses carry the address they belong to;
// a replayed read may come back after reads issued later.
//
// inj_* ports model transient faults for evaluation and must be tied to zero
// in normal use: inj_enc_mask corrupts the encoder output, inj_mem_* flips
// stored bits, inj_cor_mask corrupts the corrector output. The event pulses
// (ev_*) report each redone encoding, read replay and scrub write-back.
// The replay policy, the arbitration order and the event outputs are choices
// of this design; the encoder/memory/corrector/detector chain and scrubbing
// follow the reference architecture.
module fs_memory_top
  import ldpc_pkg::*;
#(
  parameter int ADDR_W         = 6,
  parameter int SCRUB_INTERVAL = 64,
  parameter int MAX_RETRY      = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // write requests
  input  logic              wr_valid,
  output logic              wr_ready,
  input  logic [ADDR_W-1:0] wr_addr,
  input  info_t             wr_data,
  // read requests
  input  logic              rd_valid,
  output logic              rd_ready,
  input  logic [ADDR_W-1:0] rd_addr,
  // read responses
  output logic              rsp_valid,
  output logic [ADDR_W-1:0] rsp_addr,
  output info_t             rsp_data,
  output logic              rsp_fixed,   // corrector changed the stored word
  output logic              rsp_fail,    // still flagged after MAX_RETRY replays
  // scrubbing
  input  logic              scrub_en,
  // fault injection (tie to zero in normal use)
  input  cw_t               inj_enc_mask,
  input  logic              inj_mem_en,
  input  logic [ADDR_W-1:0] inj_mem_addr,
  input  cw_t               inj_mem_mask,
  input  cw_t               inj_cor_mask,
  // events
  output logic              ev_enc_retry,
  output logic              ev_replay,
  output logic              ev_scrub_wb
);

  localparam int RETRY_W = $clog2(MAX_RETRY + 1);

  typedef struct packed {
    logic              scrub;
    logic [RETRY_W-1:0] retries;
    logic [ADDR_W-1:0] addr;
  } tag_t;

  localparam int TAG_W = $bits(tag_t);

  // ---------------- write path ----------------
  logic              enc_out_valid, enc_out_ready;
  logic [ADDR_W-1:0] enc_out_addr;
  cw_t               enc_out_cw;
  logic              enc_pending;

  logic              wb_valid;
  logic [ADDR_W-1:0] wb_addr;
  cw_t               wb_cw;

  fs_encoder #(.ADDR_W(ADDR_W)) u_fs_enc (
    .clk, .rst_n,
    .in_valid(wr_valid), .in_ready(wr_ready), .in_addr(wr_addr), .in_info(wr_data),
    .fault_mask(inj_enc_mask),
    .out_valid(enc_out_valid), .out_ready(enc_out_ready),
    .out_addr(enc_out_addr), .out_cw(enc_out_cw),
    .pending(enc_pending), .retry(ev_enc_retry)
  );

  assign enc_out_ready = !wb_valid;

  logic              mem_we;
  logic [ADDR_W-1:0] mem_waddr;
  cw_t               mem_wdata;

  always_comb begin
    mem_we    = wb_valid || enc_out_valid;
    mem_waddr = wb_valid ? wb_addr : enc_out_addr;
    mem_wdata = wb_valid ? wb_cw   : enc_out_cw;
  end

  // ---------------- read issue ----------------
  logic              replay_q;
  tag_t              replay_tag_q;
  logic              scr_req, scr_grant;
  logic [ADDR_W-1:0] scr_addr;

  logic              issue;
  tag_t              issue_tag;
  logic              rd_hazard;

  // A user read of a word whose write is still in the encoder waits for it
  assign rd_hazard = enc_pending && (enc_out_addr == rd_addr);

  always_comb begin
    issue     = 1'b1;
    scr_grant = 1'b0;
    rd_ready  = 1'b0;
    issue_tag = '0;
    if (replay_q) begin
      issue_tag = replay_tag_q;
    end else if (scr_req) begin
      scr_grant          = 1'b1;
      issue_tag.scrub    = 1'b1;
      issue_tag.addr     = scr_addr;
    end else begin
      rd_ready       = !rd_hazard;
      issue          = rd_valid && !rd_hazard;
      issue_tag.addr = rd_addr;
    end
  end

  cw_t  mem_rdata;
  logic mem_rvalid_q;
  tag_t mem_rtag_q;

  cw_memory #(.ADDR_W(ADDR_W)) u_mem (
    .clk,
    .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .re(issue), .raddr(issue_tag.addr), .rdata(mem_rdata),
    .upset_en(inj_mem_en), .upset_addr(inj_mem_addr), .upset_mask(inj_mem_mask)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mem_rvalid_q <= 1'b0;
    else        mem_rvalid_q <= issue;
  end

  always_ff @(posedge clk) mem_rtag_q <= issue_tag;

  // ---------------- corrector + detector ----------------
  logic  dec_valid, dec_fixed, dec_err;
  cw_t   dec_cw;
  info_t dec_info;
  tag_t  dec_tag;

  fs_decoder #(.TAG_W(TAG_W)) u_dec (
    .clk, .rst_n,
    .in_valid(mem_rvalid_q), .in_cw(mem_rdata), .in_tag(mem_rtag_q),
    .cor_fault_mask(inj_cor_mask),
    .out_valid(dec_valid), .out_cw(dec_cw), .out_info(dec_info),
    .out_fixed(dec_fixed), .out_err(dec_err), .out_tag(dec_tag)
  );

  logic do_replay, final_res;
  assign do_replay = dec_valid && dec_err && (int'(dec_tag.retries) < MAX_RETRY);
  assign final_res = dec_valid && !do_replay;
  assign ev_replay = do_replay;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) replay_q <= 1'b0;
    else        replay_q <= do_replay;
  end

  always_ff @(posedge clk) begin
    if (do_replay) begin
      replay_tag_q         <= dec_tag;
      replay_tag_q.retries <= dec_tag.retries + 1'b1;
    end
  end

  assign rsp_valid = final_res && !dec_tag.scrub;
  assign rsp_addr  = dec_tag.addr;
  assign rsp_data  = dec_info;
  assign rsp_fixed = dec_fixed;
  assign rsp_fail  = dec_err;

  // ---------------- scrubbing ----------------
  scrubber #(.ADDR_W(ADDR_W), .INTERVAL(SCRUB_INTERVAL)) u_scrub (
    .clk, .rst_n, .en(scrub_en),
    .req_valid(scr_req), .req_grant(scr_grant), .req_addr(scr_addr),
    .res_valid(final_res && dec_tag.scrub), .res_fixed(dec_fixed),
    .res_fail(dec_err), .res_cw(dec_cw),
    .wr_seen_valid(enc_out_valid && enc_out_ready), .wr_seen_addr(enc_out_addr),
    .wb_valid, .wb_addr, .wb_cw
  );

  assign ev_scrub_wb = wb_valid;

`ifndef SYNTHESIS
  // A flagged word is replayed at most MAX_RETRY times
  a_retry_bound: assert property (@(posedge clk) disable iff (!rst_n)
    dec_valid |-> int'(dec_tag.retries) <= MAX_RETRY);
  // Scrub write-back and replay are never both pending for a scrub word
  a_wb_final: assert property (@(posedge clk) disable iff (!rst_n)
    wb_valid |-> final_res && dec_tag.scrub && !dec_err);
`endif

endmodule

// scrubber: periodic memory scrubbing.
//
// Transient faults accumulate in stored words; before a word collects more
// errors than the code can correct it must be read, corrected and written
// back. While en is high the scrubber waits INTERVAL cycles, then requests a
// read of the next address (addresses are visited in order and wrap). The
// read goes through the normal corrector/detector path; when its final result
// comes back (res_valid) and the corrector changed the word (res_fixed)
// without the detector failing it (res_fail low), the corrected word is
// written back in the same cycle through wb_*, which has priority on the
// memory write port. If a normal write to the same address commits between
// the scrub read and its result (wr_seen_*), the scrubbed value is stale and
// is not written back. Only one scrub read is outstanding at a time.
//
// Timing: req_valid stays high until req_grant; then the scrubber waits for
// res_valid (any number of cycles, including replays), after which the
// interval restarts. The interval, the address order and the write-back rule
// are choices of this design.
module scrubber
  import ldpc_pkg::*;
#(
  parameter int ADDR_W   = 6,
  parameter int INTERVAL = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  output logic              req_valid,
  input  logic              req_grant,
  output logic [ADDR_W-1:0] req_addr,
  input  logic              res_valid,
  input  logic              res_fixed,
  input  logic              res_fail,
  input  cw_t               res_cw,
  input  logic              wr_seen_valid,
  input  logic [ADDR_W-1:0] wr_seen_addr,
  output logic              wb_valid,
  output logic [ADDR_W-1:0] wb_addr,
  output cw_t               wb_cw
);

  typedef enum logic [1:0] {S_WAIT_TIMER, S_REQ, S_WAIT_RES} state_e;

  localparam int CNT_W = $clog2(INTERVAL + 1);

  state_e            state_q;
  logic [CNT_W-1:0]  cnt_q;
  logic [ADDR_W-1:0] addr_q;
  logic              stale_q;
  logic              hit;

  assign req_valid = (state_q == S_REQ);
  assign req_addr  = addr_q;
  assign hit       = wr_seen_valid && (wr_seen_addr == addr_q);

  assign wb_valid = (state_q == S_WAIT_RES) && res_valid && res_fixed &&
                    !res_fail && !stale_q;
  assign wb_addr  = addr_q;
  assign wb_cw    = res_cw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_WAIT_TIMER;
      cnt_q   <= '0;
      addr_q  <= '0;
      stale_q <= 1'b0;
    end else begin
      case (state_q)
        S_WAIT_TIMER: begin
          if (!en) begin
            cnt_q <= '0;
          end else if (cnt_q == CNT_W'(INTERVAL - 1)) begin
            cnt_q   <= '0;
            state_q <= S_REQ;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_REQ: begin
          if (req_grant) begin
            state_q <= S_WAIT_RES;
            stale_q <= hit;
          end
        end
        S_WAIT_RES: begin
          if (hit) stale_q <= 1'b1;
          if (res_valid) begin
            state_q <= S_WAIT_TIMER;
            addr_q  <= addr_q + 1'b1;
          end
        end
        default: state_q <= S_WAIT_TIMER;
      endcase
    end
  end

endmodule

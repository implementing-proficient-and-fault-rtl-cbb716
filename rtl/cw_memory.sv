// cw_memory: storage array for 15-bit code-words.
//
// A simple dual-port synchronous memory: one write port and one read port,
// both clocked, with a read latency of one cycle and old data returned when
// the same word is read and written in one cycle. A third port, upset_*,
// models soft errors in the storage cells: it flips the bits of upset_mask in
// the word at upset_addr (combined with a write to the same word in the same
// cycle, the written value is stored with those bits flipped). The array has
// no reset, as a real memory has none; words must be written before they are
// read. Depth, port structure and the upset port are choices of this design;
// only the existence of a memory holding code-words comes from the
// architecture.
module cw_memory
  import ldpc_pkg::*;
#(
  parameter int ADDR_W = 6
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  cw_t               wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output cw_t               rdata,
  input  logic              upset_en,
  input  logic [ADDR_W-1:0] upset_addr,
  input  cw_t               upset_mask
);

  localparam int DEPTH = 1 << ADDR_W;

  cw_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)
      mem[waddr] <= wdata ^ ((upset_en && upset_addr == waddr) ? upset_mask : '0);
    if (upset_en && !(we && upset_addr == waddr))
      mem[upset_addr] <= mem[upset_addr] ^ upset_mask;
    if (re)
      rdata <= mem[raddr];
  end

endmodule

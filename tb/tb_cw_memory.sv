// tb_cw_memory: self-check of the code-word memory.
//
// Writes every word, reads it back (one-cycle latency), checks that an upset
// flips exactly the masked bits of one word only, that an upset together with a
// write to the same word stores the written value with the bits flipped, and
// that a read of a word written in the same cycle returns the old value.
module tb_cw_memory;
  import ldpc_pkg::*;

  localparam int ADDR_W = 4;
  localparam int DEPTH  = 1 << ADDR_W;

  logic              clk = 0;
  logic              we = 0, re = 0, upset_en = 0;
  logic [ADDR_W-1:0] waddr = '0, raddr = '0, upset_addr = '0;
  cw_t               wdata = '0, upset_mask = '0, rdata;

  int  checks = 0, failures = 0;
  cw_t model [DEPTH];

  cw_memory #(.ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic read_check(int a, cw_t expv);
    @(negedge clk);
    re = 1; raddr = ADDR_W'(a);
    @(negedge clk);
    re = 0;
    checks++;
    if (rdata !== expv) begin
      failures++;
      $display("FAIL addr %0d: read %h expected %h", a, rdata, expv);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = ADDR_W'(a); wdata = cw_t'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) read_check(a, model[a]);
    // upset alone
    @(negedge clk);
    upset_en = 1; upset_addr = 4'd5; upset_mask = 15'h0401;
    model[5] ^= 15'h0401;
    @(negedge clk); upset_en = 0;
    for (int a = 0; a < DEPTH; a++) read_check(a, model[a]);
    // upset plus write to the same word
    @(negedge clk);
    we = 1; waddr = 4'd9; wdata = 15'h1234;
    upset_en = 1; upset_addr = 4'd9; upset_mask = 15'h0010;
    model[9] = 15'h1234 ^ 15'h0010;
    @(negedge clk); we = 0; upset_en = 0;
    read_check(9, model[9]);
    // upset on one word and write to another in the same cycle
    @(negedge clk);
    we = 1; waddr = 4'd2; wdata = 15'h7001;
    upset_en = 1; upset_addr = 4'd3; upset_mask = 15'h4000;
    model[2] = 15'h7001; model[3] ^= 15'h4000;
    @(negedge clk); we = 0; upset_en = 0;
    read_check(2, model[2]);
    read_check(3, model[3]);
    // read during write returns the old value
    @(negedge clk);
    we = 1; waddr = 4'd7; wdata = ~model[7];
    re = 1; raddr = 4'd7;
    @(negedge clk);
    we = 0; re = 0;
    checks++;
    if (rdata !== model[7]) begin
      failures++;
      $display("FAIL read-during-write: %h expected old %h", rdata, model[7]);
    end
    model[7] = ~model[7];
    read_check(7, model[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

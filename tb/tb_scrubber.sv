// tb_scrubber: self-check of the scrubbing controller.
//
// The testbench plays the read path: it grants each scrub request after a
// random delay and returns a result a few cycles later with random
// fixed/fail flags, sometimes with a normal write to the same address in
// between. Checks: requests appear INTERVAL cycles after the previous scrub
// finished, addresses advance by one and wrap, a write-back happens exactly
// when the word was fixed, did not fail and was not overwritten, and it
// carries the returned word and the scrubbed address.
module tb_scrubber;
  import ldpc_pkg::*;

  localparam int ADDR_W   = 3;
  localparam int INTERVAL = 5;

  logic              clk = 0, rst_n = 0, en = 0;
  logic              req_valid, req_grant = 0;
  logic [ADDR_W-1:0] req_addr;
  logic              res_valid = 0, res_fixed = 0, res_fail = 0;
  cw_t               res_cw = '0;
  logic              wr_seen_valid = 0;
  logic [ADDR_W-1:0] wr_seen_addr = '0;
  logic              wb_valid;
  logic [ADDR_W-1:0] wb_addr;
  cw_t               wb_cw;

  int checks = 0, failures = 0, wbs = 0, stales = 0;

  scrubber #(.ADDR_W(ADDR_W), .INTERVAL(INTERVAL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ADDR_W-1:0] exp_addr;
    int waited;
    logic stale, exp_wb;
    exp_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    en = 1;
    for (int n = 0; n < 60; n++) begin
      // wait for the request and measure the interval
      waited = 0;
      while (!req_valid) begin
        @(negedge clk);
        waited++;
      end
      checks++;
      if (waited != INTERVAL || req_addr !== exp_addr) begin
        failures++;
        $display("FAIL scrub %0d: waited %0d addr %0d (exp %0d)", n, waited, req_addr, exp_addr);
      end
      // hold the request a few cycles before granting
      repeat ($urandom_range(2)) @(negedge clk);
      checks++;
      if (!req_valid) begin
        failures++;
        $display("FAIL request dropped before grant");
      end
      req_grant = 1;
      stale = 0;
      // a write to the scrubbed word in the grant cycle also makes it stale
      if (n % 5 == 2) begin
        wr_seen_valid = 1; wr_seen_addr = exp_addr; stale = 1;
      end
      @(negedge clk);
      req_grant = 0; wr_seen_valid = 0;
      repeat ($urandom_range(1, 4)) begin
        if (n % 5 == 4) begin
          wr_seen_valid = 1; wr_seen_addr = exp_addr; stale = 1;
        end else if (n % 5 == 1) begin
          wr_seen_valid = 1; wr_seen_addr = exp_addr + 1'b1;
        end
        @(negedge clk);
        wr_seen_valid = 0;
      end
      res_valid = 1; res_fixed = $urandom_range(3) != 0; res_fail = $urandom_range(4) == 0;
      res_cw = cw_t'($urandom);
      exp_wb = res_fixed && !res_fail && !stale;
      #1;
      checks++;
      if (wb_valid !== exp_wb || (exp_wb && (wb_addr !== exp_addr || wb_cw !== res_cw))) begin
        failures++;
        $display("FAIL scrub %0d: wb %b (exp %b) addr %0d cw %h", n, wb_valid, exp_wb, wb_addr, wb_cw);
      end
      if (wb_valid) wbs++;
      if (stale && res_fixed && !res_fail) stales++;
      @(negedge clk);
      res_valid = 0;
      exp_addr = exp_addr + 1'b1;
    end
    // disabled: no request within several intervals
    en = 0;
    repeat (4 * INTERVAL) begin
      @(negedge clk);
      checks++;
      if (req_valid) begin
        failures++;
        $display("FAIL request while disabled");
      end
    end
    checks++;
    if (wbs == 0 || stales == 0) begin
      failures++;
      $display("FAIL write-backs %0d stale cases %0d", wbs, stales);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

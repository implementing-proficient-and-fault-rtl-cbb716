// tb_fs_memory_top: end-to-end test of the fault-tolerant memory system at its
// default size (64 words, scrub interval 64, one replay).
//
// Phases:
//  1. fill every word with random data while single-bit faults are injected
//     into the encoder: every write must still store a correct code-word;
//  2. read everything back and check the data and the 4-cycle read latency;
//  3. flip one stored bit in words 0..15 and two in words 16..31, read all
//     back: the data must be corrected and rsp_fixed set exactly for those;
//  4. upset the corrector during one read: the read must be replayed and then
//     return correct data 9 cycles after it was accepted; upset it during the
//     replay too: the response must carry rsp_fail;
//  5. enable scrubbing and run random reads and writes for more than one full
//     scrub pass, sometimes writing the word being scrubbed; then stop
//     scrubbing and read everything: no word may still need correction and
//     every value must be the last one written.
// The expected data comes from a plain array of written values. Each
// mechanism (encoder redo, single and double error correction, replay,
// uncorrectable flag, scrub write-back, stale scrub cancelled, read stall,
// write stall) is counted, and one that never happened is a failure.
module tb_fs_memory_top;
  import ldpc_pkg::*;

  localparam int ADDR_W = 6;
  localparam int DEPTH  = 1 << ADDR_W;

  logic              clk = 0, rst_n = 0;
  logic              wr_valid = 0, wr_ready;
  logic [ADDR_W-1:0] wr_addr = '0;
  info_t             wr_data = '0;
  logic              rd_valid = 0, rd_ready;
  logic [ADDR_W-1:0] rd_addr = '0;
  logic              rsp_valid, rsp_fixed, rsp_fail;
  logic [ADDR_W-1:0] rsp_addr;
  info_t             rsp_data;
  logic              scrub_en = 0;
  cw_t               inj_enc_mask = '0, inj_mem_mask = '0, inj_cor_mask = '0;
  logic              inj_mem_en = 0;
  logic [ADDR_W-1:0] inj_mem_addr = '0;
  logic              ev_enc_retry, ev_replay, ev_scrub_wb;

  fs_memory_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // reference contents and outstanding reads
  info_t model [DEPTH];
  typedef struct {
    logic [ADDR_W-1:0] addr;
    info_t             data;
    int                cyc;
    int                lat;    // expected latency, 0 = do not check
    logic              fixed;  // expected rsp_fixed
    logic              chkfix;
    logic              fail;   // expected rsp_fail
  } rd_t;
  rd_t pend [$];

  // event counters
  int n_enc_retry = 0, n_replay = 0, n_scrub_wb = 0, n_fix1 = 0, n_fix2 = 0;
  int n_fail = 0, n_stale = 0, n_rd_stall = 0, n_wr_stall = 0, n_rsp = 0;

  always @(posedge clk) if (rst_n) begin
    if (ev_enc_retry) n_enc_retry++;
    if (ev_replay)    n_replay++;
    if (ev_scrub_wb)  n_scrub_wb++;
    if (rd_valid && !rd_ready) n_rd_stall++;
    if (wr_valid && !wr_ready) n_wr_stall++;
    if (dut.u_scrub.res_valid && dut.u_scrub.stale_q && dut.u_scrub.res_fixed) n_stale++;
  end

  // response checker
  always @(posedge clk) if (rst_n && rsp_valid) begin
    int idx;
    idx = -1;
    foreach (pend[i]) if (idx < 0 && pend[i].addr == rsp_addr) idx = i;
    checks++;
    if (idx < 0) begin
      failures++;
      $display("FAIL unexpected response for address %0d", rsp_addr);
    end else begin
      rd_t e;
      e = pend[idx];
      pend.delete(idx);
      n_rsp++;
      if (rsp_fail) n_fail++;
      if (rsp_fail !== e.fail || (!e.fail && rsp_data !== e.data) ||
          (e.chkfix && rsp_fixed !== e.fixed) || (e.lat != 0 && cycle - e.cyc != e.lat)) begin
        failures++;
        $display("FAIL read %0d: data %h fixed %b fail %b lat %0d, expected %h %b %b %0d",
                 rsp_addr, rsp_data, rsp_fixed, rsp_fail, cycle - e.cyc, e.data, e.fixed,
                 e.fail, e.lat);
      end
    end
  end

  task automatic do_write(int a, info_t d);
    @(negedge clk);
    wr_valid = 1; wr_addr = ADDR_W'(a); wr_data = d;
    #1;
    while (!wr_ready) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    model[a] = d;
    #1;
    wr_valid = 0;
  endtask

  task automatic do_read(int a, int lat = 4, logic chkfix = 0, logic fixed = 0, logic fail = 0);
    rd_t e;
    @(negedge clk);
    rd_valid = 1; rd_addr = ADDR_W'(a);
    #1;
    while (!rd_ready) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    e.addr = ADDR_W'(a); e.data = model[a]; e.cyc = cycle; e.lat = lat;
    e.chkfix = chkfix; e.fixed = fixed; e.fail = fail;
    pend.push_back(e);
    #1;
    rd_valid = 0;
  endtask

  task automatic drain();
    int guard;
    guard = 0;
    while (pend.size() != 0 && guard < 200) begin
      @(posedge clk);
      guard++;
    end
    repeat (12) @(posedge clk);
    checks++;
    if (pend.size() != 0) begin
      failures++;
      $display("FAIL %0d reads never answered", pend.size());
      pend.delete();
    end
  endtask

  task automatic upset(int a, cw_t m);
    @(negedge clk);
    inj_mem_en = 1; inj_mem_addr = ADDR_W'(a); inj_mem_mask = m;
    @(negedge clk);
    inj_mem_en = 0;
  endtask

  function automatic cw_t rand_err(int w);
    cw_t e = '0;
    while ($countones(e) < w) e[$urandom_range(14)] = 1'b1;
    return e;
  endfunction

  task automatic check_count(string name, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", name);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. fill, with encoder faults on every fourth write
    for (int a = 0; a < DEPTH; a++) begin
      if (a % 4 == 1) inj_enc_mask = rand_err(1 + a % 3);
      do_write(a, info_t'($urandom));
      inj_enc_mask = '0;
    end
    repeat (3) @(posedge clk);

    // 2. clean read-back, 4-cycle latency
    for (int a = 0; a < DEPTH; a++) do_read(a, 4, 1, 0);
    drain();

    // 3. one and two stored errors
    for (int a = 0; a < 32; a++) upset(a, rand_err(a < 16 ? 1 : 2));
    for (int a = 0; a < DEPTH; a++) begin
      do_read(a, 4, 1, a < 32);
      if (a < 16) n_fix1++;
      else if (a < 32) n_fix2++;
    end
    drain();

    // 4a. corrector upset on the first pass: replay, then correct data
    do_read(40, 9, 1, 0);
    @(negedge clk);
    inj_cor_mask = rand_err(1);
    repeat (3) @(negedge clk);
    inj_cor_mask = '0;
    drain();
    // 4b. corrector upset on the first pass and on the replay: rsp_fail
    do_read(41, 9, 0, 0, 1);
    @(negedge clk);
    inj_cor_mask = rand_err(2);
    repeat (12) @(negedge clk);
    inj_cor_mask = '0;
    drain();

    // 5. scrubbing with concurrent traffic
    scrub_en = 1;
    for (int n = 0; n < 2200; n++) begin
      int a;
      if (dut.u_scrub.req_valid && $urandom_range(3) == 0) begin
        a = int'(dut.u_scrub.req_addr);
        do_write(a, info_t'($urandom));
      end else if ($urandom_range(7) == 0) begin
        do_write(32 + $urandom_range(31), info_t'($urandom));
      end else if ($urandom_range(3) == 0) begin
        do_read($urandom_range(DEPTH - 1), 0);
      end else begin
        @(negedge clk);
      end
    end
    // let the last pass finish
    repeat (DEPTH * (64 + 8)) @(posedge clk);
    scrub_en = 0;
    drain();
    repeat (20) @(posedge clk);
    for (int a = 0; a < DEPTH; a++) do_read(a, 4, 1, 0);
    drain();

    check_count("encoder redo", n_enc_retry);
    check_count("single error corrected", n_fix1);
    check_count("double error corrected", n_fix2);
    check_count("read replay", n_replay);
    check_count("uncorrectable flag", n_fail);
    check_count("scrub write-back", n_scrub_wb);
    check_count("stale scrub cancelled", n_stale);
    check_count("read stall", n_rd_stall);
    check_count("write stall", n_wr_stall);
    $display("events: enc_redo=%0d fix1=%0d fix2=%0d replay=%0d fail=%0d scrub_wb=%0d stale=%0d rd_stall=%0d wr_stall=%0d responses=%0d",
             n_enc_retry, n_fix1, n_fix2, n_replay, n_fail, n_scrub_wb, n_stale, n_rd_stall,
             n_wr_stall, n_rsp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

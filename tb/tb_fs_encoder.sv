// tb_fs_encoder: self-check of the fault-secure encoder.
//
// Write requests stream in with random back-pressure on the memory side. Each
// code-word leaving the encoder is compared with info(x)-based reference
// encoding computed here (systematic remainder by g(x)). Some requests are
// hit by an injected encoder fault on their first encoding: the detector must
// catch it, retry must pulse, and the word that finally comes out must still
// be the correct code-word. Without faults and back-pressure a word leaves
// one cycle after it is accepted.
module tb_fs_encoder;
  import ldpc_pkg::*;

  localparam int ADDR_W = 6;

  logic              clk = 0, rst_n = 0;
  logic              in_valid = 0, in_ready;
  logic [ADDR_W-1:0] in_addr = '0;
  info_t             in_info = '0;
  cw_t               fault_mask = '0;
  logic              out_valid, out_ready = 1;
  logic [ADDR_W-1:0] out_addr;
  cw_t               out_cw;
  logic              retry, pending;

  int checks = 0, failures = 0, cycle = 0, retries = 0;

  fs_encoder #(.ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // systematic code-word with info in c0..c6: the parity p(x) (degree < 8)
  // must make info(x) + x^7 p(x) a multiple of g(x); found by search
  function automatic cw_t ref_enc(info_t i);
    for (int p = 0; p < 256; p++) begin
      logic [14:0] r;
      r = {8'(p), i};
      for (int d = 14; d >= 8; d--) if (r[d]) r ^= 15'h01D1 << (d - 8);
      if (r[7:0] == 0) return {8'(p), i};
    end
    return '0;
  endfunction

  info_t exp_q [$];
  logic [ADDR_W-1:0] expa_q [$];
  int    sent = 0, recv = 0, acc_cyc = 0, lat_checked = 0;

  always @(posedge clk) begin
    if (rst_n && retry) retries++;
    if (rst_n && out_valid && out_ready) begin
      info_t i;
      i = exp_q.pop_front();
      checks++;
      if (out_cw !== ref_enc(i) || out_addr !== expa_q.pop_front()) begin
        failures++;
        $display("FAIL word %0d: cw %h expected %h", recv, out_cw, ref_enc(i));
      end
      recv++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency: a single word, no faults, leaves in the cycle after acceptance
    @(negedge clk);
    in_valid = 1; in_info = 7'h2A; in_addr = 6'd3;
    exp_q.push_back(7'h2A); expa_q.push_back(6'd3); sent++;
    @(posedge clk); acc_cyc = cycle;
    @(negedge clk); in_valid = 0;
    checks++;
    if (!out_valid || !pending || cycle != acc_cyc + 1) begin
      failures++;
      $display("FAIL latency: out_valid %b", out_valid);
    end
    @(posedge clk);
    // stream with faults and back-pressure
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      out_ready = ($urandom_range(3) != 0);
      in_valid = 1; in_info = info_t'($urandom); in_addr = ADDR_W'($urandom);
      fault_mask = (n % 7 == 3) ? cw_t'(1) << $urandom_range(14) : '0;
      #1;
      while (!in_ready) begin
        @(negedge clk);
        out_ready = ($urandom_range(3) != 0);
        #1;
      end
      @(posedge clk);
      exp_q.push_back(in_info); expa_q.push_back(in_addr); sent++;
      @(negedge clk);
      fault_mask = '0;
      in_valid = 0;
      out_ready = ($urandom_range(3) != 0);
    end
    out_ready = 1;
    repeat (10) @(posedge clk);
    checks++;
    if (recv != sent || retries < 40) begin
      failures++;
      $display("FAIL sent %0d received %0d retries %0d", sent, recv, retries);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

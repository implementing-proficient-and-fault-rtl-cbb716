// tb_fs_decoder: self-check of the corrector + detector read path.
//
// Words with 0, 1 or 2 errors must come back, 3 cycles after they were
// applied, as the original code-word with out_err low, out_fixed set when an
// error was present and out_info equal to the information bits. A single-bit
// upset injected into the corrector must be caught by the detector (out_err
// high). For three errors only the consistency of out_err with the syndrome of
// the returned word is checked. Code-words and syndromes are computed here
// from the polynomial and circulant definitions of the code.
module tb_fs_decoder;
  import ldpc_pkg::*;

  localparam int TAG_W = 12;
  localparam int LAT   = 3;

  logic             clk = 0, rst_n = 0;
  logic             in_valid = 0;
  cw_t              in_cw = '0, cor_fault_mask = '0;
  logic [TAG_W-1:0] in_tag = '0;
  logic             out_valid, out_fixed, out_err;
  cw_t              out_cw;
  info_t            out_info;
  logic [TAG_W-1:0] out_tag;

  int checks = 0, failures = 0, cycle = 0;

  fs_decoder #(.TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // systematic code-word with info in c0..c6, found by search over the parity
  function automatic cw_t ref_enc(info_t i);
    for (int p = 0; p < 256; p++) begin
      logic [14:0] r;
      r = {8'(p), i};
      for (int d = 14; d >= 8; d--) if (r[d]) r ^= 15'h01D1 << (d - 8);
      if (r[7:0] == 0) return {8'(p), i};
    end
    return '0;
  endfunction

  function automatic logic nonzero_syn(cw_t c);
    for (int r = 0; r < 15; r++)
      if (c[r] ^ c[(r + 1) % 15] ^ c[(r + 3) % 15] ^ c[(r + 7) % 15]) return 1'b1;
    return 1'b0;
  endfunction

  cw_t  exp_cw   [4096];
  int   exp_nerr [4096];
  int   exp_cyc  [4096];
  logic exp_inj  [4096];
  int   sent = 0, recv = 0, caught = 0;

  task automatic push(cw_t c, cw_t e, logic inj = 1'b0);
    @(negedge clk);
    in_valid = 1; in_cw = c ^ e; in_tag = TAG_W'(sent);
    exp_cw[sent] = c; exp_nerr[sent] = $countones(e);
    exp_cyc[sent] = cycle + LAT; exp_inj[sent] = inj;
    sent++;
    if (inj) begin
      @(negedge clk);
      in_valid = 0;
      cor_fault_mask = cw_t'(1) << $urandom_range(14);
      @(negedge clk);
      cor_fault_mask = '0;
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int t;
      t = int'(out_tag);
      checks++;
      if (cycle != exp_cyc[t]) begin
        failures++;
        $display("FAIL tag %0d latency: at cycle %0d, expected %0d", t, cycle, exp_cyc[t]);
      end
      checks++;
      if (exp_inj[t]) begin
        if (out_err !== 1'b1) begin
          failures++;
          $display("FAIL tag %0d: corrector upset not detected", t);
        end else caught++;
      end else if (exp_nerr[t] <= 2) begin
        if (out_cw !== exp_cw[t] || out_info !== exp_cw[t][6:0] || out_err !== 1'b0 ||
            out_fixed !== (exp_nerr[t] != 0)) begin
          failures++;
          $display("FAIL tag %0d: out %h err %b fixed %b, expected %h", t, out_cw, out_err,
                   out_fixed, exp_cw[t]);
        end
      end else if (out_err !== nonzero_syn(out_cw)) begin
        failures++;
        $display("FAIL tag %0d: err %b disagrees with syndrome of %h", t, out_err, out_cw);
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
    for (int n = 0; n < 600; n++) begin
      cw_t e;
      int  w;
      e = '0;
      w = n % 4;
      while ($countones(e) < w) e[$urandom_range(14)] = 1'b1;
      push(ref_enc(info_t'($urandom)), e, (n % 37 == 5));
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (recv != sent || caught == 0) begin
      failures++;
      $display("FAIL sent %0d received %0d caught %0d", sent, recv, caught);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

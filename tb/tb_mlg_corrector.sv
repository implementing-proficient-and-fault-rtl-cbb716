// tb_mlg_corrector: self-check of the pipelined majority-logic corrector.
//
// A stream of words is pushed one per cycle: exact code-words, code-words with
// every single and every double error pattern, and random triple errors.
// Code-words are built as m(x) * g(x), independently of the encoder. The
// scoreboard expects each word back exactly 2 cycles after it was applied,
// with the original code-word restored for up to two errors and out_fixed set
// exactly when an error was present. For three errors it only checks the
// latency and tag. A fault_mask pulse must appear XORed into the output.
module tb_mlg_corrector;
  import ldpc_pkg::*;

  localparam int TAG_W = 12;
  localparam int LAT   = 2;

  logic             clk = 0, rst_n = 0;
  logic             in_valid = 0;
  cw_t              in_cw = '0, fault_mask = '0;
  logic [TAG_W-1:0] in_tag = '0;
  logic             out_valid, out_fixed;
  cw_t              out_cw;
  logic [TAG_W-1:0] out_tag;

  int checks = 0, failures = 0, cycle = 0;

  mlg_corrector #(.TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic cw_t poly_cw(logic [6:0] m);
    cw_t c = '0;
    for (int i = 0; i < 7; i++) if (m[i]) c ^= 15'h01D1 << i;
    return c;
  endfunction

  // expected results, indexed by tag
  cw_t exp_cw   [4096];
  int  exp_nerr [4096];
  int  exp_cyc  [4096];
  cw_t exp_mask [4096];
  int  sent = 0, recv = 0;

  task automatic push(cw_t c, cw_t e, cw_t fm = '0);
    @(negedge clk);
    in_valid = 1; in_cw = c ^ e; in_tag = TAG_W'(sent);
    exp_cw[sent] = c; exp_nerr[sent] = $countones(e);
    exp_cyc[sent] = cycle + LAT; exp_mask[sent] = fm;
    sent++;
    if (fm != 0) begin
      // the mask acts one cycle later, when this word is in stage 1
      @(negedge clk);
      in_valid = 0;
      fault_mask = fm;
      @(negedge clk);
      fault_mask = '0;
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
      if (exp_nerr[t] <= 2) begin
        checks++;
        if (out_cw !== (exp_cw[t] ^ exp_mask[t]) || out_fixed !== (exp_nerr[t] != 0)) begin
          failures++;
          $display("FAIL tag %0d: out %h fixed %b, expected %h fixed %b", t, out_cw, out_fixed,
                   exp_cw[t] ^ exp_mask[t], exp_nerr[t] != 0);
        end
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
    cw_t c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 128; m += 9) push(poly_cw(7'(m)), '0);
    for (int a = 0; a < 15; a++) begin
      push(poly_cw(7'($urandom)), cw_t'(1) << a);
      for (int b = a + 1; b < 15; b++)
        push(poly_cw(7'($urandom)), (cw_t'(1) << a) | (cw_t'(1) << b));
    end
    for (int n = 0; n < 50; n++) begin
      cw_t e;
      e = '0;
      while ($countones(e) < 3) e[$urandom_range(14)] = 1'b1;
      push(poly_cw(7'($urandom)), e);
    end
    push(poly_cw(7'h33), '0, 15'h0100);
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (recv != sent) begin
      failures++;
      $display("FAIL sent %0d received %0d", sent, recv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

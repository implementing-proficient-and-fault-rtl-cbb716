// tb_ldpc_encoder: exhaustive self-check of the (15,7) systematic encoder.
//
// For all 128 information vectors the code-word must (a) carry the
// information bits unchanged in c0..c6 and (b) be a multiple of the generator
// polynomial g(x) = 1 + x^4 + x^6 + x^7 + x^8, checked here by polynomial
// division, independently of the generator matrix the encoder uses. It also
// checks the minimum distance: no nonzero code-word has weight below 5, and
// the number of ones in X gives the 22 two-input XOR gates of the reference
// encoder.
module tb_ldpc_encoder;
  import ldpc_pkg::*;

  info_t info;
  cw_t   cw;
  int    checks = 0, failures = 0;

  ldpc_encoder dut (.info, .cw);

  // remainder of c(x) / g(x) over GF(2)
  function automatic logic [7:0] poly_rem(cw_t c);
    logic [14:0] r;
    r = c;
    for (int d = 14; d >= 8; d--)
      if (r[d]) r = r ^ (15'h01D1 << (d - 8));
    return r[7:0];
  endfunction

  initial begin
    #100000;  // combinational test: all vectors take 128 time units
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int min_w, ones;
    min_w = N;
    for (int v = 0; v < 128; v++) begin
      info = info_t'(v);
      #1;
      checks++;
      if (cw[6:0] !== info) begin
        failures++;
        $display("FAIL info %h: systematic bits %h", info, cw[6:0]);
      end
      checks++;
      if (poly_rem(cw) != 0) begin
        failures++;
        $display("FAIL info %h: cw %h not a multiple of g(x)", info, cw);
      end
      if (v != 0 && $countones(cw) < min_w) min_w = $countones(cw);
    end
    checks++;
    if (min_w != 5) begin
      failures++;
      $display("FAIL minimum weight %0d, expected 5", min_w);
    end
    ones = 0;
    for (int j = 0; j < P; j++) ones += $countones(x_col(j));
    checks++;
    if (ones - P != 22) begin
      failures++;
      $display("FAIL X has %0d ones, expected 30", ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fs_detector: self-check of the syndrome detector.
//
// The expected syndrome is recomputed here from the definition of the code's
// parity-check matrix (row r holds ones at r, r+1, r+3, r+7 mod 15). Checks:
// every code-word (built as info(x) * g(x), independently of the encoder)
// gives a zero syndrome and no error; every pattern of 1 to 4 flipped bits on
// random code-words gives a nonzero syndrome and raises err; random words
// match the reference syndrome bit for bit.
module tb_fs_detector;
  import ldpc_pkg::*;

  cw_t  cw, syn;
  logic err;
  int   checks = 0, failures = 0;

  fs_detector dut (.cw, .syndrome(syn), .err);

  function automatic cw_t ref_syn(cw_t c);
    cw_t s;
    for (int r = 0; r < 15; r++)
      s[r] = c[r] ^ c[(r + 1) % 15] ^ c[(r + 3) % 15] ^ c[(r + 7) % 15];
    return s;
  endfunction

  // non-systematic code-word: m(x) * g(x)
  function automatic cw_t poly_cw(logic [6:0] m);
    cw_t c = '0;
    for (int i = 0; i < 7; i++) if (m[i]) c ^= 15'h01D1 << i;
    return c;
  endfunction

  task automatic check(cw_t c, logic exp_err);
    cw = c;
    #1;
    checks++;
    if (syn !== ref_syn(c) || err !== exp_err) begin
      failures++;
      $display("FAIL cw %h: syn %h (exp %h) err %b (exp %b)", c, syn, ref_syn(c), err, exp_err);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cw_t base;
    for (int m = 0; m < 128; m++) check(poly_cw(7'(m)), 1'b0);
    // all single and double errors on one code-word
    base = poly_cw(7'h5A);
    for (int a = 0; a < 15; a++) begin
      check(base ^ (cw_t'(1) << a), 1'b1);
      for (int b = a + 1; b < 15; b++)
        check(base ^ (cw_t'(1) << a) ^ (cw_t'(1) << b), 1'b1);
    end
    // random triple and quadruple errors
    for (int n = 0; n < 500; n++) begin
      cw_t e;
      int  w;
      w = 3 + n % 2;
      e = '0;
      while ($countones(e) < w) e[$urandom_range(14)] = 1'b1;
      check(poly_cw(7'($urandom)) ^ e, 1'b1);
    end
    // random words against the reference syndrome
    for (int n = 0; n < 500; n++) begin
      cw_t c;
      c = cw_t'($urandom);
      check(c, ref_syn(c) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

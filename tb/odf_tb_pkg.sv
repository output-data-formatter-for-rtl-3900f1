// odf_tb_pkg: reference model of the formatter's output order, for the
// testbenches only.
//
// exp_bit(w, count, i) gives the i-th bit a device sends after a load
// (i = 0 is the first bit), written straight from the published field table:
// CALTAG; COUNT[10:0]; DATA_FROM_CORR[26:0]; LNK_ERR_DATA0;
// DATA_FROM_CORR[53:27]; LNK_ERR_DATA1; DATA_FROM_CORR[80:54]; LNK_ERR_DATA2;
// vectors most significant bit first.  It deliberately does not reuse the
// packing function of the design.
package odf_tb_pkg;
  import odf_pkg::*;

  function automatic logic exp_bit(load_word_t w, logic [CNT_W-1:0] count,
                                   int i);
    int base;
    if (i == 0) return w.caltag;
    if (i <= CNT_W) return count[CNT_W - i];
    base = 1 + CNT_W;
    for (int k = 0; k < N_WORDS; k++) begin
      if (i < base + WORD_W) return w.corr[k*WORD_W + WORD_W - 1 - (i - base)];
      if (i == base + WORD_W) return w.lnk_err[k];
      base += WORD_W + 1;
    end
    return 1'b0;
  endfunction

  function automatic load_word_t rand_word();
    logic [LOAD_W-1:0] v;
    for (int k = 0; k < LOAD_W; k++) v[k] = 1'($urandom);
    return load_word_t'(v);
  endfunction

endpackage

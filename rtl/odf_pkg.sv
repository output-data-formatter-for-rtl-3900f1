// odf_pkg: sizes and the load-word layout shared by the Output Data Formatter.
//
// One formatter device accepts 85 bits in parallel on each load: three 27-bit
// correlator words (DATA_FROM_CORR[80:0]), one link-error flag per word
// (LNK_ERR_DATA[2:0]) and the calibration flag CALTAG.  It adds an 11-bit tag
// count and serialises the 96 bits.  All these numbers are the published ones;
// the struct layout of load_word_t is this design's own packing.
package odf_pkg;

  localparam int unsigned WORD_W  = 27;  // bits per correlator word
  localparam int unsigned N_WORDS = 3;   // correlator words per device
  localparam int unsigned CNT_W   = 11;  // tag counter width
  localparam int unsigned CORR_W  = WORD_W * N_WORDS;         // 81
  localparam int unsigned LOAD_W  = 1 + N_WORDS + CORR_W;     // 85
  localparam int unsigned SR_W    = LOAD_W + CNT_W;           // 96

  // Parallel-load word of one device.
  typedef struct packed {
    logic                caltag;  // 1 = data taken in calibrate mode
    logic [N_WORDS-1:0]  lnk_err; // LNK_ERR_DATA[2:0], bit i flags word i
    logic [CORR_W-1:0]   corr;    // DATA_FROM_CORR[80:0], word i = [27i+26:27i]
  } load_word_t;

  // Shift-register image of one frame, first bit out at index SR_W-1:
  //   CALTAG, COUNT[10:0], word0[26:0], LNK0, word1[26:0], LNK1,
  //   word2[26:0], LNK2   (vectors most significant bit first).
  function automatic logic [SR_W-1:0] pack_frame(load_word_t w,
                                                 logic [CNT_W-1:0] count);
    logic [SR_W-1:0] r;
    int unsigned     pos;
    r[SR_W-1]           = w.caltag;
    r[SR_W-2 -: CNT_W]  = count;
    pos = SR_W - 2 - CNT_W;
    for (int unsigned i = 0; i < N_WORDS; i++) begin
      r[pos -: WORD_W] = w.corr[i*WORD_W +: WORD_W];
      pos -= WORD_W;
      r[pos] = w.lnk_err[i];
      pos -= 1;
    end
    return r;
  endfunction

  // Inverse of pack_frame for the non-counter fields.
  function automatic load_word_t unpack_frame(logic [SR_W-1:0] r);
    load_word_t  w;
    int unsigned pos;
    w.caltag = r[SR_W-1];
    pos = SR_W - 2 - CNT_W;
    for (int unsigned i = 0; i < N_WORDS; i++) begin
      w.corr[i*WORD_W +: WORD_W] = r[pos -: WORD_W];
      pos -= WORD_W;
      w.lnk_err[i] = r[pos];
      pos -= 1;
    end
    return w;
  endfunction

endpackage

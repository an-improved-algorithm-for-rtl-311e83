// rlevlc_pkg: constants and types shared by the RLE-VLC pixel-hit compressor.
//
// The defaults describe the reference configuration of the code alphabet:
// Bc = 6 column address bits, Bk = 6 core address bits, Br = 4 region address
// bits, Bp = 4 ToT bits and Brun = 3 run-length bits, with four pixels per
// region. The most probable ToT value is 0 and the second most probable is 2,
// as measured on simulated HL-LHC hit patterns. The symbol kinds below label
// each codeword the encoder emits, so that monitors can count them.
package rlevlc_pkg;

  localparam int unsigned DEF_BC   = 6;   // column address bits
  localparam int unsigned DEF_BK   = 6;   // core address bits
  localparam int unsigned DEF_BR   = 4;   // region-in-core address bits
  localparam int unsigned DEF_BP   = 4;   // ToT bits per pixel
  localparam int unsigned DEF_BRUN = 3;   // run-length field bits
  localparam int unsigned DEF_NPIX = 4;   // pixels per region
  localparam int unsigned DEF_V1   = 0;   // most probable ToT value
  localparam int unsigned DEF_V2   = 2;   // second most probable ToT value

  // Kind of codeword on the encoder output.
  typedef enum logic [2:0] {
    SYM_C       = 3'd0,  // column address (C,COL)
    SYM_K       = 3'd1,  // cluster address (K,CORE,REG)
    SYM_REG_VLC = 3'd2,  // active region, VLC coded ([F] H V...)
    SYM_REG_CUR = 3'd3,  // active region, current coding ([F] T,A,B,C,D)
    SYM_RUN     = 3'd4,  // run of inactive regions (R,RUN)
    SYM_EOK     = 3'd5,  // end of cluster
    SYM_EOC     = 3'd6,  // end of column
    SYM_END     = 3'd7   // end of event: no bits, closes the packed stream
  } sym_t;

  // Longest region codeword: optional F, then H and NPIX generic values.
  function automatic int unsigned region_code_max(int unsigned npix, int unsigned bp);
    return 2 + npix * (2 + bp);
  endfunction

  function automatic int unsigned max2(int unsigned a, int unsigned b);
    return (a > b) ? a : b;
  endfunction

endpackage

// rlevlc_top: RLE-VLC compression of pixel hits in the chip periphery, and
// the matching decompressor on the receiving end of the link.
//
// Chip side: each of the NCOLS core columns writes the active regions of a
// trigger (core address, region address and NPIX ToT values) into its own
// region_fifo, in scan order. An evt_start pulse makes the column_sequencer
// drain the FIFOs column by column into the intra_column_encoder, which forms
// clusters and emits the codewords of the alphabet; the bit_packer turns them
// into OUT_W-bit link words (link_*), the payload handed to the serial output.
// Receiving side: rlevlc_decoder turns the link words back into regions
// (dec_*), ending each event with a dec_end beat.
//
// Interface: per-column write strobes and data, fifo_full per column;
// evt_start/busy (no FIFO writes while busy); link_hold stalls the link, as a
// serializer that is not ready would; the decoded stream is valid/ready.
// Timing: the link words leave as soon as they fill; the decoder is fed from
// the same words. Defaults follow the reference configuration of the code
// (Bc=6, Bk=6, Br=4, Bp=4, Brun=3) and a 400-pixel-wide matrix of 8-pixel core
// columns (50 columns of 24 cores); the FIFO depth and the link framing are
// this design's choices.
module rlevlc_top
  import rlevlc_pkg::*;
#(
  parameter int unsigned NCOLS      = 50,
  parameter int unsigned NCORES     = 24,
  parameter int unsigned BC         = DEF_BC,
  parameter int unsigned BK         = DEF_BK,
  parameter int unsigned BR         = DEF_BR,
  parameter int unsigned BP         = DEF_BP,
  parameter int unsigned BRUN       = DEF_BRUN,
  parameter int unsigned NPIX       = DEF_NPIX,
  parameter int unsigned V1_VAL     = DEF_V1,
  parameter int unsigned V2_VAL     = DEF_V2,
  parameter int unsigned FIFO_DEPTH = 32,
  parameter int unsigned OUT_W      = 64,
  localparam int unsigned DW        = BK + BR + NPIX * BP,
  localparam int unsigned OUTLW     = $clog2(OUT_W + 1)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // core-column writes
  input  logic [NCOLS-1:0]                   wr_en,
  input  logic [NCOLS-1:0][BK-1:0]           wr_core,
  input  logic [NCOLS-1:0][BR-1:0]           wr_reg,
  input  logic [NCOLS-1:0][NPIX-1:0][BP-1:0] wr_tot,
  output logic [NCOLS-1:0]                   fifo_full,
  // event control
  input  logic                               evt_start,
  output logic                               busy,
  // link words
  input  logic                               link_hold,
  output logic                               link_valid,
  output logic [OUT_W-1:0]                   link_data,
  output logic                               link_last,
  output logic [OUTLW-1:0]                   link_nbits,
  // decoded regions
  output logic                               dec_valid,
  input  logic                               dec_ready,
  output logic                               dec_end,
  output logic [BC-1:0]                      dec_col,
  output logic [BK-1:0]                      dec_core,
  output logic [BR-1:0]                      dec_reg,
  output logic [NPIX-1:0][BP-1:0]            dec_tot,
  output logic                               dec_vlc
);

  localparam int unsigned RMAX = region_code_max(NPIX, BP);
  localparam int unsigned CW   = max2(max2(BC, BK + BR), max2(1 + BRUN, RMAX));
  localparam int unsigned FAW  = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1;

  // Core-column FIFOs
  logic [NCOLS-1:0]          f_empty, f_pop;
  logic [NCOLS-1:0][DW-1:0]  f_data;

  for (genvar c = 0; c < NCOLS; c++) begin : g_col
    logic [FAW:0] unused_count;
    region_fifo #(.WIDTH(DW), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en  (wr_en[c]),
      .wr_data({wr_core[c], wr_reg[c], wr_tot[c]}),
      .full   (fifo_full[c]),
      .rd_en  (f_pop[c]),
      .rd_data(f_data[c]),
      .empty  (f_empty[c]),
      .count  (unused_count)
    );
  end

  // Column sequencer
  logic          s_valid, s_ready, s_end;
  logic [BC-1:0] s_col;
  logic [DW-1:0] s_data;

  column_sequencer #(.NCOLS(NCOLS), .BC(BC), .DW(DW)) u_seq (
    .clk, .rst_n,
    .start     (evt_start),
    .busy      (busy),
    .fifo_empty(f_empty),
    .fifo_data (f_data),
    .fifo_pop  (f_pop),
    .out_valid (s_valid),
    .out_ready (s_ready),
    .out_end   (s_end),
    .out_col   (s_col),
    .out_data  (s_data)
  );

  // Encoder
  logic                    c_valid, c_ready, c_last;
  logic [CW-1:0]           c_code;
  logic [$clog2(CW+1)-1:0] c_len;
  sym_t                    c_sym;
  logic [NPIX-1:0][BP-1:0] s_tot;
  logic [BK-1:0]           s_core;
  logic [BR-1:0]           s_reg;
  assign {s_core, s_reg, s_tot} = s_data;

  intra_column_encoder #(
    .BC(BC), .BK(BK), .BR(BR), .BP(BP), .BRUN(BRUN), .NPIX(NPIX),
    .V1_VAL(V1_VAL), .V2_VAL(V2_VAL)
  ) u_enc (
    .clk, .rst_n,
    .in_valid  (s_valid),
    .in_ready  (s_ready),
    .in_end    (s_end),
    .in_col    (s_col),
    .in_core   (s_core),
    .in_reg    (s_reg),
    .in_tot    (s_tot),
    .code_valid(c_valid),
    .code_ready(c_ready),
    .code      (c_code),
    .code_len  (c_len),
    .code_sym  (c_sym),
    .code_last (c_last)
  );

  // Packer
  logic p_ready;
  bit_packer #(.IN_W(CW), .OUT_W(OUT_W)) u_pack (
    .clk, .rst_n,
    .in_valid (c_valid),
    .in_ready (c_ready),
    .in_code  (c_code),
    .in_len   (c_len),
    .in_last  (c_last),
    .out_valid(link_valid),
    .out_ready(p_ready),
    .out_data (link_data),
    .out_last (link_last),
    .out_nbits(link_nbits)
  );

  // Receiving side
  logic d_ready;
  assign p_ready = d_ready && !link_hold;

  rlevlc_decoder #(
    .W(OUT_W), .BC(BC), .BK(BK), .BR(BR), .BP(BP), .BRUN(BRUN), .NPIX(NPIX),
    .V1_VAL(V1_VAL), .V2_VAL(V2_VAL)
  ) u_dec (
    .clk, .rst_n,
    .in_valid (link_valid && !link_hold),
    .in_ready (d_ready),
    .in_data  (link_data),
    .in_last  (link_last),
    .in_nbits (link_nbits),
    .out_valid(dec_valid),
    .out_ready(dec_ready),
    .out_end  (dec_end),
    .out_col  (dec_col),
    .out_core (dec_core),
    .out_reg  (dec_reg),
    .out_tot  (dec_tot),
    .out_vlc  (dec_vlc)
  );

  // Cores beyond the column height do not exist.
  for (genvar c = 0; c < NCOLS; c++) begin : g_chk
    a_core: assert property (@(posedge clk) disable iff (!rst_n)
      wr_en[c] |-> (32'(wr_core[c]) < NCORES));
  end
  a_last_is_end: assert property (@(posedge clk) disable iff (!rst_n)
    (c_valid && c_last) |-> (c_sym == SYM_END));
  a_no_write_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (wr_en == '0));

endmodule

// rlevlc_decoder: decompressor for the intra-column RLE-VLC bitstream.
//
// It rebuilds the list of active regions from the packed words. The code is
// prefix free only in context, so the decoder tracks what may come next:
//   D_COL   BC bits of column address (or the end of the event when no valid
//           bits are left in the last word)
//   D_K     BK+BR bits of cluster address, then a region without F
//   D_REG   a whole region: '1' = T followed by NPIX ToT values, or '0' = H
//           followed by NPIX pixel codes ('0' = V1, '11' = V2, '10' + BP bits
//           = that value)
//   D_AFTER after a region or a run: '1' = F (next region, D_REG), or '0'
//           + BRUN bits: all ones = EOK (D_K), all zeros = EOC (D_COL), other
//           values = run of that many inactive regions (stays in D_AFTER)
// The position of the next region advances by one after each region and by
// the run length after each run.
//
// Interface: input words valid/ready with in_last on the final word of an
// event and in_nbits its number of valid leading bits. Output: one beat per
// decoded region (column, core, region, ToT values, and whether VLC was used),
// then one beat with out_end = 1 for the end of the event. Timing: bits sit in
// a 2*W bit buffer, refilled whenever at most W bits remain; one symbol, a
// whole region counting as one, is decoded per cycle, and a region is
// decoded only once all of its bits are in the buffer. A region therefore
// takes one cycle, plus one for its F, which matches the encoder's pace. The
// schedule is this design's choice; the symbol grammar is the code
// alphabet's.
module rlevlc_decoder
  import rlevlc_pkg::*;
#(
  parameter int unsigned W      = 64,
  parameter int unsigned BC     = DEF_BC,
  parameter int unsigned BK     = DEF_BK,
  parameter int unsigned BR     = DEF_BR,
  parameter int unsigned BP     = DEF_BP,
  parameter int unsigned BRUN   = DEF_BRUN,
  parameter int unsigned NPIX   = DEF_NPIX,
  parameter int unsigned V1_VAL = DEF_V1,
  parameter int unsigned V2_VAL = DEF_V2,
  localparam int unsigned WLW   = $clog2(W + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [W-1:0]            in_data,
  input  logic                    in_last,
  input  logic [WLW-1:0]          in_nbits,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic                    out_end,
  output logic [BC-1:0]           out_col,
  output logic [BK-1:0]           out_core,
  output logic [BR-1:0]           out_reg,
  output logic [NPIX-1:0][BP-1:0] out_tot,
  output logic                    out_vlc
);

  localparam int unsigned PW   = BK + BR;
  localparam int unsigned BW   = 2 * W;
  localparam int unsigned CNW  = $clog2(BW + 1);
  localparam int unsigned RMAX = 1 + NPIX * (2 + BP);   // longest region, without F

  typedef enum logic [1:0] {D_COL, D_K, D_REG, D_AFTER} dstate_t;

  dstate_t          state;
  logic [BW-1:0]    sbuf;       // bits, first one at the top
  logic [CNW-1:0]   bcnt;       // number of valid bits in sbuf
  logic             ended;      // last word of the event is in sbuf
  logic [BC-1:0]    col;
  logic [PW-1:0]    nxt;        // position of the next region

  // Region parse: the region's length and values, assuming it starts at the
  // top of the buffer. Bits beyond bcnt may be read, but then the length
  // exceeds bcnt and the result is not used.
  logic [RMAX-1:0]          win;
  logic                     r_vlc;
  logic [CNW-1:0]           r_len;
  logic [NPIX-1:0][BP-1:0]  r_tot;
  int unsigned              off;
  assign win = sbuf[BW-1 -: RMAX];

  always_comb begin
    r_vlc = !win[RMAX-1];
    r_tot = '0;
    off   = 1;
    for (int i = 0; i < NPIX; i++) begin
      if (!r_vlc) begin
        r_tot[i] = win[RMAX-1-off -: BP];
        off      = off + BP;
      end else if (!win[RMAX-1-off]) begin
        r_tot[i] = BP'(V1_VAL);
        off      = off + 1;
      end else if (win[RMAX-2-off]) begin
        r_tot[i] = BP'(V2_VAL);
        off      = off + 2;
      end else begin
        r_tot[i] = win[RMAX-3-off -: BP];
        off      = off + 2 + BP;
      end
    end
    r_len = CNW'(off);
  end

  // Decode step
  logic             stall;
  logic [CNW-1:0]   take;       // bits consumed this cycle
  logic             emit_reg, emit_end;
  logic             b0;
  logic [BRUN-1:0]  runf;

  assign stall = out_valid && !out_ready;
  assign b0    = sbuf[BW-1];
  assign runf  = sbuf[BW-2 -: BRUN];

  always_comb begin
    take     = '0;
    emit_reg = 1'b0;
    emit_end = 1'b0;
    if (!stall) begin
      unique case (state)
        D_COL: begin
          if (bcnt >= CNW'(BC)) take = CNW'(BC);
          else if (ended && bcnt == '0) emit_end = 1'b1;
        end
        D_K: if (bcnt >= CNW'(PW)) take = CNW'(PW);
        D_REG: if (bcnt >= r_len) begin
          take     = r_len;
          emit_reg = 1'b1;
        end
        D_AFTER: begin
          if (bcnt >= CNW'(1) && b0) take = CNW'(1);
          else if (bcnt >= CNW'(1 + BRUN) && !b0) take = CNW'(1 + BRUN);
        end
        default: ;
      endcase
    end
  end

  // Buffer: consume, then append an incoming word behind what is left.
  logic [CNW-1:0] left;
  assign left     = bcnt - take;
  assign in_ready = !ended && (bcnt <= CNW'(W));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sbuf  <= '0;
      bcnt  <= '0;
      ended <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        sbuf  <= (sbuf << take) | ({in_data, {W{1'b0}}} >> left);
        bcnt  <= left + CNW'(in_nbits);
        ended <= in_last;
      end else begin
        sbuf <= sbuf << take;
        bcnt <= left;
        if (emit_end) ended <= 1'b0;
      end
    end
  end

  // Symbol state machine and output register
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= D_COL;
      col       <= '0;
      nxt       <= '0;
      out_valid <= 1'b0;
      out_end   <= 1'b0;
      out_col   <= '0;
      out_core  <= '0;
      out_reg   <= '0;
      out_tot   <= '0;
      out_vlc   <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (emit_end) begin
        out_valid <= 1'b1;
        out_end   <= 1'b1;
      end
      if (emit_reg) begin
        out_valid <= 1'b1;
        out_end   <= 1'b0;
        out_col   <= col;
        {out_core, out_reg} <= nxt;
        out_tot   <= r_tot;
        out_vlc   <= r_vlc;
      end
      if (take != '0) begin
        unique case (state)
          D_COL: begin
            col   <= sbuf[BW-1 -: BC];
            state <= D_K;
          end
          D_K: begin
            nxt   <= sbuf[BW-1 -: PW];
            state <= D_REG;
          end
          D_REG: begin
            nxt   <= nxt + 1'b1;
            state <= D_AFTER;
          end
          D_AFTER: begin
            if (b0) state <= D_REG;                          // F
            else if (runf == '1) state <= D_K;               // EOK
            else if (runf == '0) state <= D_COL;             // EOC
            else nxt <= nxt + PW'(runf);                     // R,RUN
          end
          default: state <= D_COL;
        endcase
      end
    end
  end

  a_in_nbits: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && !in_last) |-> (in_nbits == WLW'(W)));

endmodule

// intra_column_encoder: cluster former and symbol generator of the RLE-VLC
// compressor, intra-column mode.
//
// It takes the active regions of one event, column after column, each column
// in scan order (core by core from the top, and inside a core region by
// region, left half before right half, row after row), and emits one codeword
// per cycle:
//   C,COL       (BC bits)      first cluster of a column
//   K,CORE,REG  (BK+BR bits)   address of the first region of a cluster
//   region      (region_coder) F is omitted for the first region of a cluster
//   R,RUN       ('0' + BRUN)   run of 1..LRMAX inactive regions, LRMAX = 2^BRUN-2
//   EOK         ('0' + 1..1)   end of cluster
//   EOC         ('0' + 0..0)   end of column (replaces the EOK of its last cluster)
// A gap of D inactive regions between two active regions of a column is kept
// inside the cluster, as ceil(D/LRMAX) run symbols, when
// (1+BRUN)*ceil(D/LRMAX) < BK+BR; otherwise the cluster is closed with EOK and
// a new one opened with K. Columns without hits produce nothing.
//
// Interface: valid/ready input. An input beat is either one active region
// (in_end = 0: column, core, region and the NPIX ToT values) or the end of the
// event (in_end = 1, other fields ignored). Columns must arrive in increasing
// order and regions of a column in increasing position. Output: valid/ready
// codeword, left aligned in code with its length in code_len, its kind in
// code_sym, and code_last on the zero-length codeword that ends the event.
// Timing: one input beat is accepted in the idle state; it then takes one
// cycle per emitted codeword (plus output stalls) before the next is accepted.
// The end of a column is detected when a region of another column or the end
// of the event arrives, so EOC is emitted at that point. The input framing and
// the one-codeword-per-cycle schedule are this design's choices; the symbols
// and the clustering rule follow the code alphabet.
module intra_column_encoder
  import rlevlc_pkg::*;
#(
  parameter int unsigned BC     = DEF_BC,
  parameter int unsigned BK     = DEF_BK,
  parameter int unsigned BR     = DEF_BR,
  parameter int unsigned BP     = DEF_BP,
  parameter int unsigned BRUN   = DEF_BRUN,
  parameter int unsigned NPIX   = DEF_NPIX,
  parameter int unsigned V1_VAL = DEF_V1,
  parameter int unsigned V2_VAL = DEF_V2,
  localparam int unsigned RMAX  = region_code_max(NPIX, BP),
  localparam int unsigned CW    = max2(max2(BC, BK + BR), max2(1 + BRUN, RMAX)),
  localparam int unsigned LENW  = $clog2(CW + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // region stream
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic                    in_end,
  input  logic [BC-1:0]           in_col,
  input  logic [BK-1:0]           in_core,
  input  logic [BR-1:0]           in_reg,
  input  logic [NPIX-1:0][BP-1:0] in_tot,
  // codeword stream
  output logic                    code_valid,
  input  logic                    code_ready,
  output logic [CW-1:0]           code,
  output logic [LENW-1:0]         code_len,
  output sym_t                    code_sym,
  output logic                    code_last
);

  localparam int unsigned PW    = BK + BR;               // linear position width
  localparam int unsigned LRMAX = (1 << BRUN) - 2;       // longest run symbol

  typedef enum logic [2:0] {
    S_IDLE, S_EOC, S_C, S_K, S_RUN, S_EOK, S_REG, S_END
  } state_t;

  state_t            state;
  logic              col_open;            // a column has been started
  logic [BC-1:0]     cur_col;
  logic [PW-1:0]     prev_pos;            // position of the last coded region
  logic [BC-1:0]     h_col;               // held input beat
  logic [PW-1:0]     h_pos;
  logic [NPIX-1:0][BP-1:0] h_tot;
  logic              h_end;
  logic              h_with_f;
  logic [PW-1:0]     run_left;

  // Gap analysis for the incoming region.
  logic [PW-1:0] in_pos, gap;
  logic [PW:0]   nruns;
  logic          fuse;
  assign in_pos = {in_core, in_reg};
  assign gap    = in_pos - prev_pos - PW'(1);
  always_comb begin
    nruns = ((PW+1)'(gap) + (PW+1)'(LRMAX - 1)) / (PW+1)'(LRMAX);
    fuse  = (32'(nruns) * (1 + BRUN)) < (BK + BR);
  end

  // Region code of the held region.
  logic [RMAX-1:0]          rcode;
  logic [$clog2(RMAX+1)-1:0] rlen;
  logic                     rvlc;
  region_coder #(.BP(BP), .NPIX(NPIX), .V1_VAL(V1_VAL), .V2_VAL(V2_VAL)) u_region (
    .tot(h_tot), .with_f(h_with_f), .code(rcode), .len(rlen), .use_vlc(rvlc)
  );

  logic [BRUN-1:0] run_now;
  assign run_now = (run_left > PW'(LRMAX)) ? BRUN'(LRMAX) : BRUN'(run_left);

  assign in_ready   = (state == S_IDLE);
  assign code_valid = (state != S_IDLE);
  assign code_last  = (state == S_END);

  always_comb begin
    code     = '0;
    code_len = '0;
    code_sym = SYM_END;
    unique case (state)
      S_C: begin
        code     = CW'(h_col) << (CW - BC);
        code_len = LENW'(BC);
        code_sym = SYM_C;
      end
      S_K: begin
        code     = CW'(h_pos) << (CW - PW);
        code_len = LENW'(PW);
        code_sym = SYM_K;
      end
      S_RUN: begin
        code     = CW'({1'b0, run_now}) << (CW - 1 - BRUN);
        code_len = LENW'(1 + BRUN);
        code_sym = SYM_RUN;
      end
      S_EOK: begin
        code     = CW'({1'b0, {BRUN{1'b1}}}) << (CW - 1 - BRUN);
        code_len = LENW'(1 + BRUN);
        code_sym = SYM_EOK;
      end
      S_EOC: begin
        code     = '0;
        code_len = LENW'(1 + BRUN);
        code_sym = SYM_EOC;
      end
      S_REG: begin
        code     = CW'(rcode) << (CW - RMAX);
        code_len = LENW'(rlen);
        code_sym = rvlc ? SYM_REG_VLC : SYM_REG_CUR;
      end
      default: ;  // S_IDLE, S_END: no bits
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      col_open <= 1'b0;
      cur_col  <= '0;
      prev_pos <= '0;
      h_col    <= '0;
      h_pos    <= '0;
      h_tot    <= '0;
      h_end    <= 1'b0;
      h_with_f <= 1'b0;
      run_left <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          h_col <= in_col;
          h_pos <= in_pos;
          h_tot <= in_tot;
          h_end <= in_end;
          run_left <= gap;
          if (in_end) begin
            state <= col_open ? S_EOC : S_END;
          end else if (!col_open) begin
            state <= S_C;
          end else if (in_col != cur_col) begin
            state <= S_EOC;
          end else if (gap == '0) begin
            h_with_f <= 1'b1;
            state    <= S_REG;
          end else if (fuse) begin
            h_with_f <= 1'b1;
            state    <= S_RUN;
          end else begin
            state <= S_EOK;
          end
        end
        S_EOC: if (code_ready) begin
          col_open <= 1'b0;
          state    <= h_end ? S_END : S_C;
        end
        S_C: if (code_ready) state <= S_K;
        S_EOK: if (code_ready) state <= S_K;
        S_K: if (code_ready) begin
          h_with_f <= 1'b0;
          state    <= S_REG;
        end
        S_RUN: if (code_ready) begin
          run_left <= run_left - PW'(run_now);
          if (run_left <= PW'(LRMAX)) state <= S_REG;
        end
        S_REG: if (code_ready) begin
          col_open <= 1'b1;
          cur_col  <= h_col;
          prev_pos <= h_pos;
          state    <= S_IDLE;
        end
        S_END: if (code_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Regions of a column must arrive in strictly increasing position, and
  // columns in increasing order.
  a_order: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_ready && !in_end && col_open) |->
      ((in_col > cur_col) || (in_col == cur_col && in_pos > prev_pos)));

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (code_valid && !code_ready) |=> (code_valid && $stable(code) && $stable(code_len)));

endmodule

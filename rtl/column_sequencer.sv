// column_sequencer: intra-column readout order for the compressor.
//
// On start it visits the core-column FIFOs from column 0 to NCOLS-1. While the
// current column's FIFO holds entries it forwards them, tagged with the column
// number, to the encoder (popping one per accepted beat); an empty FIFO moves
// it to the next column after one cycle. After the last column it sends one
// end-of-event beat (out_end = 1) and returns to idle. busy is high from the
// start pulse until that beat is accepted.
//
// Interface: the FIFOs are seen through their show-ahead outputs
// (fifo_empty, fifo_data) and pop strobes; the output is valid/ready. The
// contents of the FIFOs at the start pulse form the event: the FIFOs must not
// be written while busy. This event framing is this design's choice.
module column_sequencer #(
  parameter int unsigned NCOLS = 50,
  parameter int unsigned BC    = 6,
  parameter int unsigned DW    = 26
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  output logic                      busy,
  input  logic [NCOLS-1:0]          fifo_empty,
  input  logic [NCOLS-1:0][DW-1:0]  fifo_data,
  output logic [NCOLS-1:0]          fifo_pop,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic                      out_end,
  output logic [BC-1:0]             out_col,
  output logic [DW-1:0]             out_data
);

  typedef enum logic [1:0] {Q_IDLE, Q_SCAN, Q_END} qstate_t;
  qstate_t         state;
  logic [BC-1:0]   col;

  logic cur_empty;
  assign cur_empty = fifo_empty[col];

  assign busy      = (state != Q_IDLE);
  assign out_valid = (state == Q_END) || (state == Q_SCAN && !cur_empty);
  assign out_end   = (state == Q_END);
  assign out_col   = col;
  assign out_data  = (state == Q_SCAN) ? fifo_data[col] : '0;

  always_comb begin
    fifo_pop = '0;
    if (state == Q_SCAN && !cur_empty && out_ready) fifo_pop[col] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= Q_IDLE;
      col   <= '0;
    end else begin
      unique case (state)
        Q_IDLE: if (start) begin
          state <= Q_SCAN;
          col   <= '0;
        end
        Q_SCAN: if (cur_empty) begin
          if (col == BC'(NCOLS - 1)) state <= Q_END;
          else col <= col + 1'b1;
        end
        Q_END: if (out_ready) state <= Q_IDLE;
        default: state <= Q_IDLE;
      endcase
    end
  end

  initial assert (NCOLS <= (1 << BC)) else $error("NCOLS does not fit in BC bits");

endmodule

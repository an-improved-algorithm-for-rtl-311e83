// bit_packer: concatenates variable-length codewords into fixed-width words.
//
// Codewords are appended most significant bit first to an accumulator of
// OUT_W + IN_W bits. As soon as OUT_W bits are held, the top OUT_W bits are
// offered as one output word; while a word waits the input is stalled, so the
// input sees one idle cycle each time a word fills. A codeword flagged
// in_last (it may have zero length) closes the stream: the remaining bits are
// sent as a final word, zero padded at the bottom, with out_last set and
// out_nbits giving how many of its leading bits are valid (OUT_W on full
// words). When the stream is closed with nothing left to send (an event
// without bits, or a zero-length closing codeword right after a word boundary)
// a single word with out_nbits = 0 and out_last set is sent.
//
// Interface: valid/ready on both sides; in_code is left aligned (in_code[IN_W-1]
// goes first). Timing: one codeword per cycle, except while a word is pending.
// The word width defaults to the 64-bit payload of an Aurora 64b/66b frame;
// the padding and the bit-count sideband are this design's choices.
module bit_packer #(
  parameter int unsigned IN_W  = 26,
  parameter int unsigned OUT_W = 64,
  localparam int unsigned INLW = $clog2(IN_W + 1),
  localparam int unsigned OUTLW = $clog2(OUT_W + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [IN_W-1:0]  in_code,
  input  logic [INLW-1:0]  in_len,
  input  logic             in_last,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [OUT_W-1:0] out_data,
  output logic             out_last,
  output logic [OUTLW-1:0] out_nbits
);

  localparam int unsigned AW  = OUT_W + IN_W;
  localparam int unsigned CNW = $clog2(AW + 1);

  logic [AW-1:0]  acc;
  logic [CNW-1:0] cnt;
  logic           flushing;

  assign in_ready  = !flushing && (cnt < CNW'(OUT_W));
  assign out_valid = flushing || (cnt >= CNW'(OUT_W));
  assign out_data  = acc[AW-1 -: OUT_W];
  assign out_last  = flushing && (cnt <= CNW'(OUT_W));
  assign out_nbits = (cnt >= CNW'(OUT_W)) ? OUTLW'(OUT_W) : OUTLW'(cnt);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc      <= '0;
      cnt      <= '0;
      flushing <= 1'b0;
    end else if (in_valid && in_ready) begin
      acc <= acc | ({in_code, {OUT_W{1'b0}}} >> cnt);
      cnt <= cnt + CNW'(in_len);
      if (in_last) flushing <= 1'b1;
    end else if (out_valid && out_ready) begin
      acc <= acc << OUT_W;
      if (out_last) begin
        cnt      <= '0;
        flushing <= 1'b0;
      end else begin
        cnt <= cnt - CNW'(OUT_W);
      end
    end
  end

  a_len: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (in_len <= INLW'(IN_W)));

endmodule

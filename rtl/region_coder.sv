// region_coder: codes one active four-pixel region of the RLE-VLC bitstream.
//
// A region is coded in one of two ways, whichever is shorter:
//   current coding: T = '1' followed by the NPIX ToT values of BP bits each
//   VLC coding:     H = '0' followed by one code per pixel, where the most
//                   probable value V1 is '0', the second most probable V2 is
//                   '11' and any other value v is '10' followed by v (BP bits).
// VLC is chosen only when it is strictly shorter, which is the case when
// N1*(1+BP) + N2*BP > 2*NPIX, with N1 and N2 the numbers of pixels holding V1
// and V2; on a tie current coding is used. When with_f is set the region is
// preceded by the one-bit start-of-region symbol F = '1' (every region of a
// cluster but the first).
//
// Interface: purely combinational. tot[0] is the leftmost pixel of the region
// and is coded first. code is left aligned: code[MAXLEN-1] is the first bit on
// the wire and only the top len bits are meaningful, the rest are zero.
// The tie rule and the bit layout of the port are this design's choices; the
// symbols, their codes and the decision rule follow the code alphabet.
module region_coder #(
  parameter int unsigned BP     = rlevlc_pkg::DEF_BP,
  parameter int unsigned NPIX   = rlevlc_pkg::DEF_NPIX,
  parameter int unsigned V1_VAL = rlevlc_pkg::DEF_V1,
  parameter int unsigned V2_VAL = rlevlc_pkg::DEF_V2,
  localparam int unsigned MAXLEN = rlevlc_pkg::region_code_max(NPIX, BP),
  localparam int unsigned LENW   = $clog2(MAXLEN + 1)
) (
  input  logic [NPIX-1:0][BP-1:0] tot,
  input  logic                    with_f,
  output logic [MAXLEN-1:0]       code,
  output logic [LENW-1:0]         len,
  output logic                    use_vlc
);

  localparam logic [BP-1:0] V1 = BP'(V1_VAL);
  localparam logic [BP-1:0] V2 = BP'(V2_VAL);

  logic [$clog2(NPIX+1)-1:0] n1, n2;
  logic [MAXLEN-1:0]         acc;
  logic [LENW-1:0]           l;

  always_comb begin
    n1 = '0;
    n2 = '0;
    for (int i = 0; i < NPIX; i++) begin
      if (tot[i] == V1) n1 = n1 + 1'b1;
      else if (tot[i] == V2) n2 = n2 + 1'b1;
    end
    use_vlc = (32'(n1) * (1 + BP) + 32'(n2) * BP) > 2 * NPIX;
  end

  // Build the codeword right aligned in acc, then left align it.
  always_comb begin
    acc = '0;
    l   = '0;
    if (with_f) begin
      acc = MAXLEN'(1);
      l   = LENW'(1);
    end
    if (use_vlc) begin
      acc = acc << 1;                       // H = '0'
      l   = l + LENW'(1);
      for (int i = 0; i < NPIX; i++) begin
        if (tot[i] == V1) begin
          acc = acc << 1;                   // V1 = '0'
          l   = l + LENW'(1);
        end else if (tot[i] == V2) begin
          acc = (acc << 2) | MAXLEN'(2'b11); // V2 = '11'
          l   = l + LENW'(2);
        end else begin
          acc = (acc << (2 + BP)) | MAXLEN'({2'b10, tot[i]});
          l   = l + LENW'(2 + BP);
        end
      end
    end else begin
      acc = (acc << 1) | MAXLEN'(1'b1);     // T = '1'
      l   = l + LENW'(1);
      for (int i = 0; i < NPIX; i++) begin
        acc = (acc << BP) | MAXLEN'(tot[i]);
        l   = l + LENW'(BP);
      end
    end
    code = acc << (LENW'(MAXLEN) - l);
    len  = l;
  end

endmodule

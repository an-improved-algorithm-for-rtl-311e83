// tb_region_coder: exhaustive check of the region coder.
//
// Every combination of four 4-bit ToT values is coded with and without the
// leading F bit, and the codeword, its length and the VLC/current choice are
// compared with the software reference. The current-coded region of the
// worked example (ToT 15, 13, 3, 5) is also checked against its printed bits.
module tb_region_coder;
  import rlevlc_ref_pkg::*;

  logic [3:0][3:0] tot;
  logic            with_f;
  logic [25:0]     code;
  logic [4:0]      len;
  logic            use_vlc;
  int checks = 0, failures = 0;

  region_coder dut (.tot, .with_f, .code, .len, .use_vlc);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic rlevlc_ref ref_m = new();
    for (int v = 0; v < 65536; v++) begin
      for (int f = 0; f < 2; f++) begin
        bitq_t q;
        int t[4];
        bit ok;
        for (int i = 0; i < 4; i++) t[i] = (v >> (4 * (3 - i))) & 15;
        for (int i = 0; i < 4; i++) tot[i] = 4'(t[i]);
        with_f = f[0];
        #1;
        q.delete();
        ref_m.n_vlc = 0;
        ref_m.region(q, t, f[0]);
        ok = (int'(len) == q.size()) && (use_vlc == (ref_m.n_vlc == 1));
        for (int b = 0; b < 26; b++)
          if (code[25 - b] != ((b < q.size()) ? q[b] : 1'b0)) ok = 0;
        checks++;
        if (!ok) begin
          failures++;
          if (failures < 10)
            $display("mismatch tot=%h f=%0d len=%0d exp_len=%0d code=%b", v, f, len, q.size(), code);
        end
      end
    end
    // Printed example: F then T,15,13,3,5
    tot[0] = 4'd15; tot[1] = 4'd13; tot[2] = 4'd3; tot[3] = 4'd5; with_f = 1'b1;
    #1;
    checks++;
    if (len != 5'd18 || code[25 -: 18] != 18'b1_1_1111_1101_0011_0101 || use_vlc) begin
      failures++;
      $display("example region wrong: len=%0d code=%b", len, code);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

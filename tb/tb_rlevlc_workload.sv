// tb_rlevlc_workload: 342 synthetic triggers through the full-size design.
//
// Each trigger is a 192 x 400 hit map built from random clusters of 1 to 3
// rows by 1 to 12 pixels, added until about 81 regions are active (the mean
// occupancy that corresponds to 0.0338 bits per pixel in the 32-bit
// format). Hit pixels get ToT 1..15 (value 2 and the overflow value 15 more
// often), pixels without a hit read 0. The regions are written into the
// core-column FIFOs and compressed; the link bits must equal the software
// reference and the decoded regions the written ones. The testbench reports
// the compression ratio against 32 bits per region and the number of cycles
// from evt_start to the last link word of each trigger, which must stay
// below the bound below.
module tb_rlevlc_workload;
  import rlevlc_ref_pkg::*;

  localparam int NCOLS = 50, NROWS = 192, NPXC = 400, NTRIG = 342, TARGET = 81;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NCOLS-1:0]           wr_en, fifo_full;
  logic [NCOLS-1:0][5:0]      wr_core;
  logic [NCOLS-1:0][3:0]      wr_reg;
  logic [NCOLS-1:0][3:0][3:0] wr_tot;
  logic                       evt_start, busy, link_hold;
  logic                       link_valid, link_last;
  logic [63:0]                link_data;
  logic [6:0]                 link_nbits;
  logic                       dec_valid, dec_ready, dec_end, dec_vlc;
  logic [5:0]                 dec_col, dec_core;
  logic [3:0]                 dec_reg;
  logic [3:0][3:0]            dec_tot;

  rlevlc_top dut (.*);

  assign link_hold = 1'b0;
  assign dec_ready = 1'b1;

  int checks = 0, failures = 0;
  hit_t  exp_h[$];
  bitq_t link_bits;
  bit    got_end, enc_done;
  int    cyc, t_last;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && link_valid && dut.u_dec.in_ready) begin
      for (int b = 0; b < int'(link_nbits); b++) link_bits.push_back(link_data[63 - b]);
      if (link_last) begin
        enc_done <= 1'b1;
        t_last   <= cyc;
      end
    end
    if (rst_n && dec_valid) begin
      if (dec_end) begin
        got_end <= 1'b1;
        checks++;
        if (exp_h.size() != 0) begin failures++; $display("end beat too early"); end
      end else begin
        hit_t h;
        bit ok;
        checks++;
        if (exp_h.size() == 0) ok = 0;
        else begin
          h = exp_h.pop_front();
          ok = (int'(dec_col) == h.col) && (int'(dec_core) == h.core) && (int'(dec_reg) == h.rg);
          for (int t = 0; t < 4; t++) if (int'(dec_tot[t]) != h.tot[t]) ok = 0;
        end
        if (!ok) begin
          failures++;
          if (failures < 5) $display("decoded region %0d/%0d/%0d differs", dec_col, dec_core, dec_reg);
        end
      end
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int hit_tot();
    int r = $urandom_range(99);
    if (r < 25) return 2;
    if (r < 40) return 15;
    return $urandom_range(14, 1);
  endfunction

  // Build one trigger's active-region list, sorted by column then position.
  function automatic void make_trigger(ref hit_t hits[$]);
    int tot[int];            // key: linear region index over the chip -> packed ToTs
    int keys[$];
    int nact = 0;
    while (nact < TARGET) begin
      int h = $urandom_range(3, 1), w = $urandom_range(12, 1);
      int r0 = $urandom_range(NROWS - h), c0 = $urandom_range(NPXC - w);
      for (int r = r0; r < r0 + h; r++)
        for (int c = c0; c < c0 + w; c++) begin
          int col = c / 8, core = r / 8, rg = 2 * (r % 8) + (c % 8) / 4, px = c % 4;
          int key = (col * 24 + core) * 16 + rg;
          if (!tot.exists(key)) begin tot[key] = 0; nact++; end
          tot[key] = (tot[key] & ~(15 << (4 * px))) | (hit_tot() << (4 * px));
        end
    end
    hits.delete();
    foreach (tot[k]) begin
      hit_t hh;
      hh.col = k / (24 * 16); hh.core = (k / 16) % 24; hh.rg = k % 16;
      for (int p = 0; p < 4; p++) hh.tot[p] = (tot[k] >> (4 * p)) & 15;
      hits.push_back(hh);
    end
  endfunction

  task automatic write_event(hit_t hits[$]);
    hit_t per_col[NCOLS][$];
    bit more;
    foreach (hits[i]) per_col[hits[i].col].push_back(hits[i]);
    more = 1;
    while (more) begin
      @(negedge clk);
      more = 0;
      for (int c = 0; c < NCOLS; c++) begin
        wr_en[c] = (per_col[c].size() > 0);
        if (wr_en[c]) begin
          hit_t h;
          h = per_col[c].pop_front();
          wr_core[c] = 6'(h.core);
          wr_reg[c]  = 4'(h.rg);
          for (int t = 0; t < 4; t++) wr_tot[c][t] = 4'(h.tot[t]);
          more = 1;
        end
      end
    end
    @(negedge clk);
    wr_en = '0;
  endtask

  initial begin
    automatic rlevlc_ref ref_m = new();
    hit_t   hits[$];
    bitq_t  q;
    longint bits_total, cur_total, cyc_total;
    int     cyc_max, t0;
    wr_en = '0; wr_core = '0; wr_reg = '0; wr_tot = '0; evt_start = 0; cyc = 0;
    bits_total = 0; cur_total = 0; cyc_total = 0; cyc_max = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < NTRIG; e++) begin
      make_trigger(hits);
      q = ref_m.encode(hits);
      exp_h = hits;
      link_bits.delete();
      got_end = 0;
      enc_done = 0;
      write_event(hits);
      @(negedge clk);
      evt_start = 1;
      t0 = cyc;
      @(negedge clk);
      evt_start = 0;
      while (!got_end || !enc_done) @(posedge clk);
      checks++;
      if (link_bits != q) begin
        failures++;
        $display("trigger %0d: %0d link bits, expected %0d", e, link_bits.size(), q.size());
      end
      bits_total += longint'(q.size());
      cur_total  += longint'(32 * hits.size());
      cyc_total  += longint'(t_last) - longint'(t0);
      if (t_last - t0 > cyc_max) cyc_max = t_last - t0;
      // Bound: per region one accept cycle plus at most C, K, EOK/EOC, region
      // and two runs; one cycle per column and per link word; end beat.
      checks++;
      if (t_last - t0 > 7 * hits.size() + NCOLS + q.size() / 64 + 8) begin
        failures++;
        $display("trigger %0d took %0d cycles", e, t_last - t0);
      end
      @(posedge clk);
    end
    $display("%0d triggers: %0d bits compressed, %0d bits at 32 per region, ratio %0.3f, %0.4f bits/pixel",
             NTRIG, bits_total, cur_total, real'(cur_total) / real'(bits_total),
             real'(bits_total) / real'(NTRIG) / real'(NROWS * NPXC));
    $display("cycles from evt_start to last link word: mean %0.1f, max %0d",
             real'(cyc_total) / real'(NTRIG), cyc_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rlevlc_top: end-to-end test of the compressor and decompressor at the
// default size (50 core columns of 24 cores, 64-bit link words).
//
// For each event the testbench writes the active regions into the core-column
// FIFOs (all columns in parallel, one entry per column per cycle), pulses
// evt_start and then checks that
//   - the link bits, cut at link_nbits, equal the software reference encoding,
//   - the decoded regions equal the written ones, in column and scan order,
//     followed by one end beat.
// Event 0 is the worked example cluster of column 12 alone, which must take
// 161 bits against 288 bits with one 32-bit word per region. Event 1 is empty.
// The other events are random, with the link held and the decoded output
// stalled at random. Each mechanism of the design is counted and must occur:
// VLC and current-coded regions, runs, runs split over several symbols, new
// clusters inside a column (EOK), ends of column, packer stalls, link holds,
// output backpressure and empty events.
module tb_rlevlc_top;
  import rlevlc_pkg::*;
  import rlevlc_ref_pkg::*;

  localparam int NCOLS = 50;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NCOLS-1:0]                 wr_en, fifo_full;
  logic [NCOLS-1:0][5:0]            wr_core;
  logic [NCOLS-1:0][3:0]            wr_reg;
  logic [NCOLS-1:0][3:0][3:0]       wr_tot;
  logic                             evt_start, busy, link_hold;
  logic                             link_valid, link_last;
  logic [63:0]                      link_data;
  logic [6:0]                       link_nbits;
  logic                             dec_valid, dec_ready, dec_end, dec_vlc;
  logic [5:0]                       dec_col, dec_core;
  logic [3:0]                       dec_reg;
  logic [3:0][3:0]                  dec_tot;

  rlevlc_top dut (.*);

  int checks = 0, failures = 0;
  hit_t  exp_h[$];
  bitq_t link_bits;
  bit    got_end;
  int    hold_pct, bp_pct;
  rlevlc_ref ref_m;

  // mechanism counters
  int n_vlc, n_cur, n_run, n_split, n_eok, n_eoc, n_pack_stall, n_hold, n_bp, n_empty_evt;

  always @(posedge clk) begin
    if (rst_n) begin
      if (link_valid && !link_hold && dut.u_dec.in_ready)
        for (int b = 0; b < int'(link_nbits); b++) link_bits.push_back(link_data[63 - b]);
      if (link_valid && link_hold) n_hold++;
      if (dut.u_pack.in_valid && !dut.u_pack.in_ready && !dut.u_pack.flushing) n_pack_stall++;
      if (dec_valid && !dec_ready) n_bp++;
      if (dut.u_enc.code_valid && dut.u_enc.code_ready)
        case (dut.u_enc.code_sym)
          SYM_REG_VLC: n_vlc++;
          SYM_REG_CUR: n_cur++;
          SYM_RUN:     n_run++;
          SYM_EOK:     n_eok++;
          SYM_EOC:     n_eoc++;
          default: ;
        endcase
      if (dec_valid && dec_ready) begin
        checks++;
        if (dec_end) begin
          got_end <= 1'b1;
          if (exp_h.size() != 0) begin failures++; $display("end beat too early"); end
        end else if (exp_h.size() == 0) begin
          failures++;
          $display("unexpected region");
        end else begin
          hit_t h;
          bit ok;
          h = exp_h.pop_front();
          ok = (int'(dec_col) == h.col) && (int'(dec_core) == h.core) && (int'(dec_reg) == h.rg);
          for (int t = 0; t < 4; t++) if (int'(dec_tot[t]) != h.tot[t]) ok = 0;
          if (!ok) begin
            failures++;
            if (failures < 5) $display("decoded %0d/%0d/%0d, expected %0d/%0d/%0d",
                                       dec_col, dec_core, dec_reg, h.col, h.core, h.rg);
          end
        end
      end
    end
    link_hold <= ($urandom_range(99) < hold_pct);
    dec_ready <= ($urandom_range(99) >= bp_pct);
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_event(hit_t hits[$]);
    hit_t per_col[NCOLS][$];
    bit more;
    more = 1;
    foreach (hits[i]) per_col[hits[i].col].push_back(hits[i]);
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
    hit_t  hits[$];
    bitq_t q;
    longint bits_total, cur_total;
    ref_m = new();
    wr_en = '0; wr_core = '0; wr_reg = '0; wr_tot = '0; evt_start = 0;
    hold_pct = 0; bp_pct = 0;
    bits_total = 0; cur_total = 0;
    n_vlc = 0; n_cur = 0; n_run = 0; n_split = 0; n_eok = 0; n_eoc = 0;
    n_pack_stall = 0; n_hold = 0; n_bp = 0; n_empty_evt = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 200; e++) begin
      hits.delete();
      if (e == 0) ref_m.example(hits);
      else if (e == 1 || e % 50 == 25) n_empty_evt++;
      else ref_m.rand_event(hits, NCOLS, 24, 3);
      q = ref_m.encode(hits);
      n_split += ref_m.n_split;
      hold_pct = (e < 2) ? 0 : (e % 2) * 25;
      bp_pct   = (e < 2) ? 0 : (e % 3) * 20;
      exp_h = hits;
      link_bits.delete();
      got_end = 0;
      write_event(hits);
      @(negedge clk);
      evt_start = 1;
      @(negedge clk);
      evt_start = 0;
      while (!got_end) @(posedge clk);
      checks++;
      if (link_bits != q) begin
        failures++;
        $display("event %0d: link carried %0d bits, expected %0d", e, link_bits.size(), q.size());
      end
      if (e == 0) begin
        checks++;
        if (link_bits.size() != 161) begin failures++; $display("example took %0d bits", link_bits.size()); end
        $display("example: %0d bits against %0d, ratio %0.2f", link_bits.size(), 32 * hits.size(),
                 real'(32 * hits.size()) / real'(link_bits.size()));
      end
      bits_total += q.size();
      cur_total  += 32 * hits.size();
      @(posedge clk);
    end
    $display("random events: %0d bits against %0d, ratio %0.2f", bits_total, cur_total,
             real'(cur_total) / real'(bits_total));
    $display("mechanisms: vlc=%0d cur=%0d run=%0d split=%0d eok=%0d eoc=%0d pack_stall=%0d hold=%0d backpressure=%0d empty=%0d",
             n_vlc, n_cur, n_run, n_split, n_eok, n_eoc, n_pack_stall, n_hold, n_bp, n_empty_evt);
    checks++;
    if (n_vlc == 0 || n_cur == 0 || n_run == 0 || n_split == 0 || n_eok == 0 || n_eoc == 0 ||
        n_pack_stall == 0 || n_hold == 0 || n_bp == 0 || n_empty_evt == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

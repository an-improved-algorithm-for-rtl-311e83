// tb_intra_column_encoder: checks the cluster former and symbol generator.
//
// Event 0 is the worked example cluster of column 12 followed by a distant
// cluster in the same column and a region in column 40: its first 161 bits
// must equal the printed bitstream of the example, and the EOK, EOC and
// second-cluster symbols must follow. A directed event checks the gap rule:
// 12 inactive regions stay inside the cluster as two R,6 symbols, 13 close it. Then random events with random output
// backpressure are encoded and the concatenated codewords compared with the
// software reference. With the output always ready the encoder must take
// exactly one cycle per codeword plus one accept cycle per input beat.
module tb_intra_column_encoder;
  import rlevlc_pkg::*;
  import rlevlc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            in_valid, in_ready, in_end;
  logic [5:0]      in_col;
  logic [5:0]      in_core;
  logic [3:0]      in_reg;
  logic [3:0][3:0] in_tot;
  logic            code_valid, code_ready, code_last;
  logic [25:0]     code;
  logic [4:0]      code_len;
  sym_t            code_sym;

  int checks = 0, failures = 0;
  int n_sym[8];
  int cycles;

  intra_column_encoder dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bitq_t got;
  bit    done;
  int    bp_pct;

  // Output collector
  always @(posedge clk) begin
    if (rst_n && code_valid && code_ready) begin
      for (int b = 0; b < int'(code_len); b++) got.push_back(code[25 - b]);
      n_sym[code_sym]++;
      if (code_last) done <= 1'b1;
    end
    code_ready <= ($urandom_range(99) >= bp_pct);
  end

  task automatic send(hit_t h, bit is_end);
    @(negedge clk);
    in_valid = 1'b1;
    in_end   = is_end;
    in_col   = 6'(h.col);
    in_core  = 6'(h.core);
    in_reg   = 4'(h.rg);
    for (int t = 0; t < 4; t++) in_tot[t] = 4'(h.tot[t]);
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  task automatic run_event(hit_t hits[$], output bitq_t res, output int ncyc);
    hit_t dummy;
    int t0;
    got.delete();
    done = 1'b0;
    dummy.col = 0; dummy.core = 0; dummy.rg = 0; dummy.tot = '{0, 0, 0, 0};
    t0 = cycles;
    foreach (hits[i]) send(hits[i], 1'b0);
    send(dummy, 1'b1);
    while (!done) @(posedge clk);
    ncyc = cycles - t0;
    res = got;
  endtask

  always @(posedge clk) cycles <= rst_n ? cycles + 1 : 0;

  initial begin
    automatic rlevlc_ref ref_m = new();
    hit_t  hits[$];
    hit_t  h;
    bitq_t res, exp_q;
    int    ncyc;
    bit    ok;
    in_valid = 0; in_end = 0; in_col = 0; in_core = 0; in_reg = 0; in_tot = '0;
    bp_pct = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // Worked example, then a second cluster after a gap too long to fuse
    // (the encoder itself does not bound the core address), then column 40
    ref_m.example(hits);
    h.col = 12; h.core = 25; h.rg = 0;  h.tot = '{0, 0, 2, 0};  hits.push_back(h);
    h.col = 40; h.core = 3;  h.rg = 2;  h.tot = '{9, 9, 9, 9};  hits.push_back(h);
    run_event(hits, res, ncyc);
    ok = (res.size() >= 161);
    for (int b = 0; b < 161 && ok; b++)
      if (res[b] != ((EXAMPLE_BITS[b] == "1") ? 1'b1 : 1'b0)) ok = 0;
    checks++;
    if (!ok) begin
      failures++;
      $display("example bitstream differs");
      for (int b = 0; b < 161; b++) $write("%0d", res[b]);
      $display("");
      $display("%s", EXAMPLE_BITS);
    end
    exp_q = ref_m.encode(hits);
    checks++;
    if (res != exp_q) begin failures++; $display("example tail differs"); end
    // 3 C/K/EOC-type symbols... count codewords: every symbol plus the end beat
    checks++;
    if (ncyc != (ref_m.n_c + ref_m.n_k + ref_m.n_vlc + ref_m.n_cur + ref_m.n_run
                 + ref_m.n_eok + ref_m.n_eoc + 1) + hits.size() + 1 + 1) begin
      failures++;
      $display("example took %0d cycles", ncyc);
    end

    // Gap rule: 12 inactive regions stay in the cluster (two R,6), 13 do not
    begin
      int s0[8];
      hits.delete();
      h.col = 5; h.tot = '{0, 0, 0, 1};
      h.core = 0; h.rg = 3;  hits.push_back(h);   // position 3
      h.core = 1; h.rg = 0;  hits.push_back(h);   // position 16: gap 12
      h.core = 1; h.rg = 14; hits.push_back(h);   // position 30: gap 13
      s0 = n_sym;
      run_event(hits, res, ncyc);
      exp_q = ref_m.encode(hits);
      checks++;
      if (res != exp_q || n_sym[SYM_RUN] - s0[SYM_RUN] != 2 || n_sym[SYM_EOK] - s0[SYM_EOK] != 1
          || n_sym[SYM_K] - s0[SYM_K] != 2) begin
        failures++;
        $display("gap rule: %0d runs, %0d EOK", n_sym[SYM_RUN] - s0[SYM_RUN], n_sym[SYM_EOK] - s0[SYM_EOK]);
      end
    end

    // Random events
    for (int e = 0; e < 300; e++) begin
      bp_pct = (e % 3 == 0) ? 0 : 30;
      ref_m.rand_event(hits, 50, 24, 3);
      exp_q = ref_m.encode(hits);
      run_event(hits, res, ncyc);
      checks++;
      if (res != exp_q) begin
        failures++;
        if (failures < 5) $display("event %0d: %0d bits, expected %0d", e, res.size(), exp_q.size());
      end
      if (bp_pct == 0) begin
        checks++;
        if (ncyc != (ref_m.n_c + ref_m.n_k + ref_m.n_vlc + ref_m.n_cur + ref_m.n_run
                     + ref_m.n_eok + ref_m.n_eoc + 1) + hits.size() + 1 + 1) begin
          failures++;
          $display("event %0d took %0d cycles", e, ncyc);
        end
      end
    end
    checks++;
    if (n_sym[SYM_RUN] == 0 || n_sym[SYM_EOK] == 0 || n_sym[SYM_REG_CUR] == 0) begin
      failures++;
      $display("some symbol kinds never occurred");
    end
    $display("symbols: C=%0d K=%0d VLC=%0d CUR=%0d R=%0d EOK=%0d EOC=%0d END=%0d",
             n_sym[0], n_sym[1], n_sym[2], n_sym[3], n_sym[4], n_sym[5], n_sym[6], n_sym[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

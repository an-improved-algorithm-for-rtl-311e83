// tb_rlevlc_decoder: checks the decompressor.
//
// Events are encoded by the software reference, cut into 64-bit words with
// the bit count of the last word, and fed to the decoder with random gaps
// while its output is stalled at random. Every decoded region (column, core,
// region, ToT values, and the VLC flag) must match the original list, in
// order, followed by exactly one end beat. The events are the worked example
// cluster, an empty event, and random events.
module tb_rlevlc_decoder;
  import rlevlc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            in_valid, in_ready, in_last;
  logic [63:0]     in_data;
  logic [6:0]      in_nbits;
  logic            out_valid, out_ready, out_end, out_vlc;
  logic [5:0]      out_col, out_core;
  logic [3:0]      out_reg;
  logic [3:0][3:0] out_tot;

  rlevlc_decoder dut (.*);

  int checks = 0, failures = 0;
  hit_t exp_h[$];
  bit   got_end;
  int   bp_pct, gap_pct;
  rlevlc_ref ref_m;

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (out_end) begin
        got_end <= 1'b1;
        if (exp_h.size() != 0) begin failures++; $display("end beat too early"); end
      end else if (exp_h.size() == 0) begin
        failures++;
        $display("unexpected region");
      end else begin
        hit_t h;
        bit ok;
        h = exp_h.pop_front();
        ok = (int'(out_col) == h.col) && (int'(out_core) == h.core) && (int'(out_reg) == h.rg)
                 && (out_vlc == (ref_m.vlc_len(h.tot) < 17));
        for (int t = 0; t < 4; t++) if (int'(out_tot[t]) != h.tot[t]) ok = 0;
        if (!ok) begin
          failures++;
          if (failures < 5) $display("got %0d/%0d/%0d tot %h, expected %0d/%0d/%0d",
                                     out_col, out_core, out_reg, out_tot, h.col, h.core, h.rg);
        end
      end
    end
    out_ready <= ($urandom_range(99) >= bp_pct);
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(bitq_t q);
    automatic int nw = (q.size() + 63) / 64;
    if (nw == 0) nw = 1;
    for (int w = 0; w < nw; w++) begin
      logic [63:0] d = '0;
      int nb = 0;
      for (int b = 0; b < 64 && w * 64 + b < q.size(); b++) begin
        d[63 - b] = q[w * 64 + b];
        nb++;
      end
      while ($urandom_range(99) < gap_pct) @(negedge clk);
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = d;
      in_nbits = 7'(nb);
      in_last  = (w == nw - 1);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      #1 in_valid = 1'b0;
    end
  endtask

  initial begin
    hit_t hits[$];
    bitq_t q;
    ref_m = new();
    in_valid = 0; in_data = '0; in_nbits = '0; in_last = 0;
    bp_pct = 0; gap_pct = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 300; e++) begin
      hits.delete();
      if (e == 0) ref_m.example(hits);
      else if (e == 1) ;                       // empty event
      else ref_m.rand_event(hits, 50, 24, 3);
      q = ref_m.encode(hits);
      if (e == 0) begin
        checks++;
        if (q.size() != 161) begin failures++; $display("example is %0d bits", q.size()); end
      end
      exp_h = hits;
      got_end = 0;
      bp_pct  = (e % 3) * 20;
      gap_pct = (e % 2) * 30;
      feed(q);
      while (!got_end) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

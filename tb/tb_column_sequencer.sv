// tb_column_sequencer: checks the column-by-column readout order.
//
// Eight model FIFOs are filled with random numbers of tagged entries (many
// columns empty). After a start pulse the sequencer must deliver every entry
// of column 0, then of column 1, and so on, each tagged with its column, and
// finish with one end beat, under random output backpressure. With the output
// always ready it must take one cycle per entry, one per column it leaves and
// one for the end beat.
module tb_column_sequencer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NCOLS = 8, BC = 3, DW = 12;
  logic                     start, busy;
  logic [NCOLS-1:0]         fifo_empty, fifo_pop;
  logic [NCOLS-1:0][DW-1:0] fifo_data;
  logic                     out_valid, out_ready, out_end;
  logic [BC-1:0]            out_col;
  logic [DW-1:0]            out_data;

  column_sequencer #(.NCOLS(NCOLS), .BC(BC), .DW(DW)) dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] q[NCOLS][$];
  logic [DW-1:0] expq[$];
  int            expc[$];
  int            bp_pct;
  bit            got_end;

  always_comb
    for (int c = 0; c < NCOLS; c++) begin
      fifo_empty[c] = (q[c].size() == 0);
      fifo_data[c]  = (q[c].size() > 0) ? q[c][0] : '0;
    end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      if (out_end) begin
        got_end <= 1'b1;
        checks++;
        if (expq.size() != 0) begin failures++; $display("end beat before all entries"); end
      end else begin
        checks++;
        if (expq.size() == 0 || out_data != expq[0] || int'(out_col) != expc[0]) begin
          failures++;
          if (failures < 5) $display("got col %0d data %h", out_col, out_data);
        end
        if (expq.size() > 0) begin void'(expq.pop_front()); void'(expc.pop_front()); end
      end
    end
    for (int c = 0; c < NCOLS; c++) if (rst_n && fifo_pop[c]) void'(q[c].pop_front());
    out_ready <= ($urandom_range(99) >= bp_pct);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; bp_pct = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 200; e++) begin
      automatic int n = 0;
      int t0, t1;
      bp_pct = (e % 2) ? 40 : 0;
      for (int c = 0; c < NCOLS; c++) begin
        automatic int k = ($urandom_range(99) < 50) ? 0 : $urandom_range(5, 1);
        for (int i = 0; i < k; i++) begin
          automatic logic [DW-1:0] d = DW'($urandom);
          q[c].push_back(d);
          expq.push_back(d);
          expc.push_back(c);
          n++;
        end
      end
      got_end = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      t0 = $time / 10;
      while (!got_end) @(posedge clk);
      t1 = $time / 10;
      checks++;
      if (busy) begin failures++; $display("still busy after end"); end
      if (bp_pct == 0) begin
        checks++;
        if (t1 - t0 != n + NCOLS + 1) begin
          failures++;
          $display("event %0d: %0d cycles for %0d entries", e, t1 - t0, n);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

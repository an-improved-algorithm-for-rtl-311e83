// tb_region_fifo: checks the core-column FIFO against a queue model.
//
// Random writes and reads (never a write when full nor a read when empty, as
// the assertions demand) run for many cycles, filling the FIFO to full and
// draining it to empty several times. The show-ahead output, the full/empty
// flags and the entry count are compared with the model every cycle.
module tb_region_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int DEPTH = 32;
  logic        wr_en, rd_en, full, empty;
  logic [25:0] wr_data, rd_data;
  logic [5:0]  count;

  region_fifo dut (.*);

  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0;
  logic [25:0] model[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int bias;
      @(negedge clk);
      // compare state
      checks++;
      if (full != (model.size() == DEPTH) || empty != (model.size() == 0) ||
          int'(count) != model.size() || (model.size() > 0 && rd_data != model[0])) begin
        failures++;
        if (failures < 5) $display("cycle %0d: count=%0d model=%0d", cyc, count, model.size());
      end
      if (full) n_full++;
      if (empty) n_empty++;
      bias = ((cyc / 500) % 2) ? 70 : 30;   // alternate filling and draining
      wr_en   = !full && ($urandom_range(99) < bias);
      rd_en   = !empty && ($urandom_range(99) >= bias);
      wr_data = 26'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("never full or never empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sync_fifo: random pushes and pops against a queue model. Fills the FIFO
// to full and drains it to empty, checks full/empty/count every cycle and the
// registered read data with its valid flag.
module tb_sync_fifo;
  localparam int DEPTH = 256;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        wr_en = 0, rd_en = 0;
  logic [15:0] wr_data = '0, rd_data;
  logic        rd_valid, full, empty;
  logic [8:0]  count;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [15:0] q [$];

  always #5 clk = ~clk;

  sync_fifo #(.DEPTH(DEPTH), .DW(16)) dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data,
                                           .rd_valid, .full, .empty, .count);

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wr_pct;
    bit e_valid;
    logic [15:0] e_data;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      wr_pct  = ((n / 2000) % 2 == 0) ? 80 : 20;     // alternate filling and draining
      wr_en   = ($urandom_range(0, 99) < wr_pct) && (q.size() < DEPTH);
      rd_en   = $urandom_range(0, 99) < (100 - wr_pct);
      wr_data = 16'($urandom);
      checks++;
      if (int'(count) != q.size() || full != (q.size() == DEPTH) || empty != (q.size() == 0)) begin
        failures++;
        if (failures < 10) $display("n=%0d count=%0d model=%0d", n, count, q.size());
      end
      n_full  += int'(full);
      n_empty += int'(empty);
      e_valid = rd_en && (q.size() > 0);
      if (e_valid) e_data = q.pop_front();
      if (wr_en) q.push_back(wr_data);
      @(posedge clk); #1;
      checks++;
      if (rd_valid != e_valid || (e_valid && rd_data != e_data)) begin
        failures++;
        if (failures < 10) $display("n=%0d read %h/%0b exp %h/%0b", n, rd_data, rd_valid, e_data, e_valid);
      end
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("full or empty never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

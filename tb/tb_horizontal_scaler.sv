// tb_horizontal_scaler: the horizontal scaler writing into a 256-word FIFO.
// Lines of vertically filtered pixels (random, with hard edges to drive the
// limiter) are sent with their line enable and tags at several ratios. A
// model predicts every FIFO write: pixel value from the horizontal phase
// filter, line/field tags, and the clock edge of the write (two edges after
// the pixel carrying the DTO carry). A last run without reads must fill the
// FIFO, drop the surplus and set overflow.
module tb_horizontal_scaler;
  import ds_ref_pkg::*;

  localparam int FDEPTH = 256;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [16:0] scale_h = '0;
  logic [7:0]  data_outv = '0;
  logic        hin = 0, sol = 0, sof = 0, en_v = 0;
  logic [8:0]  fifo_count;
  logic        wr_en, overflow, h_clipped;
  logic [15:0] wr_data;
  logic        rd_en = 1'b1, rd_valid, full, empty;
  logic [15:0] rd_data;
  int checks = 0, failures = 0, n_clip = 0, n_drop = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  horizontal_scaler dut (.clk, .rst_n, .scale_h, .data_outv, .hin, .sol, .sof, .en_v, .fifo_count,
                         .wr_en, .wr_data, .overflow, .h_clipped);
  sync_fifo #(.DEPTH(FDEPTH), .DW(16)) u_fifo (.clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data,
                                               .rd_valid, .full, .empty, .count(fifo_count));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [15:0] word; longint at_edge; } exp_t;
  exp_t q [$];
  int hist [5];
  bit sol_pend = 0, sof_pend = 0, drop_mode = 0;
  int writes = 0;

  always @(negedge clk) if (rst_n && wr_en) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected write"); end
    else begin
      e = q.pop_front();
      if (wr_data != e.word || e.at_edge != cyc + 1) begin
        failures++;
        if (failures < 10) $display("write %h/%h at edge %0d/%0d", wr_data, e.word, cyc + 1, e.at_edge);
      end
    end
  end

  task automatic send_line(int w, bit ev, bit first, int step);
    int d [], acc = 0, acc_n, sel, tap [5];
    bit carry;
    exp_t e;
    longint base;
    d = new[w];
    foreach (d[i]) d[i] = ((i / 5) % 3 == 0) ? int'($urandom % 256) : (((i / 2) % 2) ? 255 : 0);
    sol_pend = 1; sof_pend |= first;
    @(negedge clk);
    base = cyc + 1;
    for (int i = 0; i < w; i++) begin
      ref_dto_step(acc, step, 5, acc_n, carry, sel);
      acc = acc_n;
      if (!carry || !ev) continue;
      tap[0] = (i + 1 < w) ? d[i+1] : d[w-1];
      for (int k = 1; k < 5; k++) tap[k] = (i - k + 1 >= 0) ? d[i-k+1] : hist[k - i - 1];
      if (ref_hclip(sel, tap)) n_clip++;
      writes++;
      if (drop_mode && writes > FDEPTH) begin n_drop++; continue; end
      e.word = {6'b0, sof_pend, sol_pend, 8'(ref_hfilt(sel, tap))};
      e.at_edge = base + i + 2;
      sol_pend = 0; sof_pend = 0;
      q.push_back(e);
    end
    for (int k = 1; k < 5; k++) hist[k] = d[w-k];
    for (int i = 0; i < w + 5; i++) begin
      if (i > 0) @(negedge clk);
      scale_h = 17'(step);
      hin = (i < w); en_v = ev;
      sol = (i == 0); sof = (i == 0) && first;
      data_outv = (i < w) ? 8'(d[i]) : 8'($urandom);
    end
  endtask

  initial begin
    int steps [4] = '{26887, 65536, 31775, 62000};
    for (int k = 0; k < 5; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (steps[s]) for (int l = 0; l < 12; l++) send_line(80, (l % 4) != 3, l == 0, steps[s]);
    repeat (10) @(negedge clk);
    // no reader: fill, drop, overflow
    rd_en = 1'b0; drop_mode = 1; writes = 0;
    for (int l = 0; l < 6; l++) send_line(80, 1'b1, 1'b0, 65536);
    repeat (10) @(negedge clk);
    checks++;
    if (!overflow || !full || q.size() != 0 || n_drop == 0 || n_clip == 0) begin
      failures++; $display("overflow=%0b full=%0b left=%0d drops=%0d clips=%0d", overflow, full, q.size(), n_drop, n_clip);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

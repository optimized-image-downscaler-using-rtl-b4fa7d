// tb_downscaler_top: end-to-end test of the downscaler at its default sizes
// (768-pixel line memories, 256 x 16 FIFO).
//
// A frame model predicts every FIFO write bit for bit: it keeps its own copy of
// the two line memories, steps the vertical phase once per line and the
// horizontal phase once per pixel, filters with plain multiply-accumulate
// arithmetic, and tags the first word of each output line and field. Each
// predicted write carries the clock edge at which it must happen (6 edges
// after the input pixel that produced the horizontal carry), and the monitor
// checks data and timing at the FIFO input; a second checker compares every
// word read out.
//
// Sequence: small 64-pixel frames at several ratio pairs (mode switches),
// one with a slow random reader (FIFO backlog), one NTSC-sized 720 x 480
// frame at 1/2.4375 in both directions (295 x 196 output pixels), and last a
// frame with no reader, which must fill the FIFO, drop the rest and raise
// overflow. Every mechanism (line skip, pixel skip, limiter, all 32 horizontal
// and 16 vertical phases, backlog, full/overflow, line and field tags, ratio
// change) is counted and must occur.
module tb_downscaler_top;
  import ds_ref_pkg::*;

  localparam int DEPTH = 768;
  localparam int FDEPTH = 256;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  pix_in = '0;
  logic        hin = 1'b0, vin = 1'b0;
  logic [16:0] scale_h = '0, scale_v = '0;
  logic        rd_en = 1'b0;
  logic [15:0] rd_data;
  logic        rd_valid, empty, full, overflow, h_clipped;
  logic [8:0]  fifo_count;

  always #5 clk = ~clk;

  downscaler_top dut (.clk, .rst_n, .pix_in, .hin, .vin, .scale_h, .scale_v, .rd_en,
                      .rd_data, .rd_valid, .empty, .full, .fifo_count, .overflow, .h_clipped);

  int checks = 0, failures = 0;
  longint cyc = 0;                 // clock edges so far
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  typedef struct {
    logic [15:0] word;
    bit          known;   // pixel value predictable (taps initialised)
    longint      at_edge;   // clock edge at which the write happens
  } exp_t;

  exp_t wq [$];            // expected FIFO writes
  exp_t rq [$];            // expected FIFO reads (written words, in order)

  int  mem1 [DEPTH], mem2 [DEPTH];   // -1: unknown
  int  hist [5];
  int  acc_v = 0;
  bit  prev_vin = 0, sol_pend = 0, sof_pend = 0;
  bit  drop_mode = 0;
  int  frame_writes = 0;

  // mechanism counters
  int n_line_skip = 0, n_line_out = 0, n_pix_skip = 0, n_clip = 0, n_drop = 0;
  int n_backlog = 0, n_sol = 0, n_sof = 0, n_ratio = 0;
  bit [31:0] hphase_seen = '0;
  bit [15:0] vphase_seen = '0;

  function automatic int vf(int p, int a, int b, int c);
    if (a < 0 || b < 0 || c < 0) return -1;
    return ref_vfilt(p, a, b, c);
  endfunction

  // Predict one line; base_edge is the clock edge that samples pixel 0.
  task automatic model_line(int w, bit vline, int pix [], int sh, int sv, longint base_edge);
    int d [];
    int acc = 0, acc_n, sel, sel_v, en_v, tap [5], val;
    bit carry, sof_line, known;
    exp_t e;
    // vertical phase
    sof_line = vline && !prev_vin;
    if (!vline) begin
      acc_v = 0; en_v = 0; sel_v = 0;
    end else begin
      ref_dto_step(acc_v, sv, 4, acc_n, carry, sel_v);
      acc_v = acc_n; en_v = carry;
      if (en_v) begin n_line_out++; vphase_seen[sel_v] = 1'b1; end
      else n_line_skip++;
    end
    prev_vin = vline;
    sol_pend |= vline;
    sof_pend |= sof_line;
    // vertical filter and line memories
    d = new[w];
    for (int i = 0; i < w; i++) begin
      d[i] = vf(sel_v, pix[i], mem1[i], mem2[i]);
      mem2[i] = mem1[i];
      mem1[i] = pix[i];
    end
    // horizontal phase and filter
    for (int i = 0; i < w; i++) begin
      ref_dto_step(acc, sh, 5, acc_n, carry, sel);
      acc = acc_n;
      if (!carry) begin n_pix_skip++; continue; end
      tap[0] = (i + 1 < w) ? d[i+1] : d[w-1];
      for (int k = 1; k < 5; k++) tap[k] = (i - k + 1 >= 0) ? d[i-k+1] : hist[k - i - 1];
      known = 1'b1;
      for (int k = 0; k < 5; k++) if (tap[k] < 0) known = 1'b0;
      val = known ? ref_hfilt(sel, tap) : 0;
      if (!en_v) continue;
      if (known && ref_hclip(sel, tap)) n_clip++;
      hphase_seen[sel] = 1'b1;
      frame_writes++;
      if (drop_mode && frame_writes > FDEPTH) begin n_drop++; continue; end
      e.word  = {6'b0, sof_pend, sol_pend, 8'(val)};
      e.known = known;
      e.at_edge  = base_edge + i + 6;
      n_sol += int'(sol_pend); n_sof += int'(sof_pend);
      sol_pend = 0; sof_pend = 0;
      wq.push_back(e);
      rq.push_back(e);
    end
    // the filter's delay line carries the last four pixels into the next line
    for (int k = 1; k < 5; k++) hist[k] = (w - k >= 0) ? d[w-k] : hist[k - w];
  endtask

  // ---------------------------------------------------------------- driver
  int read_pct = 100;

  task automatic send_line(int w, int blank, bit vline, int pix [], int sh, int sv);
    @(negedge clk);
    scale_h = 17'(sh);
    scale_v = 17'(sv);
    model_line(w, vline, pix, sh, sv, cyc + 1);
    for (int i = 0; i < w + blank; i++) begin
      if (i > 0) @(negedge clk);
      hin    = (i < w);
      vin    = vline;
      pix_in = (i < w) ? 8'(pix[i]) : 8'($urandom);
    end
  endtask

  // Pattern: 0 random, 1 binary edges, 2 diagonal cosine (fh, fv cycles/pixel,line)
  function automatic int pattern(int kind, int x, int y, real fh, real fv);
    case (kind)
      0: return int'($urandom % 256);
      1: return (((x / 3) + (y / 2)) % 2 == 0) ? 0 : 255;
      default: return int'(127.5 + 127.0 * $cos(6.283185307 * (fh * x + fv * y)));
    endcase
  endfunction

  task automatic send_frame(int w, int h, int blank, int sh, int sv, int kind, real fh, real fv);
    int pix [];
    pix = new[w];
    n_ratio++;
    $display("frame %0d starts at edge %0d", n_ratio, cyc);
    frame_writes = 0;
    // three lines outside the vertical window fill the line memories
    for (int l = 0; l < 3; l++) begin
      foreach (pix[i]) pix[i] = pattern(kind, i, l, fh, fv);
      send_line(w, blank, 1'b0, pix, sh, sv);
    end
    for (int l = 0; l < h; l++) begin
      foreach (pix[i]) pix[i] = pattern(kind, i, l + 3, fh, fv);
      send_line(w, blank, 1'b1, pix, sh, sv);
    end
    foreach (pix[i]) pix[i] = pattern(kind, i, h + 3, fh, fv);
    send_line(w, blank, 1'b0, pix, sh, sv);
  endtask

  // ---------------------------------------------------------------- checkers
  // FIFO input: data and cycle of every write (sampled at the falling edge,
  // so wr_en is the value the next rising edge acts on).
  always @(negedge clk) if (rst_n) begin
    if (dut.wr_en) begin
      exp_t e;
      checks++;
      if (wq.size() == 0) begin
        failures++;
        if (failures < 10) $display("unexpected write at edge %0d", cyc + 1);
      end else begin
        e = wq.pop_front();
        if (e.at_edge != cyc + 1 || dut.u_fifo.wr_data[15:8] != e.word[15:8] ||
            (e.known && dut.u_fifo.wr_data[7:0] != e.word[7:0])) begin
          failures++;
          if (failures < 10) $display("write mismatch edge %0d/%0d data %h/%h known %0b",
                                      cyc + 1, e.at_edge, dut.u_fifo.wr_data, e.word, e.known);
        end
      end
    end
    if (fifo_count > 8) n_backlog++;
  end

  // FIFO output
  always @(negedge clk) if (rst_n) begin
    if (rd_valid) begin
      exp_t e;
      checks++;
      if (rq.size() == 0) begin
        failures++; $display("unexpected read");
      end else begin
        e = rq.pop_front();
        if (rd_data[15:8] != e.word[15:8] || (e.known && rd_data[7:0] != e.word[7:0])) begin
          failures++;
          if (failures < 10) $display("read mismatch %h exp %h", rd_data, e.word);
        end
      end
    end
    rd_en = ($urandom_range(0, 99) < read_pct);
  end

  task automatic expect_count(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  int n_before;

  initial begin
    for (int i = 0; i < DEPTH; i++) begin mem1[i] = -1; mem2[i] = -1; end
    for (int k = 0; k < 5; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // small frames, several ratio pairs
    send_frame(64, 24, 8, 65536, 65536, 0, 0.0, 0.0);   // 1:1
    send_frame(64, 24, 8, 26887, 26887, 1, 0.0, 0.0);   // 1/2.4375, edges
    send_frame(64, 24, 4, 31775, 43690, 0, 0.0, 0.0);   // 1/2.0625 x 2/3, min blanking
    send_frame(64, 40, 8, 40000, 20000, 2, 0.22, 0.1);
    send_frame(64, 40, 8, 62000, 62000, 0, 0.0, 0.0);   // near 1: low phases
    read_pct = 75;                                        // slower reader: backlog
    send_frame(64, 24, 40, 65536, 52000, 1, 0.0, 0.0);
    read_pct = 100;
    // NTSC-sized frame: 720 x 480 active, 858 clocks per line, 1/2.4375
    n_before = n_line_out;
    send_frame(720, 480, 138, 26887, 26887, 2, 5.0 / 13.5, 0.0);
    checks++;
    if (n_line_out - n_before != 196) begin
      failures++; $display("NTSC frame: %0d output lines, expected 196", n_line_out - n_before);
    end
    // no reader: FIFO fills, the rest is dropped and overflow is flagged
    repeat (50) @(negedge clk);
    checks++;
    if (!empty || overflow) begin failures++; $display("FIFO not idle before overflow frame"); end
    read_pct = 0;
    drop_mode = 1;
    send_frame(64, 24, 8, 65536, 65536, 0, 0.0, 0.0);
    repeat (20) @(negedge clk);
    checks++;
    if (!full || !overflow || fifo_count != 9'(FDEPTH)) begin
      failures++; $display("overflow frame: full=%0b overflow=%0b count=%0d", full, overflow, fifo_count);
    end
    read_pct = 100;
    repeat (FDEPTH + 20) @(negedge clk);
    checks++;
    if (wq.size() != 0 || rq.size() != 0 || !empty) begin
      failures++; $display("left over: %0d writes, %0d reads expected", wq.size(), rq.size());
    end
    $display("mechanisms: phases h=%b v=%b", hphase_seen, vphase_seen);
    expect_count("output lines", n_line_out);
    expect_count("skipped lines (en_v low)", n_line_skip);
    expect_count("skipped pixels (en_h low)", n_pix_skip);
    expect_count("limiter clips", n_clip);
    expect_count("FIFO backlog cycles", n_backlog);
    expect_count("words dropped on full", n_drop);
    expect_count("line-start tags", n_sol);
    expect_count("field-start tags", n_sof);
    expect_count("ratio settings", n_ratio > 1 ? n_ratio : 0);
    expect_count("horizontal phases (of 32)", $countones(hphase_seen) == 32 ? 32 : 0);
    expect_count("vertical phases (of 16)", $countones(vphase_seen) == 16 ? 16 : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_workload_snr: the evaluation workload. A 720 x 480 diagonal cosine
// pattern (BT.601 active area, 13.5 MHz pixel clock, 858 clocks per line) at
// 1, 2, 3, 4 and 5 MHz horizontal frequency is scaled by 1/2.0625 (step
// 31775) and by 1/2.4375 (step 26887) in both directions. The diagonal pattern has the same frequency in
// cycles per pixel and cycles per line.
//
// For each frequency the testbench collects the scaler's output through the
// FIFO and also builds a pixel-drop image (the input pixel at each horizontal
// and vertical DTO carry). For both it computes a spectral SNR along the
// output rows: Hann window, DFT, signal = the 7 bins around the strongest
// non-DC bin, noise = all other non-DC bins, averaged over rows. It checks
// the output size (floor(720 * step / 65536) x floor(480 * step / 65536),
// e.g. 349 x 232 at 1/2.0625) and that the filtered image has the higher SNR
// at every frequency, and prints both SNRs.
module tb_workload_snr;
  import ds_ref_pkg::*;

  localparam int W = 720, H = 480, BLANK = 138;
  localparam int NSTEPS = 2;
  localparam int STEPS [NSTEPS] = '{31775, 26887};   // 1/2.0625, 1/2.4375

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  pix_in = '0;
  logic        hin = 1'b0, vin = 1'b0;
  logic [16:0] scale_h = '0, scale_v = '0;
  logic        rd_en = 1'b1;
  logic [15:0] rd_data;
  logic        rd_valid, empty, full, overflow, h_clipped;
  logic [8:0]  fifo_count;

  always #5 clk = ~clk;

  downscaler_top dut (.clk, .rst_n, .pix_in, .hin, .vin, .scale_h, .scale_v, .rd_en,
                      .rd_data, .rd_valid, .empty, .full, .fifo_count, .overflow, .h_clipped);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collected output, row by row (a new row at every line-start tag)
  int out_img [$][$];
  always @(posedge clk) if (rst_n && rd_valid) begin
    if (rd_data[8] || out_img.size() == 0) out_img.push_back('{});
    out_img[out_img.size() - 1].push_back(int'(rd_data[7:0]));
  end

  function automatic int pattern(int x, int y, real f);
    return int'(127.5 + 120.0 * $cos(6.283185307 * f * real'(x + y)));
  endfunction

  // Spectral SNR of one row, in dB.
  function automatic real row_snr(int row [$]);
    int  n = row.size();
    real mean = 0.0, re, im, p [], pk = 0.0, sig = 0.0, noise = 0.0, win;
    int  kpk = 1;
    foreach (row[i]) mean += real'(row[i]);
    mean /= real'(n);
    p = new[n / 2];
    for (int k = 1; k < n / 2; k++) begin
      re = 0.0; im = 0.0;
      for (int i = 0; i < n; i++) begin
        win = 0.5 - 0.5 * $cos(6.283185307 * real'(i) / real'(n));
        re += win * (real'(row[i]) - mean) * $cos(6.283185307 * real'(k * i) / real'(n));
        im -= win * (real'(row[i]) - mean) * $sin(6.283185307 * real'(k * i) / real'(n));
      end
      p[k] = re * re + im * im;
      if (k > 2 && p[k] > pk) begin pk = p[k]; kpk = k; end
    end
    for (int k = 3; k < n / 2; k++)
      if (k >= kpk - 3 && k <= kpk + 3) sig += p[k]; else noise += p[k];
    if (noise <= 0.0) noise = 1.0e-12;
    return 10.0 * $log10(sig / noise);
  endfunction

  task automatic send_line(bit vline, int y, real f);
    for (int i = 0; i < W + BLANK; i++) begin
      @(negedge clk);
      hin    = (i < W);
      vin    = vline;
      pix_in = (i < W) ? 8'(pattern(i, y, f)) : 8'd16;
    end
  endtask

  initial begin
    real f_mhz, f, snr_p, snr_d;
    int  rows, acc, acc_n, sel, ycar [$], xcar [$];
    bit  carry;
    int  drop_row [$];
    int  step, ow, oh;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int si = 0; si < NSTEPS; si++)
    for (int m = 1; m <= 5; m++) begin
      step = STEPS[si];
      ow = (W * step) / 65536; oh = (H * step) / 65536;
      scale_h = 17'(step); scale_v = 17'(step);
      // carry positions of the DTOs (pixel drop samples the pixel at each carry)
      xcar.delete(); ycar.delete();
      acc = 0;
      for (int i = 0; i < W; i++) begin ref_dto_step(acc, step, 5, acc_n, carry, sel); acc = acc_n; if (carry) xcar.push_back(i); end
      acc = 0;
      for (int y = 0; y < H; y++) begin ref_dto_step(acc, step, 4, acc_n, carry, sel); acc = acc_n; if (carry) ycar.push_back(y); end
      f_mhz = real'(m);
      f = f_mhz / 13.5;
      out_img.delete();
      for (int l = 0; l < 3; l++) send_line(1'b0, l - 3, f);   // fill the line memories
      for (int l = 0; l < H; l++) send_line(1'b1, l, f);
      send_line(1'b0, H, f);
      repeat (20) @(negedge clk);
      checks++;
      if (out_img.size() != oh || out_img[0].size() != ow || overflow) begin
        failures++;
        $display("%0d MHz: output %0d rows x %0d, expected %0d x %0d", m, out_img.size(),
                 out_img.size() ? out_img[0].size() : 0, oh, ow);
        continue;
      end
      snr_p = 0.0; snr_d = 0.0; rows = 0;
      for (int r = 2; r < oh; r += 8) begin
        drop_row.delete();
        foreach (xcar[c]) drop_row.push_back(pattern(xcar[c], ycar[r], f));
        snr_p += row_snr(out_img[r]);
        snr_d += row_snr(drop_row);
        rows++;
      end
      snr_p /= real'(rows); snr_d /= real'(rows);
      $display("step %0d, %0d MHz: SNR pixel drop %6.2f dB, filtered %6.2f dB", step, m, snr_d, snr_p);
      checks++;
      if (!(snr_p > snr_d)) begin
        failures++; $display("%0d MHz: filtered image not better than pixel drop", m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

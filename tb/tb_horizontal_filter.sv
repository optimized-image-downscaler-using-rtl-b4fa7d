// tb_horizontal_filter: random pixel streams, random phases and step patterns
// (to drive the limiter) through the horizontal filter, compared cycle by
// cycle against a multiply-accumulate model using an independent copy of the
// coefficient table. Checks the one-cycle output latency and the clip flag.
module tb_horizontal_filter;
  import ds_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       shift_en = 1'b0;
  logic [7:0] din = '0;
  logic [4:0] sel = '0;
  logic [7:0] dout;
  logic       clipped;
  int checks = 0, failures = 0;
  int hist [5];          // model of the four stored samples (index 1..4)
  int exp_out, n_clip = 0;
  bit exp_clip;

  always #5 clk = ~clk;

  horizontal_filter dut (.clk, .rst_n, .shift_en, .din, .sel, .dout, .clipped);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tap [5];
    for (int i = 0; i < 5; i++) hist[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      shift_en = ($urandom_range(0, 7) != 0);
      if (n % 1000 < 300) din = (($urandom_range(0, 3) == 0) ? 8'd255 : 8'd0);  // edges
      else                din = 8'($urandom);
      sel = 5'($urandom);
      // taps as the filter sees them this cycle
      tap[0] = shift_en ? int'(din) : hist[1];
      for (int i = 1; i < 5; i++) tap[i] = hist[i];
      exp_out  = ref_hfilt(int'(sel), tap);
      exp_clip = ref_hclip(int'(sel), tap);
      if (shift_en) begin
        for (int i = 4; i > 1; i--) hist[i] = hist[i-1];
        hist[1] = int'(din);
      end
      @(posedge clk); #1;
      checks++;
      if (int'(dout) != exp_out || clipped != exp_clip) begin
        failures++;
        if (failures < 10) $display("mismatch n=%0d sel=%0d dout=%0d exp=%0d clip=%0b/%0b",
                                    n, sel, dout, exp_out, clipped, exp_clip);
      end
      if (exp_clip) n_clip++;
    end
    checks++;
    if (n_clip == 0) begin failures++; $display("limiter never exercised"); end
    $display("clipped outputs: %0d", n_clip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vertical_filter: random three-line taps and phases through the vertical
// filter, compared with a linear-interpolation model (weights from the
// distance to the wanted position). Checks the one-cycle latency.
module tb_vertical_filter;
  import ds_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] x0 = '0, x1 = '0, x2 = '0, dout;
  logic [3:0] sel = '0;
  int checks = 0, failures = 0;
  int exp_out;

  always #5 clk = ~clk;

  vertical_filter dut (.clk, .rst_n, .x0, .x1, .x2, .sel, .dout);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      x0 = 8'($urandom); x1 = 8'($urandom); x2 = 8'($urandom);
      if (n < 16) begin x0 = 8'd255; x1 = 8'd255; x2 = 8'd255; end   // unity gain
      sel = (n < 16) ? 4'(n) : 4'($urandom);
      exp_out = ref_vfilt(int'(sel), int'(x0), int'(x1), int'(x2));
      @(posedge clk); #1;
      checks++;
      if (int'(dout) != exp_out) begin
        failures++;
        if (failures < 10) $display("mismatch sel=%0d x=%0d,%0d,%0d dout=%0d exp=%0d",
                                    sel, x0, x1, x2, dout, exp_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_horizontal_dto: drives lines of active pixels with several ratios and
// checks en_h and sel_h every cycle against a 1.16 phase model. Also checks
// the output rate: a 720-pixel line at 1/2.4375 (step 26887) must give
// floor(720 * 26887 / 65536) = 295 output pixels, and at 1:1 all 720.
module tb_horizontal_dto;
  import ds_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [16:0] scale_h = '0;
  logic        en_hin = 1'b0;
  logic        en_h;
  logic [4:0]  sel_h;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  horizontal_dto dut (.clk, .rst_n, .scale_h, .en_hin, .en_h, .sel_h);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_line(int step, int width, int exp_count);
    int acc = 0, acc_n, sel, count = 0;
    bit carry;
    scale_h = 17'(step);
    for (int i = 0; i < width + 3; i++) begin
      @(negedge clk);
      en_hin = (i < width);
      ref_dto_step(acc, step, 5, acc_n, carry, sel);
      if (!en_hin) begin acc_n = 0; carry = 0; end
      @(posedge clk); #1;
      checks++;
      if (en_h != carry || (en_hin && int'(sel_h) != sel)) begin
        failures++;
        if (failures < 10) $display("mismatch step=%0d i=%0d en_h=%0b/%0b sel=%0d/%0d",
                                    step, i, en_h, carry, sel_h, sel);
      end
      if (en_h) count++;
      acc = acc_n;
    end
    if (exp_count >= 0) begin
      checks++;
      if (count != exp_count) begin
        failures++;
        $display("step %0d: %0d outputs, expected %0d", step, count, exp_count);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_line(26887, 720, 295);     // 1/2.4375
    run_line(65536, 720, 720);     // 1:1
    run_line(32768, 720, 360);     // 1/2
    run_line(31775, 100, -1);      // 1/2.0625
    for (int k = 0; k < 10; k++) run_line(int'($urandom_range(1000, 65536)), 200, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

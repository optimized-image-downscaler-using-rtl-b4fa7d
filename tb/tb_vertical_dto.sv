// tb_vertical_dto: drives fields of lines (horizontal active pulses inside a
// vertical active window) and checks that en_v and sel_v change only at line
// starts, follow a 1.16 phase model with one step per line, and clear while
// the vertical active signal is low. A 480-line field at 1/2.4375 must give
// floor(480 * 26887 / 65536) = 196 output lines.
module tb_vertical_dto;
  import ds_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [16:0] scale_v = '0;
  logic        en_vin = 1'b0, en_hin = 1'b0;
  logic        en_v;
  logic [3:0]  sel_v;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vertical_dto dut (.clk, .rst_n, .scale_v, .en_vin, .en_hin, .en_v, .sel_v);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_field(int step, int lines, int exp_count);
    int acc = 0, acc_n, sel, count = 0;
    bit carry;
    scale_v = 17'(step);
    @(negedge clk); en_vin = 1'b0;
    @(negedge clk);
    checks++;
    if (en_v !== 1'b0 || sel_v !== 4'd0) begin failures++; $display("not cleared"); end
    for (int l = 0; l < lines; l++) begin
      ref_dto_step(acc, step, 4, acc_n, carry, sel);
      for (int i = 0; i < 24; i++) begin
        @(negedge clk);
        en_vin = 1'b1;
        en_hin = (i >= 4 && i < 20);
        if (i >= 5) begin
          checks++;
          if (en_v != carry || int'(sel_v) != sel) begin
            failures++;
            if (failures < 10) $display("mismatch step=%0d line=%0d en_v=%0b/%0b sel=%0d/%0d",
                                        step, l, en_v, carry, sel_v, sel);
          end
        end
      end
      if (carry) count++;
      acc = acc_n;
    end
    @(negedge clk); en_hin = 1'b0; en_vin = 1'b0;
    if (exp_count >= 0) begin
      checks++;
      if (count != exp_count) begin
        failures++; $display("step %0d: %0d lines, expected %0d", step, count, exp_count);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_field(26887, 480, 196);
    run_field(65536, 20, 20);
    run_field(31775, 60, -1);
    for (int k = 0; k < 5; k++) run_field(int'($urandom_range(2000, 65536)), 40, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

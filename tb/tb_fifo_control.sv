// tb_fifo_control: random pixel/line enables, framing pulses and FIFO fill
// levels; checks the registered write enable (only for en_h and en_v, never
// when the FIFO plus the write in flight would be full), the sol/sof tags on
// the first write after a line/field start, and the sticky overflow flag.
module tb_fifo_control;
  localparam int DEPTH = 256;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       en_h = 0, en_v = 0, sol = 0, sof = 0;
  logic [8:0] count = '0;
  logic       wr_en, sol_tag, sof_tag, overflow;
  int checks = 0, failures = 0, n_block = 0, n_wr = 0;

  always #5 clk = ~clk;

  fifo_control #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .en_h, .en_v, .sol, .sof, .count,
                                     .wr_en, .sol_tag, .sof_tag, .overflow);

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit sol_p = 0, sof_p = 0, want, blocked, e_wr = 0, e_sol = 0, e_sof = 0, e_ovf = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 10000; n++) begin
      @(negedge clk);
      en_h  = $urandom_range(0, 2) != 0;
      en_v  = (n % 200) < 150;
      sol   = (n % 50) == 0;
      sof   = (n % 1000) == 0;
      count = (n % 700 > 600) ? 9'($urandom_range(254, 256)) : 9'($urandom_range(0, 250));
      want    = en_h && en_v;
      blocked = (int'(count) + int'(wr_en)) >= DEPTH;
      e_wr  = want && !blocked;
      e_sol = sol_p || sol;
      e_sof = sof_p || sof;
      if (want && blocked) begin e_ovf = 1; n_block++; end
      if (want && !blocked) begin sol_p = 0; sof_p = 0; end
      else begin sol_p = sol_p || sol; sof_p = sof_p || sof; end
      @(posedge clk); #1;
      checks++;
      if (wr_en != e_wr || overflow != e_ovf || (wr_en && (sol_tag != e_sol || sof_tag != e_sof))) begin
        failures++;
        if (failures < 10) $display("n=%0d wr=%0b/%0b sol=%0b/%0b sof=%0b/%0b ovf=%0b/%0b", n,
                                    wr_en, e_wr, sol_tag, e_sol, sof_tag, e_sof, overflow, e_ovf);
      end
      n_wr += int'(wr_en);
    end
    checks++;
    if (n_block == 0 || n_wr == 0) begin failures++; $display("full case not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_line_sram: random enabled reads/writes against an array model. Checks
// read-before-write (a read at the address being written returns the old
// word), the one-cycle read latency and that rdata holds while disabled.
module tb_line_sram;
  localparam int DEPTH = 768;
  logic        clk = 1'b0;
  logic        en = 1'b0, we = 1'b0;
  logic [9:0]  addr = '0;
  logic [7:0]  wdata = '0, rdata;
  int checks = 0, failures = 0;
  int model [DEPTH];
  bit known [DEPTH];
  int exp_q = -1;

  always #5 clk = ~clk;

  line_sram #(.DEPTH(DEPTH), .DW(8)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word once
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      en = 1'b1; we = 1'b1; addr = 10'(a); wdata = 8'($urandom);
      model[a] = int'(wdata); known[a] = 1'b1;
    end
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      en    = ($urandom_range(0, 3) != 0);
      we    = en && $urandom_range(0, 1);
      addr  = 10'($urandom_range(0, DEPTH - 1));
      wdata = 8'($urandom);
      if (en) exp_q = model[addr];
      if (we) model[addr] = int'(wdata);
      @(posedge clk); #1;
      checks++;
      if (int'(rdata) != exp_q) begin
        failures++;
        if (failures < 10) $display("mismatch n=%0d addr=%0d q=%0d exp=%0d", n, addr, rdata, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

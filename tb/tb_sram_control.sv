// tb_sram_control: lines of random length (some longer than the memory) with
// random blanking; checks that the address counts active pixels from 0 and
// that the memory is enabled only for the first DEPTH pixels of a line.
module tb_sram_control;
  localparam int DEPTH = 40;
  logic       clk = 1'b0, rst_n = 1'b0, hin = 1'b0;
  logic       mem_en;
  logic [5:0] addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sram_control #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .hin, .mem_en, .addr);

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len, blank;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int l = 0; l < 60; l++) begin
      len   = (l == 0) ? DEPTH + 5 : $urandom_range(1, DEPTH + 10);
      blank = $urandom_range(1, 6);
      for (int i = 0; i < len + blank; i++) begin
        @(negedge clk);
        hin = (i < len);
        #1;
        checks++;
        if (hin && i < DEPTH) begin
          if (!mem_en || int'(addr) != i) begin
            failures++;
            if (failures < 10) $display("line %0d pixel %0d: en=%0b addr=%0d", l, i, mem_en, addr);
          end
        end else if (mem_en) begin
          failures++;
          if (failures < 10) $display("line %0d pixel %0d: enabled outside", l, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

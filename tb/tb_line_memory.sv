// tb_line_memory: writes random lines through the two-SRAM line memory, with
// the SRAM control generating addresses, and checks that two cycles after
// each pixel x0/x1/x2 carry that pixel position of the current line and of the
// one and two lines before.
module tb_line_memory;
  localparam int DEPTH = 768;
  localparam int W     = 720;
  localparam int LINES = 6;
  logic       clk = 1'b0, rst_n = 1'b0, hin = 1'b0;
  logic       mem_en;
  logic [9:0] addr;
  logic [7:0] din = '0, x0, x1, x2;
  int checks = 0, failures = 0;
  int img [LINES][W];

  always #5 clk = ~clk;

  sram_control #(.DEPTH(DEPTH)) u_ctl (.clk, .rst_n, .hin, .mem_en, .addr);
  line_memory  #(.DEPTH(DEPTH), .DW(8)) dut (.clk, .rst_n, .mem_en, .addr, .din, .x0, .x1, .x2);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: a pixel presented before clock edge c is on x0..x2 after edge c+1
  int pipe_l [$], pipe_i [$];
  initial begin
    int l, i;
    forever begin
      @(posedge clk); #1;
      if (pipe_l.size() > 1) begin
        l = pipe_l.pop_front(); i = pipe_i.pop_front();
        if (l >= 2 && i >= 0) begin
          checks++;
          if (int'(x0) != img[l][i] || int'(x1) != img[l-1][i] || int'(x2) != img[l-2][i]) begin
            failures++;
            if (failures < 10) $display("line %0d px %0d: %0d %0d %0d exp %0d %0d %0d", l, i,
                                        x0, x1, x2, img[l][i], img[l-1][i], img[l-2][i]);
          end
        end
      end
    end
  end

  initial begin
    for (int l = 0; l < LINES; l++) for (int i = 0; i < W; i++) img[l][i] = int'($urandom % 256);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int l = 0; l < LINES; l++) begin
      for (int i = 0; i < W + 20; i++) begin
        @(negedge clk);
        hin = (i < W);
        din = hin ? 8'(img[l][i]) : 8'($urandom);
        pipe_l.push_back(l);
        pipe_i.push_back(hin ? i : -1);
      end
    end
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

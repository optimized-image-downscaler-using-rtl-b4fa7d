// tb_sync_delay: random words through the delay line; checks that each word
// appears exactly LAT cycles later.
module tb_sync_delay;
  localparam int LAT = 3;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [3:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [3:0] hist [$];

  always #5 clk = ~clk;

  sync_delay #(.W(4), .LAT(LAT)) dut (.clk, .rst_n, .din, .dout);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      din = 4'($urandom);
      hist.push_back(din);
      @(posedge clk); #1;
      if (hist.size() > LAT) void'(hist.pop_front());
      if (hist.size() == LAT) begin
        checks++;
        if (dout != hist[0]) begin
          failures++;
          if (failures < 10) $display("n=%0d dout=%h exp=%h", n, dout, hist[0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

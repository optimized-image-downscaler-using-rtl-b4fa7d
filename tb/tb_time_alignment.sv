// tb_time_alignment: random fields of lines; checks that pixel and active
// signals come out one cycle later and that sol/sof mark the first pixel of
// each active line and of the first active line of a field.
module tb_time_alignment;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] pix_in = '0, pix;
  logic       hin_in = 1'b0, vin_in = 1'b0, hin, vin, sol, sof;
  int checks = 0, failures = 0;
  int n_sol = 0, n_sof = 0;

  always #5 clk = ~clk;

  time_alignment dut (.clk, .rst_n, .pix_in, .hin_in, .vin_in, .pix, .hin, .vin, .sol, .sof);

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e_sol, e_sof, prev_h = 0, first = 1;
    logic [7:0] e_pix;
    bit e_h, e_v;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 6; f++) begin
      for (int l = 0; l < 12; l++) begin
        for (int i = 0; i < 30; i++) begin
          @(negedge clk);
          vin_in = (l >= 2 && l < 10);
          hin_in = (i >= 5 && i < 25);
          pix_in = 8'($urandom);
          e_sol = hin_in && !prev_h && vin_in;
          e_sof = e_sol && first;
          if (!vin_in) first = 1; else if (hin_in && !prev_h) first = 0;
          prev_h = hin_in;
          e_pix = pix_in; e_h = hin_in; e_v = vin_in;
          @(posedge clk); #1;
          checks++;
          if (pix != e_pix || hin != e_h || vin != e_v || sol != e_sol || sof != e_sof) begin
            failures++;
            if (failures < 10) $display("f%0d l%0d i%0d mismatch sol=%0b/%0b sof=%0b/%0b",
                                        f, l, i, sol, e_sol, sof, e_sof);
          end
          n_sol += int'(sol); n_sof += int'(sof);
        end
      end
    end
    checks++;
    if (n_sol != 48 || n_sof != 6) begin
      failures++; $display("sol count %0d sof count %0d", n_sol, n_sof);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vertical_scaler: the vertical scaler together with the line memory it
// addresses. Random lines are sent as from the input stage (pixel, hin, vin,
// and sol/sof pulses on the first pixel of active lines). A model with its own
// copy of the two line memories and a 1.16 line-phase accumulator predicts,
// for every active pixel, the filtered value and the aligned line-enable and
// tag signals; they are checked three clock edges after the pixel is
// presented, whenever hin_out is high.
module tb_vertical_scaler;
  import ds_ref_pkg::*;

  localparam int DEPTH = 768;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [16:0] scale_v = '0;
  logic        hin = 0, vin = 0, sol = 0, sof = 0;
  logic [7:0]  pix = '0;
  logic        mem_en;
  logic [9:0]  mem_addr;
  logic [7:0]  x0, x1, x2, data_outv;
  logic        hin_out, sol_out, sof_out, en_v_out;
  int checks = 0, failures = 0, n_lines_out = 0, n_lines_skip = 0;

  always #5 clk = ~clk;

  line_memory #(.DEPTH(DEPTH), .DW(8)) u_mem (.clk, .rst_n, .mem_en, .addr(mem_addr), .din(pix), .x0, .x1, .x2);
  vertical_scaler dut (.clk, .rst_n, .scale_v, .hin, .vin, .sol, .sof, .mem_en, .mem_addr,
                       .x0, .x1, .x2, .data_outv, .hin_out, .sol_out, .sof_out, .en_v_out);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int val; bit sol, sof, en_v; } exp_t;
  exp_t q [$];
  int mem1 [DEPTH], mem2 [DEPTH];
  int acc_v = 0;

  always @(negedge clk) if (rst_n && hin_out) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected pixel"); end
    else begin
      e = q.pop_front();
      if ((e.val >= 0 && int'(data_outv) != e.val) || sol_out != e.sol || sof_out != e.sof || en_v_out != e.en_v) begin
        failures++;
        if (failures < 10) $display("mismatch: %0d/%0d sol %0b/%0b sof %0b/%0b en_v %0b/%0b", data_outv, e.val,
                                    sol_out, e.sol, sof_out, e.sof, en_v_out, e.en_v);
      end
    end
  end

  task automatic send_line(int w, bit vline, bit first, int step);
    int acc_n, sel_v, p, ev;
    bit carry;
    exp_t e;
    if (!vline) begin acc_v = 0; sel_v = 0; ev = 0; end
    else begin
      ref_dto_step(acc_v, step, 4, acc_n, carry, sel_v);
      acc_v = acc_n; ev = int'(carry);
      if (carry) n_lines_out++; else n_lines_skip++;
    end
    for (int i = 0; i < w + 6; i++) begin
      @(negedge clk);
      scale_v = 17'(step);
      hin = (i < w); vin = vline;
      sol = vline && (i == 0); sof = sol && first;
      if (i < w) begin
        p = int'($urandom % 256);
        pix = 8'(p);
        e.val  = (mem1[i] < 0 || mem2[i] < 0) ? -1 : ref_vfilt(sel_v, p, mem1[i], mem2[i]);
        e.sol  = sol; e.sof = sof; e.en_v = ev[0];
        q.push_back(e);
        mem2[i] = mem1[i]; mem1[i] = p;
      end else pix = 8'($urandom);
    end
  endtask

  initial begin
    int steps [4] = '{26887, 65536, 31775, 50000};
    for (int i = 0; i < DEPTH; i++) begin mem1[i] = -1; mem2[i] = -1; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (steps[s]) begin
      for (int l = 0; l < 2; l++) send_line(100, 1'b0, 1'b0, steps[s]);
      for (int l = 0; l < 30; l++) send_line(100, 1'b1, l == 0, steps[s]);
    end
    send_line(100, 1'b0, 1'b0, 65536);
    repeat (6) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_lines_out == 0 || n_lines_skip == 0) begin
      failures++; $display("left %0d, lines out %0d skipped %0d", q.size(), n_lines_out, n_lines_skip);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

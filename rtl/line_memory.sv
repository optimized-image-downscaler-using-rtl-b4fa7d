// line_memory: two cascaded one-line (1H) delays for the vertical filter.
//
// SRAM1 stores the incoming line while returning the line before it; SRAM2
// stores SRAM1's output while returning the line before that. Together they
// deliver, for every active pixel position, the current line (x0), the 1H
// delayed line (x1) and the 2H delayed line (x2). The two-memory cascade and
// the 768 x 8 size follow the published design. Because each SRAM read takes a
// clock, SRAM2 works one cycle behind SRAM1, and the current and 1H pixels are
// delayed so that all three taps leave together.
//
// Interface: din/mem_en/addr come from the input stage and the SRAM control.
// Timing: x0, x1, x2 appear two cycles after the pixel is presented on din.
module line_memory #(
  parameter int unsigned DEPTH = 768,
  parameter int unsigned DW    = 8,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          mem_en,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] x0,
  output logic [DW-1:0] x1,
  output logic [DW-1:0] x2
);

  logic [DW-1:0] q1, q2;
  logic          en_d;
  logic [AW-1:0] addr_d;
  logic [DW-1:0] din_d1, din_d2, q1_d;

  line_sram #(.DEPTH(DEPTH), .DW(DW), .AW(AW)) u_sram1 (
    .clk(clk), .en(mem_en), .we(mem_en), .addr(addr), .wdata(din), .rdata(q1)
  );

  line_sram #(.DEPTH(DEPTH), .DW(DW), .AW(AW)) u_sram2 (
    .clk(clk), .en(en_d), .we(en_d), .addr(addr_d), .wdata(q1), .rdata(q2)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_d   <= 1'b0;
      addr_d <= '0;
      din_d1 <= '0;
      din_d2 <= '0;
      q1_d   <= '0;
    end else begin
      en_d   <= mem_en;
      addr_d <= addr;
      din_d1 <= din;
      din_d2 <= din_d1;
      q1_d   <= q1;
    end
  end

  assign x0 = din_d2;
  assign x1 = q1_d;
  assign x2 = q2;

endmodule

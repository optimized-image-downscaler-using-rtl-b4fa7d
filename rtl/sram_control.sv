// sram_control: address generator for the two line memories.
//
// A pixel counter runs during the horizontal active time and restarts at 0
// whenever the active signal is low, so the n-th active pixel of every line
// uses address n. The SRAM is enabled (read and write) for addresses below
// DEPTH; pixels of a line longer than DEPTH are not stored. The published
// design names an SRAM control block; this counter scheme is this design's
// choice.
//
// Timing: combinational outputs for the pixel presented with hin this cycle.
module sram_control #(
  parameter int unsigned DEPTH = 768,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          hin,
  output logic          mem_en,
  output logic [AW-1:0] addr
);

  logic [AW:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      count <= '0;
    else if (!hin)                   count <= '0;
    else if (count < (AW+1)'(DEPTH)) count <= count + 1'b1;
  end

  assign mem_en = hin & (count < (AW+1)'(DEPTH));
  assign addr   = count[AW-1:0];

endmodule

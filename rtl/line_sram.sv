// line_sram: single-port line memory (one of SRAM1 / SRAM2), DEPTH x DW.
//
// Each enabled cycle reads the word at addr and, if we is high, writes wdata
// to the same address; the read returns the old contents (read before write).
// That lets one port delay a pixel stream by exactly one line: the pixel
// written at address a in one line is read back at address a in the next.
// Size (768 x 8 bits) follows the published design, which uses compiled SRAM
// macros; here the memory is an array that synthesis maps to a memory.
//
// Timing: rdata is registered, valid the cycle after en; it holds its value
// while en is low. The array is not reset.
module line_sram #(
  parameter int unsigned DEPTH = 768,
  parameter int unsigned DW    = 8,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= mem[addr];
      if (we) mem[addr] <= wdata;
    end
  end

endmodule

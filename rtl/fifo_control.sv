// fifo_control: write control of the output FIFO.
//
// The FIFO must receive only valid downscaled pixels: those for which the
// horizontal DTO raised its pixel enable (en_h) inside a line that the
// vertical DTO marked as an output line (en_v). en_h belongs to the filter's
// input cycle, so it is registered here to meet the filter's registered output.
// A write that would find the FIFO full (counting the write already issued
// last cycle) is dropped and sets the sticky
// overflow flag (cleared by reset). Two tags travel with each written pixel:
// sol_tag marks the first pixel written after a line start and sof_tag the
// first pixel written after a field start, so a reader on the far side of the
// FIFO can rebuild the output raster. Gating the write with the line and pixel
// enables follows the published block diagram; the tags, the full handling and
// the overflow flag are this design's choices.
//
// Timing: wr_en, sol_tag and sof_tag are registered, aligned with the
// horizontal filter's output pixel.
module fifo_control #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en_h,      // pixel enable from the horizontal DTO
  input  logic en_v,      // line enable from the vertical DTO, aligned
  input  logic sol,       // first active pixel of a line, aligned
  input  logic sof,       // first active pixel of a field, aligned
  input  logic [AW:0] count, // words in the FIFO
  output logic wr_en,
  output logic sol_tag,
  output logic sof_tag,
  output logic overflow
);

  logic sol_pend, sof_pend;
  logic want;
  logic full;     // no room once the write already issued lands

  assign want = en_h & en_v;
  assign full = (32'(count) + 32'(wr_en)) >= DEPTH;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sol_pend <= 1'b0;
      sof_pend <= 1'b0;
      wr_en    <= 1'b0;
      sol_tag  <= 1'b0;
      sof_tag  <= 1'b0;
      overflow <= 1'b0;
    end else begin
      wr_en   <= want & ~full;
      sol_tag <= sol_pend | sol;
      sof_tag <= sof_pend | sof;
      if (want & full) overflow <= 1'b1;
      if (want & ~full) begin
        sol_pend <= 1'b0;
        sof_pend <= 1'b0;
      end else begin
        sol_pend <= sol_pend | sol;
        sof_pend <= sof_pend | sof;
      end
    end
  end

endmodule

// time_alignment: input register stage of the downscaler.
//
// It registers the incoming pixel and the horizontal and vertical active
// signals, so that every later block sees them on the same clock edge, and
// derives two framing pulses from them: sol (first active pixel of a line,
// the rising edge of the horizontal active) and sof (first active pixel of the
// first active line of a field). The published design only names a time
// alignment block; what it contains here is this design's choice.
//
// Timing: all outputs are registered, one cycle after the inputs.
module time_alignment
  import ds_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PIX_W-1:0]  pix_in,
  input  logic              hin_in,
  input  logic              vin_in,
  output logic [PIX_W-1:0]  pix,
  output logic              hin,
  output logic              vin,
  output logic              sol,
  output logic              sof
);

  logic first_line;   // no active line seen yet in this field

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix        <= '0;
      hin        <= 1'b0;
      vin        <= 1'b0;
      sol        <= 1'b0;
      sof        <= 1'b0;
      first_line <= 1'b1;
    end else begin
      pix <= pix_in;
      hin <= hin_in;
      vin <= vin_in;
      sol <= hin_in & ~hin & vin_in;
      sof <= hin_in & ~hin & vin_in & first_line;
      if (!vin_in)                    first_line <= 1'b1;
      else if (hin_in & ~hin)         first_line <= 1'b0;
    end
  end

endmodule

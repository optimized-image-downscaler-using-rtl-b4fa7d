// sync_delay: fixed delay for the control signals of the vertical scaler.
//
// A shift register of LAT stages that delays a W-bit bundle (active signals,
// framing pulses, line enable) so that it lines up with pixel data that has
// passed the line memory and the vertical filter. The published design names
// a delay block in the vertical scaler; its length and contents are this
// design's choice.
//
// Timing: dout equals din of LAT cycles earlier; reset clears all stages.
module sync_delay #(
  parameter int unsigned W   = 4,
  parameter int unsigned LAT = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  logic [W-1:0] stage [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) stage[i] <= '0;
    end else begin
      stage[0] <= din;
      for (int i = 1; i < LAT; i++) stage[i] <= stage[i-1];
    end
  end

  assign dout = stage[LAT-1];

endmodule

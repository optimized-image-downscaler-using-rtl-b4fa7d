// vertical_dto: vertical discrete time oscillator, the line phase generator of
// the vertical scaler.
//
// It works like the horizontal DTO, one step per line instead of one per
// pixel: a 17-bit accumulator adds the 17-bit vertical ratio scale_v (1.16
// fixed point) at the start of every active line, i.e. on the rising edge of
// the horizontal active signal while the vertical active signal is high. The
// registered XOR of the sum's and the accumulator's MSBs is en_v, which tells
// whether the line produces an output line; the four bits below the MSB are
// sel_v, one of the 16 vertical filter phases. Both are held for the whole line.
// The published design names the inputs (ratio, vertical and horizontal
// active) and says the method equals the horizontal DTO; the line-start update
// and clearing the accumulator and outputs while en_vin is low are this design's choices.
//
// Timing: en_v and sel_v change one cycle after the first active pixel of a
// line is presented on en_hin.
module vertical_dto
  import ds_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SCALE_W-1:0]  scale_v,
  input  logic                en_vin,
  input  logic                en_hin,
  output logic                en_v,
  output logic [V_SEL_W-1:0]  sel_v
);

  logic               hin_q;
  logic               line_start;
  logic [SCALE_W-1:0] scale_d;
  logic [SCALE_W-1:0] scale_d_a;

  assign line_start = en_hin & ~hin_q;
  assign scale_d_a  = scale_d + scale_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hin_q   <= 1'b0;
      scale_d <= '0;
      en_v    <= 1'b0;
      sel_v   <= '0;
    end else begin
      hin_q <= en_hin;
      if (!en_vin) begin
        scale_d <= '0;
        en_v    <= 1'b0;
        sel_v   <= '0;
      end else if (line_start) begin
        scale_d <= scale_d_a;
        en_v    <= scale_d_a[SCALE_W-1] ^ scale_d[SCALE_W-1];
        sel_v   <= scale_d[SCALE_W-2 -: V_SEL_W];
      end
    end
  end

endmodule

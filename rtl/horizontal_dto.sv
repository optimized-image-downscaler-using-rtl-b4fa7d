// horizontal_dto: horizontal discrete time oscillator, the phase generator of
// the horizontal scaler.
//
// A 17-bit accumulator (ScaleD) adds the 17-bit scaling ratio scale_h once per
// active input pixel; scale_h is the ratio in 1.16 fixed point (65536 = 1:1,
// 26887 = 1/2.4375). Each time the sum (ScaleD_a) carries past a multiple of
// 2^16 its most significant bit differs from that of ScaleD: the XOR of the two
// MSBs, registered, is en_h, which marks an output pixel. The five bits just
// below the MSB of ScaleD, registered, are sel_h, which choose one of the 32
// horizontal filter phases. This structure, the widths and the XOR follow the
// published DTO diagram. Clearing the accumulator while en_hin is low, so that
// every line starts at phase 0, is this design's choice.
//
// Timing: en_h and sel_h are registered. In the cycle after an active pixel has
// been accumulated, en_h tells whether that pixel produced a carry and sel_h
// gives the accumulator phase before that pixel.
module horizontal_dto
  import ds_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SCALE_W-1:0]  scale_h,
  input  logic                en_hin,
  output logic                en_h,
  output logic [H_SEL_W-1:0]  sel_h
);

  logic [SCALE_W-1:0] scale_d;     // ScaleD
  logic [SCALE_W-1:0] scale_d_a;   // ScaleD_a = ScaleD + Scale_h

  assign scale_d_a = scale_d + scale_h;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scale_d <= '0;
      en_h    <= 1'b0;
      sel_h   <= '0;
    end else begin
      scale_d <= en_hin ? scale_d_a : '0;
      en_h    <= en_hin & (scale_d_a[SCALE_W-1] ^ scale_d[SCALE_W-1]);
      sel_h   <= scale_d[SCALE_W-2 -: H_SEL_W];
    end
  end

endmodule

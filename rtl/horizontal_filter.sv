// horizontal_filter: 5-tap, 32-phase polyphase filter of the horizontal scaler,
// built as a multiplexer-adder ("coefficient multiplexer, then one adder").
//
// The incoming vertical-scaler output runs through a chain of four registers,
// giving five taps (tap 0 = the sample on din this cycle). The 5-bit phase
// select picks one of the 32 coefficient sets of ds_pkg::hcoef. Instead of
// computing 32 filter outputs and selecting one, the selected coefficients
// drive the multiplication directly: for each tap, each bit of the
// coefficient's magnitude gates a shifted copy of the tap (x, 2x, 4x ... 128x),
// and all gated copies are added, with the coefficient's sign, in a single
// sum. The sum (gain 256) is limited to 0 .. 256*256-1, divided by 256 by
// dropping 8 bits, and registered. The order of these steps, the 1/256 gain,
// the coefficients and the 8-bit input and output follow the published
// architecture; the 18-bit signed sum width and truncation (no rounding) are
// this design's choices.
//
// Interface: shift_en marks din as an active pixel and advances the tap chain.
// While it is low the chain holds and tap 0 repeats the newest stored pixel,
// so the output due for the last pixel of a line, computed in the first
// blanking cycle, sees the edge pixel repeated instead of blanking data (this
// design's choice; the chain also carries the previous line's last pixels into
// the start of the next line). sel is the phase from the horizontal DTO. dout is registered: it holds the filter
// output for the taps and sel present one cycle earlier. clipped flags, in the
// same cycle as dout, that the limiter changed the value.
module horizontal_filter
  import ds_pkg::*;
#(
  parameter int unsigned DW = PIX_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift_en,
  input  logic [DW-1:0]       din,
  input  logic [H_SEL_W-1:0]  sel,
  output logic [DW-1:0]       dout,
  output logic                clipped
);

  localparam int unsigned SUM_W = DW + COEF_W + 1;   // 18 bits for 8-bit pixels
  localparam int unsigned MAG_W = COEF_W - 1;

  // The phase select must address exactly the published number of phases.
  if (H_PHASES != (1 << H_SEL_W)) begin : g_bad_phases
    $error("horizontal_filter: H_PHASES must equal 2**H_SEL_W");
  end

  logic [DW-1:0] dly [1:H_TAPS-1];
  logic [DW-1:0] tap [H_TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < H_TAPS; i++) dly[i] <= '0;
    end else if (shift_en) begin
      dly[1] <= din;
      for (int i = 2; i < H_TAPS; i++) dly[i] <= dly[i-1];
    end
  end

  always_comb begin
    tap[0] = shift_en ? din : dly[1];
    for (int i = 1; i < H_TAPS; i++) tap[i] = dly[i];
  end

  // Coefficient multiplexer followed by the single shift-and-add sum.
  logic signed [SUM_W-1:0] acc;
  always_comb begin
    coef_t                   c;
    logic [MAG_W-1:0]        mag;
    logic signed [SUM_W-1:0] part;
    acc = '0;
    for (int t = 0; t < H_TAPS; t++) begin
      c    = hcoef(sel, t);
      mag  = c[COEF_W-1] ? MAG_W'(-c) : c[MAG_W-1:0];
      part = '0;
      for (int b = 0; b < MAG_W; b++)
        if (mag[b]) part = part + (SUM_W'(tap[t]) << b);
      acc = c[COEF_W-1] ? acc - part : acc + part;
    end
  end

  // Limit, then divide by 256.
  localparam logic signed [SUM_W-1:0] LIM_MAX = SUM_W'((1 << (DW + H_SHIFT)) - 1);
  logic signed [SUM_W-1:0] lim;
  logic                    clip_c;
  always_comb begin
    clip_c = 1'b0;
    lim    = acc;
    if (acc < 0) begin
      lim = '0;      clip_c = 1'b1;
    end else if (acc > LIM_MAX) begin
      lim = LIM_MAX; clip_c = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout    <= '0;
      clipped <= 1'b0;
    end else begin
      dout    <= lim[H_SHIFT +: DW];
      clipped <= clip_c;
    end
  end

endmodule

// vertical_filter: 3-tap, 16-phase filter of the vertical scaler.
//
// The three taps are the same pixel position in the current line, the line
// before (1H) and the line before that (2H), all delivered by the line memory.
// The 4-bit phase from the vertical DTO picks one of 16 coefficient sets; as in
// the horizontal filter the selected coefficients gate shifted copies of each
// tap and one sum adds them. The gain of 1/64 and the 3-tap, 16-phase
// structure follow the published design; the coefficients are this design's
// own (linear interpolation, see ds_pkg::vcoef), because none are published.
// The sum is limited to 0 .. 64*256-1 and divided by 64, as in the horizontal
// filter. With the built-in coefficients the limit never acts, but it is kept
// so that other coefficient sets with negative taps work unchanged.
//
// Interface: x0/x1/x2 are current/1H/2H pixels, sel the phase. dout is
// registered, one cycle after its inputs.
module vertical_filter
  import ds_pkg::*;
#(
  parameter int unsigned DW = PIX_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DW-1:0]       x0,
  input  logic [DW-1:0]       x1,
  input  logic [DW-1:0]       x2,
  input  logic [V_SEL_W-1:0]  sel,
  output logic [DW-1:0]       dout
);

  localparam int unsigned SUM_W = DW + COEF_W + 1;
  localparam int unsigned MAG_W = COEF_W - 1;

  // The phase select must address exactly the published number of phases.
  if (V_PHASES != (1 << V_SEL_W)) begin : g_bad_phases
    $error("vertical_filter: V_PHASES must equal 2**V_SEL_W");
  end

  logic [DW-1:0] tap [V_TAPS];
  assign tap[0] = x0;
  assign tap[1] = x1;
  assign tap[2] = x2;

  logic signed [SUM_W-1:0] acc;
  always_comb begin
    coef_t                   c;
    logic [MAG_W-1:0]        mag;
    logic signed [SUM_W-1:0] part;
    acc = '0;
    for (int t = 0; t < V_TAPS; t++) begin
      c    = vcoef(sel, t);
      mag  = c[COEF_W-1] ? MAG_W'(-c) : c[MAG_W-1:0];
      part = '0;
      for (int b = 0; b < MAG_W; b++)
        if (mag[b]) part = part + (SUM_W'(tap[t]) << b);
      acc = c[COEF_W-1] ? acc - part : acc + part;
    end
  end

  localparam logic signed [SUM_W-1:0] LIM_MAX = SUM_W'((1 << (DW + V_SHIFT)) - 1);
  logic signed [SUM_W-1:0] lim;
  always_comb begin
    lim = acc;
    if (acc < 0)            lim = '0;
    else if (acc > LIM_MAX) lim = LIM_MAX;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= lim[V_SHIFT +: DW];
  end

endmodule

// ds_pkg: constants and coefficient tables shared by the image downscaler.
//
// The downscaler works on 8-bit pixels at one pixel per clock. Both scaling
// directions use a 17-bit phase accumulator (a "discrete time oscillator", DTO)
// whose step is the scaling ratio in 1.16 fixed point: a step of 2^16 is a
// ratio of 1, a step of 2^16/2.4375 = 26887 scales by 1/2.4375.
//
// Horizontal filter: 5 taps, 32 phases, gain 1/256. The 32 coefficient sets
// below are the published table, row n+1 selected by phase n. Tap 1 multiplies
// the newest sample. Every row sums to 256, and the group delay runs from about
// 1.5 samples (phase 0) to 2.5 samples (phase 31).
//
// Vertical filter: 3 taps, 16 phases, gain 1/64. No coefficients are published
// for it, so this design uses linear interpolation between the two lines that
// straddle the wanted position. It mirrors the horizontal filter: a group delay
// of 0.5 + (p + 0.5)/16 lines for phase p, centred on the middle tap. All
// weights are even integers that sum to 64.
package ds_pkg;

  localparam int unsigned PIX_W     = 8;   // pixel width
  localparam int unsigned SCALE_W   = 17;  // DTO step / accumulator width
  localparam int unsigned H_TAPS    = 5;
  localparam int unsigned H_PHASES  = 32;
  localparam int unsigned H_SEL_W   = 5;
  localparam int unsigned H_SHIFT   = 8;   // gain 1/256
  localparam int unsigned V_TAPS    = 3;
  localparam int unsigned V_PHASES  = 16;
  localparam int unsigned V_SEL_W   = 4;
  localparam int unsigned V_SHIFT   = 6;   // gain 1/64
  localparam int unsigned COEF_W    = 9;   // signed coefficient width (-256..255)

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t hcoef_set_t [H_TAPS];
  typedef coef_t vcoef_set_t [V_TAPS];

  // Horizontal coefficients, one tap at a time (tap 0 = newest sample).
  function automatic coef_t hcoef(input logic [H_SEL_W-1:0] sel, input int tap);
    coef_t row [H_TAPS];
    case (sel)
      5'd0 : row = '{-9'sd2, 9'sd126, 9'sd133, -9'sd1,  9'sd0};
      5'd1 : row = '{-9'sd4, 9'sd122, 9'sd139,  9'sd0, -9'sd1};
      5'd2 : row = '{-9'sd4, 9'sd116, 9'sd143,  9'sd2, -9'sd1};
      5'd3 : row = '{-9'sd6, 9'sd111, 9'sd149,  9'sd4, -9'sd2};
      5'd4 : row = '{-9'sd6, 9'sd105, 9'sd153,  9'sd6, -9'sd2};
      5'd5 : row = '{-9'sd6, 9'sd99,  9'sd157,  9'sd8, -9'sd2};
      5'd6 : row = '{-9'sd6, 9'sd93,  9'sd161,  9'sd10, -9'sd2};
      5'd7 : row = '{-9'sd6, 9'sd88,  9'sd164,  9'sd12, -9'sd2};
      5'd8 : row = '{-9'sd6, 9'sd82,  9'sd168,  9'sd14, -9'sd2};
      5'd9 : row = '{-9'sd6, 9'sd76,  9'sd172,  9'sd16, -9'sd2};
      5'd10: row = '{-9'sd6, 9'sd69,  9'sd176,  9'sd19, -9'sd2};
      5'd11: row = '{-9'sd6, 9'sd64,  9'sd176,  9'sd25, -9'sd3};
      5'd12: row = '{-9'sd6, 9'sd59,  9'sd178,  9'sd29, -9'sd4};
      5'd13: row = '{-9'sd6, 9'sd54,  9'sd180,  9'sd32, -9'sd4};
      5'd14: row = '{-9'sd5, 9'sd48,  9'sd182,  9'sd35, -9'sd4};
      5'd15: row = '{-9'sd4, 9'sd44,  9'sd180,  9'sd40, -9'sd4};
      5'd16: row = '{-9'sd4, 9'sd40,  9'sd180,  9'sd44, -9'sd4};
      5'd17: row = '{-9'sd4, 9'sd35,  9'sd182,  9'sd48, -9'sd5};
      5'd18: row = '{-9'sd4, 9'sd32,  9'sd180,  9'sd54, -9'sd6};
      5'd19: row = '{-9'sd4, 9'sd29,  9'sd178,  9'sd59, -9'sd6};
      5'd20: row = '{-9'sd3, 9'sd25,  9'sd176,  9'sd64, -9'sd6};
      5'd21: row = '{-9'sd2, 9'sd19,  9'sd176,  9'sd69, -9'sd6};
      5'd22: row = '{-9'sd2, 9'sd16,  9'sd172,  9'sd76, -9'sd6};
      5'd23: row = '{-9'sd2, 9'sd14,  9'sd168,  9'sd82, -9'sd6};
      5'd24: row = '{-9'sd2, 9'sd12,  9'sd164,  9'sd88, -9'sd6};
      5'd25: row = '{-9'sd2, 9'sd10,  9'sd161,  9'sd93, -9'sd6};
      5'd26: row = '{-9'sd2, 9'sd8,   9'sd157,  9'sd99, -9'sd6};
      5'd27: row = '{-9'sd2, 9'sd6,   9'sd153,  9'sd105, -9'sd6};
      5'd28: row = '{-9'sd2, 9'sd4,   9'sd149,  9'sd111, -9'sd6};
      5'd29: row = '{-9'sd1, 9'sd2,   9'sd143,  9'sd116, -9'sd4};
      5'd30: row = '{-9'sd1, 9'sd0,   9'sd139,  9'sd122, -9'sd4};
      default: row = '{9'sd0, -9'sd1,  9'sd133,  9'sd126, -9'sd2};
    endcase
    return row[tap];
  endfunction

  // Vertical coefficients (tap 0 = current line, tap 2 = line delayed by 2H).
  // Position in 1/64 line units: d = 34 + 4p, i.e. 0.5 + (p + 0.5)/16 lines.
  function automatic coef_t vcoef(input logic [V_SEL_W-1:0] sel, input int tap);
    int d;
    int w [V_TAPS];
    d = 34 + 4 * int'(sel);
    if (d < 64) begin
      w[0] = 64 - d; w[1] = d;       w[2] = 0;
    end else begin
      w[0] = 0;      w[1] = 128 - d; w[2] = d - 64;
    end
    return coef_t'(w[tap]);
  endfunction

endpackage

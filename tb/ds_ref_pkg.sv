// ds_ref_pkg: reference arithmetic for the downscaler testbenches.
//
// Everything here is written independently of the RTL: the horizontal
// coefficient table is a separate copy of the published table (each row sums
// to 256), the vertical coefficients come from a direct linear-interpolation
// formula, and the filters are plain multiply-accumulate loops instead of the
// RTL's gated shift-and-add. The DTO model steps a 1.16 fixed-point phase.
package ds_ref_pkg;

  localparam int HTAB [32][5] = '{
    '{  -2,  126,  133,   -1,    0},
    '{  -4,  122,  139,    0,   -1},
    '{  -4,  116,  143,    2,   -1},
    '{  -6,  111,  149,    4,   -2},
    '{  -6,  105,  153,    6,   -2},
    '{  -6,   99,  157,    8,   -2},
    '{  -6,   93,  161,   10,   -2},
    '{  -6,   88,  164,   12,   -2},
    '{  -6,   82,  168,   14,   -2},
    '{  -6,   76,  172,   16,   -2},
    '{  -6,   69,  176,   19,   -2},
    '{  -6,   64,  176,   25,   -3},
    '{  -6,   59,  178,   29,   -4},
    '{  -6,   54,  180,   32,   -4},
    '{  -5,   48,  182,   35,   -4},
    '{  -4,   44,  180,   40,   -4},
    '{  -4,   40,  180,   44,   -4},
    '{  -4,   35,  182,   48,   -5},
    '{  -4,   32,  180,   54,   -6},
    '{  -4,   29,  178,   59,   -6},
    '{  -3,   25,  176,   64,   -6},
    '{  -2,   19,  176,   69,   -6},
    '{  -2,   16,  172,   76,   -6},
    '{  -2,   14,  168,   82,   -6},
    '{  -2,   12,  164,   88,   -6},
    '{  -2,   10,  161,   93,   -6},
    '{  -2,    8,  157,   99,   -6},
    '{  -2,    6,  153,  105,   -6},
    '{  -2,    4,  149,  111,   -6},
    '{  -1,    2,  143,  116,   -4},
    '{  -1,    0,  139,  122,   -4},
    '{   0,   -1,  133,  126,   -2}
  };

  // Linear interpolation weight (gain 64) of vertical tap t for phase p: the
  // wanted position is 0.5 + (p + 0.5)/16 lines behind the current line.
  function automatic int ref_vcoef(int p, int t);
    real pos;
    real w;
    pos = 0.5 + (real'(p) + 0.5) / 16.0;
    w   = 1.0 - ((pos > real'(t)) ? pos - real'(t) : real'(t) - pos);
    if (w < 0.0) w = 0.0;
    return int'(w * 64.0);
  endfunction

  function automatic int clamp8(int s, int shift);
    int q;
    if (s < 0) return 0;
    q = s >>> shift;
    return (q > 255) ? 255 : q;
  endfunction

  // Horizontal filter: tap[0] newest.
  function automatic int ref_hfilt(int p, int tap[5]);
    int s = 0;
    for (int t = 0; t < 5; t++) s += HTAB[p][t] * tap[t];
    return clamp8(s, 8);
  endfunction

  function automatic bit ref_hclip(int p, int tap[5]);
    int s = 0;
    for (int t = 0; t < 5; t++) s += HTAB[p][t] * tap[t];
    return (s < 0) || (s > 65535);
  endfunction

  // Vertical filter: x0 current line, x2 two lines back.
  function automatic int ref_vfilt(int p, int x0, int x1, int x2);
    int s;
    s = ref_vcoef(p, 0) * x0 + ref_vcoef(p, 1) * x1 + ref_vcoef(p, 2) * x2;
    return clamp8(s, 6);
  endfunction

  // One DTO step: from phase acc (0 .. 2^17-1) with ratio step; returns the
  // new phase, whether an output sample is produced and the phase index
  // (top bits of the old phase's fraction).
  function automatic void ref_dto_step(input int acc, input int step, input int sel_bits,
                                       output int acc_n, output bit carry, output int sel);
    acc_n = (acc + step) % 131072;
    carry = ((acc_n >= 65536) != (acc >= 65536));
    sel   = (acc % 65536) >> (16 - sel_bits);
  endfunction

endpackage

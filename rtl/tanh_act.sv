// tanh_act: hyperbolic tangent activation by piecewise-linear approximation.
//
// The input is a signed fixed-point number with IN_FRAC fraction bits; the
// output is signed with OUT_FRAC fraction bits (1.0 = 2^OUT_FRAC). The curve
// is odd, so |x| is mapped and the sign put back. On |x| the curve is linear
// between the exact tanh values at 0, 0.5, 1, 1.5, 2 and 3 and saturates at
// 1.0 beyond 3. The tanh values at the breakpoints are stored with 16
// fraction bits and rounded to OUT_FRAC bits; slopes keep 16 fraction bits.
// The document uses a piecewise-linear tanh without giving its
// segments; these segments are this design's choice.
// Purely combinational. Inputs up to 60 bits with up to 56 fraction bits are
// supported.
module tanh_act #(
  parameter int unsigned IN_W     = 13,
  parameter int unsigned IN_FRAC  = 8,
  parameter int unsigned OUT_W    = 8,
  parameter int unsigned OUT_FRAC = 6
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);
  // magnitude, tables and products are held in 64-bit integers
  if (IN_W > 60 || IN_FRAC > 56) begin : g_too_wide
    $error("tanh_act: input wider than the 64-bit arithmetic allows");
  end

  localparam int unsigned NSEG = 5;
  localparam int unsigned SF   = 16;  // slope fraction bits
  // breakpoints in halves: 0, 1, 2, 3, 4, 6 (x = 0 .. 3)
  localparam int HALVES [NSEG+1] = '{0, 1, 2, 3, 4, 6};
  // tanh at the breakpoints, in units of 2^-16
  localparam longint TV [NSEG+1] = '{0, 30285, 49912, 59320, 63179, 65212};

  localparam longint ONE_OUT = longint'(1) << OUT_FRAC;

  typedef longint tab_t [NSEG+1];
  // breakpoints in input units
  function automatic tab_t mk_bpx();
    tab_t r;
    for (int s = 0; s <= int'(NSEG); s++) r[s] = (longint'(HALVES[s]) << IN_FRAC) >> 1;
    return r;
  endfunction
  // tanh at the breakpoints, rounded to output units
  function automatic tab_t mk_bpy();
    tab_t r;
    for (int s = 0; s <= int'(NSEG); s++) r[s] = ((TV[s] << OUT_FRAC) + (longint'(1) << (SF - 1))) >> SF;
    return r;
  endfunction
  // slope of segment s, output per input unit with SF fraction bits
  function automatic tab_t mk_slope();
    tab_t r;
    r[NSEG] = 0;
    for (int s = 0; s < int'(NSEG); s++)
      r[s] = ((TV[s+1] - TV[s]) * 2) / (longint'(HALVES[s+1]) - longint'(HALVES[s]));
    return r;
  endfunction
  localparam tab_t BPX   = mk_bpx();
  localparam tab_t BPY   = mk_bpy();
  localparam tab_t SLOPE = mk_slope();

  logic                 neg;
  logic [IN_W-1:0]      mag;
  longint               xa, yabs, dx;

  always_comb begin
    neg  = x[IN_W-1];
    mag  = neg ? IN_W'(-x) : IN_W'(x);
    xa   = longint'(mag);
    yabs = ONE_OUT;
    dx   = 0;
    for (int s = int'(NSEG) - 1; s >= 0; s--) begin
      if (xa < BPX[s+1]) begin
        dx   = xa - BPX[s];
        yabs = BPY[s] + ((dx * SLOPE[s]) >>> (IN_FRAC + SF - OUT_FRAC));
      end
    end
    if (yabs > ONE_OUT) yabs = ONE_OUT;
    y = neg ? OUT_W'(-yabs) : OUT_W'(yabs);
  end
endmodule

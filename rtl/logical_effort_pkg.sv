// Unified logical-effort model of a UMC 65 nm inverter at ultra-low
// supply, used to size the clock buffers of the thermally robust H-tree.
//
// Moderate inversion (near threshold, about 0.33 V to 0.5 V):
//   1/g = B(T)*V^2 + C(T)*V + D(T),
// with B, C and D second-order polynomials of the temperature T in degrees
// C and V the supply in volts.
// Weak inversion (sub-threshold, below about 0.33 V):
//   1/g = E(T) * exp(F(T) * (V - V_T0)),
// with E of fourth and F of second order in T. The coefficients of both
// are the published UMC 65 nm fits.
//
// The buffer-width rule W2 = W1 * g(V,T) needs g relative to its 25 C
// value at the same supply, so logical_effort() divides by the 25 C value;
// this removes the fits' own scale factors. In weak inversion that ratio
// still depends on V - V_T0. V_T0 (the threshold voltage at 0 C) is not
// published as a number; this design derives it from the published
// normalisation of the weak fit, 1/g = 1 at 25 C and about 0.33 V:
//   V_T0 = 0.33 + ln(E(25)) / F(25) = 0.338 V.
// With it, a buffer model built on this package reproduces the published
// uncompensated 0.3 V clock skews of the H-tree to within a few percent.
//
// Temperature code format (T[9:0] of each local sensor): this design reads
// the code as an unsigned number of quarter degrees above -50 C, so
// 0 = -50 C, 300 = 25 C and 700 = 125 C. The source sensor's exact code
// format is not published; this scale is this design's own choice.
`timescale 1ns / 1ps
package logical_effort_pkg;

  localparam int unsigned TCODE_W = 10;      // T[9:0]
  localparam int          TCODE_OFFSET_C = -50;
  localparam int          TCODE_PER_C = 4;   // quarter-degree steps

  // Temperature in degrees C for a sensor code.
  function automatic real tcode_to_celsius(input logic [TCODE_W-1:0] code);
    return real'(code) / real'(TCODE_PER_C) + real'(TCODE_OFFSET_C);
  endfunction

  // Raw unified 1/g of the near-threshold fit (UMC 65 nm).
  function automatic real inv_g_raw(input real vdd, input real t);
    real b, c, d;
    b = -2.05e-4 * t * t - 4.81e-2 * t + 15.9;
    c =  6.54e-5 * t * t + 5.87e-2 * t - 8.75;
    d =  3.21e-6 * t * t - 1.22e-2 * t + 1.30;
    return b * vdd * vdd + c * vdd + d;
  endfunction

  // Supply below which the weak-inversion fit is used, and the threshold
  // voltage at 0 C derived above.
  localparam real WEAK_BELOW_V = 0.33;
  localparam real VT0_V        = 0.338;

  // Raw unified 1/g of the sub-threshold fit (UMC 65 nm).
  function automatic real inv_g_weak_raw(input real vdd, input real t);
    real e, f;
    e = 6.88e-10 * t * t * t * t - 2.37e-7 * t * t * t + 2.86e-5 * t * t
        + 1.20e-2 * t + 0.855;
    f = 2.90e-4 * t * t - 1.06e-1 * t + 21.1;
    return e * $exp(f * (vdd - VT0_V));
  endfunction

  // Raw 1/g of the region the supply falls in.
  function automatic real inv_g_any(input real vdd, input real t);
    return (vdd < WEAK_BELOW_V) ? inv_g_weak_raw(vdd, t) : inv_g_raw(vdd, t);
  endfunction

  // Logical effort g(V,T), normalised to 1 at (vdd, 25 C).
  function automatic real logical_effort(input real vdd, input real t);
    return inv_g_any(vdd, 25.0) / inv_g_any(vdd, t);
  endfunction

  // Width that keeps g at 1: W2 = W1 * g(V,T), rounded and clipped to the
  // 1X..255X range of the tunable-width inverter.
  function automatic int unsigned target_width(input real vdd, input int unsigned w1,
                                               input real t);
    real w;
    w = real'(w1) * logical_effort(vdd, t);
    if (w < 1.0) return 1;
    if (w > 255.0) return 255;
    return int'($rtoi(w + 0.5));
  endfunction

endpackage

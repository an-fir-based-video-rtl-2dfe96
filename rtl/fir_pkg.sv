// fir_pkg: reset-time interpolation kernel of the multi-phase filters.
//
// The kernel is a sinc truncated by a raised-cosine window,
//   h(d) = W(d) * sin(pi*d)/(pi*d),   W(d) = cos(pi*beta*d) / (1 - (2*beta*d)^2),
// evaluated at the TAPS sample distances of each of PHASES stored phases and
// quantised to signed coefficients with CFRAC fractional bits. Each phase is
// normalised so its coefficients sum to exactly 1.0 (the rounding residue
// goes to the larger of the two centre taps), which keeps flat areas flat.
// Tap k (k = 0 is the newest sample) of phase p sits at distance
// d = TAPS/2 - k - p/PHASES from the output position.
// The kernel shape is the document's; beta and the quantisation are this
// design's choices. The coefficients can be rewritten at run time.
package fir_pkg;
  localparam real PI = 3.14159265358979;

  function automatic real kernel(input real d, input real beta);
    real s, w, den;
    s = (d > -1.0e-9 && d < 1.0e-9) ? 1.0 : $sin(PI * d) / (PI * d);
    den = 1.0 - (2.0 * beta * d) * (2.0 * beta * d);
    if (den > -1.0e-6 && den < 1.0e-6) w = PI / 4.0;   // limit at |2*beta*d| = 1
    else w = $cos(PI * beta * d) / den;
    return s * w;
  endfunction

  function automatic int coef(input int taps, input int tap, input int phase,
                              input int phases, input int cfrac, input real beta);
    real raw [16];
    real sum, d;
    int  q [16];
    int  qsum, centre;
    sum = 0.0;
    for (int k = 0; k < taps; k++) begin
      d = real'(taps / 2 - k) - real'(phase) / real'(phases);
      raw[k] = kernel(d, beta);
      sum += raw[k];
    end
    qsum = 0;
    for (int k = 0; k < taps; k++) begin
      q[k] = $rtoi(raw[k] / sum * real'(1 << cfrac) + ((raw[k] >= 0.0) ? 0.5 : -0.5));
      qsum += q[k];
    end
    centre = (2 * phase < phases) ? taps / 2 : taps / 2 - 1;
    q[centre] += (1 << cfrac) - qsum;
    return q[tap];
  endfunction
endpackage

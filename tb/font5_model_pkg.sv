// font5_model_pkg: reference arithmetic for the feedback testbenches,
// written from the specification of each stage rather than from the RTL:
// diff/sum through a binned reciprocal, the start-up gain table, and the
// saturating delay-loop sum.
package font5_model_pkg;
  import font5_pkg::*;

  function automatic int m_sat(input longint v, input int bits);
    longint hi, lo;
    hi = (longint'(1) << (bits - 1)) - 1;
    lo = -(longint'(1) << (bits - 1));
    return int'((v > hi) ? hi : (v < lo) ? lo : v);
  endfunction

  // Normalised position, Q1.(POS_W-1).
  function automatic int m_pos(input int s, input int d);
    int a, sbits;
    longint r;
    sbits = ADC_W - 1 - RECIP_AW;
    a = (s <= 0) ? 0 : (s >> sbits);
    r = (a == 0) ? 0 : longint'($rtoi((2.0 ** (RECIP_FRAC + 1)) / (2.0 * a + 1.0) + 0.5));
    return m_sat((longint'(d) * r) >>> (RECIP_FRAC + sbits - (POS_W - 1)), POS_W);
  endfunction

  // Correction read from a gain table holding gain g_q8/256 (negative feedback).
  function automatic int m_corr(input int p, input int g_q8);
    int v;
    v = p >>> (POS_W - GAIN_AW);
    return m_sat(-(longint'(g_q8) * v * (longint'(1) << (DAC_W - GAIN_AW))) / 256, DAC_W);
  endfunction

  function automatic int m_acc(input int acc, input int c, input bit dl_on);
    return m_sat(longint'(dl_on ? acc : 0) + c, DAC_W);
  endfunction
endpackage

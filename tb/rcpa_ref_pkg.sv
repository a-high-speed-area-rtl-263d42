// Reference models for the RCPA testbenches.
//
// The adder model works from the meaning of the reverse carry, not from the
// gate equations of the RCPFA cell: walking from the most significant bit
// down, bit i already owes 2*C_{i+1}; if A_i, B_i and C_{i+1} are all equal
// the carry C_i it asks from below is the forecast F_i, otherwise it is
// C_{i+1}; S_i is A_i + B_i + C_i - 2*C_{i+1} clipped to 0..1. The exact
// forecast is read off an ordinary integer addition.
package rcpa_ref_pkg;
  import rcpa_pkg::*;

  // Forecast F_i for bit i (i >= 1), F_0 = cin.
  function automatic bit ref_forecast(longint unsigned a, longint unsigned b, bit cin,
                                      int i, forecast_e fc);
    longint unsigned lo_mask;
    if (i == 0) return cin;
    case (fc)
      FC_EXACT: begin
        lo_mask = (64'd1 << i) - 1;
        return bit'((((a & lo_mask) + (b & lo_mask) + cin) >> i) & 1);
      end
      FC_I:    return bit'((a >> (i - 1)) & 1);
      FC_II:   return bit'((a >> (i - 1)) & (b >> (i - 1)) & 1);
      default: return bit'(((a >> (i - 1)) | (b >> (i - 1))) & 1);
    endcase
  endfunction

  // Result {cout, sum} of a width-bit RCPA; c_lsb returns C_0.
  function automatic longint unsigned ref_add(longint unsigned a, longint unsigned b, bit cin,
                                              int width, forecast_e fc, output bit c_lsb);
    longint unsigned res;
    bit c_up, c_dn, ai, bi;
    int t;
    c_up = ref_forecast(a, b, cin, width, fc);
    res  = longint'(c_up) << width;
    for (int i = width - 1; i >= 0; i--) begin
      ai = bit'((a >> i) & 1);
      bi = bit'((b >> i) & 1);
      if (ai == bi && bi == c_up) c_dn = ref_forecast(a, b, cin, i, fc);
      else                        c_dn = c_up;
      t = int'(ai) + int'(bi) + int'(c_dn) - 2 * int'(c_up);
      if (t > 0) res |= longint'(1) << i;
      c_up = c_dn;
    end
    c_lsb = c_up;
    return res;
  endfunction

  // Shift-and-add product using ref_add for every partial-product step.
  function automatic longint unsigned ref_mul(longint unsigned a, longint unsigned b,
                                              int width, forecast_e fc);
    longint unsigned acc, lo, s, pp;
    bit unused;
    acc = 0;
    lo  = 0;
    for (int k = 0; k < width; k++) begin
      pp  = ((a >> k) & 1) != 0 ? b : 0;
      s   = ref_add(acc, pp, 1'b0, width, fc, unused);
      lo |= (s & 1) << k;
      acc = s >> 1;
    end
    return (acc << width) | lo;
  endfunction

endpackage

// tb_ref_pkg: bit-accurate reference model of the PID-like fuzzy controller,
// written independently of the RTL for the testbenches. Everything is plain
// integer arithmetic on int values. Products with 4.4 gains are rounded to
// nearest (halves away from zero) and the centroid is rounded to nearest.
//
// Input fuzzy sets: triangles 32 codes apart peaking at 16 + 32*k in the
// shifted [0, 255] range, 6-bit memberships (one = 63), full membership in the
// outer sets beyond the outer peaks. Output singletons at round(256*k/7),
// clipped to 255. The rule table is the printed 8 x 8 table (rows: rate set,
// columns: error set), typed in again here from its set names.
package tb_ref_pkg;

  typedef enum int {NB = 0, NM, NS, NZ, PZ, PS, PM, PB} fset_e;

  // rule_tab[r][e]
  localparam fset_e RULE_TAB [8][8] = '{
    '{NB, NB, NB, NM, NM, NS, NZ, PZ},
    '{NB, NB, NM, NM, NS, NZ, PZ, PZ},
    '{NB, NM, NM, NS, NZ, PZ, PZ, PS},
    '{NM, NM, NS, NZ, PZ, PZ, PS, PM},
    '{NM, NS, NZ, NZ, PZ, PS, PM, PM},
    '{NS, NZ, NZ, PZ, PS, PM, PM, PB},
    '{NZ, NZ, PZ, PS, PM, PM, PB, PB},
    '{NZ, PZ, PS, PM, PM, PB, PB, PB}
  };

  function automatic int clamp8(int v);
    if (v > 127)  return 127;
    if (v < -128) return -128;
    return v;
  endfunction

  // Division by 16 rounded to nearest, halves away from zero.
  function automatic int round16(int v);
    if (v >= 0) return (v + 8) / 16;
    return -((-v + 8) / 16);
  endfunction

  // Input gain then shift: signed x, unsigned 4.4 k -> 0..255.
  function automatic int ref_gain_in(int x, int k);
    return clamp8(round16(x * k)) + 128;
  endfunction

  // Shift then output gain: 0..255 z, unsigned 4.4 k -> signed.
  function automatic int ref_gain_out(int z, int k);
    return clamp8(round16((z - 128) * k));
  endfunction

  // First active set and its membership for shifted input x.
  function automatic void ref_mf(int x, output int idx, output int mu);
    int f;
    if (x < 16) begin
      idx = 0; mu = 63;
    end else if (x >= 240) begin
      idx = 6; mu = 0;
    end else begin
      idx = (x - 16) / 32;
      f   = (x - 16) % 32;
      // linear fall from 63 at the peak to ~0 at the next peak, rounded
      mu  = 63 - int'($floor(real'(f) * 63.0 / 32.0 + 0.5));
    end
  endfunction

  function automatic int ref_singleton(int k);
    int v;
    v = int'($floor(256.0 * real'(k) / 7.0 + 0.5));
    return (v > 255) ? 255 : v;
  endfunction

  // inv = 1 selects the inverted table (consequent set k replaced by 7-k).
  function automatic int ref_beta(int e_set, int r_set, bit inv = 1'b0);
    int k;
    k = int'(RULE_TAB[r_set][e_set]);
    return ref_singleton(inv ? 7 - k : k);
  endfunction

  function automatic int imin(int a, int b);
    return (a < b) ? a : b;
  endfunction

  // Fuzzy inference system on shifted inputs s1 (error axis), s2 (rate axis).
  function automatic int ref_fis(int s1, int s2, bit inv = 1'b0);
    int i1, m1, i2, m2;
    int idx1 [2], mu1 [2], idx2 [2], mu2 [2];
    int num, den, w;
    ref_mf(s1, i1, m1);
    ref_mf(s2, i2, m2);
    idx1 = '{i1, i1 + 1}; mu1 = '{m1, 63 - m1};
    idx2 = '{i2, i2 + 1}; mu2 = '{m2, 63 - m2};
    num = 0; den = 0;
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++) begin
        w    = imin(mu1[a], mu2[b]);
        num += w * ref_beta(idx1[a], idx2[b], inv);
        den += w;
      end
    if (den == 0) return 128;
    return (num + den / 2) / den;     // rounded centroid
  endfunction

  function automatic int ref_pdflc(int x1, int x2, int k1, int k2, int ko, bit inv = 1'b0);
    return ref_gain_out(ref_fis(ref_gain_in(x1, k1), ref_gain_in(x2, k2), inv), ko);
  endfunction

endpackage

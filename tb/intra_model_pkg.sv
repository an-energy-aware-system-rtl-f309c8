// intra_model_pkg: reference model of HEVC intra prediction for the
// testbenches.
//
// Written straight from the HEVC equations with the neighbours held as
// separate arrays (left column L[], above row T[], corner C), forming each
// mode's main reference ref[k] (k = 0 the corner, k > 0 the main side,
// k < 0 the projected other side for negative angles), so it shares no
// addressing scheme with the hardware. pred_sample() returns one predicted
// sample. Planar, DC (with the first row/column filter for luma blocks below
// 32x32) and the angular modes are modelled; the vertical/horizontal
// boundary filter and the reference smoothing filter are not, matching the
// hardware.
package intra_model_pkg;

  int unsigned L[64];   // p[-1][y]
  int unsigned T[64];   // p[x][-1]
  int unsigned C;       // p[-1][-1]

  function automatic int angle_of(int mode);
    case (mode)
      2, 34: return 32;   3, 33: return 26;   4, 32: return 21;   5, 31: return 17;
      6, 30: return 13;   7, 29: return 9;    8, 28: return 5;    9, 27: return 2;
      11, 25: return -2;  12, 24: return -5;  13, 23: return -9;  14, 22: return -13;
      15, 21: return -17; 16, 20: return -21; 17, 19: return -26; 18: return -32;
      default: return 0;
    endcase
  endfunction

  function automatic int inv_of(int angle);
    case (angle)
      -2: return -4096;  -5: return -1638;  -9: return -910;  -13: return -630;
      -17: return -482;  -21: return -390;  -26: return -315; -32: return -256;
      default: return 0;
    endcase
  endfunction

  function automatic int log2i(int n);
    int l = 0;
    while ((1 << l) < n) l++;
    return l;
  endfunction

  function automatic int unsigned dc_value(int n);
    int unsigned s = 0;
    for (int i = 0; i < n; i++) s += L[i] + T[i];
    return (s + n) >> (log2i(n) + 1);
  endfunction

  // main reference sample ref[k] of an angular mode
  function automatic int unsigned ref_main(int k, bit vert, int inv);
    int s;
    if (k == 0) return C;
    if (k > 0) return vert ? T[k-1] : L[k-1];
    s = -1 + ((k * inv + 128) >>> 8);
    return vert ? L[s] : T[s];
  endfunction

  function automatic int unsigned pred_sample(int n, int mode, bit luma, int x, int y);
    int lg = log2i(n);
    if (mode == 0)
      return ((n-1-x)*L[y] + (x+1)*T[n] + (n-1-y)*T[x] + (y+1)*L[n] + n) >> (lg+1);
    if (mode == 1) begin
      int unsigned dc = dc_value(n);
      if (luma && n < 32) begin
        if (x == 0 && y == 0) return (L[0] + 2*dc + T[0] + 2) >> 2;
        if (y == 0)           return (T[x] + 3*dc + 2) >> 2;
        if (x == 0)           return (L[y] + 3*dc + 2) >> 2;
      end
      return dc;
    end
    begin
      int a   = angle_of(mode);
      int inv = inv_of(a);
      bit vert = (mode >= 18);
      int u = vert ? x : y;   // position along the main side
      int v = vert ? y : x;   // distance from the main side
      int pos = (v+1)*a;
      int idx = pos >>> 5;
      int f   = pos & 31;
      if (f == 0) return ref_main(u+idx+1, vert, inv);
      return ((32-f)*ref_main(u+idx+1, vert, inv) + f*ref_main(u+idx+2, vert, inv) + 16) >> 5;
    end
  endfunction

endpackage

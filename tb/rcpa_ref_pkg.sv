// rcpa_ref_pkg: reference models used by the adder testbenches.
//
// rcpa_ref computes, bit by bit from the top down, what a W-bit reverse
// carry propagate adder must produce: the forecast into bit i+1 is A[i]
// (F[0] given), the top carry C[W] equals F[W], a bit whose operand bits
// differ hands its required carry down unchanged, any other bit asks the
// lower bit for its forecast, and each sum bit is the parity of
// A[i] + B[i] + C[i]. rcpa_err gives the arithmetic error the reverse
// scheme must show: each bit where A[i] == B[i] != C[i+1] contributes
// +2^(i+1) (both operand bits 0) or -2^(i+1) (both 1).
package rcpa_ref_pkg;

  typedef struct {
    longint unsigned s;
    longint unsigned c;   // C[W-1:0]
    longint unsigned f;   // F[W:1]
    bit              f_out;
    bit              c0;
  } rcpa_res_t;

  function automatic rcpa_res_t rcpa_ref(int w, longint unsigned a,
                                         longint unsigned b, bit f_in);
    rcpa_res_t r;
    bit chi, cl, fi, ai, bi;
    r.s = 0;
    r.c = 0;
    r.f = 0;
    for (int i = 0; i < w; i++) r.f[i] = a[i];
    r.f_out = a[w-1];
    chi = r.f_out;
    for (int i = w - 1; i >= 0; i--) begin
      ai = a[i];
      bi = b[i];
      fi = (i == 0) ? f_in : a[i-1];
      cl = (ai != bi) ? chi : fi;
      r.s[i] = ai ^ bi ^ cl;
      r.c[i] = cl;
      chi = cl;
    end
    r.c0 = chi;
    return r;
  endfunction

  // Signed error (approximate - exact) of a W-bit rcpa with forecast-in f_in
  // when its result is read as s + 2^W * F[W] against a + b + C[0].
  function automatic longint rcpa_err(int w, longint unsigned a,
                                      longint unsigned b, longint unsigned c,
                                      bit f_out);
    longint e;
    bit chi;
    e = 0;
    for (int i = w - 1; i >= 0; i--) begin
      chi = (i == w - 1) ? f_out : c[i+1];
      if (a[i] == b[i] && a[i] != chi) begin
        if (a[i]) e -= longint'(2) << i;
        else      e += longint'(2) << i;
      end
    end
    return e;
  endfunction

endpackage

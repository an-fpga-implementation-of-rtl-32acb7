// ldpc_ref_pkg: reference arithmetic for the decoder testbenches, written from the
// decoding equations rather than from the RTL.
//   ref_f       : f(x) = ln((1+e^-x)/(1-e^-x)) evaluated in real arithmetic, scaled to
//                 the 0.25-LSB format and rounded, saturated to 15.
//   ref_cnu     : check node update on K hybrid words (sum of the other magnitudes,
//                 saturated to 63, through f; sign = XOR of the other signs).
//   ref_vnu     : variable node update of one degree-3 node (integer sums, f, sign).
package ldpc_ref_pkg;
  localparam int KR = 6;

  function automatic int ref_f(int m);
    real x, v;
    if (m <= 0) return 15;
    x = m / 4.0;
    v = $ln((1.0 + $exp(-x)) / (1.0 - $exp(-x))) * 4.0;
    v = $floor(v + 0.5);
    return (v > 15.0) ? 15 : int'(v);
  endfunction

  // sign-magnitude 5-bit to integer
  function automatic int sm(logic [4:0] v);
    return v[4] ? -int'(v[3:0]) : int'(v[3:0]);
  endfunction

  // beta[i] for K hybrid inputs; returns parity through the output argument
  function automatic void ref_cnu(input logic [5:0] xin [KR], output logic [4:0] beta [KR],
                                  output logic parity);
    int tot; logic sg;
    parity = 0;
    for (int i = 0; i < KR; i++) parity ^= xin[i][5];
    for (int i = 0; i < KR; i++) begin
      tot = 0; sg = 0;
      for (int n = 0; n < KR; n++)
        if (n != i) begin
          tot += int'(xin[n][3:0]);
          sg  ^= xin[n][4];
        end
      if (tot > 63) tot = 63;
      beta[i] = {sg, 4'(ref_f(tot))};
    end
  endfunction

  function automatic void ref_vnu(input logic [4:0] z, input logic [4:0] y [3],
                                  output logic [5:0] xo [3], output logic hd);
    int lam, g;
    lam = sm(z) + sm(y[0]) + sm(y[1]) + sm(y[2]);
    hd  = (lam <= 0);
    for (int i = 0; i < 3; i++) begin
      g = lam - sm(y[i]);
      xo[i] = {hd, (g < 0), 4'(ref_f(g < 0 ? -g : g))};
    end
  endfunction
endpackage

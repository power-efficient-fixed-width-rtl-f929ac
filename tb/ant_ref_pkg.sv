// ant_ref_pkg: reference arithmetic for the ANT multiplier testbenches.
//
// rpr_ref() evaluates the fixed-width replica product from the full operands
// with global bit indices, directly from the compensation rules:
//   MSP   : x_i y_j with N/2 <= i, j <= N-1 and i + j >= 3N/2
//   beta' : number of ones among x_(N-1-k) y_(N/2+k), k = 0..N/2-2
//   C_m   : beta' == 0 and some x_(N-2-k) y_(N/2+k), k = 0..N/2-2, is one
//   C_N/2 : x_(N/2) y_(N-1) or C_m
// result = MSP / 2^(3N/2) + beta' + C_N/2.
package ant_ref_pkg;
  function automatic bit xbit(longint unsigned v, int i);
    return bit'((v >> i) & 1);
  endfunction

  function automatic bit cm_ref(longint unsigned x, longint unsigned y, int n);
    int  beta1 = 0;
    bit  micv  = 1'b0;
    for (int k = 0; k <= n / 2 - 2; k++) begin
      if (xbit(x, n - 1 - k) && xbit(y, n / 2 + k)) beta1++;
      micv  |= xbit(x, n - 2 - k) & xbit(y, n / 2 + k);
    end
    return (beta1 == 0) && micv;
  endfunction

  // Direct truncation: the MSP alone, in units of 2^(3N/2).
  function automatic longint unsigned msp_ref(longint unsigned x, longint unsigned y, int n);
    longint unsigned msp = 0;
    for (int i = n / 2; i < n; i++)
      for (int j = n / 2; j < n; j++)
        if (i + j >= 3 * n / 2 && xbit(x, i) && xbit(y, j))
          msp += longint'(1) << (i + j - 3 * n / 2);
    return msp;
  endfunction

  function automatic longint unsigned rpr_ref(longint unsigned x, longint unsigned y, int n);
    longint unsigned msp = msp_ref(x, y, n);
    int              beta1 = 0;
    bit              clast;
    for (int k = 0; k <= n / 2 - 2; k++)
      if (xbit(x, n - 1 - k) && xbit(y, n / 2 + k)) beta1++;
    clast = (xbit(x, n / 2) & xbit(y, n - 1)) | cm_ref(x, y, n);
    return msp + longint'(beta1) + longint'(clast);
  endfunction
endpackage

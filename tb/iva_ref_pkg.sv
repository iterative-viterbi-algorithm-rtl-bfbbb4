// iva_ref_pkg: behavioural reference of the parity-concatenated encoder,
// used by the testbenches to build expected data independently of the RTL.
//
// encode() takes the information bits of one block, (ROWS-1)*K_B bits for
// ROWS > 1 (K_B bits for ROWS = 1), forms the column parity row, appends the
// row parity bits of g(D) = D^P + 1 and encodes every row with a tail-biting
// rate 1/2 convolutional code. Generators use the octal convention with the
// first of K = m+1 tap bits on the current input, left-justified to whole
// octal digits; the first coded bit of a step uses g0.
package iva_ref_pkg;

  function automatic int par(input longint v);
    int p = 0;
    for (int i = 0; i < 64; i++) p ^= int'(v[i]);
    return p;
  endfunction

  // code bits x[row*nb + k] of the block
  function automatic void code_rows(input int nb, kb, rows, input bit info[],
                                    output bit x[]);
    int irows = (rows > 1) ? rows - 1 : 1;
    int p = nb - kb;
    x = new[rows * nb];
    for (int r = 0; r < rows; r++) begin
      for (int k = 0; k < kb; k++) begin
        if (r < irows) x[r*nb + k] = info[r*kb + k];
        else begin
          bit c = 0;
          for (int rr = 0; rr < irows; rr++) c ^= info[rr*kb + k];
          x[r*nb + k] = c;
        end
      end
      for (int c = 0; c < p; c++) begin
        bit b = 0;
        for (int k = c; k < kb; k += p) b ^= x[r*nb + k];
        x[r*nb + kb + c] = b;
      end
    end
  endfunction

  function automatic void conv_rows(input int nb, rows, m, g0, g1, input bit x[],
                                    output bit z[]);
    int k = m + 1;
    int pad = (k % 3 == 0) ? 0 : 3 - (k % 3);
    longint t0 = longint'(g0) >> pad;
    longint t1 = longint'(g1) >> pad;
    z = new[rows * nb * 2];
    for (int r = 0; r < rows; r++) begin
      longint st = 0;
      for (int i = 0; i < m; i++) st |= longint'(x[r*nb + nb - 1 - i]) << (m - 1 - i);
      for (int t = 0; t < nb; t++) begin
        longint v = (longint'(x[r*nb + t]) << m) | st;
        z[r*nb*2 + 2*t]     = bit'(par(v & t0));
        z[r*nb*2 + 2*t + 1] = bit'(par(v & t1));
        st = v >> 1;
      end
    end
  endfunction

  function automatic void encode(input int nb, kb, rows, m, g0, g1, input bit info[],
                                 output bit z[]);
    bit x[];
    code_rows(nb, kb, rows, info, x);
    conv_rows(nb, rows, m, g0, g1, x, z);
  endfunction

  // BPSK sample of coded bit b: +amp for 1, -amp for 0, plus approximately
  // Gaussian noise (sum of four uniforms of half-width u), clipped to 8 bits.
  function automatic byte channel(input bit b, input int amp, input int u);
    int n = 0, r;
    for (int i = 0; i < 4; i++) n += int'($urandom_range(2*u, 0)) - u;
    r = (b ? amp : -amp) + n;
    if (r > 127) r = 127;
    if (r < -128) r = -128;
    return byte'(r);
  endfunction

endpackage

// cnn_ref_pkg: behavioural reference of the network for the testbenches,
// written independently of the RTL: convolution with bias and ReLU, 2x2
// max-pooling flattened in (pool row, pool column, channel) order, the dense
// layer with bias, and arg-max with the lowest index winning ties. The same
// truncations as the hardware: drop CONV_SHIFT / DENSE_SHIFT bits, keep 16.
package cnn_ref_pkg;
  import cnn_pkg::*;

  typedef logic signed [7:0]  img_t   [IMG][IMG];
  typedef logic signed [7:0]  cw_t    [N_CH][9];
  typedef logic signed [15:0] cb_t    [N_CH];
  typedef logic signed [15:0] conv_t  [N_CH][CONV_OUT][CONV_OUT];
  typedef logic signed [15:0] pool_t  [DENSE_IN];
  typedef logic signed [7:0]  dw_t    [N_OUT][DENSE_IN];
  typedef logic signed [15:0] db_t    [N_OUT];
  typedef logic signed [15:0] neu_t   [N_OUT];

  function automatic logic signed [15:0] t16(input longint v, input int sh);
    longint s = v >>> sh;
    return s[15:0];
  endfunction

  function automatic conv_t ref_conv(input img_t img, input cw_t cw, input cb_t cb);
    conv_t o;
    for (int c = 0; c < N_CH; c++)
      for (int r = 0; r < CONV_OUT; r++)
        for (int q = 0; q < CONV_OUT; q++) begin
          longint s = 0;
          logic signed [15:0] v;
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++) s += longint'(img[r+i][q+j]) * longint'(cw[c][i*3+j]);
          v = t16(s, CONV_SHIFT) + cb[c];
          o[c][r][q] = (v < 0) ? 16'sd0 : v;
        end
    return o;
  endfunction

  function automatic pool_t ref_pool(input conv_t cv);
    pool_t p;
    for (int pr = 0; pr < POOL_OUT; pr++)
      for (int pc = 0; pc < POOL_OUT; pc++)
        for (int c = 0; c < N_CH; c++) begin
          logic signed [15:0] m = cv[c][2*pr][2*pc];
          if (cv[c][2*pr+1][2*pc]   > m) m = cv[c][2*pr+1][2*pc];
          if (cv[c][2*pr][2*pc+1]   > m) m = cv[c][2*pr][2*pc+1];
          if (cv[c][2*pr+1][2*pc+1] > m) m = cv[c][2*pr+1][2*pc+1];
          p[(pr*POOL_OUT + pc)*N_CH + c] = m;
        end
    return p;
  endfunction

  function automatic neu_t ref_dense(input pool_t p, input dw_t dw, input db_t db);
    neu_t n;
    for (int o = 0; o < N_OUT; o++) begin
      longint s = 0;
      for (int k = 0; k < DENSE_IN; k++) s += longint'(p[k]) * longint'(dw[o][k]);
      n[o] = t16(s, DENSE_SHIFT) + db[o];
    end
    return n;
  endfunction

  function automatic int ref_argmax(input neu_t n);
    int best = 0;
    for (int o = 1; o < N_OUT; o++) if (n[o] > n[best]) best = o;
    return best;
  endfunction
endpackage

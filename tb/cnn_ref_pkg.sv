// Reference model of a CNN coarse-layer for the testbenches: zero-padded
// strided convolution of signed 8-bit maps with signed 8-bit weights, sum over
// input maps, bias + ReLU + rounded shift + saturation to 0..127, and KxK
// max pooling. Maps are flat arrays indexed [map][row][col].
package cnn_ref_pkg;
  // in: [f*dim*dim + r*dim + c]; w: [((o*nf)+f)*k*k + i]; out: [o*od*od + r*od + c]
  function automatic void conv(input int nf, input int no, input int dim, input int k,
                               input int stride, input int pad,
                               ref int in[], ref int w[], ref longint out[], output int od);
    int pd;
    pd = dim + 2*pad;
    od = (pd - k) / stride + 1;
    out = new[no*od*od];
    for (int o = 0; o < no; o++)
      for (int r = 0; r < od; r++)
        for (int c = 0; c < od; c++) begin
          longint s;
          s = 0;
          for (int f = 0; f < nf; f++)
            for (int i = 0; i < k; i++)
              for (int j = 0; j < k; j++) begin
                int pr, pc, x;
                pr = r*stride + i - pad;
                pc = c*stride + j - pad;
                x = (pr < 0 || pc < 0 || pr >= dim || pc >= dim) ? 0 : in[f*dim*dim + pr*dim + pc];
                s += longint'(x) * longint'(w[(o*nf + f)*k*k + i*k + j]);
              end
          out[o*od*od + r*od + c] = s;
        end
  endfunction

  function automatic int requant(input longint x, input longint bias, input int shift);
    longint s;
    s = x + bias;
    if (s < 0) s = 0;
    if (shift > 0) s = (s + (longint'(1) << (shift - 1))) >>> shift;
    if (s > 127) s = 127;
    return int'(s);
  endfunction

  function automatic void pool(input int nm, input int dim, input int k, input int stride,
                               input bit is_min, ref int in[], ref int out[], output int od);
    od = (dim - k) / stride + 1;
    out = new[nm*od*od];
    for (int m = 0; m < nm; m++)
      for (int r = 0; r < od; r++)
        for (int c = 0; c < od; c++) begin
          int b;
          b = in[m*dim*dim + (r*stride)*dim + c*stride];
          for (int i = 0; i < k; i++)
            for (int j = 0; j < k; j++) begin
              int x;
              x = in[m*dim*dim + (r*stride + i)*dim + c*stride + j];
              if (is_min ? (x < b) : (x > b)) b = x;
            end
          out[m*od*od + r*od + c] = b;
        end
  endfunction
endpackage

// Reference model of the ISL transition functions used by the testbenches.
// Works on plain integer arrays in row-major order and reproduces the
// fixed-point arithmetic of the processing element: Jacobi multiplies the
// window sum by round(2^frac/(2*dim+1)) and shifts right arithmetically; Heat
// adds (neighbours - 2*dim*centre) >>> 3 (plus the centre for dim >= 2).
// Border elements are copied unchanged.
package isl_ref_pkg;
  function automatic void step(input int dim, input bit heat, input int frac,
                               input int cols, input int rows, input int planes,
                               ref int a[], ref int b[]);
    longint coef;
    coef = ((longint'(1) << frac) + (2*dim+1)/2) / (2*dim+1);
    b = new[a.size()];
    for (int p = 0; p < planes; p++)
      for (int r = 0; r < rows; r++)
        for (int c = 0; c < cols; c++) begin
          int i;
          bit inter;
          longint s, nb, ctr;
          i = (p*rows + r)*cols + c;
          inter = (c >= 1 && c <= cols-2);
          if (dim >= 2) inter &= (r >= 1 && r <= rows-2);
          if (dim >= 3) inter &= (p >= 1 && p <= planes-2);
          if (!inter) begin
            b[i] = a[i];
            continue;
          end
          ctr = a[i];
          nb = longint'(a[i-1]) + longint'(a[i+1]);
          if (dim >= 2) nb += longint'(a[i-cols]) + longint'(a[i+cols]);
          if (dim >= 3) nb += longint'(a[i-cols*rows]) + longint'(a[i+cols*rows]);
          if (!heat) begin
            s = ((nb + ctr) * coef) >>> frac;
          end else begin
            s = (nb - 2*dim*ctr) >>> 3;
            if (dim >= 2) s += ctr;
          end
          b[i] = int'(s);
        end
  endfunction
endpackage

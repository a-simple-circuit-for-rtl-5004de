// Reference arithmetic for the testbenches of the (-1+j)-base adder.
//
// Converts between digit strings in base (-1+j) and Gaussian integers
// re + j*im with ordinary integer arithmetic, so the expected results do not
// depend on the adder's state table. Digit k of a vector is the coefficient
// of (-1+j)^k.
//   cbn_value : digits -> (re, im), by summing the powers of (-1+j).
//   cbn_encode: (re, im) -> digits, by repeated division by (-1+j): the low
//               digit is the parity of re+im, then (z - d)/(-1+j) =
//               (z - d)(-1-j)/2.
package cba_tb_pkg;

  typedef logic [63:0] digits_t;

  typedef struct {
    longint re;
    longint im;
  } gauss_t;

  function automatic gauss_t cbn_value(digits_t d);
    gauss_t acc = '{0, 0};
    longint pr = 1, pi = 0, tr;
    for (int k = 0; k < 64; k++) begin
      if (d[k]) begin
        acc.re += pr;
        acc.im += pi;
      end
      tr = -pr - pi;
      pi = pr - pi;
      pr = tr;
    end
    return acc;
  endfunction

  // Returns the digits; len is the number of significant digits.
  function automatic digits_t cbn_encode(gauss_t z, output int len);
    digits_t d = '0;
    longint re = z.re, im = z.im, nr, ni;
    len = 0;
    for (int k = 0; k < 64; k++) begin
      if (re == 0 && im == 0) break;
      d[k] = ((re + im) % 2) != 0;
      if (d[k]) re -= 1;
      nr = (im - re) / 2;
      ni = (-re - im) / 2;
      re = nr;
      im = ni;
      len = k + 1;
    end
    return d;
  endfunction

  function automatic gauss_t gauss_add(gauss_t x, gauss_t y);
    return '{x.re + y.re, x.im + y.im};
  endfunction

endpackage

// tb_bcd_util_pkg: reference arithmetic for the BCD multiplier testbenches.
//
// Numbers are held as arrays of decimal digits, least significant first, up to
// MAXD digits, so reference products of 32-digit results need no wide integers.
// The reference multiply is plain schoolbook multiplication on integers and
// shares nothing with the digit cells under test.
package tb_bcd_util_pkg;

  localparam int MAXD = 64;
  typedef int unsigned dnum_t [MAXD];

  function automatic int unsigned rand_digit();
    return $urandom_range(9, 0);
  endfunction

  function automatic void clear(output dnum_t a);
    for (int i = 0; i < MAXD; i++) a[i] = 0;
  endfunction

  // r = a * b, digit arrays, schoolbook with integer carries
  function automatic void mul_ref(input dnum_t a, input dnum_t b, input int n,
                                  output dnum_t r);
    int unsigned acc [MAXD];
    for (int i = 0; i < MAXD; i++) acc[i] = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        acc[i + j] += a[i] * b[j];
    for (int i = 0; i < MAXD - 1; i++) begin
      acc[i + 1] += acc[i] / 10;
      acc[i]      = acc[i] % 10;
    end
    for (int i = 0; i < MAXD; i++) r[i] = acc[i];
  endfunction

  // value of the lowest n digits (n <= 19)
  function automatic longint unsigned value64(input dnum_t a, input int n);
    longint unsigned v = 0;
    for (int i = n - 1; i >= 0; i--) v = v * 10 + longint'(a[i]);
    return v;
  endfunction

endpackage

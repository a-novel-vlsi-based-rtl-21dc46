// r4sdc_pkg: constants and helper functions shared by the radix-4
// single-path delay-commutator (R4SDC) FFT modules.
//
// - Default sizes: a 16-point transform with 16-bit real and imaginary input
//   samples, as in the reference design. The 16-bit twiddle width and its
//   Q2.14 format are choices of this implementation.
// - log4 / digit_rev4: the radix-4 DIF pipeline delivers its results in
//   base-4 digit-reversed order. digit_rev4 maps an output position to the
//   frequency bin it carries.
package r4sdc_pkg;

  localparam int unsigned FFT_N_DEFAULT  = 16;
  localparam int unsigned DATA_W_DEFAULT = 16;
  localparam int unsigned COEF_W_DEFAULT = 16;

  // Number of radix-4 digits of n (n must be a power of 4).
  function automatic int unsigned log4(input int unsigned n);
    int unsigned r;
    r = 0;
    while (n > 1) begin
      n = n >> 2;
      r++;
    end
    return r;
  endfunction

  // Reverse the order of the lowest `digits` base-4 digits of idx.
  function automatic int unsigned digit_rev4(input int unsigned idx, input int unsigned digits);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < digits; i++) begin
      r   = (r << 2) | (idx & 3);
      idx = idx >> 2;
    end
    return r;
  endfunction

endpackage

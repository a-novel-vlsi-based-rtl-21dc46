// twiddle_rom: table of the twiddle factors W_N^m = exp(-j 2 pi m / N).
//
// cos_q = round(cos(2 pi m / N) * 2^(CW-2)), sin_q = round(sin(2 pi m / N) *
// 2^(CW-2)), so W_N^m = cos_q - j sin_q in Q2.(CW-2) fixed point (+1.0 is
// representable exactly). The table is computed at elaboration time by a
// constant function. Lookup is combinational.
module twiddle_rom #(
  parameter int unsigned N  = 16,  // transform size
  parameter int unsigned CW = 16,  // coefficient width
  localparam int unsigned AW = $clog2(N)
) (
  input  logic [AW-1:0]        addr,     // exponent m
  output logic signed [CW-1:0] cos_q,
  output logic signed [CW-1:0] sin_q
);

  typedef logic signed [CW-1:0] coef_t;
  typedef coef_t table_t [N];

  function automatic table_t make_table(input bit want_sin);
    table_t t;
    real    ang, v;
    for (int m = 0; m < int'(N); m++) begin
      ang  = 2.0 * 3.14159265358979323846 * real'(m) / real'(N);
      v    = (want_sin ? $sin(ang) : $cos(ang)) * real'(64'd1 << (CW - 2));
      t[m] = coef_t'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
    end
    return t;
  endfunction

  localparam table_t COS_T = make_table(1'b0);
  localparam table_t SIN_T = make_table(1'b1);

  assign cos_q = COS_T[addr];
  assign sin_q = SIN_T[addr];

endmodule

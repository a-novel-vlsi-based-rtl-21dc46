// r4_butterfly: modified radix-4 decimation-in-frequency butterfly (the
// processing element of a stage), forming one of its four outputs per cycle.
//
// For operands a = x[n], b = x[n+L], c = x[n+2L], d = x[n+3L] and select k:
//   k = 0 : y0 = a +  b + c +  d
//   k = 1 : y1 = a - jb - c + jd
//   k = 2 : y2 = a -  b + c -  d
//   k = 3 : y3 = a + jb - c - jd
// i.e. y_k = sum_m (-j)^(m*k) x_m. Multiplying by a power of -j only swaps real
// and imaginary parts and/or negates them, so each operand passes through a
// small swap/negate multiplexer and three complex adders form the sum. A
// full four-output butterfly would need eight complex adders. Here one unit is
// busy every cycle, producing the four outputs of a group in turn, which is the
// higher butterfly utilisation the SDC organisation is built for.
// The outputs are two bits wider than the inputs and never overflow.
// Purely combinational.
module r4_butterfly #(
  parameter int unsigned W = 16    // input width of real and imaginary parts
) (
  input  logic signed [W-1:0] x_re [4],
  input  logic signed [W-1:0] x_im [4],
  input  logic [1:0]          k,
  output logic signed [W+1:0] y_re,
  output logic signed [W+1:0] y_im
);

  logic signed [W:0]   r_re [4], r_im [4];   // (-j)^(m*k) * x_m
  logic [1:0]          e;

  always_comb begin
    for (int m = 0; m < 4; m++) begin
      e = 2'(m * int'(k));
      case (e)
        2'd0: begin r_re[m] =  (W+1)'(x_re[m]); r_im[m] =  (W+1)'(x_im[m]); end
        2'd1: begin r_re[m] =  (W+1)'(x_im[m]); r_im[m] = -(W+1)'(x_re[m]); end
        2'd2: begin r_re[m] = -(W+1)'(x_re[m]); r_im[m] = -(W+1)'(x_im[m]); end
        default: begin r_re[m] = -(W+1)'(x_im[m]); r_im[m] = (W+1)'(x_re[m]); end
      endcase
    end
    y_re = (W+2)'(r_re[0]) + (W+2)'(r_re[1]) + (W+2)'(r_re[2]) + (W+2)'(r_re[3]);
    y_im = (W+2)'(r_im[0]) + (W+2)'(r_im[1]) + (W+2)'(r_im[2]) + (W+2)'(r_im[3]);
  end

endmodule

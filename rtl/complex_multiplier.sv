// complex_multiplier: registered fixed-point complex multiplication y = x * w.
//
//   re = xr*wr - xi*wi,  im = xr*wi + xi*wr
// w is in Q2.(CW-2) format. The product is rounded to nearest (adding half an
// LSB, then an arithmetic shift right by CW-2). The result is one bit wider
// than x, because rotating a vector can raise one component by up to sqrt(2).
// The unit uses four multipliers and two adders, and has one register stage:
// in_valid is carried to out_valid with the same one-cycle latency.
module complex_multiplier #(
  parameter int unsigned W  = 18,  // width of x parts
  parameter int unsigned CW = 16   // width of w parts
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_re,
  input  logic signed [W-1:0] x_im,
  input  logic signed [CW-1:0] w_re,
  input  logic signed [CW-1:0] w_im,
  output logic                out_valid,
  output logic signed [W:0]   y_re,
  output logic signed [W:0]   y_im
);

  localparam int unsigned FRAC = CW - 2;
  localparam int unsigned PW   = W + CW + 1;

  logic signed [PW-1:0] p_re, p_im;
  logic signed [PW-1:0] r_re, r_im;

  always_comb begin
    p_re = PW'(x_re) * PW'(w_re) - PW'(x_im) * PW'(w_im);
    p_im = PW'(x_re) * PW'(w_im) + PW'(x_im) * PW'(w_re);
    r_re = (p_re + (PW'(1) <<< (FRAC - 1))) >>> FRAC;
    r_im = (p_im + (PW'(1) <<< (FRAC - 1))) >>> FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      y_re <= r_re[W:0];
      y_im <= r_im[W:0];
    end
  end

endmodule

// sdc_delay_commutator: delay commutator of one radix-4 SDC stage.
//
// The stage emits output word q = k*L + n of a 4L-word block 3L accepted
// words after input word q of that block arrived. That word is butterfly output
// y_k[n], which needs all four operands x[n], x[n+L], x[n+2L], x[n+3L] of
// the block. When word q leaves, operand m (x[n+mL]) arrived
// (3-m)L + kL words ago. The oldest operand (m = 0, k = 3) is 6L words old.
//
// The unit is a 6L-word shift register, advanced once per accepted word, with
// taps every L words. A multiplexer per operand picks, for the current k, the
// tap at delay (3-m+k)L (delay 0 is the live input). Holding the block
// for the extra 3L words lets the butterfly be reused for all four of its
// outputs. This is why the stage stores 6L words: 3N/2 in the first stage and
// 3N/8 in the second, as in the reference design.
// Operands are combinational from the registers, the input and k. There is
// no reset: the words are don't-care until the first block has arrived.
module sdc_delay_commutator #(
  parameter int unsigned W = 16,   // width of real and imaginary parts
  parameter int unsigned L = 4     // butterfly span
) (
  input  logic                clk,
  input  logic                en,      // accept din
  input  logic signed [W-1:0] din_re,
  input  logic signed [W-1:0] din_im,
  input  logic [1:0]          k,       // butterfly output being formed
  output logic signed [W-1:0] op_re [4],
  output logic signed [W-1:0] op_im [4]
);

  // line[i] holds the word accepted i+1 words ago.
  logic signed [W-1:0] line_re [6*L];
  logic signed [W-1:0] line_im [6*L];

  always_ff @(posedge clk) begin
    if (en) begin
      line_re[0] <= din_re;
      line_im[0] <= din_im;
      for (int i = 1; i < 6 * L; i++) begin
        line_re[i] <= line_re[i-1];
        line_im[i] <= line_im[i-1];
      end
    end
  end

  // Tap t (t = 0..6): the word t*L words old; tap 0 is the live input.
  logic signed [W-1:0] tap_re [7];
  logic signed [W-1:0] tap_im [7];

  always_comb begin
    tap_re[0] = din_re;
    tap_im[0] = din_im;
    for (int t = 1; t < 7; t++) begin
      tap_re[t] = line_re[t*L-1];
      tap_im[t] = line_im[t*L-1];
    end
    for (int m = 0; m < 4; m++) begin
      op_re[m] = tap_re[3 - m + int'(k)];
      op_im[m] = tap_im[3 - m + int'(k)];
    end
  end

endmodule

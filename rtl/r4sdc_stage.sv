// r4sdc_stage: one pipelined radix-4 single-path delay-commutator stage.
//
// The stage takes one complex word per accepted cycle (in_valid) and works on
// blocks of 4L words. Output word q = k*L + n of a block is the butterfly
// output y_k[n] = sum_m (-j)^(mk) x[n+mL], multiplied by the twiddle factor
// W_{4L}^{nk} = W_N^{nk N/(4L)} unless TWIDDLE = 0 (last stage). y0 (the
// sum) needs no twiddle; y1..y3 (the differences) do.
//   sdc_stage_ctrl        counts words; gives k, the twiddle exponent and primed
//   sdc_delay_commutator  6L-word delay line; its multiplexers pick the four
//                         operands of y_k[n]
//   r4_butterfly          forms y_k[n], one output per cycle
//   twiddle_rom +
//   complex_multiplier    apply W_N^{tw_exp}
//
// Timing: each output word leaves 3L accepted words after the input word at
// the same block position (the stage holds a block until its last operand
// x[n+3L] has arrived). It first emits real data (out_valid) on its 3L-th
// accepted word. From then on, every accepted input word yields one output
// word. The stage advances only on accepted words, so gaps in in_valid stall
// it without loss. A register follows the butterfly, and with TWIDDLE a second
// one sits in the multiplier, so out_valid follows in_valid by 1 cycle
// (TWIDDLE = 0) or 2 cycles.
// The parts (commutator with delays, processing element, multiplexer control,
// twiddle multiplication) and the 6L-word memory follow the reference design.
// The valid handshake, the word widths and the rounding are this
// implementation's choices.
module r4sdc_stage #(
  parameter int unsigned W       = 16,  // input width of real/imag parts
  parameter int unsigned L       = 4,   // butterfly span of this stage
  parameter int unsigned N       = 16,  // size of the whole transform
  parameter int unsigned CW      = 16,  // twiddle coefficient width
  parameter bit          TWIDDLE = 1'b1,
  localparam int unsigned OW     = W + 2 + (TWIDDLE ? 1 : 0)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_re,
  input  logic signed [W-1:0]  in_im,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_re,
  output logic signed [OW-1:0] out_im
);

  localparam int unsigned BW  = W + 2;        // butterfly output width
  localparam int unsigned TWW = $clog2(N);

  if (L == 0 || (L & (L - 1)) != 0 || N % (4 * L) != 0) begin : g_bad_span
    $error("r4sdc_stage: L must be a power of 2 and 4L must divide N");
  end

  logic [1:0]     k;
  logic [TWW-1:0] tw_exp;
  logic           primed;

  sdc_stage_ctrl #(.L(L), .N(N)) u_ctrl (
    .clk, .rst_n, .en(in_valid), .k, .tw_exp, .primed
  );

  logic signed [W-1:0]  op_re [4], op_im [4];
  logic signed [BW-1:0] y_re, y_im;

  sdc_delay_commutator #(.W(W), .L(L)) u_comm (
    .clk, .en(in_valid), .din_re(in_re), .din_im(in_im), .k, .op_re, .op_im
  );

  r4_butterfly #(.W(W)) u_pe (
    .x_re(op_re), .x_im(op_im), .k, .y_re, .y_im
  );

  // Register after the butterfly, with the twiddle exponent of the word.
  logic                 r_valid;
  logic signed [BW-1:0] r_re, r_im;
  logic [TWW-1:0]       r_exp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid <= 1'b0;
    end else begin
      r_valid <= in_valid & primed;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      r_re  <= y_re;
      r_im  <= y_im;
      r_exp <= tw_exp;
    end
  end

  if (TWIDDLE) begin : g_twiddle
    logic signed [CW-1:0] w_cos, w_sin;
    twiddle_rom #(.N(N), .CW(CW)) u_rom (
      .addr(r_exp), .cos_q(w_cos), .sin_q(w_sin)
    );
    // W_N^m = cos - j sin
    complex_multiplier #(.W(BW), .CW(CW)) u_mul (
      .clk, .rst_n, .in_valid(r_valid), .x_re(r_re), .x_im(r_im),
      .w_re(w_cos), .w_im(-w_sin),
      .out_valid, .y_re(out_re), .y_im(out_im)
    );
  end else begin : g_plain
    // Last stage: every twiddle exponent is 0, so r_exp goes unused here.
    assign out_valid = r_valid;
    assign out_re    = r_re;
    assign out_im    = r_im;
  end

endmodule

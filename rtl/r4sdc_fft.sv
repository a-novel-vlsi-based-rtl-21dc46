// r4sdc_fft: pipelined radix-4 single-path delay-commutator (R4SDC) FFT.
//
// An N-point decimation-in-frequency FFT made of log4(N) cascaded R4SDC stages
// (two for the default N = 16). Stage s has butterfly span L = N / 4^(s+1)
// and twiddle multiplication after it, except the last. The complex input
// arrives in natural order on a single path, one word per in_valid cycle.
// Frames follow each other with no gap needed. Results leave on a single
// path, one per out_valid cycle, in base-4 digit-reversed order. out_bin gives
// the frequency bin of each result and out_first marks bin 0 of every frame.
//
// Widths: each butterfly adds 2 bits and each twiddle multiplier 1, so
// OW = DW + 3*log4(N) - 1 (21 bits for N = 16, DW = 16) and nothing can
// overflow. No scaling is applied.
//
// Timing: the pipeline holds N-1 words (3N/4 + 3N/16 + ... + 3). Output j of
// a frame appears with the input word that is N-1 words later, delayed by 2
// cycles per twiddle stage plus 1 for the last stage. The pipeline only moves
// on in_valid: the last frame is pushed out by the next frame's words (or by
// N-1 padding words).
// The stage structure, the N = 16 size and the 16-bit input follow the
// reference design. The valid handshake, the output bin index, widths and
// rounding are this implementation's choices.
module r4sdc_fft
  import r4sdc_pkg::*;
#(
  parameter int unsigned N  = FFT_N_DEFAULT,    // transform size, a power of 4
  parameter int unsigned DW = DATA_W_DEFAULT,   // input width of real/imag
  parameter int unsigned CW = COEF_W_DEFAULT,   // twiddle width
  localparam int unsigned S  = log4(N),
  localparam int unsigned OW = DW + 3 * S - 1,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_re,
  output logic signed [OW-1:0] out_im,
  output logic [AW-1:0]        out_bin,    // frequency bin of this result
  output logic                 out_first   // result is bin 0 of a frame
);

  if (N < 4 || (1 << (2 * S)) != N) begin : g_bad_n
    $error("r4sdc_fft: N must be a power of 4, at least 4");
  end

  // Inter-stage buses, wide enough for every stage; stage s uses the low
  // DW + 3*s bits of bus s.
  localparam int unsigned BUSW = DW + 3 * S;
  logic                   bus_valid [S+1];
  logic signed [BUSW-1:0] bus_re    [S+1];
  logic signed [BUSW-1:0] bus_im    [S+1];

  assign bus_valid[0] = in_valid;
  assign bus_re[0]    = BUSW'(in_re);
  assign bus_im[0]    = BUSW'(in_im);

  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int unsigned SW = DW + 3 * s;
    localparam bit          TW = (s != S - 1);
    localparam int unsigned SO = SW + 2 + (TW ? 1 : 0);
    logic signed [SO-1:0] o_re, o_im;

    r4sdc_stage #(
      .W(SW), .L(N >> (2 * (s + 1))), .N(N), .CW(CW), .TWIDDLE(TW)
    ) u_stage (
      .clk, .rst_n,
      .in_valid (bus_valid[s]),
      .in_re    (bus_re[s][SW-1:0]),
      .in_im    (bus_im[s][SW-1:0]),
      .out_valid(bus_valid[s+1]),
      .out_re   (o_re),
      .out_im   (o_im)
    );
    assign bus_re[s+1] = BUSW'(o_re);
    assign bus_im[s+1] = BUSW'(o_im);
  end

  // Output position within the frame, and the bin it carries.
  logic [AW-1:0] pos;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pos <= '0;
    else if (bus_valid[S]) pos <= pos + 1'b1;
  end

  assign out_valid = bus_valid[S];
  assign out_re    = bus_re[S][OW-1:0];
  assign out_im    = bus_im[S][OW-1:0];
  assign out_bin   = AW'(digit_rev4(32'(pos), S));
  assign out_first = out_valid && (pos == '0);

endmodule

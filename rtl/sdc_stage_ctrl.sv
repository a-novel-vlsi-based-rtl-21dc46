// sdc_stage_ctrl: multiplexer control of one radix-4 SDC stage.
//
// A stage of span L works on blocks of 4L words and emits each block 3L
// accepted words after it arrives. This controller counts accepted words
// (en) modulo 4L, and for the word the stage emits in the current cycle,
// output position p = (count + L) mod 4L, it gives
//   - k      : p / L, which butterfly output y_k is formed. It selects the
//              delay-commutator taps and the butterfly's sign pattern.
//   - tw_exp : twiddle exponent n*k*N/(4L), with n = p mod L, so the word is
//              multiplied by W_{4L}^{nk} = W_N^{tw_exp}.
//   - primed : the stage has accepted 3L words, so what it emits from now on
//              is real data.
// The counter is this implementation's; the reference design only says the
// stage steers its data with multiplexers.
module sdc_stage_ctrl #(
  parameter int unsigned L  = 4,    // butterfly span (N/4 in the first stage)
  parameter int unsigned N  = 16,   // transform size (twiddle table size)
  localparam int unsigned CNTW = $clog2(4 * L),
  localparam int unsigned TWW  = $clog2(N)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,       // one word accepted this cycle
  output logic [1:0]     k,
  output logic [TWW-1:0] tw_exp,
  output logic           primed
);

  localparam int unsigned STRIDE = N / (4 * L);

  logic [CNTW-1:0] cnt;
  logic [1:0]      quarter;        // cnt / L
  logic            filled;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      filled <= 1'b0;
    end else if (en) begin
      cnt <= cnt + 1'b1;               // wraps at 4L (a power of two)
      if (quarter == 2'd3) filled <= 1'b1;
    end
  end

  int unsigned out_n;
  always_comb begin
    quarter = cnt[CNTW-1 -: 2];
    k       = quarter + 2'd1;          // (count + L) / L, modulo 4
    out_n   = int'(cnt) % L;
    tw_exp  = TWW'((out_n * int'(k) * STRIDE) % N);
    primed  = filled | (quarter == 2'd3);
  end

endmodule

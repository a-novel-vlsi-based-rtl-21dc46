// tb_r4sdc_fft: end-to-end test of the R4SDC FFT at its default size (N = 16,
// 16-bit input), compared with a direct DFT computed in floating point.
//
// Frames sent: an impulse, a constant, single tones, a full-scale pattern, a
// ramp (x[n] = n + jn) and random data, mostly back to back, one frame with random input gaps (stalls),
// then padding words to push the last frame out. For every result the test
// checks the value against the DFT (within a rounding tolerance) and the bin
// index against base-4 digit reversal of the output position. It also checks
// the latency of the first result (N-1 words plus 3 register cycles), the
// number of non-trivial twiddle multiplications per frame in the first stage
// (9 for N = 16), and that every mechanism happened: stalls, back-to-back
// frames, each butterfly output y0..y3 in both stages, digit-reversed bins.
module tb_r4sdc_fft;
  import r4sdc_pkg::*;

  localparam int N  = FFT_N_DEFAULT;
  localparam int DW = DATA_W_DEFAULT;
  localparam int S  = log4(N);
  localparam int OW = DW + 3 * S - 1;
  localparam int AW = $clog2(N);
  localparam int NFRAMES = 12;
  localparam int STALL_FRAME = 9;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [DW-1:0] in_re = '0, in_im = '0;
  logic out_valid, out_first;
  logic signed [OW-1:0] out_re, out_im;
  logic [AW-1:0] out_bin;

  r4sdc_fft dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // stimulus
  int xr [NFRAMES][N];
  int xi [NFRAMES][N];

  function automatic int rnd_full();
    return int'($signed(16'($urandom)));
  endfunction

  initial begin
    for (int f = 0; f < NFRAMES; f++)
      for (int n = 0; n < N; n++) begin
        case (f)
          0: begin xr[f][n] = (n == 0) ? 1000 : 0; xi[f][n] = 0; end
          1: begin xr[f][n] = 20000; xi[f][n] = -3000; end
          2, 3, 4: begin
            xr[f][n] = int'($rtoi(15000.0 * $cos(2.0 * PI * real'((f - 1) * n) / real'(N))));
            xi[f][n] = int'($rtoi(15000.0 * $sin(2.0 * PI * real'((f - 1) * n) / real'(N))));
          end
          6: begin  // ramp 0..15 on both parts
            xr[f][n] = n; xi[f][n] = n;
          end
          5: begin  // full scale, worst case for growth
            xr[f][n] = (n % 2 == 0) ? 32767 : -32768; xi[f][n] = -32768;
          end
          default: begin xr[f][n] = rnd_full(); xi[f][n] = rnd_full(); end
        endcase
      end
  end

  // reference DFT and tolerance
  function automatic void dft(input int f, input int k, output real yr, output real yi);
    real a;
    yr = 0.0; yi = 0.0;
    for (int n = 0; n < N; n++) begin
      a  = -2.0 * PI * real'(n * k) / real'(N);
      yr += real'(xr[f][n]) * $cos(a) - real'(xi[f][n]) * $sin(a);
      yi += real'(xr[f][n]) * $sin(a) + real'(xi[f][n]) * $cos(a);
    end
  endfunction

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // independent digit reversal (base 4)
  function automatic int rev4(input int p);
    int r = 0;
    for (int d = 0; d < S; d++) begin
      r = r * 4 + (p % 4);
      p = p / 4;
    end
    return r;
  endfunction

  // monitor
  int out_frame = -1, out_pos = 0;
  bit in_sending = 1'b0;
  int n_first = 0, n_bins_rev = 0;
  longint first_in_cycle = -1, first_out_cycle = -1;
  real tol = 80.0;
  real max_err = 0.0;
  always @(posedge clk) begin
    real yr, yi;
    if (rst_n && out_valid) begin
      if (first_out_cycle < 0) first_out_cycle = cycle;
      if (out_first) begin
        out_frame++;
        n_first++;
        checks++;
        if (out_pos != 0 && out_frame > 0 && out_pos != N) begin
          failures++;
          $display("FAIL out_first at position %0d", out_pos);
        end
        out_pos = 0;
      end
      if (out_frame >= 0 && out_frame < NFRAMES) begin
        checks++;
        if (int'(out_bin) != rev4(out_pos)) begin
          failures++;
          $display("FAIL frame %0d pos %0d: bin %0d expected %0d", out_frame, out_pos, out_bin, rev4(out_pos));
        end
        if (int'(out_bin) != out_pos) n_bins_rev++;
        dft(out_frame, rev4(out_pos), yr, yi);
        if (rabs(real'(out_re) - yr) > max_err) max_err = rabs(real'(out_re) - yr);
        if (rabs(real'(out_im) - yi) > max_err) max_err = rabs(real'(out_im) - yi);
        checks++;
        if (rabs(real'(out_re) - yr) > tol || rabs(real'(out_im) - yi) > tol) begin
          failures++;
          $display("FAIL frame %0d bin %0d: got (%0d,%0d) expected (%0.1f,%0.1f)",
                   out_frame, rev4(out_pos), out_re, out_im, yr, yi);
        end
      end
      out_pos++;
    end
  end

  // mechanism counters, observed inside the design
  int n_stall = 0, n_tw_nontriv = 0, n_b2b = 0;
  int n_k1 [4], n_k2 [4];   // butterfly outputs y_k formed, per stage
  initial for (int k = 0; k < 4; k++) begin n_k1[k] = 0; n_k2[k] = 0; end
  always @(posedge clk) begin
    if (!in_valid && first_in_cycle >= 0 && in_sending) n_stall++;
    if (dut.g_stage[0].u_stage.in_valid && dut.g_stage[0].u_stage.primed)
      n_k1[dut.g_stage[0].u_stage.k]++;
    if (dut.g_stage[1].u_stage.in_valid && dut.g_stage[1].u_stage.primed)
      n_k2[dut.g_stage[1].u_stage.k]++;
    if (dut.g_stage[0].u_stage.r_valid && dut.g_stage[0].u_stage.r_exp != '0) n_tw_nontriv++;
  end

  task automatic send_frame(input int f, input int stall_pct);
    for (int n = 0; n < N; n++) begin
      while (stall_pct > 0 && ($urandom % 100) < stall_pct) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
      @(negedge clk);
      if (first_in_cycle < 0) first_in_cycle = cycle;  // sampled at the next posedge, before cycle advances
      in_valid = 1'b1;
      in_re = DW'(xr[f][n]);
      in_im = DW'(xi[f][n]);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    in_sending = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      send_frame(f, (f == STALL_FRAME) ? 40 : 0);
      if (f > 0 && f != STALL_FRAME && f != STALL_FRAME + 1) n_b2b++;
    end
    in_sending = 1'b0;
    // padding pushes the last frame out
    for (int n = 0; n < N - 1; n++) begin
      @(negedge clk);
      in_valid = 1'b1; in_re = '0; in_im = '0;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(negedge clk);

    checks++;
    if (out_frame != NFRAMES - 1 || out_pos != N) begin
      failures++;
      $display("FAIL received %0d frames, last at position %0d", out_frame + 1, out_pos);
    end
    checks++;
    if (first_out_cycle - first_in_cycle != N - 1 + 3) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", first_out_cycle - first_in_cycle, N + 2);
    end
    // nine non-trivial twiddle products per frame in the first stage (N=16);
    // the padding words form one extra partial frame
    checks++;
    if (n_tw_nontriv < 9 * NFRAMES || n_tw_nontriv > 9 * (NFRAMES + 1)) begin
      failures++;
      $display("FAIL %0d non-trivial twiddle products, expected 9 per frame", n_tw_nontriv);
    end
    $display("largest deviation from the exact DFT: %0.2f LSB", max_err);
    $display("mechanisms: stall cycles=%0d back-to-back frames=%0d nontrivial twiddles=%0d reordered bins=%0d frame starts=%0d",
             n_stall, n_b2b, n_tw_nontriv, n_bins_rev, n_first);
    $display("butterfly outputs y0..y3: stage 1 %0d %0d %0d %0d, stage 2 %0d %0d %0d %0d",
             n_k1[0], n_k1[1], n_k1[2], n_k1[3], n_k2[0], n_k2[1], n_k2[2], n_k2[3]);
    checks++; if (n_stall == 0)      begin failures++; $display("FAIL no stall"); end
    checks++; if (n_b2b == 0)        begin failures++; $display("FAIL no back-to-back frames"); end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_k1[k] == 0 || n_k2[k] == 0) begin failures++; $display("FAIL butterfly output y%0d never formed", k); end
    end
    checks++; if (n_bins_rev == 0)   begin failures++; $display("FAIL no reordered bins"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

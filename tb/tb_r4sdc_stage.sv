// tb_r4sdc_stage: two stages side by side, fed the same random stream with
// random input gaps:
//   - the first stage of a 16-point FFT (L = 4, with twiddles), and
//   - a last stage (L = 1, no twiddle), which must be an exact 4-point DFT.
// For each 4L-word block the expected output at position k*L+n is
// y_k[n] * W_{4L}^{nk}, y_k[n] = sum_m x[n+mL] (-j)^(mk), computed here in
// floating point (tolerance 1 LSB plus the coefficient rounding error for the twiddled stage, exact for the
// other). Also checks that out_valid follows the accepted input word 2 (resp.
// 1) cycles later and that the first result comes with input word 3L.
module tb_r4sdc_stage;
  localparam int W = 16, N = 16;
  localparam int NW = 16 * 24;           // words sent
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  always #5 clk = ~clk;
  logic signed [W-1:0] in_re = '0, in_im = '0;
  logic ov_a, ov_b;
  logic signed [W+2:0] oa_re, oa_im;
  logic signed [W+1:0] ob_re, ob_im;
  int checks = 0, failures = 0;

  r4sdc_stage #(.W(W), .L(4), .N(N), .CW(16), .TWIDDLE(1'b1)) dut_a (
    .clk, .rst_n, .in_valid, .in_re, .in_im, .out_valid(ov_a), .out_re(oa_re), .out_im(oa_im));
  r4sdc_stage #(.W(W), .L(1), .N(N), .CW(16), .TWIDDLE(1'b0)) dut_b (
    .clk, .rst_n, .in_valid, .in_re, .in_im, .out_valid(ov_b), .out_re(ob_re), .out_im(ob_im));

  int xr [NW], xi [NW];
  longint cycle = 0;
  longint acc_cycle [NW];
  always @(posedge clk) cycle <= cycle + 1;

  // expected output word p of the stage with span L
  task automatic expected(input int L, input bit tw, input int p, output real er, output real ei);
    int b, q, k, n, e, r, i, tr;
    real c, s, yr, yi;
    b = p / (4 * L); q = p % (4 * L); k = q / L; n = q % L;
    yr = 0.0; yi = 0.0;
    for (int m = 0; m < 4; m++) begin
      r = xr[b * 4 * L + n + m * L]; i = xi[b * 4 * L + n + m * L];
      for (e = 0; e < (m * k) % 4; e++) begin tr = r; r = i; i = -tr; end  // times -j
      yr += real'(r); yi += real'(i);
    end
    if (tw) begin
      c = $cos(2.0 * PI * real'(n * k) / real'(4 * L));
      s = $sin(2.0 * PI * real'(n * k) / real'(4 * L));
      er = yr * c + yi * s;
      ei = yi * c - yr * s;
    end else begin
      er = yr; ei = yi;
    end
  endtask

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  int pa = 0, pb = 0, nacc = 0;
  always @(posedge clk) begin
    real er, ei, tol;
    if (rst_n && in_valid) begin
      acc_cycle[nacc] = cycle;
      nacc++;
    end
    if (rst_n && ov_a && pa < NW - 12) begin
      expected(4, 1'b1, pa, er, ei);
      checks++;
      tol = 1.0 + (rabs(er) + rabs(ei)) * 0.5 / 16384.0;  // rounding + coefficient error
      if (rabs(real'(oa_re) - er) > tol || rabs(real'(oa_im) - ei) > tol) begin
        failures++;
        $display("FAIL stage L=4 word %0d got (%0d,%0d) expected (%0.1f,%0.1f)", pa, oa_re, oa_im, er, ei);
      end
      checks++;
      if (cycle != acc_cycle[pa + 12] + 2) begin
        failures++;
        $display("FAIL stage L=4 word %0d timing", pa);
      end
      pa++;
    end
    if (rst_n && ov_b && pb < NW - 3) begin
      expected(1, 1'b0, pb, er, ei);
      checks++;
      if (real'(ob_re) != er || real'(ob_im) != ei) begin
        failures++;
        $display("FAIL stage L=1 word %0d got (%0d,%0d) expected (%0.1f,%0.1f)", pb, ob_re, ob_im, er, ei);
      end
      checks++;
      if (cycle != acc_cycle[pb + 3] + 1) begin
        failures++;
        $display("FAIL stage L=1 word %0d timing", pb);
      end
      pb++;
    end
  end

  initial begin
    for (int i = 0; i < NW; i++) begin
      xr[i] = int'($signed(W'($urandom)));
      xi[i] = int'($signed(W'($urandom)));
      if (i < 16) begin xr[i] = (i % 2) ? -32768 : 32767; xi[i] = -32768; end
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NW; i++) begin
      while (i > 64 && ($urandom % 3) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
      @(negedge clk);
      in_valid = 1'b1;
      in_re = W'(xr[i]);
      in_im = W'(xi[i]);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (pa != NW - 12 || pb != NW - 3) begin
      failures++;
      $display("FAIL results: %0d and %0d", pa, pb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

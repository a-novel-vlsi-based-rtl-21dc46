// tb_sdc_stage_ctrl: runs two controllers (L = 4 and L = 1, N = 16) through
// several blocks with random gaps in `en`. A counter kept here predicts, for
// the output position p = (count + L) mod 4L, the butterfly select k = p / L,
// the twiddle exponent n*k*N/(4L) with n = p mod L, and primed (3L words
// accepted).
module tb_sdc_stage_ctrl;
  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] k4, k1;
  logic pr4, pr1;
  logic [3:0] tw4, tw1;

  sdc_stage_ctrl #(.L(4), .N(N)) dut4 (.clk, .rst_n, .en, .k(k4), .primed(pr4), .tw_exp(tw4));
  sdc_stage_ctrl #(.L(1), .N(N)) dut1 (.clk, .rst_n, .en, .k(k1), .primed(pr1), .tw_exp(tw1));

  int cnt = 0;
  int n_bf4 = 0, n_tw = 0;

  task automatic check(input int L, input int c, input logic [1:0] kd, input logic pr, input logic [3:0] tw);
    int p, k, n, e;
    p = ((c % (4 * L)) + L) % (4 * L);
    k = p / L;
    n = p % L;
    e = (n * k * (N / (4 * L))) % N;
    checks++;
    if (int'(kd) != k || pr != (c >= 3 * L) || int'(tw) != e) begin
      failures++;
      $display("FAIL L=%0d count %0d: k %0d primed %0b tw %0d, expected %0d %0b %0d",
               L, c, kd, pr, tw, k, c >= 3 * L, e);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      check(4, cnt, k4, pr4, tw4);
      check(1, cnt, k1, pr1, tw1);
      if (en) begin
        cnt++;
        if (k4 == 2'd3) n_bf4++;
        if (tw4 != 0) n_tw++;
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
    end
    @(negedge clk);
    en = 1'b0;
    checks++;
    if (n_bf4 == 0 || n_tw == 0) begin
      failures++;
      $display("FAIL select k = 3 or non-trivial twiddle never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

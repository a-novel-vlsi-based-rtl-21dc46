// tb_twiddle_rom: checks every entry of the 16-point twiddle table against
// cos/sin evaluated in floating point (within one LSB), plus exact values at
// m = 0, 2 and 4 (1, 1/sqrt(2) and -j in Q2.14).
module tb_twiddle_rom;
  localparam int N = 16, CW = 16;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [$clog2(N)-1:0] addr;
  logic signed [CW-1:0] cos_q, sin_q;
  int checks = 0, failures = 0;

  twiddle_rom #(.N(N), .CW(CW)) dut (.*);

  task automatic expect_exact(input int m, input int c, input int s);
    addr = m[$clog2(N)-1:0];
    #1;
    checks++;
    if (int'(cos_q) != c || int'(sin_q) != s) begin
      failures++;
      $display("FAIL m=%0d got (%0d,%0d) expected (%0d,%0d)", m, cos_q, sin_q, c, s);
    end
  endtask

  initial begin
    real ec, es;
    for (int m = 0; m < N; m++) begin
      @(negedge clk);
      addr = m[$clog2(N)-1:0];
      #1;
      ec = $cos(2.0 * PI * m / N) * 16384.0;
      es = $sin(2.0 * PI * m / N) * 16384.0;
      checks++;
      if (real'(cos_q) - ec > 1.0 || ec - real'(cos_q) > 1.0 ||
          real'(sin_q) - es > 1.0 || es - real'(sin_q) > 1.0) begin
        failures++;
        $display("FAIL m=%0d got (%0d,%0d) expected (%0.1f,%0.1f)", m, cos_q, sin_q, ec, es);
      end
    end
    expect_exact(0, 16384, 0);
    expect_exact(2, 11585, 11585);
    expect_exact(4, 0, 16384);
    expect_exact(8, -16384, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

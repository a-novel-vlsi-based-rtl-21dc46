// tb_complex_multiplier: random and extreme operands; the expected product is
// formed with 64-bit integers and rounded half up (floor((p + 2^13) / 2^14)).
// Checks the one-cycle latency of out_valid and of the data.
module tb_complex_multiplier;
  localparam int W = 18, CW = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, out_valid;
  logic signed [W-1:0]  x_re = '0, x_im = '0;
  logic signed [CW-1:0] w_re = '0, w_im = '0;
  logic signed [W:0]    y_re, y_im;
  int checks = 0, failures = 0;

  complex_multiplier #(.W(W), .CW(CW)) dut (.*);

  function automatic longint rnd(input longint p);
    longint q;
    q = p + 64'sd8192;
    return (q >= 0) ? q / 16384 : -((-q + 16383) / 16384);
  endfunction

  longint exp_re [$], exp_im [$];
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_re.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        longint er, ei;
        er = exp_re.pop_front(); ei = exp_im.pop_front();
        if (longint'(y_re) != er || longint'(y_im) != ei) begin
          failures++;
          $display("FAIL got (%0d,%0d) expected (%0d,%0d)", y_re, y_im, er, ei);
        end
      end
    end
  end

  task automatic drive(input longint xr, input longint xi, input longint wr, input longint wi);
    @(negedge clk);
    in_valid = 1'b1;
    x_re = W'(xr); x_im = W'(xi); w_re = CW'(wr); w_im = CW'(wi);
    exp_re.push_back(rnd(xr * wr - xi * wi));
    exp_im.push_back(rnd(xr * wi + xi * wr));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    drive(-131072, -131072, 11585, -11585);
    drive(131071, -131072, 16384, 0);
    drive(-131072, 131071, 0, -16384);
    drive(12345, -6789, -11585, -11585);
    for (int t = 0; t < 400; t++) begin
      if (t % 7 == 3) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
      drive(longint'($signed(W'($urandom))), longint'($signed(W'($urandom))),
            longint'($urandom_range(0, 32768)) - 16384, longint'($urandom_range(0, 32768)) - 16384);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_re.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_re.size());
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

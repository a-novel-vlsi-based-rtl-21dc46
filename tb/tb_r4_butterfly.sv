// tb_r4_butterfly: checks the modified radix-4 DIF butterfly, for every
// output select k, against the defining sums y_k = sum_m x_m (-j)^(mk)
// (written out here with integer complex arithmetic), for extreme and random
// 16-bit operands.
module tb_r4_butterfly;
  localparam int W = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic signed [W-1:0]   x_re [4], x_im [4];
  logic [1:0]            k;
  logic signed [W+1:0]   y_re, y_im;
  int checks = 0, failures = 0;

  r4_butterfly #(.W(W)) dut (.*);

  // (-j)^e applied to (r, i)
  task automatic rot(input int e, input int r, input int i, output int orr, output int oi);
    case (e % 4)
      0: begin orr = r;  oi = i;  end
      1: begin orr = i;  oi = -r; end
      2: begin orr = -r; oi = -i; end
      default: begin orr = -i; oi = r; end
    endcase
  endtask

  task automatic check_once();
    int er, ei, tr, ti;
    for (int kk = 0; kk < 4; kk++) begin
      k = 2'(kk);
      #1;
      er = 0; ei = 0;
      for (int m = 0; m < 4; m++) begin
        rot(m * kk, int'(x_re[m]), int'(x_im[m]), tr, ti);
        er += tr; ei += ti;
      end
      checks++;
      if (int'(y_re) != er || int'(y_im) != ei) begin
        failures++;
        $display("FAIL y%0d got (%0d,%0d) expected (%0d,%0d)", kk, y_re, y_im, er, ei);
      end
    end
  endtask

  initial begin
    for (int m = 0; m < 4; m++) begin x_re[m] = -32768; x_im[m] = -32768; end
    check_once();
    for (int m = 0; m < 4; m++) begin x_re[m] = 32767; x_im[m] = (m % 2) ? -32768 : 32767; end
    check_once();
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int m = 0; m < 4; m++) begin
        x_re[m] = W'($urandom);
        x_im[m] = W'($urandom);
      end
      check_once();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

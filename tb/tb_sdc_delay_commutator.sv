// tb_sdc_delay_commutator: pushes a random stream (L = 4) with random gaps
// in `en` and a random select k, and checks, on every accepted word once 6L
// words are in, that operand m is the word (3 - m + k)L positions back in the
// stream (position 0 being the live input).
module tb_sdc_delay_commutator;
  localparam int W = 16, L = 4;
  logic clk = 1'b0, en = 1'b0;
  always #5 clk = ~clk;
  logic signed [W-1:0] din_re = '0, din_im = '0;
  logic [1:0] k = '0;
  logic signed [W-1:0] op_re [4], op_im [4];
  int checks = 0, failures = 0;

  sdc_delay_commutator #(.W(W), .L(L)) dut (.*);

  int hist_re [$], hist_im [$];   // accepted words, oldest first
  int n_k [4];
  initial for (int i = 0; i < 4; i++) n_k[i] = 0;

  always @(posedge clk) begin
    if (en) begin
      hist_re.push_back(int'(din_re));
      hist_im.push_back(int'(din_im));
      if (hist_re.size() > 6 * L) begin
        n_k[k]++;
        for (int m = 0; m < 4; m++) begin
          int idx;
          idx = hist_re.size() - 1 - (3 - m + int'(k)) * L;
          checks++;
          if (int'(op_re[m]) != hist_re[idx] || int'(op_im[m]) != hist_im[idx]) begin
            failures++;
            $display("FAIL k=%0d operand %0d got (%0d,%0d) expected (%0d,%0d)", k, m, op_re[m], op_im[m],
                     hist_re[idx], hist_im[idx]);
          end
        end
      end
    end
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      en = ($urandom % 3) != 0;
      k = 2'($urandom);
      din_re = W'($urandom);
      din_im = W'($urandom);
    end
    @(negedge clk);
    en = 1'b0;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_k[i] == 0) begin failures++; $display("FAIL select %0d never used", i); end
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

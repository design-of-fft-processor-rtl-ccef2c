// tb_mul_neg_j - checks (A + Bj)(-j) = B - Aj on random operands.
module tb_mul_neg_j;
  localparam int W = 20;
  logic signed [W-1:0] in_re, in_im, out_re, out_im;
  int checks = 0, failures = 0;
  mul_neg_j #(.W(W)) dut (.*);
  initial begin
    for (int n = 0; n < 2000; n++) begin
      in_re = W'($urandom_range(2**18 - 1)) - W'(2**17);
      in_im = W'($urandom_range(2**18 - 1)) - W'(2**17);
      #1;
      checks++;
      // real part of (A+Bj)(-j) = B, imaginary part = -A
      if (out_re != in_im || out_im != -in_re) begin
        failures++; $display("FAIL: %0d %0d -> %0d %0d", in_re, in_im, out_re, out_im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

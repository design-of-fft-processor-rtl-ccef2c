// tb_mul_w8 - checks the shift-add W8^1 / W8^3 multiplier against an integer
// multiplication by 181/256 and against the exact complex product with
// exp(-j pi/4) or exp(-j 3pi/4) (error bounded by the 8-bit constant).
module tb_mul_w8;
  localparam int W = 20;
  logic sel3;
  logic signed [W-1:0] in_re, in_im;
  logic signed [W:0]   out_re, out_im;
  int checks = 0, failures = 0;
  mul_w8 #(.W(W)) dut (.*);

  initial begin
    for (int n = 0; n < 4000; n++) begin
      longint a, b, er, ei;
      real    xr, xi, c, tol;
      sel3  = n[0];
      in_re = W'($urandom_range(2**W - 1));
      in_im = W'($urandom_range(2**W - 1));
      if (n < 4) begin in_re = (n < 2) ? -(2**(W-1)) : 2**(W-1) - 1; in_im = in_re; end
      #1;
      a = in_re; b = in_im;
      er = ((a + b) * 181) >>> 8;
      ei = ((b - a) * 181) >>> 8;
      if (sel3) begin longint t; t = er; er = ei; ei = -t; end
      checks++;
      if (out_re != er || out_im != ei) begin
        failures++; $display("FAIL: sel3=%0d %0d %0d -> %0d %0d (exp %0d %0d)", sel3, a, b, out_re, out_im, er, ei);
      end
      c  = 1.0 / $sqrt(2.0);
      xr = sel3 ? (c * (b - a)) : (c * (a + b));
      xi = sel3 ? -(c * (a + b)) : (c * (b - a));
      tol = 0.0001 * (((a < 0) ? -a : a) + ((b < 0) ? -b : b)) + 2.0;
      checks++;
      if ((out_re - xr) > tol || (xr - out_re) > tol || (out_im - xi) > tol || (xi - out_im) > tol) begin
        failures++; $display("FAIL: far from exact product");
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

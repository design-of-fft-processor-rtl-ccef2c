// tb_fixed_point - checks the scale-down block: arithmetic shift right by 0..3
// (truncation), saturation to 20 bits, and the one-clock latency.
module tb_fixed_point;
  localparam int W_IN = 25, WL = 20;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [1:0] shift = '0;
  logic signed [W_IN-1:0] in_re = '0, in_im = '0;
  logic out_valid;
  logic signed [WL-1:0] out_re, out_im;
  int checks = 0, failures = 0;
  longint er, ei; bit ev;

  fixed_point #(.W_IN(W_IN), .WL(WL)) dut (.*);
  always #5 clk = ~clk;

  function automatic longint ref_scale(longint x, int sh);
    longint y;
    y = x >>> sh;
    if (y > 524287) y = 524287;
    if (y < -524288) y = -524288;
    return y;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      in_valid = n[0] | n[3];
      shift = 2'($urandom_range(3));
      in_re = W_IN'($urandom); in_im = W_IN'($urandom);
      if (n % 4 == 1) begin in_re = in_re >>> 4; in_im = in_im >>> 5; end
      er = ref_scale(in_re, shift); ei = ref_scale(in_im, shift); ev = in_valid;
      @(negedge clk);
      checks++;
      if (out_valid != ev || (ev && (out_re != er || out_im != ei))) begin
        failures++; $display("FAIL: sh=%0d got %0d %0d exp %0d %0d", shift, out_re, out_im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

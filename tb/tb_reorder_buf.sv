// tb_reorder_buf - feeds groups in bit-reversed order (X(0) X(4) X(2) X(6)
// X(1) X(5) X(3) X(7)), with invalid groups in between, and checks that they
// leave in normal order with the right index, X(k) of a group whose X(0)
// entered at clock t0 leaving at t0 + 4 + k.
module tb_reorder_buf;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [2:0] in_pos = '0;
  logic signed [W-1:0] in_re = '0, in_im = '0;
  logic out_valid; logic [2:0] out_k;
  logic signed [W-1:0] out_re, out_im;
  int checks = 0, failures = 0, nout = 0, t = 0;
  int vals [$];
  int t0 [$];
  reorder_buf #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  function automatic int brev(int o);
    return ((o & 1) << 2) | (o & 2) | ((o >> 2) & 1);
  endfunction

  always @(negedge clk) if (rst_n) begin
    t++;
    if (out_valid) begin
      int g, k;
      g = nout / 8; k = nout % 8;
      checks++;
      if (out_k != 3'(k) || out_re != W'(vals[8*g + k]) || out_im != -W'(vals[8*g + k]) || t != t0[g] + 4 + k) begin
        failures++; $display("FAIL: out %0d k=%0d got %0d t=%0d exp %0d t=%0d", nout, out_k, out_re, t, vals[8*g+k], t0[g]+4+k);
      end
      nout++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 40; g++) begin
      bit v; int base;
      v = (g % 4 != 2) && (g % 7 != 5);
      base = $urandom_range(1000);
      if (v) begin
        for (int k = 0; k < 8; k++) vals.push_back(base + 100 * k);
        t0.push_back(t + 1);
      end
      for (int o = 0; o < 8; o++) begin
        in_valid = v; in_pos = 3'(o);
        in_re = W'(base + 100 * brev(o)); in_im = -in_re;
        @(negedge clk);
      end
    end
    in_valid = 0;
    for (int o = 0; o < 16; o++) begin in_pos = 3'(o); @(negedge clk); end
    checks++;
    if (nout != vals.size()) begin failures++; $display("FAIL: %0d outputs of %0d", nout, vals.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

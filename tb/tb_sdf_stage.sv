// tb_sdf_stage - checks radix-2 SDF stages with feedback 4 and 2 on a stream
// of random 8-sample groups with invalid groups in between: every valid
// output must carry the right position tag and the right sum or difference,
// and the first sum of the M = 4 stage must appear one clock after input
// position 4 arrived (M + 1 clocks after input position 0).
module tb_sdf_stage;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [2:0] in_pos = '0;
  logic signed [W-1:0] in_re = '0, in_im = '0;
  logic ov4, ov2; logic [2:0] op4, op2;
  logic signed [W:0] o4_re, o4_im, o2_re, o2_im;
  int checks = 0, failures = 0;
  int xr [$], xi [$];          // valid inputs in order
  int n4 = 0, n2 = 0;          // valid outputs seen
  int t = 0, t_first4 = -1, t_in4 = -1;

  sdf_stage #(.M(4), .W(W)) d4 (.clk, .rst_n, .in_valid, .in_pos, .in_re, .in_im,
    .out_valid(ov4), .out_pos(op4), .out_re(o4_re), .out_im(o4_im));
  sdf_stage #(.M(2), .W(W)) d2 (.clk, .rst_n, .in_valid, .in_pos, .in_re, .in_im,
    .out_valid(ov2), .out_pos(op2), .out_re(o2_re), .out_im(o2_im));
  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // expected output at position p of group g for feedback m
  function automatic void expect_out(int m, int g, int p, output int er, output int ei);
    int base, r;
    base = 8 * g + (p / (2 * m)) * 2 * m;
    r = p % (2 * m);
    if (r < m) begin er = xr[base + r] + xr[base + r + m]; ei = xi[base + r] + xi[base + r + m]; end
    else begin er = xr[base + r - m] - xr[base + r]; ei = xi[base + r - m] - xi[base + r]; end
  endfunction

  always @(negedge clk) if (rst_n) begin
    int er, ei;
    t++;
    if (ov4) begin
      if (t_first4 < 0) t_first4 = t;
      expect_out(4, n4 / 8, n4 % 8, er, ei);
      chk(op4 == 3'(n4 % 8) && o4_re == er && o4_im == ei, $sformatf("M=4 output %0d", n4));
      n4++;
    end
    if (ov2) begin
      expect_out(2, n2 / 8, n2 % 8, er, ei);
      chk(op2 == 3'(n2 % 8) && o2_re == er && o2_im == ei, $sformatf("M=2 output %0d", n2));
      n2++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 60; g++) begin
      bit v;
      v = (g % 5 != 3);
      for (int p = 0; p < 8; p++) begin
        in_valid = v; in_pos = 3'(p);
        in_re = W'($urandom); in_im = W'($urandom);
        if (v) begin xr.push_back(in_re); xi.push_back(in_im); end
        if (v && t_in4 < 0 && p == 4) t_in4 = t + 1;
        @(negedge clk);
      end
    end
    in_valid = 0;
    for (int p = 0; p < 16; p++) begin in_pos = 3'(p); @(negedge clk); end
    chk(n4 == xr.size() && n2 == xr.size(), $sformatf("output count %0d %0d of %0d", n4, n2, xr.size()));
    chk(t_first4 - t_in4 == 1, $sformatf("M=4 latency %0d", t_first4 - t_in4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

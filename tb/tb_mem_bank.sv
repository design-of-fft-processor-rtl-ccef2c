// tb_mem_bank - fills the single-port bank with random words, reads them back
// and checks the one-clock read latency, that a disabled cycle keeps the read
// data, and that a write does not disturb rdata.
module tb_mem_bank;
  localparam int DEPTH = 128, W = 40;
  logic clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [6:0] addr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  mem_bank #(.DEPTH(DEPTH), .W(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = {$urandom, $urandom} ;
      en = 1; we = 1; addr = 7'(a); wdata = model[a];
      @(negedge clk);
    end
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      en = 1; we = 0; addr = 7'(a);
      @(negedge clk);
      chk(rdata == model[a], $sformatf("read %0d", a));
      en = 0; addr = 7'($urandom_range(DEPTH - 1));
      @(negedge clk);
      chk(rdata == model[a], "rdata held while disabled");
      if (n % 3 == 0) begin
        int b;
        b = (a + 1 + $urandom_range(DEPTH - 2)) % DEPTH;
        model[b] = {$urandom, $urandom};
        en = 1; we = 1; addr = 7'(b); wdata = model[b];
        @(negedge clk);
        chk(rdata == model[a], "rdata held during a write");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_wr_commutator - issues random write sets (up to 8 valid requests in
// different banks) through the write commutator into 8 bank models and checks
// that every bank then holds exactly what a reference memory indexed by
// address holds: each word reached the right bank, the right row, and no
// idle bank was written.
module tb_wr_commutator;
  import fft_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  mem_req_t req [NBANK];
  cplx_t data [NBANK];
  logic bank_we [NBANK];
  logic [BANK_AW-1:0] bank_row [NBANK];
  cplx_t bank_d [NBANK];
  cplx_t mem [NBANK][BANK_DEPTH];
  cplx_t ref_mem [1024];
  int checks = 0, failures = 0;

  wr_commutator #(.NREQ(NBANK)) dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk)
    for (int b = 0; b < NBANK; b++) if (bank_we[b]) mem[b][bank_row[b]] <= bank_d[b];

  function automatic logic [AW-1:0] addr_of(int b, int r);
    return {7'(r), 3'((b - (r >> 4)) & 7)};
  endfunction

  initial begin
    int perm [NBANK];
    for (int a = 0; a < 1024; a++) ref_mem[a] = '0;
    for (int b = 0; b < NBANK; b++) for (int r = 0; r < BANK_DEPTH; r++) mem[b][r] = '0;
    for (int i = 0; i < NBANK; i++) begin req[i] = '0; data[i] = '0; perm[i] = i; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int nv, nwe;
      perm.shuffle();
      nv = 0;
      for (int i = 0; i < NBANK; i++) begin
        req[i].valid = ($urandom_range(3) != 0);
        req[i].addr  = addr_of(perm[i], $urandom_range(BANK_DEPTH - 1));
        data[i] = {WL'($urandom), WL'($urandom)};
        if (req[i].valid) begin ref_mem[req[i].addr] = data[i]; nv++; end
      end
      #1;
      nwe = 0;
      for (int b = 0; b < NBANK; b++) if (bank_we[b]) nwe++;
      checks++;
      if (nwe != nv) begin failures++; $display("FAIL: %0d write enables for %0d requests", nwe, nv); end
      @(negedge clk);
    end
    for (int a = 0; a < 1024; a++) begin
      int r, b;
      r = a >> 3;
      b = ((a & 7) + (r >> 4)) % 8;
      checks++;
      if (mem[b][r] !== ref_mem[a]) begin
        failures++; $display("FAIL: address %0d holds %h exp %h", a, mem[b][r], ref_mem[a]);
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

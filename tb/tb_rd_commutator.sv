// tb_rd_commutator - puts 8 random single-port bank models behind the read
// commutator and issues random request sets (up to 8 valid requests, all in
// different banks, some slots idle). Every valid slot must receive, one clock
// later, the word stored at its address; idle banks must not be enabled.
module tb_rd_commutator;
  import fft_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  mem_req_t req [NBANK];
  logic bank_en [NBANK];
  logic [BANK_AW-1:0] bank_row [NBANK];
  cplx_t bank_q [NBANK], data [NBANK];
  cplx_t mem [NBANK][BANK_DEPTH];
  int checks = 0, failures = 0;

  rd_commutator #(.NREQ(NBANK)) dut (.*);
  always #5 clk = ~clk;

  // bank models with one clock read latency
  always_ff @(posedge clk)
    for (int b = 0; b < NBANK; b++) if (bank_en[b]) bank_q[b] <= mem[b][bank_row[b]];

  // address of row r in bank b under the skew (A[2:0] + A[9:7]) mod 8
  function automatic logic [AW-1:0] addr_of(int b, int r);
    return {7'(r), 3'((b - (r >> 4)) & 7)};
  endfunction

  initial begin
    int perm [NBANK];
    logic [AW-1:0] a_prev [NBANK];
    logic v_prev [NBANK];
    for (int b = 0; b < NBANK; b++)
      for (int r = 0; r < BANK_DEPTH; r++) mem[b][r] = {WL'($urandom), WL'($urandom)};
    for (int i = 0; i < NBANK; i++) begin req[i] = '0; v_prev[i] = 0; a_prev[i] = '0; perm[i] = i; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // each cycle applies a new request set, then checks the data that
    // arrives for the set of the cycle before (the new set must not steer it)
    for (int n = 0; n <= 2000; n++) begin
      int busy;
      perm.shuffle();
      busy = 0;
      for (int i = 0; i < NBANK; i++) begin
        req[i].valid = (n < 2000) && ($urandom_range(5) != 0);
        req[i].addr  = addr_of(perm[i], $urandom_range(BANK_DEPTH - 1));
        if (req[i].valid) busy++;
      end
      #1;
      checks++;
      begin
        int en;
        en = 0;
        for (int b = 0; b < NBANK; b++) if (bank_en[b]) en++;
        if (en != busy) begin failures++; $display("FAIL: %0d banks enabled for %0d requests", en, busy); end
      end
      for (int i = 0; i < NBANK; i++) begin
        int b, r;
        if (!v_prev[i]) continue;
        r = int'(a_prev[i][9:3]);
        b = (int'(a_prev[i][2:0]) + (r >> 4)) % 8;
        checks++;
        if (data[i] !== mem[b][r]) begin
          failures++; $display("FAIL: slot %0d addr %0d got %h exp %h", i, a_prev[i], data[i], mem[b][r]);
        end
      end
      for (int i = 0; i < NBANK; i++) begin
        a_prev[i] = req[i].addr; v_prev[i] = req[i].valid;
      end
      @(negedge clk);
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

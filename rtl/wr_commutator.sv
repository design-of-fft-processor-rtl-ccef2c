// wr_commutator - write commutator between the writers and the 8 memory
// banks.
//
// NREQ slots each carry a valid bit, a 10-bit data address and a complex word.
// During a transform slots 0..3 are the four processing-element results; while
// the input is loaded all eight slots are the input lanes. Each address is
// split into bank (A[2:0] + A[9:7]) mod 8 and row A[9:3] and the word is routed
// to that bank's write port in the same cycle. Purely combinational; an
// assertion checks that no bank gets two writers.
module wr_commutator
  import fft_pkg::*;
#(
  parameter int NREQ = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  mem_req_t            req   [NREQ],
  input  cplx_t               data  [NREQ],
  output logic                bank_we  [NBANK],
  output logic [BANK_AW-1:0]  bank_row [NBANK],
  output cplx_t               bank_d   [NBANK]
);
  always_comb begin
    for (int j = 0; j < NBANK; j++) begin
      bank_we[j]  = 1'b0;
      bank_row[j] = '0;
      bank_d[j]   = '0;
      for (int i = 0; i < NREQ; i++) begin
        if (req[i].valid && bank_of(req[i].addr) == 3'(j)) begin
          bank_we[j]  = 1'b1;
          bank_row[j] = row_of(req[i].addr);
          bank_d[j]   = data[i];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < NREQ; i++)
        for (int k = i + 1; k < NREQ; k++)
          assert (!(req[i].valid && req[k].valid && bank_of(req[i].addr) == bank_of(req[k].addr)))
            else $error("wr_commutator: slots %0d and %0d write bank %0d together", i, k, bank_of(req[i].addr));
    end
  end
endmodule

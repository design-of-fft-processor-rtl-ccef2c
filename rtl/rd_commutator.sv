// rd_commutator - read commutator between the 8 memory banks and their
// readers.
//
// NREQ request slots each carry a valid bit and a 10-bit data address. During
// a transform slots 0..3 belong to the four processing elements; while the
// result is unloaded all eight slots belong to the output lanes. Each address
// is split into bank (A[2:0] + A[9:7]) mod 8 and row A[9:3]; every bank whose
// number is requested gets a read of that row. The bank number of each slot is
// registered, so that one clock later (the bank read latency) the slot's data
// is picked from the right bank output. The controller's schedule never sends
// two slots to one bank in a cycle; an assertion checks it.
// The checking assertions sample rst_n on the clock while the flip-flops use
// it as an asynchronous reset; lint reports rst_n as used both ways, which
// concerns the checks only, not the circuit.
module rd_commutator
  import fft_pkg::*;
#(
  parameter int NREQ = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  mem_req_t            req   [NREQ],
  output logic                bank_en  [NBANK],
  output logic [BANK_AW-1:0]  bank_row [NBANK],
  input  cplx_t               bank_q   [NBANK],
  output cplx_t               data  [NREQ]
);
  logic [2:0] sel_d [NREQ];

  always_comb begin
    for (int j = 0; j < NBANK; j++) begin
      bank_en[j]  = 1'b0;
      bank_row[j] = '0;
      for (int i = 0; i < NREQ; i++) begin
        if (req[i].valid && bank_of(req[i].addr) == 3'(j)) begin
          bank_en[j]  = 1'b1;
          bank_row[j] = row_of(req[i].addr);
        end
      end
    end
    for (int i = 0; i < NREQ; i++) data[i] = bank_q[sel_d[i]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREQ; i++) sel_d[i] <= '0;
    end else begin
      for (int i = 0; i < NREQ; i++) sel_d[i] <= bank_of(req[i].addr);
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < NREQ; i++)
        for (int k = i + 1; k < NREQ; k++)
          assert (!(req[i].valid && req[k].valid && bank_of(req[i].addr) == bank_of(req[k].addr)))
            else $error("rd_commutator: slots %0d and %0d read bank %0d together", i, k, bank_of(req[i].addr));
    end
  end
endmodule

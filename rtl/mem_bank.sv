// mem_bank - single-port data memory bank, DEPTH words of W bits.
//
// One access per cycle: a write when en && we, a read when en && !we. Read
// data appears on rdata one clock after the read and holds until the next
// read. The processor uses eight of these (128 words x 40 bits, a complex
// sample of two 20-bit components per word); the document builds them from a
// compiled single-port SRAM, here they are a plain array that synthesis maps
// to a memory. The one-cycle read latency is this design's choice.
module mem_bank #(
  parameter int DEPTH = 128,
  parameter int W     = 40,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule

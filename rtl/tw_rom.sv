// tw_rom - twiddle ROM of one processing element ("PE-based" ROM).
//
// Each of the four PEs only ever needs its own twiddles, so each gets a ROM
// of 296 words instead of sharing one table with symmetry logic:
//   addr 0..255   stage 1: W1024^(k * (4*n1 + p)),  addr = {n1[4:0], k[2:0]}
//   addr 256..287 stage 2: W1024^(8k * (4*n2 + p)), addr = 256 + {n2[1:0], k}
//   addr 288..295 stage 3: W1024^(64k * (p mod 2)), addr = 288 + k
// with p = PE_ID and W1024^e = exp(-j 2 pi e / 1024). The map and the address
// format follow the document. The words are computed at elaboration as
// round(2^16 cos) and round(-2^16 sin) (Q2.16 in 18 bits); synthesis turns
// the constant table into combinational logic. Combinational read.
module tw_rom #(
  parameter int PE_ID   = 0,
  parameter int TW_W    = 18,
  parameter int TW_FRAC = 16
) (
  input  logic [8:0]             addr,
  output logic signed [TW_W-1:0] tw_re,
  output logic signed [TW_W-1:0] tw_im
);
  localparam int DEPTH = 296;
  typedef logic signed [TW_W-1:0] tw_t;
  typedef tw_t [DEPTH-1:0] tab_t;

  function automatic int exponent(int a);
    int k;
    k = a % 8;
    if (a < 256) return (k * (4 * (a / 8) + PE_ID)) % 1024;
    if (a < 288) return (8 * k * (4 * ((a - 256) / 8) + PE_ID)) % 1024;
    return (64 * k * (PE_ID % 2)) % 1024;
  endfunction

  function automatic tab_t make_tab(bit imag);
    tab_t  t;
    real   ang, v;
    for (int a = 0; a < DEPTH; a++) begin
      ang = 2.0 * 3.14159265358979323846 * real'(exponent(a)) / 1024.0;
      v   = imag ? -$sin(ang) : $cos(ang);
      t[a] = tw_t'($rtoi($floor(v * real'(1 << TW_FRAC) + 0.5)));
    end
    return t;
  endfunction

  localparam tab_t TAB_RE = make_tab(1'b0);
  localparam tab_t TAB_IM = make_tab(1'b1);

  always_comb begin
    if (addr < 9'(DEPTH)) begin
      tw_re = TAB_RE[addr];
      tw_im = TAB_IM[addr];
    end else begin
      tw_re = '0;
      tw_im = '0;
    end
  end
endmodule

// fft_pkg - constants, types and address functions shared by the 1024-point
// parallel-in/parallel-out FFT/IFFT processor.
//
// The processor keeps the 1024 samples in 8 single-port banks of 128 words.
// A 10-bit data address A (the sample index in the layout of the current
// stage) lives in bank (A[2:0] + A[9:7]) mod 8, at row A[9:3]. With this skew
// 8 consecutive input samples x(8c..8c+7) land in 8 different banks, and so do
// 8 consecutive results X(8c..8c+7), which is what lets both sides run in
// normal order without a reorder buffer. The bank rule follows the document;
// the choice of row bits is this design's own.
//
// pe_addr() is the per-stage read/write address of a processing element for
// its 8-bit butterfly counter b and its PE number p, tw_addr() the address of
// the PE's twiddle ROM, and int_bits()/stage_shift() the fixed-point formats of
// the four stages in FFT and IFFT mode. Each file uses only some of these
// constants and address bits, so a lint run on one file lists the rest as
// unused.
package fft_pkg;

  localparam int N          = 1024;  // transform size
  localparam int WL         = 20;    // internal word length per component
  localparam int NBANK      = 8;     // memory banks = parallel lanes
  localparam int NPE        = 4;     // radix-2/4/8 processing elements
  localparam int BANK_DEPTH = 128;   // words per bank
  localparam int BANK_AW    = 7;
  localparam int AW         = 10;    // data address width
  localparam int TW_W       = 18;    // twiddle word length
  localparam int TW_FRAC    = 16;    // twiddle fraction bits (Q2.16)
  localparam int CM_FRAC    = 8;     // fraction bits of the 1/sqrt(2) constant
  localparam int TW_AW      = 9;     // twiddle ROM address width
  localparam int TW_DEPTH   = 296;   // 256 + 32 + 8 twiddles per PE
  localparam int IN_INT     = 3;     // integer bits (sign included) of the input
  localparam int D_STAGE12  = 24;    // read-to-write pipeline length, stages 1 and 2
  localparam int D_STAGE3   = 22;    // read-to-write pipeline length, stage 3
  localparam int MEM_LAT    = 1;     // bank read latency
  localparam int SDF_LAT    = 10;    // three SDF stages (5 + 3 + 2)
  localparam int RO_LAT     = 4;     // reorder buffer (3 + output register)
  localparam int CM_LAT     = 2;     // complex multiplier
  localparam int FP_LAT     = 1;     // fixed-point block
  localparam int PE_LAT     = SDF_LAT + RO_LAT + CM_LAT + FP_LAT;
  localparam int BU_LAT     = 1;     // radix-2 butterfly unit

  typedef struct packed {
    logic signed [WL-1:0] re;
    logic signed [WL-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic          valid;
    logic [AW-1:0] addr;
  } mem_req_t;

  typedef enum logic [1:0] {STG1 = 2'd0, STG2 = 2'd1, STG3 = 2'd2} stage_e;

  // Controller states: IDLE (loading allowed), the five pipeline states of
  // every stage, and UNLOAD (results leave in normal order).
  typedef enum logic [2:0] {
    S_IDLE, S_RD, S_TW, S_WR, S_WAIT_TW, S_WAIT_WR, S_UNLOAD
  } state_e;

  // Read/write address of PE p at butterfly counter b (Table 4-4).
  function automatic logic [AW-1:0] pe_addr(stage_e s, logic [7:0] b, logic [1:0] p);
    case (s)
      STG1:    return {b[2:0], b[7:3], p};
      STG2:    return {b[7:5], b[2:0], b[4:3], p};
      default: return {b[7:3], p[1], b[2:0], p[0]};
    endcase
  endfunction

  function automatic logic [2:0] bank_of(logic [AW-1:0] a);
    return a[2:0] + a[9:7];
  endfunction

  function automatic logic [BANK_AW-1:0] row_of(logic [AW-1:0] a);
    return a[9:3];
  endfunction

  // Address that holds x(n) before the transform.
  function automatic logic [AW-1:0] in_addr(logic [AW-1:0] n);
    return n;
  endfunction

  // Address that holds X(k) after the transform: x(k2k1k0 k5k4k3 k8k7k6 k9).
  function automatic logic [AW-1:0] out_addr(logic [AW-1:0] k);
    return {k[2:0], k[5:3], k[8:6], k[9]};
  endfunction

  // Twiddle ROM address (Table 4-3).
  function automatic logic [TW_AW-1:0] tw_addr(stage_e s, logic [7:0] b);
    case (s)
      STG1:    return {1'b0, b};
      STG2:    return {4'b1000, b[4:0]};
      default: return {6'b100100, b[2:0]};
    endcase
  endfunction

  // Integer bits (sign included) after stage st (0 = input) (Table 4-5).
  function automatic int int_bits(logic ifft, int st);
    if (st == 0) return IN_INT;
    if (ifft) begin
      case (st) 1: return 6; 2: return 9; 3: return 12; default: return 13; endcase
    end else begin
      case (st) 1: return 3; default: return 6; endcase
    end
  endfunction

  // Right shift applied by the fixed-point block of stage st (1..4).
  function automatic logic [1:0] stage_shift(logic ifft, int st);
    return 2'(int_bits(ifft, st) - int_bits(ifft, st - 1));
  endfunction

endpackage

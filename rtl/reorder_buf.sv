// reorder_buf - three-register reorder buffer that turns the bit-reversed
// output of the radix-2^3 SDF into normal order.
//
// Within an 8-sample group the SDF delivers X(0) X(4) X(2) X(6) X(1) X(5)
// X(3) X(7) (input position o carries X(bitrev(o))). Sending X(k) out at o = k
// + 3 needs a delay of 0 for X(1) and X(3), 3 for X(0), X(2), X(5), X(7) and 6
// for X(4) and X(6); at most three samples wait at any time, so three
// registers suffice. Register lifetimes are allocated so that a register is
// rewritten in the cycle it is read out:
//   slot 0: X(0), X(6)   slot 1: X(4), X(7)   slot 2: X(2), X(5)
// and the physical register of slot s in a group is (s + r) mod 3, where r
// steps by 2 (mod 3) from one group to the next. This gives three allocation
// modes that repeat every 24 clocks, as the document describes; the
// allocation itself is this design's. The output is registered: X(k) of a
// group whose X(0) entered at clock t0 leaves at t0 + 4 + k, with out_k = k.
// Inputs must arrive every clock with a continuous position tag (invalid
// slots are allowed and keep their valid flag low).
module reorder_buf #(
  parameter int W = 25
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [2:0]          in_pos,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic [2:0]          out_k,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  typedef struct packed {
    logic signed [W-1:0] re;
    logic signed [W-1:0] im;
  } cw_t;

  cw_t        regs [3];
  logic [1:0] r_cur, r_prev;      // allocation offset of this and the last group
  logic       v_cur, v_prev;      // group valid flags

  function automatic logic [1:0] phys(logic [1:0] slot, logic [1:0] r);
    logic [2:0] s;
    s = 3'(slot) + 3'(r);
    return (s >= 3'd3) ? 2'(s - 3'd3) : s[1:0];
  endfunction

  // slot written by input position o (3 = none)
  function automatic logic [1:0] wslot(logic [2:0] o);
    case (o)
      3'd0: return 2'd0;  // X(0)
      3'd1: return 2'd1;  // X(4)
      3'd2: return 2'd2;  // X(2)
      3'd3: return 2'd0;  // X(6)
      3'd5: return 2'd2;  // X(5)
      3'd7: return 2'd1;  // X(7)
      default: return 2'd3; // X(1), X(3) pass straight through
    endcase
  endfunction

  // slot read for output index k (3 = straight from the input)
  function automatic logic [1:0] rslot(logic [2:0] k);
    case (k)
      3'd0: return 2'd0;
      3'd2: return 2'd2;
      3'd4: return 2'd1;
      3'd5: return 2'd2;
      3'd6: return 2'd0;
      3'd7: return 2'd1;
      default: return 2'd3;
    endcase
  endfunction

  logic [2:0] k_now;
  logic [1:0] ws, rs, r_rd;
  logic       v_rd;
  cw_t        sel;

  always_comb begin
    k_now = in_pos - 3'd3;
    ws    = wslot(in_pos);
    rs    = rslot(k_now);
    // k = 0..4 belong to the group now entering, k = 5..7 to the previous one
    r_rd  = (in_pos >= 3'd3) ? r_cur : r_prev;
    v_rd  = (in_pos >= 3'd3) ? (in_valid | v_cur) : v_prev;
    if (rs == 2'd3) sel = '{re: in_re, im: in_im};
    else            sel = regs[phys(rs, r_rd)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) regs[i] <= '0;
      r_cur <= 2'd0; r_prev <= 2'd1;
      v_cur <= 1'b0; v_prev <= 1'b0;
      out_valid <= 1'b0; out_k <= '0; out_re <= '0; out_im <= '0;
    end else begin
      if (ws != 2'd3) regs[phys(ws, r_cur)] <= '{re: in_re, im: in_im};
      // group valid: set by any valid sample of the group
      if (in_pos == 3'd7) begin
        v_prev <= v_cur | in_valid;
        v_cur  <= 1'b0;
        r_prev <= r_cur;
        r_cur  <= phys(2'd2, r_cur);
      end else begin
        v_cur <= v_cur | in_valid;
      end
      out_valid <= v_rd;
      out_k     <= k_now;
      out_re    <= sel.re;
      out_im    <= sel.im;
    end
  end
endmodule

// mod_sub: modular subtractor with a run-time dual-mode option.
// C = (A - B) mod Q.  The subtraction is split into two 16-bit subtractors.
// In single mode the borrow of the low half ripples into the high half and
// the 32-bit result is corrected by adding Q when the final borrow is set; in
// dual mode the halves are independent 16-bit modular subtractions using
// Q[15:0] and Q[31:16].  The borrow bits b[1:0] (b[0] low half, b[1] high
// half) are exported because several operations use them as "A < B" flags; in
// single mode b[0] is the borrow of the whole 32-bit word.
// Structure (two 16-bit subtractors, two correcting adders, borrow-selected
// result multiplexers) follows the accelerator's subtractor diagram.
// Purely combinational.  Inputs must satisfy A, B < Q for a reduced result.
module mod_sub (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] q,
  input  logic        dual,
  output logic [31:0] c,
  output logic [1:0]  borrow
);
  logic [16:0] l0, h0;     // first-stage differences with borrow out
  logic [16:0] l1, h1;     // corrected values with carry out
  logic        bin_h;      // borrow into high half
  logic        bl, bh;

  always_comb begin
    l0    = {1'b0, a[15:0]} - {1'b0, b[15:0]};
    bl    = l0[16];
    bin_h = dual ? 1'b0 : bl;
    h0    = {1'b0, a[31:16]} - {1'b0, b[31:16]} - {16'd0, bin_h};
    bh    = h0[16];
    // correction adders: add Q (per half); in single mode the low carry
    // propagates into the high half
    l1    = {1'b0, l0[15:0]} + {1'b0, q[15:0]};
    h1    = {1'b0, h0[15:0]} + {1'b0, q[31:16]} + {16'd0, (dual ? 1'b0 : l1[16])};
    if (dual) begin
      c[15:0]  = bl ? l1[15:0] : l0[15:0];
      c[31:16] = bh ? h1[15:0] : h0[15:0];
      borrow   = {bh, bl};
    end else begin
      c        = bh ? {h1[15:0], l1[15:0]} : {h0[15:0], l0[15:0]};
      borrow   = {bh, bh};
    end
  end
endmodule

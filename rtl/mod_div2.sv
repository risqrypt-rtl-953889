// mod_div2: modular division by two, x * 2^-1 mod Q, without a multiplier.
// For even x the result is x >> 1; for odd x it is (x >> 1) + (2^-1 mod Q),
// reduced by a modular adder.  INV2 = 2^-1 mod Q is a precomputed constant
// from the auxiliary data.  Dual mode treats the halves independently (Q and
// INV2 then hold the 16-bit constants in both halves).  Combinational.
module mod_div2 (
  input  logic [31:0] x,
  input  logic [31:0] q,
  input  logic [31:0] inv2,
  input  logic        dual,
  output logic [31:0] y
);
  logic [31:0] half, addend;
  logic [1:0]  unused_ovf;
  always_comb begin
    if (dual) begin
      half   = {1'b0, x[31:17], 1'b0, x[15:1]};
      addend = {x[16] ? inv2[31:16] : 16'd0, x[0] ? inv2[15:0] : 16'd0};
    end else begin
      half   = {1'b0, x[31:1]};
      addend = x[0] ? inv2 : 32'd0;
    end
  end
  mod_add u_add (.a(half), .b(addend), .q(q), .dual(dual), .c(y), .ovf(unused_ovf));
endmodule

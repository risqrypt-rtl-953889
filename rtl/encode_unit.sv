// encode_unit: bit-string packer/unpacker of NTT-Lite (EU).
// A 64-bit shift register K and a count of the valid bits in it carry the
// data; encode and decode share them.  Bits enter at the top of the valid
// region and leave from bit 0 (little-endian bit order).
//   decode (dec=1): 32-bit words enter, d-bit fields leave, one per output in
//       single mode, two (packed as 16-bit halves) in dual mode.
//   encode (dec=0): d-bit values enter (one, or two 16-bit halves in dual
//       mode), 32-bit words leave; with 'flush' set a last partial word is
//       emitted zero-padded.
// The register is twice the word size so input and output stream at one item
// per cycle without stalling.  Valid/ready handshakes on both sides; an item
// moves when valid and ready are both high at a clock edge.  'clear' empties
// the register.  d is 1..32 (1..16 in dual mode).  The 64-bit K with a bit
// counter follows the accelerator description; the handshakes are this
// design's choice.
module encode_unit (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        dec,
  input  logic        dual,
  input  logic [5:0]  d,
  input  logic        flush,
  input  logic        in_valid,
  input  logic [31:0] in_data,
  output logic        in_ready,
  output logic        out_valid,
  output logic [31:0] out_data,
  input  logic        out_ready,
  output logic        empty
);
  logic [63:0] k;
  logic [6:0]  cnt;
  logic [6:0]  item;        // bits per value item (d or 2d)
  logic [31:0] dmask;
  logic [31:0] in_bits;
  logic [6:0]  take, put;
  logic [127:0] merged;

  always_comb begin
    item  = dual ? {d, 1'b0} : {1'b0, d};
    dmask = (d >= 6'd32) ? 32'hFFFF_FFFF : ((32'd1 << d) - 32'd1);
    if (dec) begin
      in_bits   = in_data;
      in_ready  = (cnt <= 7'd32);
      out_valid = (cnt >= item);
      out_data  = dual ? {16'(k >> d) & dmask[15:0], k[15:0] & dmask[15:0]}
                       : (k[31:0] & dmask);
      take      = (out_valid && out_ready) ? item : 7'd0;
      put       = (in_valid && in_ready) ? 7'd32 : 7'd0;
    end else begin
      in_bits   = dual ? (((in_data >> 16) & dmask) << d) | (in_data & {16'd0, dmask[15:0]})
                       : (in_data & dmask);
      in_ready  = ({1'b0, cnt} + {1'b0, item}) <= 8'd64;
      out_valid = (cnt >= 7'd32) || (flush && cnt != 7'd0);
      out_data  = k[31:0];
      take      = (out_valid && out_ready) ? ((cnt >= 7'd32) ? 7'd32 : cnt) : 7'd0;
      put       = (in_valid && in_ready) ? item : 7'd0;
    end
    merged = ({64'd0, k} >> take) | ({96'd0, in_bits} << (cnt - take));
    if (put == 7'd0) merged = {64'd0, k} >> take;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k   <= '0;
      cnt <= '0;
    end else if (clear) begin
      k   <= '0;
      cnt <= '0;
    end else begin
      cnt <= cnt - take + put;
      // keep only valid bits so stale data never reaches a partial word
      k   <= merged[63:0] & ((cnt - take + put) >= 7'd64 ? 64'hFFFF_FFFF_FFFF_FFFF
                             : ((64'd1 << (cnt - take + put)) - 64'd1));
    end
  end

  assign empty = (cnt == 7'd0);
endmodule

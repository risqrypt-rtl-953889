// instr_ram: instruction memory of the processor, WORDS x 32 bit.
// A synchronous fetch port (instruction word one cycle after fetch_en) and a
// write port used to load the program.  Contents are not reset.  The size is
// this design's choice.
module instr_ram #(
  parameter int unsigned WORDS = 16384,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          fetch_en,
  input  logic [31:0]   fetch_addr,   // byte address
  output logic [31:0]   fetch_data,
  input  logic          load_we,
  input  logic [31:0]   load_addr,    // byte address
  input  logic [31:0]   load_data
);
  logic [31:0] mem [WORDS];
  always_ff @(posedge clk) begin
    if (load_we)  mem[load_addr[AW+1:2]] <= load_data;
    if (fetch_en) fetch_data <= mem[fetch_addr[AW+1:2]];
  end
  logic unused;
  assign unused = ^{fetch_addr[31:AW+2], fetch_addr[1:0], load_addr[31:AW+2], load_addr[1:0]};
endmodule

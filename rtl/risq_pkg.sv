// risq_pkg: types and constants shared by the accelerator system.
// It defines the Wishbone-style MMIO request/response bundles, the DMA
// request/response bundles used by every accelerator to reach the data RAM,
// the NTT-Lite word modes and opcodes (the opcode names follow the operation
// list of the accelerator; their numeric encodings are this design's own), the
// butterfly-unit operation codes, the X2X opcodes and conversion modes.
package risq_pkg;

  // ---------------- bus bundles ----------------
  typedef struct packed {
    logic        cyc;
    logic        stb;
    logic        we;
    logic [31:0] adr;   // byte address
    logic [31:0] dat;   // write data
  } wb_req_t;

  typedef struct packed {
    logic        ack;
    logic [31:0] dat;   // read data, valid with ack
  } wb_rsp_t;

  typedef struct packed {
    logic        req;
    logic        we;
    logic [31:0] addr;  // byte address, word aligned
    logic [31:0] wdata;
  } dma_req_t;

  typedef struct packed {
    logic        gnt;     // request accepted this cycle
    logic        rvalid;  // read data of the request granted one cycle earlier
    logic [31:0] rdata;
  } dma_rsp_t;

  // ---------------- NTT-Lite ----------------
  typedef enum logic [1:0] {
    WM_SINGLE = 2'd0,   // one 32-bit word
    WM_DUAL   = 2'd1,   // two independent 16-bit words
    WM_POLY   = 2'd2    // dual, multiplication as degree-1 polynomial product
  } word_mode_e;

  typedef enum logic [4:0] {
    OP_NOP        = 5'd0,
    OP_NTT        = 5'd1,
    OP_INTT       = 5'd2,
    OP_PWM        = 5'd3,
    OP_ADD        = 5'd4,
    OP_SUB        = 5'd5,
    OP_SUM        = 5'd6,
    OP_MAC        = 5'd7,
    OP_COMPRESS   = 5'd8,
    OP_DECOMPRESS = 5'd9,
    OP_DECOMPOSE  = 5'd10,
    OP_CHK_NORM   = 5'd11,
    OP_MAKE_HINT  = 5'd12,
    OP_USE_HINT   = 5'd13,
    OP_ENCODE     = 5'd14,
    OP_DECODE     = 5'd15,
    OP_CBD        = 5'd16,
    OP_REJ_SAMP   = 5'd17
  } ntt_op_e;

  // butterfly-unit micro operations
  typedef enum logic [3:0] {
    BU_CT      = 4'd0,   // OUT0 = A + W*B, OUT1 = A - W*B
    BU_GS      = 4'd1,   // OUT0 = (A + B)/2, OUT1 = (B - A)*W
    BU_ADD     = 4'd2,
    BU_SUB     = 4'd3,
    BU_MUL     = 4'd4,   // A*B (poly-mode: first pass of base multiplication)
    BU_MAC     = 4'd5,   // A*B + C
    BU_PMUL2   = 4'd6,   // poly-mode second pass: {C_H, C'_L + T*zeta}
    BU_COMP    = 4'd7,
    BU_DECOMP  = 4'd8,
    BU_DCMPOSE = 4'd9,
    BU_CHKNORM = 4'd10,
    BU_MKHINT  = 4'd11,
    BU_USEHINT = 4'd12,
    BU_SUM     = 4'd13
  } bu_op_e;

  // auxiliary (constant) data path, 160 bits
  typedef struct packed {
    logic [31:0] q;      // modulus
    logic [63:0] delta;  // Barrett constant floor((2^64-1)/divisor)
    logic [31:0] beta;   // bound / alpha / constant right operand
    logic [31:0] inv2;   // 2^-1 mod q, or corner-case value / bound beta-1
  } aux_t;

  // ---------------- X2X ----------------
  typedef enum logic [2:0] {
    XOP_PRNG   = 3'd0,
    XOP_X2X    = 3'd1,
    XOP_REF    = 3'd2,
    XOP_MASK   = 3'd3,
    XOP_REFX2X = 3'd4
  } x2x_op_e;

  typedef enum logic [1:0] {
    XM_A2B     = 2'd0,
    XM_B2A     = 2'd1,
    XM_B2A_BIT = 2'd2
  } x2x_mode_e;

  localparam int unsigned X2X_CORE_STAGES = 13;
  localparam int unsigned KECCAK_ROUNDS   = 24;
  localparam int unsigned KECCAK_CYC_PER_ROUND = 4;

endpackage

// ft_pkg: types and constants shared by the fault-tolerant execute stage, the
// Reconfiguration Manager and the reconfigurable modules.
//
// The ALU operation set (AND, NAND, OR, NOR, XOR, XNOR, ADD/SUB, shift) is the
// one the hardware spare unit implements. Its 4-bit encoding, the
// signatures held in the Reconfigurable Area Status Register and the default
// storage addresses of the partial bitstreams are this design's own choices.
// Default bitstream lengths follow the published bitstream sizes
// (External ALU 67.2 KB, DES 84.4 KB, blanking 51.2 KB; 1 KB = 1024 bytes,
// rounded up to whole 32-bit words).
package ft_pkg;

  localparam int unsigned XLEN = 32;   // LEON3 is a 32-bit SPARC V8 core

  typedef enum logic [3:0] {
    ALU_AND  = 4'h0,
    ALU_NAND = 4'h1,
    ALU_OR   = 4'h2,
    ALU_NOR  = 4'h3,
    ALU_XOR  = 4'h4,
    ALU_XNOR = 4'h5,
    ALU_ADD  = 4'h6,
    ALU_SUB  = 4'h7,
    ALU_SLL  = 4'h8,
    ALU_SRL  = 4'h9,
    ALU_SRA  = 4'hA
  } alu_op_e;

  // Integer condition codes produced with every result (SPARC icc order).
  typedef struct packed {
    logic n;
    logic z;
    logic v;
    logic c;
  } icc_t;

  // Signatures of the cores that can occupy the reconfigurable area.
  localparam logic [31:0] SIG_BLANK   = 32'h0000_0000;
  localparam logic [31:0] SIG_DES     = 32'h0000_0DE5;
  localparam logic [31:0] SIG_EXT_ALU = 32'h0000_0A1E;

  // Every partial bitstream starts with the configuration sync word; the
  // word that follows it carries the signature of the core it configures.
  localparam logic [31:0] CFG_SYNC_WORD = 32'hAA99_5566;

  // Default bitstream table (byte addresses in storage memory, lengths in words).
  localparam logic [31:0] BS_ALU_ADDR   = 32'h4010_0000;
  localparam int unsigned BS_ALU_WORDS  = 17204;   // 67.2 KB
  localparam logic [31:0] BS_DES_ADDR   = 32'h4012_0000;
  localparam int unsigned BS_DES_WORDS  = 21607;   // 84.4 KB
  localparam logic [31:0] BS_BLANK_ADDR = 32'h4014_0000;
  localparam int unsigned BS_BLANK_WORDS = 13108;  // 51.2 KB

  // AMBA AHB encodings
  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_BUSY   = 2'b01;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;
  localparam logic [1:0] HTRANS_SEQ    = 2'b11;
  localparam logic [2:0] HBURST_INCR   = 3'b001;
  localparam logic [2:0] HSIZE_WORD    = 3'b010;

  // Signals crossing the reconfigurable-area boundary. Every module that can
  // be loaded into the area has exactly this interface: the dynamic part of
  // the APB slave interface (the static plug-and-play part stays outside the
  // area) plus the ALU operand and result signals. A module ignores the half
  // it does not use and drives its unused outputs to zero.
  typedef struct packed {
    logic          psel;
    logic          penable;
    logic [7:0]    paddr;
    logic          pwrite;
    logic [31:0]   pwdata;
    alu_op_e       alu_op;
    logic [31:0]   alu_a;
    logic [31:0]   alu_b;
  } ra_in_t;

  typedef struct packed {
    logic [31:0]   prdata;
    logic          pirq;
    logic [31:0]   alu_result;
    icc_t          alu_icc;
  } ra_out_t;

  function automatic logic parity32(input logic [31:0] d);
    return ^d;
  endfunction

endpackage

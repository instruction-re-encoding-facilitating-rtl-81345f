// idec_pkg: shared types and constants of the compressed-instruction decoder.
//
// The decoder turns a canonical-Huffman coded instruction stream back into
// 32-bit MIPS or ARM instructions. Its look-up tables are application
// specific, so they are written at run time through one configuration port;
// this package defines that port's record (cfg_t) and the kinds of write it
// carries. The field widths of cfg_t are fixed upper bounds; each module uses
// only the low bits its own parameters need. The configuration record and
// its encoding are this design's own choice.
package idec_pkg;


  // Target instruction set, selects the format-restore unit.
  typedef enum logic {
    ISA_MIPS = 1'b0,
    ISA_ARM  = 1'b1
  } isa_e;

  // Kinds of configuration write.
  typedef enum logic [3:0] {
    CFG_LUT_LEN  = 4'd0, // lut: data[7] = table in use, data[5:0] = code length
    CFG_LUT_MIN  = 4'd1, // lut: data = smallest (first) code of that length
    CFG_LUT_BASE = 4'd2, // lut: data = first row of the table in the word store
    CFG_COL_MODE = 4'd3, // lut: data[c] = 1 -> column c stored as transitions
    CFG_TRANS    = 4'd4, // lut, col, slot: data[31] = valid, data[15:0] = row
    CFG_RAW      = 4'd5, // addr = row of the word store, data = stored word
    CFG_RT_MAP   = 4'd6, // addr = new R-Type opcode: data[6] = valid, data[5:0] = function
    CFG_FP_FMT   = 4'd7, // addr = FP function field: data[5] = valid, data[4:0] = format
    CFG_BX_OP    = 4'd8  // data[8] = valid, data[7:0] = new Branch Exchange opcode (bits 27:20)
  } cfg_kind_e;

  typedef struct packed {
    logic        valid;
    cfg_kind_e   kind;
    logic [7:0]  lut;
    logic [7:0]  col;
    logic [7:0]  slot;
    logic [15:0] addr;
    logic [31:0] data;
  } cfg_t;

  // MIPS major opcodes used by format restoration.
  localparam logic [5:0] MIPS_OP_RTYPE = 6'b000000;
  localparam logic [5:0] MIPS_OP_COP1  = 6'b010001;

endpackage

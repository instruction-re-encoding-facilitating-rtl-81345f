// mips_restore: puts a decoded MIPS word back into the original format.
//
// Before compression some instruction bits were re-encoded or turned into
// don't-cares, which in the decoding table hold whatever the preceding row
// held. This unit undoes the re-encodings that need it, combinationally:
//   * R-Type: the application's R-Type instructions were given new, otherwise
//     unused major opcodes and their function field became don't-care. A
//     64-entry map, indexed by the major opcode, marks the new opcodes and
//     gives each one's function field; a hit writes opcode 000000 and that
//     function field.
//   * J-Type (opcode 00001x): bits 1:0 were don't-care; they are set to 0.
//   * Floating point (opcode 010001): the format field (bits 25:21) was
//     don't-care and the function field alone names the instruction; a
//     64-entry map indexed by the function field gives the format back.
// Fields that were dropped because the instruction never reads them (unused
// register fields, sa) are passed on unchanged.
//
// What is restored follows the re-encoding description; the maps' layout and
// their configuration (CFG_RT_MAP, CFG_FP_FMT) are this design's own. The
// re-encoded high bits of immediate and target fields are not restored: how
// they would be recovered is not specified. The maps are cleared on reset
// (active low, synchronous).
// Of the configuration record only valid, kind, addr and data are used.
module mips_restore
  import idec_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_t              cfg,
  input  logic [31:0]       in_word,
  output logic [31:0]       out_word
);

  logic [63:0]      rt_valid;
  logic [5:0]       rt_func  [64];
  logic [63:0]      fp_valid;
  logic [4:0]       fp_fmt   [64];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rt_valid <= '0;
      fp_valid <= '0;
      for (int i = 0; i < 64; i++) begin
        rt_func[i] <= '0;
        fp_fmt[i]  <= '0;
      end
    end else if (cfg.valid) begin
      if (cfg.kind == CFG_RT_MAP) begin
        rt_valid[cfg.addr[5:0]] <= cfg.data[6];
        rt_func[cfg.addr[5:0]]  <= cfg.data[5:0];
      end
      if (cfg.kind == CFG_FP_FMT) begin
        fp_valid[cfg.addr[5:0]] <= cfg.data[5];
        fp_fmt[cfg.addr[5:0]]   <= cfg.data[4:0];
      end
    end
  end

  logic [5:0] op, func;

  always_comb begin
    op       = in_word[31:26];
    func     = in_word[5:0];
    out_word = in_word;
    if (rt_valid[op]) begin
      out_word = {MIPS_OP_RTYPE, in_word[25:6], rt_func[op]};
    end else if (op[5:1] == 5'b00001) begin
      out_word = {in_word[31:2], 2'b00};
    end else if (op == MIPS_OP_COP1 && fp_valid[func]) begin
      out_word = {in_word[31:26], fp_fmt[func], in_word[20:0]};
    end
  end

endmodule

// arm_restore: puts a decoded ARM word back into the original format.
//
// Before compression some secondary-opcode bits of ARM instructions were turned
// into don't-cares (they hold whatever the preceding table row held). This
// unit restores them combinationally:
//   * Swap (bits 27:23 = 00010, 21:20 = 00, 7:4 = 1001): bits 11:8 = 0000.
//   * Halfword Data Transfer, register offset (bits 27:25 = 000, 22 = 0,
//     7 = 1, 4 = 1, 6:5 not 00): bits 11:8 = 0000.
//   * Branch Exchange: its 24 fixed opcode bits (27:4 = 0x12FFF1) were
//     replaced by a shorter application-specific opcode. Here that opcode is
//     the 8 bits 27:20, set through configuration (CFG_BX_OP); on a match,
//     bits 27:4 get the original pattern back.
// Other words pass unchanged.
//
// Which fields are restored follows the ARM re-encoding description; the
// position and width of the new Branch Exchange opcode and its configuration
// are this design's own. The re-encoded high bits of immediate and offset
// fields are not restored: how they would be recovered is not specified. The
// Branch Exchange opcode is disabled on reset (active low, synchronous).
// Of the configuration record only valid, kind, addr and data are used.
module arm_restore
  import idec_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_t              cfg,
  input  logic [31:0]       in_word,
  output logic [31:0]       out_word
);

  localparam logic [23:0] BX_FIXED = 24'h12FFF1;

  logic       bx_valid;
  logic [7:0] bx_op;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bx_valid <= 1'b0;
      bx_op    <= '0;
    end else if (cfg.valid && cfg.kind == CFG_BX_OP) begin
      bx_valid <= cfg.data[8];
      bx_op    <= cfg.data[7:0];
    end
  end

  logic is_swap, is_half, is_bx;

  always_comb begin
    is_swap = in_word[27:23] == 5'b00010 && in_word[21:20] == 2'b00 &&
              in_word[7:4] == 4'b1001;
    is_half = in_word[27:25] == 3'b000 && !in_word[22] && in_word[7] &&
              in_word[4] && in_word[6:5] != 2'b00;
    is_bx   = bx_valid && in_word[27:20] == bx_op;
    out_word = in_word;
    if (is_bx) begin
      out_word[27:4] = BX_FIXED;
    end else if (is_swap || is_half) begin
      out_word[11:8] = 4'b0000;
    end
  end

endmodule

// code_decompressor: hardware decoder for canonical-Huffman compressed code.
//
// It sits between the compressed instruction memory and the CPU. Words of the
// compressed stream arrive from memory into a 32-bit register, which keeps an
// L-bit shift register (L = MAX_LEN, the longest code) filled. Decoding takes
// two stages:
//   1. length: the window is compared in parallel with the first code of each
//      decoding table (one table per code length); the result gives the code
//      length, the table and the row. The code's bits leave the window in the
//      same cycle and the table rows are read on the clock edge.
//   2. table: the instruction word is rebuilt from the table (whole columns
//      from the word store, compressed columns by transition parity), put back
//      into the processor's instruction format (MIPS or ARM, parameter ISA) and
//      registered on the output.
// A code in the window gives its instruction two clock edges later (one per
// stage); the decoder delivers at most one instruction per cycle.
//
// A branch (a one-cycle branch pulse) throws away every buffered bit and
// in-flight instruction; the memory then supplies words from the target, and
// branch_skip tells how many leading bits of the first word to drop. Refilling
// the window after a branch is the decoder's main cost in cycles.
//
// The structure (32-bit register, L-bit shift register, one comparator per
// length, compressed tables, format restoration) follows the decoder
// description. The handshakes (valid/ready on both sides), the branch port,
// the configuration port and the pipeline registers are this design's own.
// Reset is synchronous and active low; tables must be configured before
// decoding.
//
// Ports
//   cfg                          configuration writes (idec_pkg::cfg_t)
//   mem_valid/mem_ready/mem_data compressed words from memory
//   branch, branch_skip          flush and bit offset of the branch target
//   instr_valid/instr_ready/instr decompressed instructions to the CPU
module code_decompressor
  import idec_pkg::*;
#(
  parameter int unsigned WORD_W    = 32,
  parameter int unsigned MAX_LEN   = 24,
  parameter int unsigned NUM_LUTS  = 16,
  parameter int unsigned IDX_W     = 14,
  parameter int unsigned MAX_TRANS = 16,
  parameter isa_e        ISA       = ISA_MIPS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  cfg_t                        cfg,
  input  logic                        mem_valid,
  output logic                        mem_ready,
  input  logic [WORD_W-1:0]           mem_data,
  input  logic                        branch,
  input  logic [$clog2(WORD_W)-1:0]   branch_skip,
  output logic                        instr_valid,
  input  logic                        instr_ready,
  output logic [WORD_W-1:0]           instr
);

  localparam int unsigned LW = $clog2(MAX_LEN + 1);
  localparam int unsigned CW = $clog2(WORD_W + 1);
  localparam int unsigned TW = $clog2(NUM_LUTS);

  // 32-bit register and shift register
  logic [WORD_W-1:0]  wr_bits;
  logic [CW-1:0]      wr_avail, take;
  logic [MAX_LEN-1:0] window;
  logic [LW-1:0]      win_count;

  // stage 1
  logic [NUM_LUTS-1:0]          lut_en;
  logic [NUM_LUTS-1:0][LW-1:0]  lut_len;
  logic [NUM_LUTS-1:0][MAX_LEN-1:0] lut_min;
  logic                         hit;
  logic [TW-1:0]                lut_sel;
  logic [LW-1:0]                code_len;
  logic [IDX_W-1:0]             index;
  logic                         fire;

  // stage 2
  logic              s2_valid;
  logic              s2_ready;
  logic              s2_move;
  logic [WORD_W-1:0] table_word;
  logic [WORD_W-1:0] restored;

  word_register #(.WORD_W(WORD_W)) u_word_reg (
    .clk       (clk),
    .rst_n     (rst_n),
    .flush     (branch),
    .flush_skip(branch_skip),
    .in_valid  (mem_valid),
    .in_ready  (mem_ready),
    .in_data   (mem_data),
    .take      (take),
    .bits      (wr_bits),
    .avail     (wr_avail)
  );

  shift_register #(.MAX_LEN(MAX_LEN), .WORD_W(WORD_W)) u_shift_reg (
    .clk        (clk),
    .rst_n      (rst_n),
    .flush      (branch),
    .consume    (fire),
    .consume_len(code_len),
    .wr_bits    (wr_bits),
    .wr_avail   (wr_avail),
    .take       (take),
    .window     (window),
    .count      (win_count)
  );

  length_detector #(
    .MAX_LEN (MAX_LEN),
    .NUM_LUTS(NUM_LUTS),
    .IDX_W   (IDX_W)
  ) u_len (
    .window  (window),
    .lut_en  (lut_en),
    .lut_len (lut_len),
    .lut_min (lut_min),
    .hit     (hit),
    .lut_sel (lut_sel),
    .code_len(code_len),
    .index   (index)
  );

  // A code is decoded once all its bits are in the window and stage 2 has room.
  assign fire = !branch && hit && (code_len <= win_count) && s2_ready;

  decoding_tables #(
    .WORD_W   (WORD_W),
    .MAX_LEN  (MAX_LEN),
    .NUM_LUTS (NUM_LUTS),
    .IDX_W    (IDX_W),
    .MAX_TRANS(MAX_TRANS)
  ) u_tables (
    .clk    (clk),
    .rst_n  (rst_n),
    .cfg    (cfg),
    .lut_en (lut_en),
    .lut_len(lut_len),
    .lut_min(lut_min),
    .rd_en  (fire),
    .rd_lut (lut_sel),
    .rd_idx (index),
    .word   (table_word)
  );

  if (ISA == ISA_MIPS) begin : g_mips
    mips_restore u_restore (
      .clk     (clk),
      .rst_n   (rst_n),
      .cfg     (cfg),
      .in_word (table_word),
      .out_word(restored)
    );
  end else begin : g_arm
    arm_restore u_restore (
      .clk     (clk),
      .rst_n   (rst_n),
      .cfg     (cfg),
      .in_word (table_word),
      .out_word(restored)
    );
  end

  // Stage 2 holds a looked-up row until the output register takes it.
  assign s2_move  = s2_valid && (!instr_valid || instr_ready);
  assign s2_ready = !s2_valid || s2_move;

  always_ff @(posedge clk) begin
    if (!rst_n || branch) begin
      s2_valid    <= 1'b0;
      instr_valid <= 1'b0;
    end else begin
      if (fire)
        s2_valid <= 1'b1;
      else if (s2_move)
        s2_valid <= 1'b0;
      if (s2_move)
        instr_valid <= 1'b1;
      else if (instr_ready)
        instr_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (s2_move)
      instr <= restored;
  end

  // The CPU sees a stable instruction while it is not accepted.
  a_instr_stable: assert property (@(posedge clk) disable iff (!rst_n || $past(branch))
    instr_valid && !instr_ready |=> instr_valid && $stable(instr));

endmodule

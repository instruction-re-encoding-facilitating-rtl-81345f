// decoding_tables: second decoding stage, the compressed decoding tables.
//
// There is one table per code length (NUM_LUTS tables, numbered in order of
// increasing length). Each table has a header: in-use flag, code length, first
// code of that length, and the first row it occupies in a shared word store.
// Each of the 32 columns of a table is kept in one of two forms, chosen per
// table and column by a mode bit:
//   * whole: the bit is read from the word store at row base + index;
//   * compressed: only the rows where the column's bit changes are kept
//     (up to MAX_TRANS of them), and the bit is the parity of the transitions
//     at or before the index (column_parity).
// A lookup (rd_en with rd_lut/rd_idx) reads the word store row, the table's
// transition list and mode bits into registers on the clock edge; word is
// rebuilt from them combinationally in the next cycle and stays until the
// next lookup. Tables are filled through the configuration port (idec_pkg::cfg_t)
// before decoding starts; writes are not meant to overlap lookups.
//
// The split into per-length tables, the transition-address column compression
// and the parity rule follow the decoder and table-compression descriptions.
// The shared word store with a per-table base row, the fixed transition slots
// per column, the registered (synchronous) read and the configuration port are
// this design's own. A column with more transitions than MAX_TRANS must be kept
// whole. Nothing is reset except the header in-use flags: every other entry is
// written by configuration before it is read.
module decoding_tables
  import idec_pkg::*;
#(
  parameter int unsigned WORD_W    = 32,
  parameter int unsigned MAX_LEN   = 24,
  parameter int unsigned NUM_LUTS  = 16,
  parameter int unsigned IDX_W     = 14,
  parameter int unsigned MAX_TRANS = 16
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  input  cfg_t                                        cfg,
  // table headers, to the length comparators
  output logic [NUM_LUTS-1:0]                         lut_en,
  output logic [NUM_LUTS-1:0][$clog2(MAX_LEN+1)-1:0]  lut_len,
  output logic [NUM_LUTS-1:0][MAX_LEN-1:0]            lut_min,
  // lookup
  input  logic                                        rd_en,
  input  logic [$clog2(NUM_LUTS)-1:0]                 rd_lut,
  input  logic [IDX_W-1:0]                            rd_idx,
  output logic [WORD_W-1:0]                           word
);

  localparam int unsigned LW    = $clog2(MAX_LEN + 1);
  localparam int unsigned TW    = $clog2(NUM_LUTS);
  localparam int unsigned DEPTH = 1 << IDX_W;

  typedef logic [WORD_W-1:0][MAX_TRANS-1:0][IDX_W-1:0] trans_rows_t;
  typedef logic [WORD_W-1:0][MAX_TRANS-1:0]            trans_valid_t;

  // headers
  logic [NUM_LUTS-1:0][IDX_W-1:0] lut_base;
  logic [NUM_LUTS-1:0][WORD_W-1:0] col_mode;

  // storage
  logic [WORD_W-1:0] word_store  [DEPTH];
  trans_rows_t       trans_rows  [NUM_LUTS];
  trans_valid_t      trans_valid [NUM_LUTS];

  // lookup registers
  logic [WORD_W-1:0] row_q;
  trans_rows_t       rows_q;
  trans_valid_t      valid_q;
  logic [WORD_W-1:0] mode_q;
  logic [IDX_W-1:0]  idx_q;

  wire [TW-1:0] cfg_lut = cfg.lut[TW-1:0];

  // Header registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lut_en <= '0;
    end else if (cfg.valid) begin
      case (cfg.kind)
        CFG_LUT_LEN: begin
          lut_en[cfg_lut]  <= cfg.data[7];
          lut_len[cfg_lut] <= cfg.data[LW-1:0];
        end
        CFG_LUT_MIN:  lut_min[cfg_lut]  <= cfg.data[MAX_LEN-1:0];
        CFG_LUT_BASE: lut_base[cfg_lut] <= cfg.data[IDX_W-1:0];
        CFG_COL_MODE: col_mode[cfg_lut] <= cfg.data[WORD_W-1:0];
        default: ;
      endcase
    end
  end

  // Word store: whole columns
  always_ff @(posedge clk) begin
    if (cfg.valid && cfg.kind == CFG_RAW)
      word_store[cfg.addr[IDX_W-1:0]] <= cfg.data[WORD_W-1:0];
  end

  // Transition lists: compressed columns
  always_ff @(posedge clk) begin
    if (cfg.valid && cfg.kind == CFG_TRANS) begin
      trans_rows[cfg_lut][cfg.col[$clog2(WORD_W)-1:0]][cfg.slot[$clog2(MAX_TRANS)-1:0]]
        <= cfg.data[IDX_W-1:0];
      trans_valid[cfg_lut][cfg.col[$clog2(WORD_W)-1:0]][cfg.slot[$clog2(MAX_TRANS)-1:0]]
        <= cfg.data[31];
    end
  end

  // Lookup: registered read of the selected table
  always_ff @(posedge clk) begin
    if (rd_en) begin
      row_q   <= word_store[lut_base[rd_lut] + rd_idx];
      rows_q  <= trans_rows[rd_lut];
      valid_q <= trans_valid[rd_lut];
      mode_q  <= col_mode[rd_lut];
      idx_q   <= rd_idx;
    end
  end

  // Column rebuild
  logic [WORD_W-1:0] parity_bits;

  for (genvar c = 0; c < WORD_W; c++) begin : g_col
    column_parity #(
      .IDX_W    (IDX_W),
      .MAX_TRANS(MAX_TRANS)
    ) u_col (
      .index      (idx_q),
      .trans_row  (rows_q[c]),
      .trans_valid(valid_q[c]),
      .bit_out    (parity_bits[c])
    );
  end

  assign word = (mode_q & parity_bits) | (~mode_q & row_q);

endmodule

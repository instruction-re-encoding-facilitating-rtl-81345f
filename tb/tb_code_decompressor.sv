// tb_code_decompressor: end-to-end test of the decoder for MIPS code, at the
// design's default sizes (24-bit longest code, 16 tables, 16k-row store).
//
// The test plays the off-line compressor: it draws MIPS instructions of four
// kinds (R-Type, J-Type, floating point, I-Type), re-encodes them (R-Type gets
// a new major opcode and its function field and unused register fields become
// don't-care, J-Type bits 1:0 and the floating-point format field become
// don't-care), sorts each table, sets don't-care bits equal to the row before,
// assigns canonical codes and loads the decoder. It then streams a random
// symbol sequence through a memory model that sometimes has no word ready,
// while the CPU side sometimes refuses instructions, and checks each restored
// instruction against the original on all bits the instruction uses.
// Branches restart the stream at a random symbol and bit offset; the first
// one is timed: with memory always ready the first instruction must appear 4
// cycles after the branch cycle (load word, fill window, look up, output).
// Every mechanism (each table, compressed and whole columns, each restore
// kind, window underrun, output back-pressure, memory gaps, branches) is
// counted and must occur.
module tb_code_decompressor;
  import idec_pkg::*;
  import idec_tb_pkg::*;

  localparam int unsigned NUM_LUTS  = 16;
  localparam int unsigned IDX_W     = 14;
  localparam int unsigned MAX_TRANS = 16;
  localparam int unsigned MAX_LEN   = 24;
  localparam int unsigned NSYM      = 3000;
  localparam int unsigned BRANCH_LATENCY = 4;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  cfg_t        cfg = '0;
  logic        mem_valid = 1'b0;
  logic        mem_ready;
  logic [31:0] mem_data = '0;
  logic        branch = 1'b0;
  logic [4:0]  branch_skip = '0;
  logic        instr_valid;
  logic        instr_ready = 1'b0;
  logic [31:0] instr;

  always #5 clk = ~clk;

  code_decompressor dut (
    .clk, .rst_n, .cfg, .mem_valid, .mem_ready, .mem_data,
    .branch, .branch_skip, .instr_valid, .instr_ready, .instr
  );

  int checks = 0, failures = 0;

  // Fig. 4 style re-encoding of R-Type instructions
  localparam logic [5:0] R_FUNC  [5] = '{6'h20, 6'h0d, 6'h1a, 6'h08, 6'h00}; // add break div jr sll
  localparam logic [5:0] R_NEWOP [5] = '{6'b110010, 6'b110011, 6'b110100, 6'b110101, 6'b110110};
  // unused fields of each: bits 25:6 that carry no information
  localparam logic [31:0] R_UNUSED [5] = '{32'h0000_07C0, 32'h03FF_FFC0, 32'h0000_FFC0,
                                           32'h001F_FFC0, 32'h03E0_0000};
  localparam logic [5:0] FP_FUNC [6] = '{6'h00, 6'h01, 6'h02, 6'h03, 6'h05, 6'h06};
  localparam logic [4:0] FP_FMT  [6] = '{5'd16, 5'd16, 5'd17, 5'd17, 5'd16, 5'd17};
  localparam logic [5:0] I_OP    [5] = '{6'h08, 6'h23, 6'h2b, 6'h04, 6'h0d};

  typedef struct packed {
    logic [31:0] enc;   // re-encoded word (sort key)
    logic [31:0] dc;    // don't-care bits of enc
    logic [31:0] orig;  // original instruction
    logic [31:0] care;  // bits of orig that must come back
    logic [1:0]  kind;  // 0 R, 1 J, 2 FP, 3 I
  } entry_t;

  entry_t table_rows [NUM_LUTS][$];
  decoder_image img;

  function automatic entry_t gen_entry();
    entry_t e;
    int unsigned k;
    logic [31:0] r = $urandom();
    int unsigned sel = $urandom_range(0, 9);
    e.care = 32'hFFFF_FFFF;
    e.dc   = 32'h0;
    if (sel < 3) begin
      k = $urandom_range(0, 4);
      e.kind = 2'd0;
      e.orig = {6'b000000, r[25:6], R_FUNC[k]};
      e.enc  = {R_NEWOP[k], r[25:6], 6'b000000};
      e.dc   = 32'h0000_003F | R_UNUSED[k];
      e.care = ~R_UNUSED[k];
    end else if (sel < 5) begin
      e.kind = 2'd1;
      e.orig = {5'b00001, r[31], r[25:2], 2'b00};
      e.enc  = e.orig;
      e.dc   = 32'h3;
    end else if (sel < 7) begin
      k = $urandom_range(0, 5);
      e.kind = 2'd2;
      e.orig = {6'b010001, FP_FMT[k], r[20:6], FP_FUNC[k]};
      e.enc  = {6'b010001, 5'b00000, r[20:6], FP_FUNC[k]};
      e.dc   = 32'h03E0_0000;
    end else begin
      k = $urandom_range(0, 4);
      e.kind = 2'd3;
      e.orig = {I_OP[k], r[25:16], 8'h00, r[7:0]};
      e.enc  = e.orig;
    end
    e.enc = e.enc & ~e.dc;
    return e;
  endfunction

  // counters of mechanisms
  int n_lut [NUM_LUTS];
  int n_kind [4];
  int n_comp_lookup = 0, n_whole_lookup = 0;
  int n_win_stall = 0, n_out_stall = 0, n_mem_gap = 0, n_branch = 0;
  bit counting = 1'b0;

  always @(posedge clk) if (counting) begin
    if (dut.fire) begin
      n_lut[dut.lut_sel]++;
      if (img.mode[dut.lut_sel] != 0) n_comp_lookup++;
      if (img.mode[dut.lut_sel] != 32'hFFFF_FFFF) n_whole_lookup++;
    end
    if (!branch && dut.s2_ready && !(dut.hit && dut.code_len <= dut.win_count)) n_win_stall++;
    if (dut.s2_valid && !dut.s2_move) n_out_stall++;
    if (mem_ready && !mem_valid) n_mem_gap++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned ptr = 0;       // next memory word
  int unsigned exp_i = 0;     // next expected symbol
  int unsigned delivered = 0;
  bit mem_always = 1'b0;

  task automatic do_branch(int unsigned target);
    @(negedge clk);
    branch      = 1'b1;
    branch_skip = 5'(img.bitpos[target] % 32);
    mem_valid   = 1'b0;
    instr_ready = 1'b0;
    ptr   = int'(img.bitpos[target] / 32);
    exp_i = target;
    n_branch++;
    @(negedge clk);
    branch = 1'b0;
  endtask

  // One cycle of traffic: set inputs at the falling edge, then act on the
  // handshakes that the next rising edge completes.
  task automatic step();
    entry_t e;
    mem_valid   = mem_always || ($urandom_range(0, 9) < 8);
    mem_data    = (ptr < img.words.size()) ? img.words[ptr] : 32'h0;
    instr_ready = mem_always || ($urandom_range(0, 9) < 8);
    #1;
    if (mem_valid && mem_ready) ptr++;
    if (instr_valid && instr_ready && exp_i < NSYM) begin
      e = table_rows[img.sym_lut[exp_i]][img.sym_idx[exp_i]];
      checks++;
      if ((instr & e.care) !== (e.orig & e.care)) begin
        failures++;
        if (failures < 10)
          $display("mismatch at symbol %0d: got %h expected %h (care %h)",
                   exp_i, instr, e.orig, e.care);
      end
      n_kind[e.kind]++;
      exp_i++;
      delivered++;
    end
    @(negedge clk);
  endtask

  initial begin
    int unsigned counts [NUM_LUTS];
    int lat, exp_lat;
    img = new(NUM_LUTS, IDX_W, MAX_TRANS, MAX_LEN);
    for (int t = 0; t < NUM_LUTS; t++) begin
      counts[t] = 2;
      img.len[t] = 4 + t;
    end
    counts[9] = 40; counts[12] = 100; counts[15] = 400;

    // tables: draw, sort, fill don't-cares from the row before
    for (int t = 0; t < NUM_LUTS; t++) begin
      for (int r = 0; r < counts[t]; r++) table_rows[t].push_back(gen_entry());
      table_rows[t].sort() with (item.enc);
      for (int r = 0; r < counts[t]; r++) begin
        logic [31:0] prev;
        prev = (r == 0) ? 32'h0 : table_rows[t][r-1].enc;
        table_rows[t][r].enc = (table_rows[t][r].enc & ~table_rows[t][r].dc) |
                               (prev & table_rows[t][r].dc);
        img.rows[t].push_back(table_rows[t][r].enc);
      end
    end
    if (!img.assign_codes()) begin
      failures++;
      $display("code lengths do not fit");
    end
    img.build_writes();
    // format-restore maps
    for (int k = 0; k < 5; k++)
      img.writes.push_back(img.mk(CFG_RT_MAP, 0, 0, 0, R_NEWOP[k], 32'h40 | R_FUNC[k]));
    for (int k = 0; k < 6; k++)
      img.writes.push_back(img.mk(CFG_FP_FMT, 0, 0, 0, FP_FUNC[k], 32'h20 | FP_FMT[k]));

    // symbol stream: every table, short codes often
    for (int s = 0; s < NSYM; s++) begin
      int unsigned t;
      t = (s < NUM_LUTS) ? s :
          ($urandom_range(0, 1) ? $urandom_range(0, 8) : $urandom_range(0, NUM_LUTS-1));
      img.add_symbol(t, $urandom_range(0, counts[t] - 1));
    end
    $display("tables: %0d rows, %0d compressed columns, stream %0d words for %0d instructions",
             img.base[NUM_LUTS-1] + counts[NUM_LUTS-1], img.n_compressed_cols,
             img.words.size(), NSYM);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (img.writes[i]) begin
      cfg = img.writes[i];
      @(negedge clk);
    end
    cfg = '0;
    counting = 1'b1;

    // run, with three branches; the first is timed
    while (n_branch < 3 || exp_i < NSYM) begin
      if (n_branch < 3 && (delivered >= 500 + 1000 * n_branch || exp_i >= NSYM - 100)) begin
        int unsigned target;
        target = $urandom_range(0, NSYM - 300);
        do_branch(target);
        if (n_branch == 1) begin
          // the first code is whole in the first word (4 cycles) or needs a second word (5)
          exp_lat = (32 - img.bitpos[target] % 32 >= img.len[img.sym_lut[target]]) ?
                    BRANCH_LATENCY : BRANCH_LATENCY + 1;
          mem_always = 1'b1;
          lat = 0;
          while (!instr_valid) begin
            step();
            lat++;
          end
          mem_always = 1'b0;
          checks++;
          if (lat != exp_lat) begin
            failures++;
            $display("branch refill took %0d cycles, expected %0d", lat, exp_lat);
          end
        end
      end
      step();
    end
    counting = 1'b0;

    for (int t = 0; t < NUM_LUTS; t++) begin
      checks++;
      if (n_lut[t] == 0) begin failures++; $display("table %0d never used", t); end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_kind[k] == 0) begin failures++; $display("instruction kind %0d never seen", k); end
    end
    checks += 6;
    if (n_comp_lookup == 0)  begin failures++; $display("no compressed-column lookup"); end
    if (n_whole_lookup == 0) begin failures++; $display("no whole-column lookup"); end
    if (n_win_stall == 0)    begin failures++; $display("window never ran short"); end
    if (n_out_stall == 0)    begin failures++; $display("no output back-pressure"); end
    if (n_mem_gap == 0)      begin failures++; $display("memory never paused"); end
    if (n_branch != 3)       begin failures++; $display("branches: %0d", n_branch); end
    $display("mechanisms: R=%0d J=%0d FP=%0d I=%0d compressed=%0d whole=%0d window_short=%0d out_stall=%0d mem_gap=%0d branch=%0d",
             n_kind[0], n_kind[1], n_kind[2], n_kind[3], n_comp_lookup, n_whole_lookup,
             n_win_stall, n_out_stall, n_mem_gap, n_branch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_decoding_tables: loads the tables at their default sizes from the
// test-side compressor model (sorted random table contents, so high columns
// change rarely and are kept as transitions, low columns are kept whole;
// compressed columns hold random bits in the word store) and reads random
// (table, row) pairs back. The word must equal the stored row one cycle after
// the lookup and stay while no new lookup is made.
module tb_decoding_tables;
  import idec_pkg::*;
  import idec_tb_pkg::*;
  localparam int unsigned K = 16, IDX_W = 14, MT = 16, L = 24;
  logic clk = 1'b0, rst_n = 1'b0;
  cfg_t cfg = '0;
  logic [K-1:0]        lut_en;
  logic [K-1:0][4:0]   lut_len;
  logic [K-1:0][L-1:0] lut_min;
  logic                rd_en = 1'b0;
  logic [3:0]          rd_lut = '0;
  logic [IDX_W-1:0]    rd_idx = '0;
  logic [31:0]         word;
  int checks = 0, failures = 0;
  decoder_image img;

  always #5 clk = ~clk;

  decoding_tables dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned cnt, t, r;
    img = new(K, IDX_W, MT, L);
    for (int t = 0; t < K; t++) begin
      logic [31:0] q [$];
      img.len[t] = 9 + t;
      cnt = (t % 4 == 3) ? 200 : $urandom_range(1, 20);
      q.delete();
      for (int r = 0; r < int'(cnt); r++) q.push_back($urandom());
      q.sort();
      foreach (q[r]) img.rows[t].push_back(q[r]);
    end
    if (!img.assign_codes()) failures++;
    img.build_writes();
    $display("compressed columns: %0d", img.n_compressed_cols);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (img.writes[i]) begin
      cfg = img.writes[i];
      @(negedge clk);
    end
    cfg = '0;
    checks++;
    if (img.n_compressed_cols == 0) failures++;
    // headers
    for (int t = 0; t < K; t++) begin
      checks++;
      if (!lut_en[t] || lut_len[t] != 5'(img.len[t]) || lut_min[t] != L'(img.first[t])) failures++;
    end
    for (int n = 0; n < 3000; n++) begin
      t = $urandom_range(0, K - 1);
      r = $urandom_range(0, img.cnt[t] - 1);
      rd_en = 1'b1; rd_lut = 4'(t); rd_idx = IDX_W'(r);
      @(negedge clk);
      rd_en = 1'b0; rd_lut = 4'($urandom()); rd_idx = IDX_W'($urandom());
      repeat ($urandom_range(0, 1)) begin
        checks++;
        if (word !== img.rows[t][r]) begin
          failures++;
          if (failures < 10) $display("table %0d row %0d: got %h expected %h", t, r, word, img.rows[t][r]);
        end
        @(negedge clk);
      end
      checks++;
      if (word !== img.rows[t][r]) begin
        failures++;
        if (failures < 10) $display("table %0d row %0d: got %h expected %h", t, r, word, img.rows[t][r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_column_parity: random columns are turned into transition lists (rows
// where the bit changes, 0 assumed before row 0); every row's bit is read back
// through the parity logic and compared with the column. Unused slots are
// filled with random rows and marked invalid, and slots are shuffled, so
// neither slot order nor unused contents may matter.
module tb_column_parity;
  localparam int unsigned IDX_W = 14, MT = 16, ROWS = 300;
  logic [IDX_W-1:0]          index;
  logic [MT-1:0][IDX_W-1:0]  trans_row;
  logic [MT-1:0]             trans_valid;
  logic                      bit_out;
  int checks = 0, failures = 0;

  column_parity dut (.*);

  initial begin
    for (int trial = 0; trial < 200; trial++) begin
      bit col [ROWS];
      int unsigned tr [$];
      bit prevb;
      int unsigned nt;
      prevb = 1'b0;
      tr.delete();
      nt = $urandom_range(0, MT);
      // build a column with nt transitions at distinct random rows
      while (tr.size() < nt) begin
        int unsigned r;
        bit dup;
        r = $urandom_range(0, ROWS - 1);
        dup = 1'b0;
        foreach (tr[i]) if (tr[i] == r) dup = 1'b1;
        if (!dup) tr.push_back(r);
      end
      for (int r = 0; r < ROWS; r++) begin
        bit flip;
        flip = 1'b0;
        foreach (tr[i]) if (tr[i] == r) flip = 1'b1;
        prevb = prevb ^ flip;
        col[r] = prevb;
      end
      tr.shuffle();
      for (int s = 0; s < MT; s++) begin
        trans_valid[s] = (s < tr.size());
        trans_row[s]   = (s < tr.size()) ? IDX_W'(tr[s]) : IDX_W'($urandom_range(0, ROWS - 1));
      end
      for (int r = 0; r < ROWS; r++) begin
        index = IDX_W'(r);
        #1;
        checks++;
        if (bit_out !== col[r]) begin
          failures++;
          if (failures < 10) $display("trial %0d row %0d: got %0b expected %0b", trial, r, bit_out, col[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_length_detector: random canonical codes (1 to 16 tables, random
// increasing lengths up to 24, random counts within the code space) are built
// here; random windows made of a code followed by random bits must give the
// code's table, length and row. Tables beyond the used ones are disabled and
// hold random headers, which must be ignored.
module tb_length_detector;
  localparam int unsigned L = 24, K = 16, IDX_W = 14;
  logic [L-1:0]               window;
  logic [K-1:0]               lut_en;
  logic [K-1:0][4:0]          lut_len;
  logic [K-1:0][L-1:0]        lut_min;
  logic                       hit;
  logic [3:0]                 lut_sel;
  logic [4:0]                 code_len;
  logic [IDX_W-1:0]           index;
  int checks = 0, failures = 0;

  length_detector dut (.*);

  initial begin
    for (int trial = 0; trial < 300; trial++) begin
      int unsigned ne, lens [$], cnts [K];
      longint unsigned code, first [K];
      int unsigned prev;
      ne = $urandom_range(1, K);
      lens.delete();
      // distinct sorted lengths
      while (lens.size() < ne) begin
        int unsigned l;
        bit dup;
        l = $urandom_range(1, L);
        dup = 1'b0;
        foreach (lens[i]) if (lens[i] == l) dup = 1'b1;
        if (!dup) lens.push_back(l);
      end
      lens.sort();
      code = 0;
      prev = 0;
      for (int t = 0; t < int'(ne); t++) begin
        longint unsigned cap, mx;
        code = code << (lens[t] - prev);
        first[t] = code;
        cap = (64'd1 << lens[t]) - code;
        mx = (t == int'(ne) - 1) ? cap : cap - 1;   // leave room for longer codes
        if (mx > (64'd1 << IDX_W)) mx = 64'd1 << IDX_W;
        if (mx < 1) mx = 1;
        cnts[t] = $urandom_range(1, int'(mx));
        code += cnts[t];
        prev = lens[t];
      end
      for (int t = 0; t < K; t++) begin
        lut_en[t]  = (t < int'(ne));
        lut_len[t] = (t < int'(ne)) ? 5'(lens[t]) : 5'($urandom());
        lut_min[t] = (t < int'(ne)) ? L'(first[t]) : L'($urandom());
      end
      for (int v = 0; v < 40; v++) begin
        int unsigned t, i;
        logic [L-1:0] w;
        t = $urandom_range(0, ne - 1);
        i = $urandom_range(0, cnts[t] - 1);
        w = L'($urandom());
        w = (L'(first[t] + i) << (L - lens[t])) | (w & (L'(1 << (L - lens[t])) - 1));
        if (lens[t] == L) w = L'(first[t] + i);
        window = w;
        #1;
        checks++;
        if (!hit || lut_sel != 4'(t) || code_len != 5'(lens[t]) || index != IDX_W'(i)) begin
          failures++;
          if (failures < 10)
            $display("window %h: hit %0b lut %0d len %0d idx %0d, expected lut %0d len %0d idx %0d",
                     w, hit, lut_sel, code_len, index, t, lens[t], i);
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

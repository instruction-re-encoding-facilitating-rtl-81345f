// tb_mips_restore: loads the R-Type map with the new opcodes 110010..110110
// (add, break, div, jr, sll) and the floating-point format map for six
// function codes, then feeds words of every kind with random don't-care bits:
// new-opcode R-Type words must come back as opcode 000000 with their function
// field, J-Type words with bits 1:0 cleared, mapped floating-point words with
// their format field, all other words unchanged (including opcode 010001 with
// an unmapped function and opcodes 110111 and up that are not in the map).
module tb_mips_restore;
  import idec_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  cfg_t cfg = '0;
  logic [31:0] in_word = '0, out_word;
  int checks = 0, failures = 0;
  int n_kind [4];

  localparam logic [5:0] R_FUNC  [5] = '{6'h20, 6'h0d, 6'h1a, 6'h08, 6'h00};
  localparam logic [5:0] FP_FUNC [6] = '{6'h00, 6'h01, 6'h02, 6'h03, 6'h05, 6'h06};
  localparam logic [4:0] FP_FMT  [6] = '{5'd16, 5'd16, 5'd17, 5'd17, 5'd16, 5'd17};

  always #5 clk = ~clk;

  mips_restore dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w, e;
    int unsigned k, sel;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (k = 0; k < 5; k++) begin
      cfg = '{valid: 1'b1, kind: CFG_RT_MAP, lut: 8'd0, col: 8'd0, slot: 8'd0,
              addr: 16'(6'b110010 + k), data: 32'h40 | 32'(R_FUNC[k])};
      @(negedge clk);
    end
    for (k = 0; k < 6; k++) begin
      cfg = '{valid: 1'b1, kind: CFG_FP_FMT, lut: 8'd0, col: 8'd0, slot: 8'd0,
              addr: 16'(FP_FUNC[k]), data: 32'h20 | 32'(FP_FMT[k])};
      @(negedge clk);
    end
    cfg = '0;
    for (int n = 0; n < 4000; n++) begin
      w = $urandom();
      sel = $urandom_range(0, 3);
      e = w;
      case (sel)
        0: begin  // re-encoded R-Type
          k = $urandom_range(0, 4);
          w[31:26] = 6'b110010 + 6'(k);
          e = {6'b000000, w[25:6], R_FUNC[k]};
        end
        1: begin  // J-Type
          w[31:27] = 5'b00001;
          e = w & 32'hFFFF_FFFC;
        end
        2: begin  // floating point
          k = $urandom_range(0, 5);
          w[31:26] = 6'b010001;
          w[5:0] = FP_FUNC[k];
          e = w;
          e[25:21] = FP_FMT[k];
        end
        default: begin // anything else, unchanged unless it lands on a rule
          if (w[31:26] inside {[6'b110010:6'b110110]} || w[31:27] == 5'b00001 ||
              (w[31:26] == 6'b010001 && w[5:0] inside {6'h00, 6'h01, 6'h02, 6'h03, 6'h05, 6'h06}))
            w[31:26] = 6'b111111;
          e = w;
        end
      endcase
      in_word = w;
      #1;
      checks++;
      n_kind[sel]++;
      if (out_word !== e) begin
        failures++;
        if (failures < 10) $display("in %h: got %h expected %h", w, out_word, e);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

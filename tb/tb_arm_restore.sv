// tb_arm_restore: feeds Swap and Halfword Data Transfer words with random
// bits 11:8 (must come back 0000), Branch Exchange words re-encoded with a
// configured 8-bit opcode in bits 27:20 and random bits 19:4 (must come back
// as 0x12FFF1 in bits 27:4 with condition and Rn kept), and other words that
// match none of these (unchanged). The Branch Exchange rule is checked off
// before configuration as well.
module tb_arm_restore;
  import idec_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  cfg_t cfg = '0;
  logic [31:0] in_word = '0, out_word;
  int checks = 0, failures = 0;
  localparam logic [7:0] BX_NEW = 8'hE7;  // an opcode this test's code never uses

  always #5 clk = ~clk;

  arm_restore dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit special(logic [31:0] w);
    return (w[27:23] == 5'b00010 && w[21:20] == 2'b00 && w[7:4] == 4'b1001) ||
           (w[27:25] == 3'b000 && w[22] == 1'b0 && w[7] && w[4] && w[6:5] != 2'b00) ||
           w[27:20] == BX_NEW;
  endfunction

  task automatic apply(logic [31:0] w, logic [31:0] e);
    in_word = w;
    #1;
    checks++;
    if (out_word !== e) begin
      failures++;
      if (failures < 10) $display("in %h: got %h expected %h", w, out_word, e);
    end
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] w, e;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // before configuration a word with the new opcode passes unchanged
    w = $urandom(); w[27:20] = BX_NEW;
    apply(w, w);
    cfg = '{valid: 1'b1, kind: CFG_BX_OP, lut: 8'd0, col: 8'd0, slot: 8'd0,
            addr: 16'd0, data: 32'h100 | 32'(BX_NEW)};
    @(negedge clk);
    cfg = '0;
    for (int n = 0; n < 4000; n++) begin
      w = $urandom();
      case ($urandom_range(0, 3))
        0: begin  // Swap: cond 00010 B 00 Rn Rd xxxx 1001 Rm
          w[27:23] = 5'b00010; w[21:20] = 2'b00; w[7:4] = 4'b1001;
          e = w; e[11:8] = 4'b0000;
        end
        1: begin  // Halfword transfer, register offset: cond 000 P U 0 W L Rn Rd xxxx 1 S H 1 Rm
          w[27:25] = 3'b000; w[22] = 1'b0; w[7] = 1'b1; w[4] = 1'b1;
          if (w[6:5] == 2'b00) w[5] = 1'b1;
          e = w; e[11:8] = 4'b0000;
        end
        2: begin  // Branch Exchange with the new opcode
          w[27:20] = BX_NEW;
          e = {w[31:28], 24'h12FFF1, w[3:0]};
        end
        default: begin
          while (special(w)) w = $urandom();
          e = w;
        end
      endcase
      apply(w, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

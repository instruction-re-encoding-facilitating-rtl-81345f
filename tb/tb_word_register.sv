// tb_word_register: checks the 32-bit register against a bit-queue model.
// Random words arrive with random gaps; each cycle a random number of bits
// (at most what is left) is taken; branches flush with a random skip. The
// model keeps the remaining bits in a queue; bits, avail and in_ready are
// compared with it every cycle, and the bits below the valid ones must be 0.
module tb_word_register;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        flush = 1'b0;
  logic [4:0]  flush_skip = '0;
  logic        in_valid = 1'b0, in_ready;
  logic [31:0] in_data = '0;
  logic [5:0]  take = '0;
  logic [31:0] bits;
  logic [5:0]  avail;
  int checks = 0, failures = 0;
  int n_flush = 0, n_load = 0;

  always #5 clk = ~clk;

  word_register dut (.*);

  bit model [$];
  int unsigned pend_skip = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    logic [31:0] exp_bits = '0;
    for (int i = 0; i < model.size(); i++) exp_bits[31-i] = model[i];
    checks++;
    if (avail !== 6'(model.size()) || bits !== exp_bits) begin
      failures++;
      if (failures < 10) $display("state: avail %0d bits %h, model %0d %h", avail, bits, model.size(), exp_bits);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int unsigned tk;
      bit exp_ready;
      check_state();
      flush      = ($urandom_range(0, 49) == 0);
      flush_skip = 5'($urandom());
      in_valid   = $urandom_range(0, 3) != 0;
      in_data    = $urandom();
      tk         = $urandom_range(0, model.size());
      take       = 6'(tk);
      #1;
      exp_ready = !flush && (model.size() == tk);
      checks++;
      if (in_ready !== exp_ready) begin
        failures++;
        $display("in_ready %0b expected %0b", in_ready, exp_ready);
      end
      @(posedge clk);
      if (flush) begin
        model.delete();
        pend_skip = flush_skip;
        n_flush++;
      end else if (in_valid && exp_ready) begin
        model.delete();
        for (int b = 31 - int'(pend_skip); b >= 0; b--) model.push_back(in_data[b]);
        pend_skip = 0;
        n_load++;
      end else begin
        repeat (tk) void'(model.pop_front());
      end
      @(negedge clk);
    end
    checks++;
    if (n_flush == 0 || n_load == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

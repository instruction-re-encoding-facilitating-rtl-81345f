// tb_shift_register: checks the L-bit window against a bit-queue model.
// A model word register offers random amounts of random bits (MSB aligned,
// zero below); each cycle a random code length up to the window count is
// consumed. The test checks take = min(room after consuming, offered), and
// the window bits and count after every cycle, including flushes.
module tb_shift_register;
  localparam int unsigned L = 24;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        flush = 1'b0;
  logic        consume = 1'b0;
  logic [4:0]  consume_len = '0;
  logic [31:0] wr_bits = '0;
  logic [5:0]  wr_avail = '0;
  logic [5:0]  take;
  logic [L-1:0] window;
  logic [4:0]  count;
  int checks = 0, failures = 0;
  int n_full = 0, n_partial = 0;

  always #5 clk = ~clk;

  shift_register dut (.*);

  bit model [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int unsigned cl, av, exp_take;
      logic [L-1:0] exp_win;
      exp_win = '0;
      for (int i = 0; i < model.size(); i++) exp_win[L-1-i] = model[i];
      checks++;
      if (count !== 5'(model.size()) || window !== exp_win) begin
        failures++;
        if (failures < 10) $display("window %h/%0d model %h/%0d", window, count, exp_win, model.size());
      end
      flush   = ($urandom_range(0, 99) == 0);
      consume = $urandom_range(0, 3) != 0;
      cl      = consume ? $urandom_range(0, model.size()) : 0;
      consume_len = 5'(cl);
      av      = $urandom_range(0, 32);
      wr_avail = 6'(av);
      wr_bits = (av == 0) ? 32'h0 : ($urandom() & ~(32'hFFFF_FFFF >> av));
      #1;
      exp_take = L - (model.size() - cl);
      if (av < exp_take) exp_take = av;
      checks++;
      if (take !== 6'(exp_take)) begin
        failures++;
        $display("take %0d expected %0d", take, exp_take);
      end
      if (exp_take == av) n_full++; else n_partial++;
      @(posedge clk);
      if (flush) model.delete();
      else begin
        repeat (cl) void'(model.pop_front());
        for (int i = 0; i < exp_take; i++) model.push_back(wr_bits[31-i]);
      end
      @(negedge clk);
    end
    checks++;
    if (n_full == 0 || n_partial == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

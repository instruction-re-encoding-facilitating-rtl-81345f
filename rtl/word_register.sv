// word_register: the 32-bit register between the compressed-code memory and
// the decoder's shift register.
//
// A word fetched from memory is loaded here and then handed, most significant
// bit first, to the shift register: each cycle the shift register reports how
// many bits it takes (take), the register shifts them out and counts what is
// left (avail). Bits below the valid ones are always zero, so the consumer may
// OR the top bits into its own window without masking. A new word is accepted
// (in_ready) in the same cycle the last bits leave, so a word-per-cycle memory
// keeps the shift register full. The 32-bit width and the refill role follow
// the decoder description; the valid/ready handshake and the branch handling
// are this design's own.
//
// Branches: a one-cycle flush empties the register and records skip, the bit
// offset of the branch target inside the next word to arrive; that many leading
// bits of the next word are dropped. Reset (active low, synchronous) empties the
// register.
//
// Ports
//   in_valid/in_ready/in_data  word from memory (handshake, one word per transfer)
//   flush, flush_skip          branch: empty and skip bits of the next word
//   take                       bits the shift register takes this cycle (<= avail)
//   bits, avail                remaining bits, MSB aligned, and their count
module word_register #(
  parameter int unsigned WORD_W = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        flush,
  input  logic [$clog2(WORD_W)-1:0]   flush_skip,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [WORD_W-1:0]           in_data,
  input  logic [$clog2(WORD_W+1)-1:0] take,
  output logic [WORD_W-1:0]           bits,
  output logic [$clog2(WORD_W+1)-1:0] avail
);

  localparam int unsigned CW = $clog2(WORD_W + 1);

  logic [WORD_W-1:0]         word_q;
  logic [CW-1:0]             cnt_q;
  logic [$clog2(WORD_W)-1:0] skip_q;
  logic [WORD_W-1:0]         word_after;
  logic [CW-1:0]             cnt_after;

  assign bits  = word_q;
  assign avail = cnt_q;

  always_comb begin
    word_after = word_q << take;
    cnt_after  = cnt_q - take;
  end

  assign in_ready = !flush && (cnt_after == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      word_q <= '0;
      cnt_q  <= '0;
      skip_q <= '0;
    end else if (flush) begin
      word_q <= '0;
      cnt_q  <= '0;
      skip_q <= flush_skip;
    end else if (in_valid && in_ready) begin
      word_q <= in_data << skip_q;
      cnt_q  <= CW'(WORD_W) - CW'(skip_q);
      skip_q <= '0;
    end else begin
      word_q <= word_after;
      cnt_q  <= cnt_after;
    end
  end

  // The shift register never takes more bits than are present.
  a_take_le_avail: assert property (@(posedge clk) disable iff (!rst_n) take <= cnt_q);

endmodule

// shift_register: the L-bit window the length comparators look at.
//
// It holds the next MAX_LEN bits of the compressed stream, most significant bit
// first, with count saying how many of them are valid (invalid bits are zero).
// In a cycle where a code of consume_len bits is decoded, the window shifts
// left by that many bits; in the same cycle it refills from the 32-bit word
// register with as many bits as fit (take = min(room, wr_avail)). MAX_LEN is the
// longest code length L. The window length L and its refill from the 32-bit
// register follow the decoder description; the count, the same-cycle refill and
// flush behaviour are this design's own. A flush (branch) empties the window.
// Reset is synchronous, active low. Only the top MAX_LEN bits of wr_bits are
// looked at: no more than MAX_LEN bits can enter the window in one cycle.
//
// Ports
//   consume, consume_len  a code of that many bits was decoded this cycle
//   wr_bits, wr_avail     bits offered by the word register (MSB aligned)
//   take                  how many of them are taken this cycle
//   window, count         the L-bit window and its number of valid bits
module shift_register #(
  parameter int unsigned MAX_LEN = 24,
  parameter int unsigned WORD_W  = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         flush,
  input  logic                         consume,
  input  logic [$clog2(MAX_LEN+1)-1:0] consume_len,
  input  logic [WORD_W-1:0]            wr_bits,
  input  logic [$clog2(WORD_W+1)-1:0]  wr_avail,
  output logic [$clog2(WORD_W+1)-1:0]  take,
  output logic [MAX_LEN-1:0]           window,
  output logic [$clog2(MAX_LEN+1)-1:0] count
);

  localparam int unsigned LW = $clog2(MAX_LEN + 1);
  localparam int unsigned CW = $clog2(WORD_W + 1);

  logic [MAX_LEN-1:0] win_q, win_shifted, win_next;
  logic [LW-1:0]      cnt_q, cnt_shifted, room;

  assign window = win_q;
  assign count  = cnt_q;

  always_comb begin
    if (consume) begin
      win_shifted = win_q << consume_len;
      cnt_shifted = cnt_q - consume_len;
    end else begin
      win_shifted = win_q;
      cnt_shifted = cnt_q;
    end
    room = LW'(MAX_LEN) - cnt_shifted;
    take = (CW'(room) < wr_avail) ? CW'(room) : wr_avail;
    // The word register keeps its unused bits zero, so its top MAX_LEN bits,
    // moved below the valid window bits, fill exactly the room that is left.
    win_next = win_shifted | (wr_bits[WORD_W-1 -: MAX_LEN] >> cnt_shifted);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      win_q <= '0;
      cnt_q <= '0;
    end else begin
      win_q <= win_next;
      cnt_q <= cnt_shifted + LW'(take);
    end
  end

  initial begin
    assert (MAX_LEN <= WORD_W) else $error("MAX_LEN must not exceed WORD_W");
  end

  a_consume_le_count: assert property (@(posedge clk) disable iff (!rst_n)
    consume |-> consume_len <= cnt_q);

endmodule

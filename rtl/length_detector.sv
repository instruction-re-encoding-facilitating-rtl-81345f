// length_detector: first decoding stage, finds the length of the next code.
//
// Codes are canonical Huffman codes: all codes of one length are consecutive
// integers, and one decoding table holds the instructions of one code length.
// Each table t has a length lut_len[t] and a minimum (first) code lut_min[t].
// One comparator per table checks, in parallel, whether the L-bit window is at
// least that minimum code left-aligned to L bits; the fired comparator of the
// longest table gives the code length. The index into the table is the code
// minus the table's minimum code. Purely combinational.
//
// The comparator-per-length structure follows the decoder description. This
// design's own choices: codes are assigned in the usual canonical order
// (shorter codes are numerically smaller once left aligned, as when each
// length's first code is (previous first + previous count) shifted left), and
// tables are numbered in order of increasing length, so the highest-numbered
// firing comparator wins.
//
// Ports
//   window           next MAX_LEN stream bits, first bit in the MSB
//   lut_en/len/min   table headers from the decoding tables
//   hit              some comparator fired
//   lut_sel          selected table, code_len its length, index the row in it
module length_detector #(
  parameter int unsigned MAX_LEN  = 24,
  parameter int unsigned NUM_LUTS = 16,
  parameter int unsigned IDX_W    = 14
) (
  input  logic [MAX_LEN-1:0]                          window,
  input  logic [NUM_LUTS-1:0]                         lut_en,
  input  logic [NUM_LUTS-1:0][$clog2(MAX_LEN+1)-1:0]  lut_len,
  input  logic [NUM_LUTS-1:0][MAX_LEN-1:0]            lut_min,
  output logic                                        hit,
  output logic [$clog2(NUM_LUTS)-1:0]                 lut_sel,
  output logic [$clog2(MAX_LEN+1)-1:0]                code_len,
  output logic [IDX_W-1:0]                            index
);

  localparam int unsigned LW = $clog2(MAX_LEN + 1);

  logic [NUM_LUTS-1:0] fired;

  // Comparators comp. 1..k
  always_comb begin
    for (int t = 0; t < NUM_LUTS; t++) begin
      fired[t] = lut_en[t] &&
                 (window >= (lut_min[t] << (LW'(MAX_LEN) - lut_len[t])));
    end
  end

  always_comb begin
    hit      = 1'b0;
    lut_sel  = '0;
    for (int t = 0; t < NUM_LUTS; t++) begin
      if (fired[t]) begin
        hit     = 1'b1;
        lut_sel = ($clog2(NUM_LUTS))'(t);
      end
    end
    code_len = lut_len[lut_sel];
    // rows beyond 2**IDX_W cannot be stored, so only the low IDX_W bits count
    index    = IDX_W'((window >> (LW'(MAX_LEN) - code_len)) - lut_min[lut_sel]);
  end

endmodule

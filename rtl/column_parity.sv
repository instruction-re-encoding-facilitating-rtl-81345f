// column_parity: rebuilds one bit of a compressed decoding-table column.
//
// A compressed column is stored as the rows at which its bit changes value
// (0->1 or 1->0), with the bit taken as 0 before row 0. The bit at a row is the
// parity of the number of stored transitions at or before that row: even
// gives 0, odd gives 1. All slots are compared with the row in parallel and
// the results are XOR-reduced, so the lookup is combinational.
// Transition storage and the parity rule follow the table-compression
// description; the fixed number of slots (MAX_TRANS) with a valid bit each is
// this design's own.
//
// Ports
//   index          row being read
//   trans_row      row address of each stored transition
//   trans_valid    slot holds a transition
//   bit_out        the column's bit at index
module column_parity #(
  parameter int unsigned IDX_W     = 14,
  parameter int unsigned MAX_TRANS = 16
) (
  input  logic [IDX_W-1:0]                  index,
  input  logic [MAX_TRANS-1:0][IDX_W-1:0]   trans_row,
  input  logic [MAX_TRANS-1:0]              trans_valid,
  output logic                              bit_out
);

  logic [MAX_TRANS-1:0] passed;

  always_comb begin
    for (int s = 0; s < MAX_TRANS; s++) begin
      passed[s] = trans_valid[s] && (trans_row[s] <= index);
    end
    bit_out = ^passed;
  end

endmodule

// Buffers load matrix of the central arbiter: the combinational IM-OM matcher.
//
// Row r holds the r-th request in processing order (high priority first, each
// class in round-robin order); bit c of a row stands for OM(c+1), bit 0 being
// the request's least significant OM bit. The network walks the rows from top
// to bottom and each row from bit 0 upwards, keeps the first 1 that is not
// masked, and masks the remaining bits of that row and the same column in all
// rows below. The result has at most one 1 in every row and every column: the
// IM-OM pairs allowed to use the central modules in this time slot. The top
// non-empty row always wins its lowest requested OM.
//
// This follows the masking procedure of the switch's dispatching scheme
// exactly; it is written as a ripple of column-busy masks, one row stage
// after another, which is how it maps onto gates. Purely combinational.
module buffers_load_matrix #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] row_bits [N],
  output logic [N-1:0] sel      [N]
);

  logic [N-1:0] busy [N+1];   // columns taken by rows above

  assign busy[0] = '0;

  for (genvar r = 0; r < N; r++) begin : g_row
    logic [N-1:0] avail;
    assign avail      = row_bits[r] & ~busy[r];
    // lowest set bit of avail
    assign sel[r]     = avail & (~avail + 1'b1);
    assign busy[r+1]  = busy[r] | sel[r];
  end

endmodule

// Multi-write, multi-read cell FIFO: one VOMQ of an input module or one output
// queue of an output module.
//
// In one time slot (one clock cycle) up to WR cells may arrive and up to RD
// cells may leave. Arriving cells are taken in index order of wr_cell, which
// fixes the order of cells that reach the queue in the same slot. The RD
// oldest cells are always visible on head (head[0] is the oldest); rd_num
// tells how many of them leave at the end of the slot and is clamped to the
// occupancy. The queue is a circular buffer of DEPTH entries (a power of two);
// cells that leave in a slot free their entries for cells arriving in the
// same slot. Cells that still do not fit are refused, the last-indexed ones
// first, and counted on dropped for that slot.
//
// The switch this belongs to assumes unlimited buffers; the finite depth and
// the drop policy are choices of this implementation. count and head are
// registered state, so the slot's decisions can be taken from them before the
// clock edge.
module cell_queue
  import mcns_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WR    = 8,
  parameter int unsigned RD    = 8,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned RW   = $clog2(RD + 1),
  localparam int unsigned DW   = $clog2(WR + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cell_t             wr_cell [WR],
  input  logic [RW-1:0]     rd_num,
  output cell_t             head    [RD],
  output logic  [CW-1:0]    count,
  output logic  [DW-1:0]    dropped
);

  cell_t           mem [DEPTH];
  logic [AW-1:0]   rd_ptr, wr_ptr;

  logic [CW-1:0]   pop;       // cells actually leaving
  logic [CW-1:0]   space;     // free entries after the pops
  logic [CW-1:0]   slot [WR]; // write offset of each offered cell
  logic            take [WR]; // offered cell is accepted
  logic [CW-1:0]   n_take;

  initial begin
    assert ((DEPTH & (DEPTH - 1)) == 0 && DEPTH >= RD)
      else $error("cell_queue: DEPTH must be a power of two and at least RD");
  end

  always_comb begin
    logic [CW-1:0] acc;
    pop   = (CW'(rd_num) > count) ? count : CW'(rd_num);
    space = CW'(DEPTH) - count + pop;
    acc   = '0;
    for (int w = 0; w < WR; w++) begin
      slot[w] = acc;
      take[w] = wr_cell[w].valid && (acc < space);
      if (take[w]) acc = acc + 1'b1;
    end
    n_take  = acc;
    dropped = '0;
    for (int w = 0; w < WR; w++)
      if (wr_cell[w].valid && !take[w]) dropped = dropped + 1'b1;
  end

  always_comb begin
    for (int r = 0; r < RD; r++) begin
      head[r]       = mem[rd_ptr + AW'(r)];
      head[r].valid = (CW'(r) < count);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      for (int w = 0; w < WR; w++)
        if (take[w]) mem[wr_ptr + AW'(slot[w])] <= wr_cell[w];
      rd_ptr <= rd_ptr + AW'(pop);
      wr_ptr <= wr_ptr + AW'(n_take);
      count  <= count - pop + n_take;
    end
  end

endmodule

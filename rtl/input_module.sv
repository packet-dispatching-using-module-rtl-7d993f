// Input module IM(i) of the MCNS: first-stage buffered module.
//
// Arriving cells (at most one per input port per time slot) are sorted by
// their destination OM into N virtual output module queues, VOMQ(i,1..N).
// From the VOMQ occupancies the request_generator forms the IM's request to
// the central arbiter. In the same slot the arbiter's decision comes back and
// the IM sends:
//   * over the direct link to every OM(j), the oldest cell of VOMQ(i,j) if it
//     is not empty (no arbitration is needed for direct links);
//   * if granted OM(g), the next cells of VOMQ(i,g), one through each enabled
//     CM, in CM order (second-oldest cell through the lowest enabled CM).
// The granted VOMQ therefore loses up to N cells in the slot (N-1 with all
// CMs on), the others at most one. Cells that leave are popped at the clock
// edge, together with the arrivals of the slot.
//
// Timing: one clock cycle is one time slot; req depends only on registered
// occupancies, the outputs on the grant inputs of the same cycle.
// LOW_THR and HIGH_THR (default n and kn) set the occupancies at which a
// VOMQ asks for the CMs with low and high priority; they can be redefined,
// for instance to request with fewer than n cells, without touching the
// arbiter. A granted VOMQ then sends only the cells it holds.
// The VOMQ organisation, direct links and grant use follow the switch's
// dispatching scheme. How cells are picked for the direct links, the cell
// order across CMs, the behaviour with CMs switched off (one cell per enabled
// CM) and the finite VOMQ depth are this design's choices.
module input_module
  import mcns_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter int unsigned K          = 2,
  parameter int unsigned VOMQ_DEPTH = 32,
  parameter int unsigned LOW_THR    = N,
  parameter int unsigned HIGH_THR   = K * N,
  localparam int unsigned IW        = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW        = $clog2(VOMQ_DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cell_t         in_cell     [N],
  output logic [N:0]    req,
  input  logic          grant_valid,
  input  logic [IW-1:0] grant_om,
  input  logic [N-2:0]  cm_en,
  output cell_t         direct_cell [N],
  output cell_t         cm_cell     [N-1],
  output logic [CW-1:0] vomq_count  [N],
  output logic [31:0]   drop_count
);

  localparam int unsigned RW = $clog2(N + 1);
  localparam int unsigned DW = $clog2(N + 1);

  cell_t         q_in   [N][N];   // [vomq][input port]
  cell_t         q_head [N][N];   // [vomq][age]
  logic [RW-1:0] q_pop  [N];
  logic [DW-1:0] q_drop [N];

  // demultiplex arrivals by destination OM
  always_comb begin
    for (int j = 0; j < N; j++)
      for (int p = 0; p < N; p++) begin
        q_in[j][p]       = in_cell[p];
        q_in[j][p].valid = in_cell[p].valid && (in_cell[p].om == 8'(j));
      end
  end

  for (genvar j = 0; j < N; j++) begin : g_vomq
    cell_queue #(.DEPTH(VOMQ_DEPTH), .WR(N), .RD(N)) u_q (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_cell (q_in[j]),
      .rd_num  (q_pop[j]),
      .head    (q_head[j]),
      .count   (vomq_count[j]),
      .dropped (q_drop[j])
    );
  end

  request_generator #(.N(N), .K(K), .CW(CW), .LOW_THR(LOW_THR), .HIGH_THR(HIGH_THR)) u_req (
    .vomq_count (vomq_count),
    .req        (req)
  );

  // cell selection for direct links and CMs
  always_comb begin
    logic [RW-1:0] n_cm;
    cell_t         gq [N];
    gq   = q_head[grant_om];
    n_cm = '0;
    for (int c = 0; c < N - 1; c++) begin
      cm_cell[c] = '0;
      if (grant_valid && cm_en[c]) begin
        cm_cell[c] = gq[32'(n_cm) + 1];
        n_cm       = n_cm + 1'b1;
      end
    end
    for (int j = 0; j < N; j++) begin
      direct_cell[j] = q_head[j][0];
      q_pop[j]       = RW'(q_head[j][0].valid);
      if (grant_valid && grant_om == IW'(j))
        q_pop[j] = q_pop[j] + n_cm;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) drop_count <= '0;
    else begin
      logic [31:0] d;
      d = '0;
      for (int j = 0; j < N; j++) d = d + 32'(q_drop[j]);
      drop_count <= drop_count + d;
    end
  end

endmodule

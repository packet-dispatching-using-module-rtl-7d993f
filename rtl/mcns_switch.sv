// MCNS: the modified memory-space-memory Clos-network switch C_M(n, n-1, n).
//
// N input modules (IMs) with N ports each, N-1 bufferless central modules
// (CMs) and N output modules (OMs) with N ports each form an N^2 x N^2 cell
// switch. Besides the CM paths, every IM has a direct link to every OM, so in
// each time slot every IM can send one cell to every OM without arbitration.
// The CMs add a second path that moves a batch of cells from one IM to one OM:
// a central arbiter matches IMs to OMs at module level from the IMs' requests
// and broadcasts a single connection pattern to all CMs, so the matched IM
// can send up to N cells to its OM in one slot (one direct, N-1 via CMs).
//
// Ports: in_cell[i][p] is input port p of IM(i) (switch input i*N+p); each
// cell's om/port fields name its destination. out_cell[j][p] is output port p
// of OM(j). LOW_THR and HIGH_THR (default n and kn) are the VOMQ
// occupancies for low- and high-priority requests. cm_en switches individual CMs on or off at run time. The other
// outputs expose the arbiter's decision and round-robin pointers, the number
// of cells held in all VOMQs and in all output queues, and the cells lost to
// full queues since reset.
//
// Timing: one clock cycle is one time slot. Requests are formed from the VOMQ
// occupancies at the start of the slot, the arbiter decides combinationally,
// cells cross the direct links or the CMs and are written into the OMs'
// output queues at the end of the slot; each output port sends one queued
// cell per slot, so a cell arriving into an empty switch leaves two slots
// later. Active-low synchronous reset.
module mcns_switch
  import mcns_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter int unsigned K          = 2,
  parameter int unsigned VOMQ_DEPTH = 32,
  parameter int unsigned OQ_DEPTH   = 64,
  parameter int unsigned LOW_THR    = N,
  parameter int unsigned HIGH_THR   = K * N,
  localparam int unsigned IW        = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cell_t         in_cell  [N][N],
  output cell_t         out_cell [N][N],
  input  logic [N-2:0]  cm_en,
  output logic [N:0]    req         [N],
  output logic          grant_valid [N],
  output logic [IW-1:0] grant_om    [N],
  output logic [IW-1:0] hp_ptr,
  output logic [IW-1:0] lp_ptr,
  output logic [31:0]   vomq_cells,
  output logic [31:0]   oq_cells,
  output logic [31:0]   vomq_drops,
  output logic [31:0]   oq_drops
);

  localparam int unsigned VCW = $clog2(VOMQ_DEPTH + 1);
  localparam int unsigned OCW = $clog2(OQ_DEPTH + 1);

  cell_t          direct [N][N];    // [IM][OM]
  cell_t          im_cm  [N][N-1];  // [IM][CM]
  cell_t          cm_in  [N-1][N];  // [CM][IM]
  cell_t          cm_out [N-1][N];  // [CM][OM]
  cell_t          om_dir [N][N];    // [OM][IM]
  cell_t          om_cm  [N][N-1];  // [OM][CM]
  logic [VCW-1:0] vomq_count [N][N];
  logic [OCW-1:0] oq_count   [N][N];
  logic [31:0]    im_drop [N];
  logic [31:0]    om_drop [N];

  for (genvar i = 0; i < N; i++) begin : g_im
    input_module #(.N(N), .K(K), .VOMQ_DEPTH(VOMQ_DEPTH), .LOW_THR(LOW_THR),
                   .HIGH_THR(HIGH_THR)) u_im (
      .clk         (clk),
      .rst_n       (rst_n),
      .in_cell     (in_cell[i]),
      .req         (req[i]),
      .grant_valid (grant_valid[i]),
      .grant_om    (grant_om[i]),
      .cm_en       (cm_en),
      .direct_cell (direct[i]),
      .cm_cell     (im_cm[i]),
      .vomq_count  (vomq_count[i]),
      .drop_count  (im_drop[i])
    );
  end

  central_arbiter #(.N(N)) u_arbiter (
    .clk         (clk),
    .rst_n       (rst_n),
    .req         (req),
    .grant_valid (grant_valid),
    .grant_om    (grant_om),
    .hp_ptr      (hp_ptr),
    .lp_ptr      (lp_ptr)
  );

  // the interconnection links between the stages
  always_comb begin
    for (int i = 0; i < N; i++)
      for (int c = 0; c < N - 1; c++) cm_in[c][i] = im_cm[i][c];
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++)     om_dir[j][i] = direct[i][j];
      for (int c = 0; c < N - 1; c++) om_cm[j][c]  = cm_out[c][j];
    end
  end

  for (genvar c = 0; c < N - 1; c++) begin : g_cm
    central_module #(.N(N)) u_cm (
      .en        (cm_en[c]),
      .in_cell   (cm_in[c]),
      .pat_valid (grant_valid),
      .pat_om    (grant_om),
      .out_cell  (cm_out[c])
    );
  end

  for (genvar j = 0; j < N; j++) begin : g_om
    output_module #(.N(N), .OQ_DEPTH(OQ_DEPTH)) u_om (
      .clk         (clk),
      .rst_n       (rst_n),
      .direct_cell (om_dir[j]),
      .cm_cell     (om_cm[j]),
      .out_cell    (out_cell[j]),
      .oq_count    (oq_count[j]),
      .drop_count  (om_drop[j])
    );
  end

  always_comb begin
    vomq_drops = '0;
    oq_drops   = '0;
    vomq_cells = '0;
    oq_cells   = '0;
    for (int i = 0; i < N; i++) begin
      vomq_drops = vomq_drops + im_drop[i];
      oq_drops   = oq_drops + om_drop[i];
      for (int j = 0; j < N; j++) begin
        vomq_cells = vomq_cells + 32'(vomq_count[i][j]);
        oq_cells   = oq_cells + 32'(oq_count[i][j]);
      end
    end
  end

endmodule

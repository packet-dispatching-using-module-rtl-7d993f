// Output module OM(j) of the MCNS: third-stage buffered module.
//
// Per time slot OM(j) can receive 2N-1 cells: one from every IM over the
// direct links and one from every CM. Each cell is written into the output
// queue (OQ) of its output port; cells of one slot enter a queue in the order
// direct link IM(1..N), then CM(1..N-1). Because an IM uses its direct link
// for the oldest cell of a VOMQ and the CMs for the following ones, in CM
// order, this keeps the cells of every flow in sequence. Each output port
// sends the oldest cell of its OQ every slot.
//
// Timing: one clock cycle is one time slot; out_cell shows the OQ heads
// (registered state) and the head leaves at the clock edge. The queue per
// output port follows the switch's output-queued third stage; the write order
// within a slot and the finite OQ depth are this design's choices.
module output_module
  import mcns_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned OQ_DEPTH = 64,
  localparam int unsigned CW      = $clog2(OQ_DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cell_t         direct_cell [N],
  input  cell_t         cm_cell     [N-1],
  output cell_t         out_cell    [N],
  output logic [CW-1:0] oq_count    [N],
  output logic [31:0]   drop_count
);

  localparam int unsigned NI = 2 * N - 1;
  localparam int unsigned DW = $clog2(NI + 1);

  cell_t         all_in [NI];
  cell_t         q_in   [N][NI];
  cell_t         q_head [N][1];
  logic [DW-1:0] q_drop [N];

  always_comb begin
    for (int i = 0; i < N; i++)     all_in[i]     = direct_cell[i];
    for (int c = 0; c < N - 1; c++) all_in[N + c] = cm_cell[c];
    for (int p = 0; p < N; p++)
      for (int i = 0; i < NI; i++) begin
        q_in[p][i]       = all_in[i];
        q_in[p][i].valid = all_in[i].valid && (all_in[i].port == 8'(p));
      end
  end

  for (genvar p = 0; p < N; p++) begin : g_oq
    cell_queue #(.DEPTH(OQ_DEPTH), .WR(NI), .RD(1)) u_q (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_cell (q_in[p]),
      .rd_num  (q_head[p][0].valid),
      .head    (q_head[p]),
      .count   (oq_count[p]),
      .dropped (q_drop[p])
    );
    assign out_cell[p] = q_head[p][0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) drop_count <= '0;
    else begin
      logic [31:0] d;
      d = '0;
      for (int p = 0; p < N; p++) d = d + 32'(q_drop[p]);
      drop_count <= drop_count + d;
    end
  end

endmodule

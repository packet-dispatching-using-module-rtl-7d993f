// Module-matching request of one input module (IM).
//
// The IM asks the central arbiter for the right to move a batch of cells
// through the central modules (CMs) to an output module (OM). The request is
// N+1 bits: bit 0 is the priority bit (1 = high), bit j (1..N) points out
// OM(j) (OM index j-1 in the zero-based numbering used in the RTL).
//
// A VOMQ with at least HIGH_THR cells (kn in the switch's defaults) qualifies
// for a high-priority request, one with at least LOW_THR cells (n) for a
// low-priority one. Since a request carries a single priority bit, an IM that
// has any high-priority VOMQ sends a high-priority request naming only those
// OMs; otherwise it sends a low-priority request naming every OM whose VOMQ
// holds LOW_THR .. HIGH_THR-1 cells. With no qualifying VOMQ the request is
// all zeros. That resolution of mixed cases is this design's choice. The
// thresholds are parameters so that requests can be redefined (for instance a
// lower LOW_THR) without touching the arbiter. Purely combinational.
module request_generator #(
  parameter int unsigned N        = 8,
  parameter int unsigned K        = 2,
  parameter int unsigned CW       = 6,
  parameter int unsigned LOW_THR  = N,
  parameter int unsigned HIGH_THR = K * N
) (
  input  logic [CW-1:0] vomq_count [N],
  output logic [N:0]    req
);

  logic [N-1:0] hi, lo;

  always_comb begin
    for (int j = 0; j < N; j++) begin
      hi[j] = (32'(vomq_count[j]) >= HIGH_THR);
      lo[j] = (32'(vomq_count[j]) >= LOW_THR) && !hi[j];
    end
    if (|hi) req = {hi, 1'b1};
    else     req = {lo, 1'b0};
  end

endmodule

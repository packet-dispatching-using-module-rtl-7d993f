// Central module (CM): bufferless N x N space switch of the second stage.
//
// Input port i is fed by IM(i), output port j feeds OM(j). In every time slot
// the central arbiter broadcasts one connection pattern to all CMs: for each
// input port i a valid bit and the output port (OM number, binary) it must be
// connected to. The pattern is a partial permutation, so each output receives
// at most one cell. A CM that is switched off (en = 0) passes nothing; CMs can
// be turned off when traffic is close to uniform. Purely combinational: cells
// cross the CM in the slot they leave the IM. The valid bit per pattern entry
// is this design's addition to the plain list of OM numbers.
module central_module
  import mcns_pkg::*;
#(
  parameter int unsigned N  = 8,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          en,
  input  cell_t         in_cell   [N],
  input  logic          pat_valid [N],
  input  logic [IW-1:0] pat_om    [N],
  output cell_t         out_cell  [N]
);

  always_comb begin
    for (int j = 0; j < N; j++) begin
      out_cell[j] = '0;
      for (int i = 0; i < N; i++)
        if (en && pat_valid[i] && pat_om[i] == IW'(j))
          out_cell[j] = in_cell[i];
    end
  end

  always_comb begin
    for (int a = 0; a < N; a++)
      for (int b = a + 1; b < N; b++)
        assert (!(pat_valid[a] && pat_valid[b] && pat_om[a] == pat_om[b]))
          else $error("central_module: two inputs connected to one output");
  end

endmodule

// Request ordering stage of the central arbiter.
//
// The IMs' requests are loaded into the rows of the buffers load matrix in
// processing order: all high-priority requests first, then all low-priority
// ones. Inside each class the order is round-robin: the IM named by that
// class's pointer comes first, then the following IM numbers, wrapping
// around. Rows that receive no request are left empty at the bottom of the
// matrix. Each IM's row position is its rank among the requests ahead of it,
// computed by counting; the rows are then filled through a permutation
// multiplexer. The priority bit is dropped when a request is loaded, so bit 0
// of a row is OM(1).
//
// Besides the rows, the stage reports which IM sits in each row, which row
// each IM got, and which IM came first in each class, so the arbiter can map
// results back and advance its pointers. Purely combinational. The class
// ordering follows the dispatching scheme; the counting structure, the empty
// rows at the bottom and the pointer meaning are this design's choices.
module request_reorder #(
  parameter int unsigned N  = 8,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N:0]    req      [N],
  input  logic [IW-1:0] hp_ptr,
  input  logic [IW-1:0] lp_ptr,
  output logic [N-1:0]  row_bits [N],
  output logic [IW-1:0] row_im   [N],
  output logic [IW-1:0] im_row   [N],
  output logic          im_act   [N],
  output logic          first_hp_valid,
  output logic [IW-1:0] first_hp,
  output logic          first_lp_valid,
  output logic [IW-1:0] first_lp
);

  logic          is_hp [N];
  logic          is_lp [N];
  logic [IW:0]   rr_pos  [N];   // round-robin distance from the class pointer
  logic [IW:0]   n_hp;

  // distance of IM i from pointer p, modulo N
  function automatic logic [IW:0] rr_dist(input int unsigned i, input logic [IW-1:0] p);
    return (IW+1)'((i + N - int'(p)) % N);
  endfunction

  always_comb begin
    n_hp = '0;
    for (int i = 0; i < N; i++) begin
      is_hp[i] = req[i][0] && (|req[i][N:1]);
      is_lp[i] = !req[i][0] && (|req[i][N:1]);
      im_act[i] = is_hp[i] || is_lp[i];
      rr_pos[i]  = is_hp[i] ? rr_dist(i, hp_ptr) : rr_dist(i, lp_ptr);
      if (is_hp[i]) n_hp = n_hp + 1'b1;
    end

    first_hp_valid = 1'b0;
    first_lp_valid = 1'b0;
    first_hp       = '0;
    first_lp       = '0;
    for (int i = 0; i < N; i++) begin
      logic [IW:0] rank;
      rank = '0;
      for (int h = 0; h < N; h++) begin
        if (is_hp[i] && is_hp[h] && rr_pos[h] < rr_pos[i]) rank = rank + 1'b1;
        if (is_lp[i] && is_lp[h] && rr_pos[h] < rr_pos[i]) rank = rank + 1'b1;
      end
      if (is_lp[i]) rank = rank + n_hp;
      im_row[i] = IW'(rank);
      if (is_hp[i] && rank == '0) begin
        first_hp_valid = 1'b1;
        first_hp       = IW'(i);
      end
      if (is_lp[i] && rank == n_hp) begin
        first_lp_valid = 1'b1;
        first_lp       = IW'(i);
      end
    end

    for (int r = 0; r < N; r++) begin
      row_bits[r] = '0;
      row_im[r]   = '0;
      for (int i = 0; i < N; i++) begin
        if (im_act[i] && im_row[i] == IW'(r)) begin
          row_bits[r] = req[i][N:1];
          row_im[r]   = IW'(i);
        end
      end
    end
  end

endmodule

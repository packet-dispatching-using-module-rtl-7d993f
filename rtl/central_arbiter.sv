// Central arbiter of the MCNS: module-level matching of IMs to OMs.
//
// Every time slot (one clock cycle) each IM presents an (N+1)-bit request
// (bit 0 = priority, bit j = OM(j)). The arbiter orders the requests
// (request_reorder: high priority first, round-robin inside each class),
// loads them into the buffers load matrix, and lets the matrix pick at most
// one OM per IM and one IM per OM. The decision goes back to the IMs as
// grant_valid/grant_om, and the same vector, read as "CM input port i is
// connected to CM output port grant_om[i]", is the connection pattern that is
// broadcast to every central module: the pattern is identical in all CMs.
//
// The whole decision is combinational within the slot. At the clock edge the
// two round-robin pointers move: each goes to the IM after the one that was
// loaded first in its class, and stays where it is when that class had no
// request. The pointer rule is this design's choice; ordering, matrix and
// broadcast follow the dispatching scheme. Reset puts both pointers at IM 0.
module central_arbiter #(
  parameter int unsigned N  = 8,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N:0]    req        [N],
  output logic          grant_valid[N],
  output logic [IW-1:0] grant_om   [N],
  output logic [IW-1:0] hp_ptr,
  output logic [IW-1:0] lp_ptr
);

  logic [N-1:0]  row_bits [N];
  logic [N-1:0]  sel      [N];
  logic [IW-1:0] row_im   [N];
  logic [IW-1:0] im_row   [N];
  logic          im_act   [N];
  logic          first_hp_valid, first_lp_valid;
  logic [IW-1:0] first_hp, first_lp;

  request_reorder #(.N(N)) u_reorder (
    .req            (req),
    .hp_ptr         (hp_ptr),
    .lp_ptr         (lp_ptr),
    .row_bits       (row_bits),
    .row_im         (row_im),
    .im_row         (im_row),
    .im_act         (im_act),
    .first_hp_valid (first_hp_valid),
    .first_hp       (first_hp),
    .first_lp_valid (first_lp_valid),
    .first_lp       (first_lp)
  );

  buffers_load_matrix #(.N(N)) u_matrix (
    .row_bits (row_bits),
    .sel      (sel)
  );

  // map each row's selection back to its IM
  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [N-1:0] s;
      s              = sel[im_row[i]];
      grant_valid[i] = im_act[i] && (|s);
      grant_om[i]    = '0;
      for (int c = 0; c < N; c++)
        if (s[c]) grant_om[i] = IW'(c);
    end
  end

  function automatic logic [IW-1:0] next_im(input logic [IW-1:0] i);
    return (32'(i) == N - 1) ? '0 : i + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hp_ptr <= '0;
      lp_ptr <= '0;
    end else begin
      if (first_hp_valid) hp_ptr <= next_im(first_hp);
      if (first_lp_valid) lp_ptr <= next_im(first_lp);
    end
  end

  // the row and IM maps of the ordering stage must be inverse
  always_comb begin
    for (int i = 0; i < N; i++)
      if (im_act[i])
        assert (row_im[im_row[i]] == IW'(i))
          else $error("central_arbiter: row map inconsistent");
  end

  // the decision must be a partial matching
  always_comb begin
    for (int a = 0; a < N; a++)
      for (int b = a + 1; b < N; b++)
        assert (!(grant_valid[a] && grant_valid[b] && grant_om[a] == grant_om[b]))
          else $error("central_arbiter: OM granted to two IMs");
  end

endmodule

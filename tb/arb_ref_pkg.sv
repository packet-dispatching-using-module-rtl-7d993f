// Reference model of the module-level matching, shared by the testbenches
// of request_reorder, central_arbiter and mcns_switch.
//
// order():  list of IMs in matrix-row order. High-priority requests first,
//           visited from the high pointer upwards (wrapping), then the
//           low-priority ones from the low pointer.
// match():  walks that list, giving each IM the lowest requested OM not yet
//           taken by an earlier IM, as the masking procedure does.
package arb_ref_pkg;

  function automatic void order(input int n, input logic [127:0] req [],
                                input int hp, input int lp, ref int list [$]);
    list.delete();
    for (int d = 0; d < n; d++) begin
      int i = (hp + d) % n;
      if (req[i][0] && (req[i] >> 1) != 0) list.push_back(i);
    end
    for (int d = 0; d < n; d++) begin
      int i = (lp + d) % n;
      if (!req[i][0] && (req[i] >> 1) != 0) list.push_back(i);
    end
  endfunction

  // gom[i] = granted OM of IM i, or -1
  function automatic void match(input int n, input logic [127:0] req [],
                                input int list [$], ref int gom []);
    bit taken [];
    taken = new[n];
    gom   = new[n];
    foreach (gom[i]) gom[i] = -1;
    foreach (list[k]) begin
      int i = list[k];
      for (int j = 0; j < n; j++)
        if (req[i][j+1] && !taken[j]) begin
          taken[j] = 1;
          gom[i]   = j;
          break;
        end
    end
  endfunction

endpackage

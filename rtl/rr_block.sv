// rr_block: round-robin selection of the next master.
//
// Two masks are built around the current master: the up mask holds every
// master numbered above it, the down mask the current master and every one
// below. Each is ANDed with the request vector. If the up-masked vector has a
// bit set, its lowest-numbered requester wins; otherwise the lowest-numbered
// requester of the down-masked vector wins. The search therefore starts just
// above the current master and wraps around, and the current master is taken
// again only when nobody else asks. Purely combinational: the result becomes
// the current master when the arbiter's Master_no register loads it.
// The two masks and the up-first search follow the original scheme and its
// worked example (current master 5, requests 5, 3, 2: master 2 wins). Taking
// the lowest-numbered requester of a vector is read off that example.
module rr_block #(
  parameter int unsigned N_M = 4,
  localparam int unsigned IDX_W = (N_M > 1) ? $clog2(N_M) : 1
) (
  input  logic [N_M-1:0]   req,          // requesting masters
  input  logic [IDX_W-1:0] cur,          // current master number
  output logic [N_M-1:0]   up_masked,    // req AND up mask
  output logic [N_M-1:0]   dn_masked,    // req AND down mask
  output logic [IDX_W-1:0] next_master,
  output logic             found         // at least one request
);

  logic [N_M-1:0] up_mask, dn_mask, pick;

  // Lowest set bit of a vector.
  function automatic logic [IDX_W-1:0] lowest(logic [N_M-1:0] v);
    lowest = '0;
    for (int i = N_M - 1; i >= 0; i--)
      if (v[i]) lowest = IDX_W'(i);
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < N_M; i++) begin
      up_mask[i] = (i > 32'(cur));
      dn_mask[i] = !up_mask[i];
    end
    up_masked   = req & up_mask;
    dn_masked   = req & dn_mask;
    pick        = (up_masked == '0) ? dn_masked : up_masked;
    next_master = lowest(pick);
    found       = |req;
  end

endmodule

// priority_block: selects the requesting master with the highest priority.
//
// Each master's 3-bit priority level is expanded to a one-hot priority level
// vector; level 0 is the highest priority. The vectors of the requesting
// masters are ORed, the lowest set bit of the result is the highest level in
// use (the same lowest-bit search the round-robin block uses), and the master
// whose vector holds that bit is returned. When several requesting masters
// share the highest level the lowest-numbered one wins; that tie rule is this
// implementation's choice. Purely combinational. The one-hot level vectors,
// their OR and level 0 being the highest follow the original scheme.
module priority_block
  import ahb_pkg::*;
#(
  parameter int unsigned N_M = 4,
  localparam int unsigned IDX_W = (N_M > 1) ? $clog2(N_M) : 1,
  localparam int unsigned NLVL  = 2 ** PLVL_W
) (
  input  logic [N_M-1:0]             req,
  input  logic [N_M-1:0][PLVL_W-1:0] p_level,
  output logic [NLVL-1:0]            top_level,   // one-hot highest level in use
  output logic [IDX_W-1:0]           next_master,
  output logic                       found
);

  logic [N_M-1:0][NLVL-1:0] plv;     // priority level vectors
  logic [NLVL-1:0]          any_lvl;

  always_comb begin
    any_lvl = '0;
    for (int unsigned m = 0; m < N_M; m++) begin
      plv[m]  = req[m] ? (NLVL'(1) << p_level[m]) : '0;
      any_lvl = any_lvl | plv[m];
    end
    top_level = any_lvl & (~any_lvl + NLVL'(1));   // isolate lowest set bit
    next_master = '0;
    for (int m = N_M - 1; m >= 0; m--)
      if ((plv[m] & top_level) != '0) next_master = IDX_W'(m);
    found = |req;
  end

endmodule

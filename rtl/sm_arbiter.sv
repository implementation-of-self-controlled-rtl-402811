// sm_arbiter: the self-motivated arbiter that sits in each output stage.
//
// A round-robin block and a priority block each propose a master from the
// request vector; a 2-to-1 multiplexer, steered by the controller, picks the
// round-robin proposal when all requesters share one priority level and the
// priority proposal otherwise. The controller applies the lock, NoPort and
// transfer-counter rules and loads the Master_no register. Because the
// priority level and transfer length arrive with every address, a master can
// move between fixed-priority, round-robin and dynamic-priority behaviour and
// between transfer, transaction and desired-length multiplexing at run time.
//
// Timing: Master_no and Add_out are registers. A decision taken in a cycle
// with HREADY high gives the owner of the next address phase. Add_out loads
// the owner's offset address when its address phase is accepted, so it holds
// the address of the transfer in its data phase.
// The set of sub-blocks and the two output registers follow the original
// arbiter; updating everything on the rising edge only, and latching Add_out
// at address-phase acceptance, are choices made here.
module sm_arbiter
  import ahb_pkg::*;
#(
  parameter int unsigned N_M = 4,
  localparam int unsigned IDX_W = (N_M > 1) ? $clog2(N_M) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_M-1:0]             req,
  input  logic [N_M-1:0][PLVL_W-1:0] p_level,
  input  logic [N_M-1:0][CNT_W-1:0]  t_count,
  input  logic                       hready,
  input  logic                       hsel,
  input  htrans_t                    htrans,
  input  logic                       hmastlock,
  input  logic [OFFS_W-1:0]          haddr,       // owner's offset address
  output logic [IDX_W-1:0]           master_no,
  output logic [OFFS_W-1:0]          add_out,
  output logic                       no_port,
  output logic                       equ_priority,
  output logic [CNT_W-1:0]           count
);

  logic [IDX_W-1:0] rr_master, pr_master, sel_master, next_master;
  logic             use_priority, master_en;
  logic             rr_found, pr_found;
  logic [N_M-1:0]   rr_up, rr_dn;
  logic [2**PLVL_W-1:0] pr_top;

  rr_block #(.N_M(N_M)) u_rr (
    .req(req), .cur(master_no), .up_masked(rr_up), .dn_masked(rr_dn),
    .next_master(rr_master), .found(rr_found)
  );

  priority_block #(.N_M(N_M)) u_pr (
    .req(req), .p_level(p_level), .top_level(pr_top),
    .next_master(pr_master), .found(pr_found)
  );

  bus_mux #(.N(2), .WIDTH(IDX_W)) u_mux (
    .din({pr_master, rr_master}), .sel(use_priority), .dout(sel_master)
  );

  sm_controller #(.N_M(N_M)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .req(req), .p_level(p_level), .t_count(t_count),
    .hready(hready), .hsel(hsel), .htrans(htrans), .hmastlock(hmastlock),
    .cur(master_no), .equ_priority(equ_priority), .use_priority(use_priority),
    .sel_master(sel_master), .next_master(next_master), .master_en(master_en),
    .no_port(no_port), .count(count)
  );

  dff_en #(.WIDTH(IDX_W)) u_master_no (
    .clk(clk), .rst_n(rst_n), .en(master_en), .d(next_master), .q(master_no)
  );

  dff_en #(.WIDTH(OFFS_W)) u_add_out (
    .clk(clk), .rst_n(rst_n), .en(hready && hsel && is_active(htrans)),
    .d(haddr), .q(add_out)
  );

  // Diagnostic vectors of the two selection blocks are not needed here.
  logic unused;
  assign unused = ^{rr_found, pr_found, rr_up, rr_dn, pr_top};

endmodule

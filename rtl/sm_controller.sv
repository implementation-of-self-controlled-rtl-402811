// sm_controller: decision logic of the self-motivated (SM) arbiter.
//
// Every cycle in which the slave's HREADY is high (an address phase ends) the
// controller decides who owns the next address phase:
//   1. While the owner's transfer carries HMASTLOCK the owner keeps the slave.
//   2. If the owner is not requesting this slave (or the port is idle): with
//      no request at all NoPort is asserted; otherwise a new master is chosen
//      and the counter is loaded with that master's transfer count.
//   3. Otherwise the owner's accepted transfer decrements the counter. When it
//      reaches zero and nobody else requests, the owner keeps the slave with a
//      fresh count; if others request, a master is chosen among all
//      requesters and the counter is reloaded. Before zero the owner stays.
// A choice uses the round-robin candidate when all requesting masters share
// one priority level, and the priority candidate otherwise.
// The counter and the NoPort flag are registered here; the master number is
// held by the arbiter's Master_no register, loaded when master_en is high.
// These rules follow the original scheme; evaluating them only at HREADY, judging
// equal priority over the requesters only, and the counter semantics (count
// of transfers still allotted) are this implementation's reading of them.
// Note that the owner's last allotted transfer still counts as a request in
// the cycle the decision is taken, so under priority arbitration an owner
// that is the most important requester is chosen again; if it has nothing
// more to send, the slave changes hands one idle cycle later. Round robin
// ranks the owner last and hands over without that gap.
module sm_controller
  import ahb_pkg::*;
#(
  parameter int unsigned N_M = 4,
  localparam int unsigned IDX_W = (N_M > 1) ? $clog2(N_M) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_M-1:0]             req,
  input  logic [N_M-1:0][PLVL_W-1:0] p_level,
  input  logic [N_M-1:0][CNT_W-1:0]  t_count,     // transfers allotted per master
  input  logic                       hready,
  input  logic                       hsel,        // owner's transfer addresses this slave
  input  htrans_t                    htrans,      // owner's HTRANS
  input  logic                       hmastlock,   // owner's HMASTLOCK
  input  logic [IDX_W-1:0]           cur,         // Master_no register
  output logic                       equ_priority,
  output logic                       use_priority, // MUX select: 1 = priority block
  input  logic [IDX_W-1:0]           sel_master,   // MUX output
  output logic [IDX_W-1:0]           next_master,
  output logic                       master_en,
  output logic                       no_port,
  output logic [CNT_W-1:0]           count
);

  logic [CNT_W-1:0] cnt_q, cnt_d, cnt_after;
  logic             np_q, np_d;
  logic             owner_req, xfer, lock, others;

  // Equal priority: every requesting master has the level of the first one.
  always_comb begin
    logic              seen;
    logic [PLVL_W-1:0] lvl;
    seen = 1'b0;
    lvl  = '0;
    equ_priority = 1'b1;
    for (int unsigned m = 0; m < N_M; m++) begin
      if (req[m]) begin
        if (seen && p_level[m] != lvl) equ_priority = 1'b0;
        if (!seen) lvl = p_level[m];
        seen = 1'b1;
      end
    end
  end
  assign use_priority = !equ_priority;

  always_comb begin
    owner_req = req[cur] && !np_q;
    xfer      = hsel && is_active(htrans);
    lock      = hsel && hmastlock;
    others    = (req & ~(N_M'(1) << cur)) != '0;
    cnt_after = (xfer && cnt_q != '0) ? cnt_q - CNT_W'(1) : cnt_q;

    next_master = cur;
    master_en   = 1'b0;
    cnt_d       = cnt_q;
    np_d        = np_q;
    if (hready) begin
      if (lock) begin                         // step 1
        np_d  = 1'b0;
        cnt_d = cnt_after;
      end else if (!owner_req) begin          // step 2
        if (req == '0) begin
          np_d = 1'b1;
        end else begin
          next_master = sel_master;
          master_en   = 1'b1;
          cnt_d       = t_count[sel_master];
          np_d        = 1'b0;
        end
      end else if (cnt_after == '0) begin     // step 3a: counter expired
        np_d = 1'b0;
        if (!others) begin
          cnt_d = t_count[cur];
        end else begin
          next_master = sel_master;
          master_en   = 1'b1;
          cnt_d       = t_count[sel_master];
        end
      end else begin                          // step 3b: keep the owner
        cnt_d = cnt_after;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      np_q  <= 1'b1;
    end else begin
      cnt_q <= cnt_d;
      np_q  <= np_d;
    end
  end

  assign no_port = np_q;
  assign count   = cnt_q;

endmodule

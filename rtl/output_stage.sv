// output_stage: the slave-facing side of one slave output port.
//
// Every master input port whose offered transfer addresses this slave raises
// its request. The embedded SM arbiter names the owner of the address phase
// (Master_no); multiplexers route that master's address and control to the
// slave, with the address reduced to its offset. When the slave's HREADYOUT
// is high the owner's transfer is accepted: the owner's input stage is told
// through accept, and the owner is remembered as the data-phase master, whose
// HWDATA is routed to the slave in the next phase. The slave's own
// HREADYOUT is its HREADY, since it is alone on this layer.
//
// Two AHB details are this implementation's own: a SEQ transfer whose master
// did not issue the slave's previous transfer goes out as NONSEQ, so a burst
// broken up by arbitration still looks legal to the slave; and HMASTER shows
// the owner's number.
module output_stage
  import ahb_pkg::*;
#(
  parameter int unsigned N_M    = 4,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned IDX_W = (N_M > 1) ? $clog2(N_M) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // master side
  input  logic [N_M-1:0]             req,       // offered transfer addresses this slave
  input  ahb_req_t [N_M-1:0]         x_req,
  input  addr_fields_t [N_M-1:0]     fields,    // split addresses from the converters
  input  logic [N_M-1:0][DATA_W-1:0] m_hwdata,
  output logic [N_M-1:0]             accept,
  // slave side
  output logic                       s_hsel,
  output logic [OFFS_W-1:0]          s_haddr,
  output htrans_t                    s_htrans,
  output logic                       s_hwrite,
  output logic [2:0]                 s_hsize,
  output hburst_t                    s_hburst,
  output logic                       s_hmastlock,
  output logic [IDX_W-1:0]           s_hmaster,
  output logic [DATA_W-1:0]          s_hwdata,
  output logic                       s_hready,
  input  logic                       s_hreadyout,
  // arbiter status
  output logic                       no_port,
  output logic [OFFS_W-1:0]          add_out,
  output logic                       equ_priority,
  output logic [CNT_W-1:0]           count
);

  logic [IDX_W-1:0]                 master_no, downer_q, last_owner_q;
  logic                             last_valid_q;
  logic [N_M-1:0][PLVL_W-1:0]       p_level;
  logic [N_M-1:0][CNT_W-1:0]        t_count;
  logic [$bits(ahb_req_t)-1:0]      own_bits;
  ahb_req_t                         own;
  logic [OFFS_W-1:0]                own_offs;
  logic                             xfer;

  always_comb begin
    for (int unsigned m = 0; m < N_M; m++) begin
      p_level[m] = fields[m].p_level;
      t_count[m] = transfer_count(fields[m].t_length, x_req[m].hburst);
    end
  end

  bus_mux #(.N(N_M), .WIDTH($bits(ahb_req_t))) u_addr_mux (
    .din(x_req), .sel(master_no), .dout(own_bits)
  );

  bus_mux #(.N(N_M), .WIDTH(DATA_W)) u_wdata_mux (
    .din(m_hwdata), .sel(downer_q), .dout(s_hwdata)
  );

  always_comb begin
    own         = ahb_req_t'(own_bits);
    own_offs    = own.haddr[OFFS_W-1:0];
    s_hsel      = !no_port && req[master_no];
    s_haddr     = own_offs;
    s_hwrite    = own.hwrite;
    s_hsize     = own.hsize;
    s_hburst    = own.hburst;
    s_hmastlock = s_hsel && own.hmastlock;
    s_hmaster   = master_no;
    s_hready    = s_hreadyout;
    if (!s_hsel)
      s_htrans = TR_IDLE;
    else if (own.htrans == TR_SEQ && !(last_valid_q && last_owner_q == master_no))
      s_htrans = TR_NONSEQ;
    else
      s_htrans = own.htrans;
    xfer   = s_hsel && is_active(s_htrans) && s_hreadyout;
    accept = xfer ? (N_M'(1) << master_no) : '0;
  end

  sm_arbiter #(.N_M(N_M)) u_arb (
    .clk(clk), .rst_n(rst_n), .req(req), .p_level(p_level), .t_count(t_count),
    .hready(s_hreadyout), .hsel(s_hsel), .htrans(s_htrans),
    .hmastlock(s_hmastlock), .haddr(s_haddr), .master_no(master_no),
    .add_out(add_out), .no_port(no_port), .equ_priority(equ_priority),
    .count(count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      downer_q     <= '0;
      last_owner_q <= '0;
      last_valid_q <= 1'b0;
    end else if (s_hreadyout) begin
      downer_q <= master_no;
      if (xfer) begin
        last_owner_q <= master_no;
        last_valid_q <= 1'b1;
      end
    end
  end

endmodule

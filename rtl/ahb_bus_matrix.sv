// ahb_bus_matrix: multi-layer AHB bus matrix with slave-side SM arbitration.
//
// N_M master ports and N_S slave ports are fully crossed. Each master port has
// an input stage, which holds a transfer that cannot start at once and builds
// the master's response, and a serial-to-parallel converter (addr_decoder)
// that splits the address into slave number, priority level, transfer length
// and offset. Each slave port has an output stage with its own SM arbiter, so
// masters talking to different slaves proceed in parallel and contention is
// settled next to the slave. The arbiter is steered by the priority level and
// transfer length that each master places in the upper address bits.
//
// Address layout (per master): [31:29] slave number, [28:26] priority level
// (0 highest), [25:22] transfer length (0: one HBURST burst, 1: one transfer,
// n: n transfers), [21:0] offset, which is all the slave receives as HADDR.
// The field widths and the block structure follow the original scheme; the field
// order, the encoding of transfer length 0, the ERROR answer for a slave
// number without a port, and the 32-bit data width are this implementation's.
//
// Timing: a transfer to a slave whose arbiter already points at the master
// starts in the cycle it is issued; otherwise it waits in the input stage for
// at least one cycle while the arbiter switches (the master sees wait states).
module ahb_bus_matrix
  import ahb_pkg::*;
#(
  parameter int unsigned N_M    = 4,
  parameter int unsigned N_S    = 4,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned IDX_W  = (N_M > 1) ? $clog2(N_M) : 1,
  localparam int unsigned SIDX_W = (N_S > 1) ? $clog2(N_S) : 1
) (
  input  logic                        hclk,
  input  logic                        hresetn,
  // master ports
  input  logic [N_M-1:0][ADDR_W-1:0]  m_haddr,
  input  logic [N_M-1:0][1:0]         m_htrans,
  input  logic [N_M-1:0]              m_hwrite,
  input  logic [N_M-1:0][2:0]         m_hsize,
  input  logic [N_M-1:0][2:0]         m_hburst,
  input  logic [N_M-1:0]              m_hmastlock,
  input  logic [N_M-1:0][DATA_W-1:0]  m_hwdata,
  output logic [N_M-1:0][DATA_W-1:0]  m_hrdata,
  output logic [N_M-1:0]              m_hready,
  output logic [N_M-1:0]              m_hresp,
  // slave ports
  output logic [N_S-1:0]              s_hsel,
  output logic [N_S-1:0][OFFS_W-1:0]  s_haddr,
  output logic [N_S-1:0][1:0]         s_htrans,
  output logic [N_S-1:0]              s_hwrite,
  output logic [N_S-1:0][2:0]         s_hsize,
  output logic [N_S-1:0][2:0]         s_hburst,
  output logic [N_S-1:0]              s_hmastlock,
  output logic [N_S-1:0][IDX_W-1:0]   s_hmaster,
  output logic [N_S-1:0][DATA_W-1:0]  s_hwdata,
  output logic [N_S-1:0]              s_hready,
  input  logic [N_S-1:0][DATA_W-1:0]  s_hrdata,
  input  logic [N_S-1:0]              s_hreadyout,
  input  logic [N_S-1:0]              s_hresp,
  // arbiter status per slave port
  output logic [N_S-1:0]              s_noport,
  output logic [N_S-1:0][OFFS_W-1:0]  s_add_out
);

  ahb_req_t [N_M-1:0]            m_req, x_req;
  logic     [N_M-1:0]            x_valid, dec_valid, accept;
  logic     [N_M-1:0][SIDX_W-1:0] dec_slave;
  logic     [N_M-1:0][N_S-1:0]   dec_hsel;
  addr_fields_t [N_M-1:0]        fields;
  logic     [N_S-1:0][N_M-1:0]   req_t, accept_t;   // indexed [slave][master]

  for (genvar m = 0; m < N_M; m++) begin : g_master
    always_comb begin
      m_req[m].haddr     = m_haddr[m];
      m_req[m].htrans    = htrans_t'(m_htrans[m]);
      m_req[m].hwrite    = m_hwrite[m];
      m_req[m].hsize     = m_hsize[m];
      m_req[m].hburst    = hburst_t'(m_hburst[m]);
      m_req[m].hmastlock = m_hmastlock[m];
    end

    input_stage #(.N_S(N_S), .DATA_W(DATA_W)) u_in (
      .clk(hclk), .rst_n(hresetn), .m_req(m_req[m]),
      .m_hready(m_hready[m]), .m_hresp(m_hresp[m]), .m_hrdata(m_hrdata[m]),
      .x_valid(x_valid[m]), .x_req(x_req[m]), .dec_valid(dec_valid[m]),
      .dec_slave(dec_slave[m]), .accept(accept[m]),
      .s_hreadyout(s_hreadyout), .s_hresp(s_hresp), .s_hrdata(s_hrdata),
      .pending()
    );

    addr_decoder #(.N_S(N_S)) u_dec (
      .haddr(x_req[m].haddr), .valid(x_valid[m]), .fields(fields[m]),
      .hsel(dec_hsel[m]), .dec_valid(dec_valid[m]), .slave(dec_slave[m])
    );

    always_comb begin
      accept[m] = 1'b0;
      for (int unsigned s = 0; s < N_S; s++) accept[m] |= accept_t[s][m];
    end
  end

  for (genvar s = 0; s < N_S; s++) begin : g_slave
    always_comb
      for (int unsigned m = 0; m < N_M; m++) req_t[s][m] = dec_hsel[m][s];

    output_stage #(.N_M(N_M), .DATA_W(DATA_W)) u_out (
      .clk(hclk), .rst_n(hresetn), .req(req_t[s]), .x_req(x_req), .fields(fields),
      .m_hwdata(m_hwdata), .accept(accept_t[s]),
      .s_hsel(s_hsel[s]), .s_haddr(s_haddr[s]), .s_htrans(s_htrans[s]),
      .s_hwrite(s_hwrite[s]), .s_hsize(s_hsize[s]), .s_hburst(s_hburst[s]),
      .s_hmastlock(s_hmastlock[s]), .s_hmaster(s_hmaster[s]),
      .s_hwdata(s_hwdata[s]), .s_hready(s_hready[s]),
      .s_hreadyout(s_hreadyout[s]), .no_port(s_noport[s]),
      .add_out(s_add_out[s]), .equ_priority(), .count()
    );
  end

endmodule

// input_stage: the master-facing side of one master input port.
//
// A master's address phase is taken when the input stage shows HREADY high
// to it. If an output stage grants the transfer in that same cycle it goes
// straight through; otherwise the address and control are copied into a
// holding register and offered from there until an output stage accepts
// them. Meanwhile the master sees HREADY low, exactly as if the slave were
// inserting wait states. Once accepted, the transfer's data phase runs on the
// slave it addresses, and that slave's HREADYOUT, HRESP and HRDATA are routed
// back to the master. An address that maps to no slave port is answered here
// with the two-cycle AHB ERROR response.
//
// States: IDLE (nothing outstanding), PEND (transfer held, waiting for a
// grant), DATA (data phase on slave dslave), ERR1/ERR2 (error response).
// The original scheme requires only that the stage holds address and control when a
// transfer cannot start at once and that it creates the master's response;
// the state machine is this implementation's way of doing it. Write data is
// not held: the master keeps HWDATA stable while HREADY is low.
module input_stage
  import ahb_pkg::*;
#(
  parameter int unsigned N_S    = 4,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned SIDX_W = (N_S > 1) ? $clog2(N_S) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // master side
  input  ahb_req_t                     m_req,
  output logic                         m_hready,
  output logic                         m_hresp,
  output logic [DATA_W-1:0]            m_hrdata,
  // towards the decoder and the output stages
  output logic                         x_valid,
  output ahb_req_t                     x_req,
  input  logic                         dec_valid,
  input  logic [SIDX_W-1:0]            dec_slave,
  input  logic                         accept,
  // responses of all slave ports
  input  logic [N_S-1:0]               s_hreadyout,
  input  logic [N_S-1:0]               s_hresp,
  input  logic [N_S-1:0][DATA_W-1:0]   s_hrdata,
  output logic                         pending
);

  typedef enum logic [2:0] {ST_IDLE, ST_PEND, ST_DATA, ST_ERR1, ST_ERR2} state_t;

  state_t            st_q, st_d;
  ahb_req_t          held_q;
  logic [SIDX_W-1:0] dslave_q, dslave_d;
  logic              live_valid, load_held;

  always_comb begin
    live_valid = is_active(m_req.htrans);
    unique case (st_q)
      ST_IDLE: m_hready = 1'b1;
      ST_DATA: m_hready = s_hreadyout[dslave_q];
      ST_ERR2: m_hready = 1'b1;
      default: m_hready = 1'b0;
    endcase
    m_hresp  = (st_q == ST_DATA && s_hresp[dslave_q]) || st_q == ST_ERR1 || st_q == ST_ERR2;
    m_hrdata = (st_q == ST_DATA) ? s_hrdata[dslave_q] : '0;

    x_valid  = (st_q == ST_PEND) || (m_hready && live_valid);
    x_req    = (st_q == ST_PEND) ? held_q : m_req;
    pending  = (st_q == ST_PEND);

    st_d      = st_q;
    dslave_d  = dslave_q;
    load_held = 1'b0;
    if (st_q == ST_PEND) begin
      if (accept) begin
        st_d     = ST_DATA;
        dslave_d = dec_slave;
      end
    end else if (m_hready) begin
      if (!live_valid) begin
        st_d = ST_IDLE;
      end else if (!dec_valid) begin
        st_d = ST_ERR1;
      end else if (accept) begin
        st_d     = ST_DATA;
        dslave_d = dec_slave;
      end else begin
        st_d      = ST_PEND;
        load_held = 1'b1;
      end
    end else if (st_q == ST_ERR1) begin
      st_d = ST_ERR2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= ST_IDLE;
      dslave_q <= '0;
      held_q   <= '0;
    end else begin
      st_q     <= st_d;
      dslave_q <= dslave_d;
      if (load_held) held_q <= m_req;
    end
  end

  // A transfer is only ever accepted while it is offered.
  a_accept_offered: assert property (@(posedge clk) disable iff (!rst_n) accept |-> x_valid);

endmodule

// tb_input_stage: one input stage with four slave ports. The testbench plays
// the decoder (slave number in address bits 31:29, numbers 4..7 unmapped),
// the output stages (accept) and the slaves (HREADYOUT, HRESP, HRDATA).
// Directed cases: a transfer taken at once with slave wait states, a
// transfer held while the master changes its bus and later accepted, a
// back-to-back pair, and an unmapped address answered with ERROR.
module tb_input_stage;
  import ahb_pkg::*;
  localparam int NS = 4;
  logic clk = 0, rst_n = 1;
  ahb_req_t m_req, x_req;
  logic m_hready, m_hresp, x_valid, dec_valid, accept, pending;
  logic [31:0] m_hrdata;
  logic [1:0] dec_slave;
  logic [NS-1:0] s_hreadyout = '1, s_hresp = '0;
  logic [NS-1:0][31:0] s_hrdata;
  int checks = 0, failures = 0;

  input_stage #(.N_S(NS), .DATA_W(32)) dut (
    .clk(clk), .rst_n(rst_n), .m_req(m_req), .m_hready(m_hready), .m_hresp(m_hresp),
    .m_hrdata(m_hrdata), .x_valid(x_valid), .x_req(x_req), .dec_valid(dec_valid),
    .dec_slave(dec_slave), .accept(accept), .s_hreadyout(s_hreadyout),
    .s_hresp(s_hresp), .s_hrdata(s_hrdata), .pending(pending)
  );

  assign dec_valid = (x_req.haddr[31:29] < 3'(NS));
  assign dec_slave = x_req.haddr[30:29];
  always_comb for (int s = 0; s < NS; s++) s_hrdata[s] = 32'hD000_0000 + 32'(s);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic ahb_req_t mk(logic [2:0] sn, logic [21:0] off, htrans_t t);
    ahb_req_t r;
    r = '0;
    r.haddr  = {sn, 3'd0, 4'd1, off};
    r.htrans = t;
    r.hwrite = 1'b0;
    r.hsize  = 3'd2;
    r.hburst = BU_SINGLE;
    return r;
  endfunction

  initial begin
    ahb_req_t a;
    m_req = '0; accept = 0;
    #2 rst_n = 0;
    #2 rst_n = 1;
    @(negedge clk);
    chk(m_hready && !x_valid && !m_hresp, "idle");

    // 1: transfer to slave 2 accepted at once, slave inserts two wait states
    m_req = mk(3'd2, 22'h100, TR_NONSEQ); accept = 1;
    #1 chk(x_valid && x_req == m_req, "live transfer offered");
    @(negedge clk);
    m_req = mk(3'd0, 22'h0, TR_IDLE); accept = 0; s_hreadyout[2] = 0;
    #1 chk(!m_hready && !x_valid, "data phase wait state 1");
    @(negedge clk);
    #1 chk(!m_hready, "data phase wait state 2");
    s_hreadyout[2] = 1;
    #1 chk(m_hready && m_hrdata == 32'hD000_0002 && !m_hresp, "data from slave 2");
    @(negedge clk);
    chk(m_hready && !pending, "back to idle");

    // 2: transfer to slave 1 not granted: it is held
    a = mk(3'd1, 22'h2A5, TR_NONSEQ);
    m_req = a;
    @(negedge clk);
    m_req = mk(3'd3, 22'h3FF, TR_SEQ);   // master already shows its next address
    #1 chk(pending && !m_hready && x_valid && x_req == a, "held transfer offered");
    @(negedge clk);
    #1 chk(pending && x_req == a, "still held");
    accept = 1;
    @(negedge clk);
    accept = 0; s_hreadyout[1] = 0;
    #1 chk(!pending && !m_hready && !x_valid, "held transfer in data phase");
    s_hreadyout[1] = 1;
    #1 chk(m_hready && m_hrdata == 32'hD000_0001, "data from slave 1");
    // the next transfer (slave 3) is offered live in this cycle and accepted
    chk(x_valid && x_req.haddr[31:29] == 3'd3, "pipelined next address offered");
    accept = 1;
    @(negedge clk);
    accept = 0; m_req = mk(3'd0, 22'h0, TR_IDLE);
    #1 chk(m_hready && m_hrdata == 32'hD000_0003, "back-to-back data from slave 3");
    @(negedge clk);

    // 3: slave ERROR response is passed on
    m_req = mk(3'd0, 22'h4, TR_NONSEQ); accept = 1;
    @(negedge clk);
    m_req = mk(3'd0, 22'h0, TR_IDLE); accept = 0;
    s_hreadyout[0] = 0; s_hresp[0] = 1;
    #1 chk(!m_hready && m_hresp, "slave error first cycle");
    @(negedge clk);
    s_hreadyout[0] = 1;
    #1 chk(m_hready && m_hresp, "slave error second cycle");
    @(negedge clk);
    s_hresp[0] = 0;

    // 4: unmapped slave number gets a two-cycle ERROR from the stage itself
    m_req = mk(3'd6, 22'h8, TR_NONSEQ);
    #1 chk(x_valid && !dec_valid, "unmapped offered");
    @(negedge clk);
    m_req = mk(3'd0, 22'h0, TR_IDLE);
    #1 chk(!m_hready && m_hresp, "ERROR cycle 1");
    @(negedge clk);
    #1 chk(m_hready && m_hresp, "ERROR cycle 2");
    @(negedge clk);
    #1 chk(m_hready && !m_hresp, "idle after ERROR");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

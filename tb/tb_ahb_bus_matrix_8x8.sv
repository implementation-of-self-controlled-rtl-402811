// tb_ahb_bus_matrix_8x8: the bus matrix built with eight master ports and
// eight slave ports (the full range of the 3-bit slave number, and the eight
// masters of the round-robin and priority examples). The same ten phases as
// the default-size test run with eight behavioural masters and eight memory
// slaves: RT, FT, RR, FR, RL, FL, DT, DR, DL and a mixed phase with random
// levels and lengths, locked pairs and idle gaps. With eight slaves every
// slave number is mapped, so no ERROR case exists here. Every read is checked,
// the slaves check SEQ ordering and locked pairs, and each mechanism of the
// matrix must occur at least once.
module tb_ahb_bus_matrix_8x8;
  import ahb_pkg::*;
  localparam int NM = 8, NS = 8, BURSTS = 12;

  logic hclk = 0, hresetn = 1;
  logic [NM-1:0][31:0] m_haddr, m_hwdata, m_hrdata;
  logic [NM-1:0][1:0]  m_htrans;
  logic [NM-1:0]       m_hwrite, m_hmastlock, m_hready, m_hresp;
  logic [NM-1:0][2:0]  m_hsize, m_hburst;
  logic [NS-1:0]       s_hsel, s_hwrite, s_hmastlock, s_hready, s_hreadyout, s_hresp, s_noport;
  logic [NS-1:0][21:0] s_haddr, s_add_out;
  logic [NS-1:0][1:0]  s_htrans;
  logic [NS-1:0][2:0]  s_hmaster;
  logic [NS-1:0][2:0]  s_hsize, s_hburst;
  logic [NS-1:0][31:0] s_hwdata, s_hrdata;

  logic       start;
  logic [2:0] cfg_plevel [NM];
  logic [3:0] cfg_tlen [NM];
  logic       cfg_rand, cfg_rand_tl, cfg_lock, cfg_err, cfg_gaps;
  logic [NM-1:0] done;
  int n_data_err [NM], n_reads [NM], n_errresp [NM];
  int s_xfer [NS], s_proto [NS];
  int checks = 0, failures = 0;

  ahb_bus_matrix #(.N_M(NM), .N_S(NS)) dut (
    .hclk(hclk), .hresetn(hresetn),
    .m_haddr(m_haddr), .m_htrans(m_htrans), .m_hwrite(m_hwrite), .m_hsize(m_hsize),
    .m_hburst(m_hburst), .m_hmastlock(m_hmastlock), .m_hwdata(m_hwdata),
    .m_hrdata(m_hrdata), .m_hready(m_hready), .m_hresp(m_hresp),
    .s_hsel(s_hsel), .s_haddr(s_haddr), .s_htrans(s_htrans), .s_hwrite(s_hwrite),
    .s_hsize(s_hsize), .s_hburst(s_hburst), .s_hmastlock(s_hmastlock),
    .s_hmaster(s_hmaster), .s_hwdata(s_hwdata), .s_hready(s_hready),
    .s_hrdata(s_hrdata), .s_hreadyout(s_hreadyout), .s_hresp(s_hresp),
    .s_noport(s_noport), .s_add_out(s_add_out)
  );

  for (genvar m = 0; m < NM; m++) begin : g_m
    ahb_master_bfm #(.ID(m), .NS(NS)) u_bfm (
      .hclk(hclk), .hresetn(hresetn), .start(start), .n_bursts(BURSTS),
      .cfg_plevel(cfg_plevel[m]), .cfg_tlen(cfg_tlen[m]), .cfg_rand(cfg_rand),
      .cfg_rand_tl(cfg_rand_tl), .cfg_len(0),      .cfg_lock(cfg_lock), .cfg_err(cfg_err), .cfg_gaps(cfg_gaps), .cfg_slaves('1),
      .done(done[m]),
      .haddr(m_haddr[m]), .htrans(m_htrans[m]), .hwrite(m_hwrite[m]), .hsize(m_hsize[m]),
      .hburst(m_hburst[m]), .hmastlock(m_hmastlock[m]), .hwdata(m_hwdata[m]),
      .hrdata(m_hrdata[m]), .hready(m_hready[m]), .hresp(m_hresp[m]),
      .n_data_err(n_data_err[m]), .n_reads(n_reads[m]), .n_errresp(n_errresp[m])
    );
  end

  for (genvar s = 0; s < NS; s++) begin : g_s
    ahb_mem_slave #(.AW(12), .MAX_WAIT(2), .IDX_W(3)) u_mem (
      .hclk(hclk), .hresetn(hresetn), .hsel(s_hsel[s]), .haddr(s_haddr[s]),
      .htrans(s_htrans[s]), .hwrite(s_hwrite[s]), .hmastlock(s_hmastlock[s]),
      .hmaster(s_hmaster[s]), .hwdata(s_hwdata[s]), .hready(s_hready[s]),
      .hrdata(s_hrdata[s]), .hreadyout(s_hreadyout[s]), .hresp(s_hresp[s]),
      .n_xfer(s_xfer[s]), .n_proto_err(s_proto[s])
    );
  end

  always #5 hclk = ~hclk;

  // ---- mechanism counters ----
  int c_hold = 0, c_rr_pick = 0, c_pr_pick = 0, c_expire_switch = 0, c_expire_keep = 0;
  int c_lock = 0, c_noport = 0, c_seq2nonseq = 0, c_multi_grant = 0, c_wait = 0, c_parallel = 0;

  for (genvar m = 0; m < NM; m++) begin : g_cm
    always @(posedge hclk) if (hresetn && dut.g_master[m].u_in.pending) c_hold++;
  end

  for (genvar s = 0; s < NS; s++) begin : g_cs
    always @(posedge hclk) begin
      if (hresetn && s_hready[s]) begin
        if (dut.g_slave[s].u_out.u_arb.u_ctrl.master_en) begin
          if (dut.g_slave[s].u_out.u_arb.u_ctrl.use_priority) c_pr_pick++;
          else c_rr_pick++;
          if (dut.g_slave[s].u_out.u_arb.u_ctrl.owner_req) c_expire_switch++;
          if (dut.g_slave[s].u_out.u_arb.u_ctrl.cnt_d > 1) c_multi_grant++;
        end else if (dut.g_slave[s].u_out.u_arb.u_ctrl.owner_req
                     && !dut.g_slave[s].u_out.u_arb.u_ctrl.lock
                     && dut.g_slave[s].u_out.u_arb.u_ctrl.cnt_after == 0) begin
          c_expire_keep++;
        end
        if (dut.g_slave[s].u_out.u_arb.u_ctrl.lock && dut.g_slave[s].u_out.u_arb.u_ctrl.others) c_lock++;
        if (s_noport[s]) c_noport++;
        if (s_hsel[s] && s_htrans[s] == 2'b10 && dut.g_slave[s].u_out.own.htrans == TR_SEQ) c_seq2nonseq++;
      end
      if (hresetn && !s_hreadyout[s]) c_wait++;
    end
  end

  always @(posedge hclk) begin
    int n;
    n = 0;
    for (int s = 0; s < NS; s++) if (s_hsel[s] && s_hready[s]) n++;
    if (n >= 2) c_parallel++;
  end

  initial begin
    repeat (100_000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_phase(string name, logic [2:0] pl[NM], logic [3:0] tl[NM],
                           logic rnd, logic rtl, logic lk, logic er, logic gp);
    int cyc;
    cfg_plevel = pl; cfg_tlen = tl;
    cfg_rand = rnd; cfg_rand_tl = rtl; cfg_lock = lk; cfg_err = er; cfg_gaps = gp;
    @(negedge hclk) start = 1;
    @(negedge hclk) start = 0;
    cyc = 0;
    while (done != '1) begin
      @(negedge hclk);
      cyc++;
    end
    $display("phase %s: %0d cycles", name, cyc);
    for (int m = 0; m < NM; m++)
      chk(n_data_err[m] == 0, $sformatf("%s: master %0d data errors %0d", name, m, n_data_err[m]));
  endtask

  initial begin
    logic [2:0] eq[NM], fx[NM];
    logic [3:0] t1[NM], t0[NM], tl[NM];
    start = 0;
    eq = '{default: 3'd2};
    fx = '{3'd3, 3'd0, 3'd2, 3'd1, 3'd7, 3'd4, 3'd6, 3'd5};
    t1 = '{default: 4'd1};
    t0 = '{default: 4'd0};
    tl = '{4'd2, 4'd3, 4'd5, 4'd8, 4'd1, 4'd4, 4'd6, 4'd15};
    #2 hresetn = 0;
    #20 hresetn = 1;
    run_phase("RT", eq, t1, 0, 0, 0, 0, 0);
    run_phase("FT", fx, t1, 0, 0, 0, 0, 0);
    run_phase("RR", eq, t0, 0, 0, 0, 0, 0);
    run_phase("FR", fx, t0, 0, 0, 0, 0, 0);
    run_phase("RL", eq, tl, 0, 0, 0, 0, 1);
    run_phase("FL", fx, tl, 0, 0, 0, 0, 1);
    run_phase("DT", eq, t1, 1, 0, 0, 0, 0);
    run_phase("DR", eq, t0, 1, 0, 0, 0, 0);
    run_phase("DL", eq, tl, 1, 0, 0, 0, 1);
    run_phase("SM", eq, t1, 1, 1, 1, 1, 1);
    repeat (5) @(negedge hclk);
    for (int m = 0; m < NM; m++) begin
      chk(n_reads[m] > 0, $sformatf("master %0d read back data", m));
    end
    for (int s = 0; s < NS; s++) begin
      chk(s_proto[s] == 0, $sformatf("slave %0d protocol errors %0d", s, s_proto[s]));
      chk(s_xfer[s] > 0, $sformatf("slave %0d used", s));
    end
    $display("held=%0d rr_pick=%0d prio_pick=%0d expire_switch=%0d expire_keep=%0d multi_grant=%0d",
             c_hold, c_rr_pick, c_pr_pick, c_expire_switch, c_expire_keep, c_multi_grant);
    $display("lock_hold=%0d noport=%0d seq2nonseq=%0d parallel=%0d wait=%0d",
             c_lock, c_noport, c_seq2nonseq, c_parallel, c_wait);
    chk(c_hold > 0, "input stage held a transfer");
    chk(c_rr_pick > 0, "round-robin selection");
    chk(c_pr_pick > 0, "priority selection");
    chk(c_expire_switch > 0, "counter expired and the slave changed hands");
    chk(c_expire_keep > 0, "counter expired with no competitor, owner kept");
    chk(c_multi_grant > 0, "grant of more than one transfer");
    chk(c_lock > 0, "HMASTLOCK kept the owner against competitors");
    chk(c_noport > 0, "NoPort");
    chk(c_seq2nonseq > 0, "SEQ turned into NONSEQ after a change of owner");
    chk(c_parallel > 0, "parallel transfers on two or more slaves");
    chk(c_wait > 0, "slave wait states");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

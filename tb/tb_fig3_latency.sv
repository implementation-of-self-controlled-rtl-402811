// tb_fig3_latency: the three-master latency example run on the bus matrix.
//
// Masters 1, 2 and 3 each issue one write burst to slave 0 in the same cycle
// (cycle 0): 4, 8 and 2 transfers, each asking for its whole burst as its
// desired transfer length. The slave has no wait states. Three priority
// settings reproduce the three grant orders of the example:
//   (a) equal levels, round robin:         M1 cycles 1-4,  M2 5-12, M3 13-14
//   (b) M3 > M1 > M2 (latency minimizing): M3 1-2,  M1 3-6,  M2 7-14
//   (c) M2 > M3 > M1 (latency aware):      M2 1-8,  M3 9-10, M1 11-14
// Cycle 0 is the arbitration cycle in which all three requests arrive; the
// testbench records the owner of every accepted address phase on slave 0
// and checks it cycle by cycle against these windows, then checks that the
// last data phase of the three bursts ends in cycle 15.
module tb_fig3_latency;
  import ahb_pkg::*;
  localparam int NM = 4, NS = 4;

  logic hclk = 0, hresetn = 1;
  logic [NM-1:0][31:0] m_haddr, m_hwdata, m_hrdata;
  logic [NM-1:0][1:0]  m_htrans;
  logic [NM-1:0]       m_hwrite, m_hmastlock, m_hready, m_hresp;
  logic [NM-1:0][2:0]  m_hsize, m_hburst;
  logic [NS-1:0]       s_hsel, s_hwrite, s_hmastlock, s_hready, s_hreadyout, s_hresp, s_noport;
  logic [NS-1:0][21:0] s_haddr, s_add_out;
  logic [NS-1:0][1:0]  s_htrans, s_hmaster;
  logic [NS-1:0][2:0]  s_hsize, s_hburst;
  logic [NS-1:0][31:0] s_hwdata, s_hrdata;

  logic       start;
  logic [2:0] cfg_plevel [NM];
  logic [3:0] cfg_tlen [NM];
  int         cfg_len [NM];
  logic [NM-1:0] done;
  int n_data_err [NM], n_reads [NM], n_errresp [NM];
  int s_xfer [NS], s_proto [NS];
  int checks = 0, failures = 0;
  int cycle;
  logic counting;
  int owner_at [32];
  int last_data;

  ahb_bus_matrix dut (
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
    ahb_master_bfm #(.ID(m)) u_bfm (
      .hclk(hclk), .hresetn(hresetn), .start(start), .n_bursts(m == 0 ? 0 : 1),
      .cfg_plevel(cfg_plevel[m]), .cfg_tlen(cfg_tlen[m]), .cfg_rand(1'b0),
      .cfg_rand_tl(1'b0), .cfg_len(cfg_len[m]),
      .cfg_lock(1'b0), .cfg_err(1'b0), .cfg_gaps(1'b0), .cfg_slaves(4'h1),
      .done(done[m]),
      .haddr(m_haddr[m]), .htrans(m_htrans[m]), .hwrite(m_hwrite[m]), .hsize(m_hsize[m]),
      .hburst(m_hburst[m]), .hmastlock(m_hmastlock[m]), .hwdata(m_hwdata[m]),
      .hrdata(m_hrdata[m]), .hready(m_hready[m]), .hresp(m_hresp[m]),
      .n_data_err(n_data_err[m]), .n_reads(n_reads[m]), .n_errresp(n_errresp[m])
    );
  end

  for (genvar s = 0; s < NS; s++) begin : g_s
    ahb_mem_slave #(.AW(12), .MAX_WAIT(0), .IDX_W(2)) u_mem (
      .hclk(hclk), .hresetn(hresetn), .hsel(s_hsel[s]), .haddr(s_haddr[s]),
      .htrans(s_htrans[s]), .hwrite(s_hwrite[s]), .hmastlock(s_hmastlock[s]),
      .hmaster(s_hmaster[s]), .hwdata(s_hwdata[s]), .hready(s_hready[s]),
      .hrdata(s_hrdata[s]), .hreadyout(s_hreadyout[s]), .hresp(s_hresp[s]),
      .n_xfer(s_xfer[s]), .n_proto_err(s_proto[s])
    );
  end

  always #5 hclk = ~hclk;

  // Cycle 0 is the first cycle in which any master drives a transfer.
  always @(posedge hclk) begin
    if (!counting && m_htrans != '0) begin
      counting <= 1;
      cycle    <= 1;
      if (s_hsel[0] && s_hready[0] && s_htrans[0][1]) owner_at[0] = int'(s_hmaster[0]);
    end else if (counting) begin
      if (cycle < 32 && s_hsel[0] && s_hready[0] && s_htrans[0][1]) owner_at[cycle] = int'(s_hmaster[0]);
      // a data phase ends in this cycle
      if (s_hready[0] && g_s[0].u_mem.d_act) last_data = cycle;
      cycle <= cycle + 1;
    end
  end

  initial begin
    repeat (5000) @(posedge hclk);
    failures++;
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

  task automatic scenario(string name, logic [2:0] pl[NM], int exp_owner[18], int exp_last);
    string got;
    hresetn = 0;
    counting = 0;
    cycle = 0;
    last_data = -1;
    for (int i = 0; i < 32; i++) owner_at[i] = -1;
    cfg_plevel = pl;
    cfg_tlen = '{4'd0, 4'd4, 4'd8, 4'd2};
    cfg_len  = '{0, 4, 8, 2};
    repeat (2) @(negedge hclk);
    hresetn = 1;
    @(negedge hclk) start = 1;
    @(negedge hclk) start = 0;
    while (done != '1) @(negedge hclk);
    got = "";
    for (int c = 0; c <= 17; c++) got = {got, $sformatf("%0d ", owner_at[c])};
    $display("(%s) owner per cycle 0..17: %s  last data phase in cycle %0d", name, got, last_data);
    for (int c = 0; c < 18; c++)
      chk(owner_at[c] == exp_owner[c], $sformatf("(%s) owner in cycle %0d is %0d, expected %0d",
                                                   name, c, owner_at[c], exp_owner[c]));
    chk(last_data == exp_last, $sformatf("(%s) last data phase in cycle %0d, expected %0d",
                                         name, last_data, exp_last));
    for (int m = 0; m < NM; m++) chk(n_data_err[m] == 0, "no response errors");
    chk(s_proto[0] == 0, "no protocol errors at the slave");
  endtask

  initial begin
    start = 0;
    scenario("a", '{3'd0, 3'd3, 3'd3, 3'd3},
             '{-1, 1, 1, 1, 1, 2, 2, 2, 2, 2, 2, 2, 2, 3, 3, -1, -1, -1}, 15);
    scenario("b", '{3'd0, 3'd1, 3'd2, 3'd0},
             '{-1, 3, 3, -1, 1, 1, 1, 1, -1, 2, 2, 2, 2, 2, 2, 2, 2, -1}, 17);
    scenario("c", '{3'd0, 3'd2, 3'd0, 3'd1},
             '{-1, 2, 2, 2, 2, 2, 2, 2, 2, -1, 3, 3, -1, 1, 1, 1, 1, -1}, 17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

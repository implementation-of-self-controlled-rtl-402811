// tb_output_stage: one output stage with four masters and a slave that
// inserts random wait states. Each master keeps offering its next transfer
// until the stage accepts it, as an input stage would. Checked every cycle:
// the slave sees the owner's offset address and control, accept goes to the
// owner exactly when the slave is ready, write data comes from the master
// that owns the data phase, a SEQ transfer that follows another master's
// transfer reaches the slave as NONSEQ, and all transfers of every master
// arrive in order. Masters use equal levels and one-transfer lengths, so
// round robin rotates through them.
module tb_output_stage;
  import ahb_pkg::*;
  localparam int N = 4, PER = 40;
  logic clk = 0, rst_n = 1;
  logic [N-1:0] req;
  ahb_req_t [N-1:0] x_req;
  addr_fields_t [N-1:0] fields;
  logic [N-1:0][31:0] m_hwdata;
  logic [N-1:0] accept;
  logic s_hsel, s_hwrite, s_hmastlock, s_hready, s_hreadyout;
  logic [21:0] s_haddr, add_out;
  htrans_t s_htrans;
  logic [2:0] s_hsize;
  hburst_t s_hburst;
  logic [1:0] s_hmaster;
  logic [31:0] s_hwdata;
  logic no_port, equ;
  logic [4:0] count;
  int checks = 0, failures = 0;
  int sent [N];
  logic       d_valid;
  int         d_owner, c_owner;
  logic       c_sel;
  int         n_conv = 0, n_switch = 0, last_owner = -1;

  output_stage #(.N_M(N), .DATA_W(32)) dut (
    .clk(clk), .rst_n(rst_n), .req(req), .x_req(x_req), .fields(fields), .m_hwdata(m_hwdata), .accept(accept),
    .s_hsel(s_hsel), .s_haddr(s_haddr), .s_htrans(s_htrans), .s_hwrite(s_hwrite),
    .s_hsize(s_hsize), .s_hburst(s_hburst), .s_hmastlock(s_hmastlock), .s_hmaster(s_hmaster),
    .s_hwdata(s_hwdata), .s_hready(s_hready), .s_hreadyout(s_hreadyout),
    .no_port(no_port), .add_out(add_out), .equ_priority(equ), .count(count)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Offer: master m's transfer number sent[m]; the first is NONSEQ, the rest SEQ.
  always_comb begin
    for (int m = 0; m < N; m++) begin
      req[m]             = sent[m] < PER;
      x_req[m]           = '0;
      x_req[m].haddr     = {3'd0, 3'd1, 4'd1, 22'(m * 4096 + sent[m] * 4)};
      x_req[m].htrans    = (sent[m] == 0) ? TR_NONSEQ : TR_SEQ;
      x_req[m].hwrite    = 1'b1;
      x_req[m].hsize     = 3'd2;
      x_req[m].hburst    = BU_INCR;
      m_hwdata[m]        = 32'(m << 24);
      fields[m]          = addr_fields_t'(x_req[m].haddr);
    end
  end

  initial begin
    for (int m = 0; m < N; m++) sent[m] = 0;
    s_hreadyout = 1;
    d_valid = 0;
    #2 rst_n = 0;
    #2 rst_n = 1;
    while (1) begin
      @(negedge clk);
      s_hreadyout = ($urandom_range(0, 3) != 0);
      #1;
      chk(s_hready == s_hreadyout, "HREADY is the slave's HREADYOUT");
      // data phase write data
      if (d_valid) chk(s_hwdata == 32'(d_owner << 24), "write data from data-phase owner");
      if (s_hsel) begin
        int o;
        o = int'(s_hmaster);
        chk(req[o], "owner requests");
        chk(s_haddr == x_req[o].haddr[21:0], $sformatf("offset address of owner %0d: %h vs %h np=%b", o, s_haddr, x_req[o].haddr, no_port));
        if (x_req[o].htrans == TR_SEQ && o != last_owner) begin
          chk(s_htrans == TR_NONSEQ, $sformatf("SEQ after another master becomes NONSEQ o=%0d last=%0d ht=%0d sent=%p", o, last_owner, s_htrans, sent));
          n_conv++;
        end else begin
          chk(s_htrans == x_req[o].htrans, "HTRANS passed through");
        end
      end else begin
        chk(s_htrans == TR_IDLE, "IDLE when not selected");
      end
      chk(accept == ((s_hsel && s_hreadyout) ? 4'(1 << s_hmaster) : 4'b0), "accept");
      c_sel   = s_hsel;
      c_owner = int'(s_hmaster);
      @(posedge clk);
      if (s_hreadyout) begin
        d_valid = c_sel;
        d_owner = c_owner;
        if (c_sel) begin
          if (last_owner >= 0 && last_owner != d_owner) n_switch++;
          last_owner = d_owner;
          sent[d_owner] <= sent[d_owner] + 1;
        end
      end
      #1;
      if (sent[0] == PER && sent[1] == PER && sent[2] == PER && sent[3] == PER) break;
    end
    repeat (3) @(negedge clk);
    chk(no_port && !s_hsel, "NoPort when all masters are done");
    $display("switches=%0d seq_to_nonseq=%0d", n_switch, n_conv);
    chk(n_switch > 100 && n_conv > 50, "round robin switched owners and converted SEQ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

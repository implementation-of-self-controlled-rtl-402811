// tb_sm_controller: random stimulus against a reference model of the
// arbitration rules. The testbench plays the Master_no register (loaded when
// master_en is high) and offers a random candidate on sel_master. Each cycle
// it checks equal-priority detection and the MUX select, the decision
// (next_master, master_en) and, after the edge, the counter and NoPort.
// It also counts how often each rule fired and fails if one never did.
module tb_sm_controller;
  import ahb_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 1;
  logic [N-1:0] req;
  logic [N-1:0][2:0] lvl;
  logic [N-1:0][4:0] tc;
  logic hready, hsel, lockin;
  htrans_t htrans;
  logic [1:0] cur, sel, nm;
  logic equ, usep, men, np;
  logic [4:0] count;
  int checks = 0, failures = 0;
  int n_lock = 0, n_idle = 0, n_new = 0, n_keep_exp = 0, n_switch = 0, n_keep = 0, n_wait = 0;

  // reference state
  logic       r_np;
  logic [4:0] r_cnt;

  sm_controller #(.N_M(N)) dut (
    .clk(clk), .rst_n(rst_n), .req(req), .p_level(lvl), .t_count(tc),
    .hready(hready), .hsel(hsel), .htrans(htrans), .hmastlock(lockin), .cur(cur),
    .equ_priority(equ), .use_priority(usep), .sel_master(sel),
    .next_master(nm), .master_en(men), .no_port(np), .count(count)
  );

  assign hsel = !np && req[cur];

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  initial begin
    logic       e_en, e_np, r_equ;
    logic [1:0] e_nm;
    logic [4:0] e_cnt, after;
    req = '0; lvl = '0; tc = '0; hready = 1; lockin = 0; htrans = TR_IDLE; cur = 0; sel = 0;
    #2 rst_n = 0;
    #2 rst_n = 1;
    r_np = 1; r_cnt = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      req    = 4'($urandom);
      if ($urandom_range(0, 9) == 0) req = '0;
      if ($urandom_range(0, 2) != 0) req[cur] = 1'b1;   // keep owners busy
      for (int m = 0; m < N; m++) begin
        lvl[m] = 3'($urandom_range(0, (i % 3 == 0) ? 0 : 2));
        tc[m]  = 5'($urandom_range(1, 4));
      end
      hready = ($urandom_range(0, 4) != 0);
      #1;
      lockin = ($urandom_range(0, 7) == 0) && hsel;
      htrans = hsel ? TR_NONSEQ : TR_IDLE;
      sel    = 2'($urandom);
      #1;
      // reference: equal priority over requesters
      r_equ = 1;
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++)
          if (req[a] && req[b] && lvl[a] != lvl[b]) r_equ = 0;
      chk(equ == r_equ && usep == !r_equ, "equal priority");
      // reference decision
      e_en = 0; e_nm = cur; e_np = r_np; e_cnt = r_cnt;
      after = (hsel && r_cnt != 0) ? r_cnt - 1 : r_cnt;
      if (!hready) begin
        n_wait++;
      end else if (lockin) begin
        n_lock++; e_np = 0; e_cnt = after;
      end else if (r_np || !req[cur]) begin
        if (req == 0) begin n_idle++; e_np = 1; end
        else begin n_new++; e_en = 1; e_nm = sel; e_cnt = tc[sel]; e_np = 0; end
      end else if (after == 0) begin
        e_np = 0;
        if ((req & ~(4'(1) << cur)) == 0) begin n_keep_exp++; e_cnt = tc[cur]; end
        else begin n_switch++; e_en = 1; e_nm = sel; e_cnt = tc[sel]; end
      end else begin
        n_keep++; e_cnt = after;
      end
      chk(men == e_en, "master_en");
      if (e_en) chk(nm == e_nm, "next_master");
      @(posedge clk);
      if (e_en) cur <= e_nm;
      r_np = e_np; r_cnt = e_cnt;
      #1;
      chk(np == r_np, "NoPort");
      chk(count == r_cnt, $sformatf("counter %0d exp %0d np=%0d", count, r_cnt, np));
    end
    $display("rules: lock=%0d noport=%0d new=%0d keep_expired=%0d switch=%0d keep=%0d wait=%0d",
             n_lock, n_idle, n_new, n_keep_exp, n_switch, n_keep, n_wait);
    chk(n_lock > 0 && n_idle > 0 && n_new > 0 && n_keep_exp > 0 && n_switch > 0 && n_keep > 0 && n_wait > 0,
        "every rule exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sm_arbiter: the arbiter of one slave port, driven the way its output
// stage drives it (HSEL is high when the owner requests and NoPort is low;
// every selected transfer is NONSEQ). Each scenario lists the owner of every
// accepted transfer and compares it with a sequence worked out by hand from
// the arbitration rules:
//   RT  equal levels, one transfer each           -> 1 2 0 1 2 0
//   FT  fixed levels, M1 highest                  -> 1 1 1 1, then M2, M0
//   RR  equal levels, four transfers each         -> 1x4 2x4 0x4
//   DL  desired lengths 3 (M2) and 2 (M1)         -> 2 2 2 1 1 2 2
//   lock M0 keeps the slave while locked          -> 0 0 0 then 0 1
//   wait states hold the owner and the counter
//   no request asserts NoPort
module tb_sm_arbiter;
  import ahb_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 1;
  logic [N-1:0] req = '0;
  logic [N-1:0][2:0] lvl = '0;
  logic [N-1:0][4:0] tc = '{default: 5'd1};
  logic hready = 1, lock = 0;
  logic hsel;
  htrans_t htrans;
  logic [21:0] haddr;
  logic [1:0] mno;
  logic [21:0] add_out;
  logic no_port, equ;
  logic [4:0] count;
  int checks = 0, failures = 0;
  int got[$];

  sm_arbiter #(.N_M(N)) dut (
    .clk(clk), .rst_n(rst_n), .req(req), .p_level(lvl), .t_count(tc),
    .hready(hready), .hsel(hsel), .htrans(htrans), .hmastlock(lock && hsel),
    .haddr(haddr), .master_no(mno), .add_out(add_out), .no_port(no_port),
    .equ_priority(equ), .count(count)
  );

  assign hsel   = !no_port && req[mno];
  assign htrans = hsel ? TR_NONSEQ : TR_IDLE;
  assign haddr  = {20'h0, mno};

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Record the owner of every accepted transfer and check Add_out follows it.
  always @(posedge clk) begin
    if (rst_n && hready && hsel) begin
      got.push_back(int'(mno));
      #1;
      checks++;
      if (add_out !== {20'h0, got[$]}) begin
        failures++;
        $display("FAIL Add_out %h after owner %0d", add_out, got[$]);
      end
    end
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic expect_seq(string name, int exp[]);
    string s = "";
    logic ok = (got.size() >= exp.size());
    for (int i = 0; i < exp.size() && ok; i++) if (got[i] != exp[i]) ok = 0;
    foreach (got[i]) s = {s, $sformatf("%0d ", got[i])};
    chk(ok, {name, " sequence, got ", s});
  endtask

  task automatic run(int cycles);
    got.delete();
    repeat (cycles) @(negedge clk);
  endtask

  task automatic idle();
    req = '0;
    repeat (3) @(negedge clk);
    chk(no_port, "NoPort with no request");
  endtask

  initial begin
    #2 rst_n = 0;
    #2 rst_n = 1;
    @(negedge clk);
    chk(no_port, "NoPort after reset");

    // RT: round robin, transfer based
    req = 4'b0111; lvl = '{default: 3'd2}; tc = '{default: 5'd1};
    run(7);
    chk(equ, "equal priority seen");
    expect_seq("RT", '{1, 2, 0, 1, 2, 0});
    idle();

    // FT: fixed priority, transfer based
    req = 4'b0111; lvl = '{3'd3, 3'd1, 3'd0, 3'd2}; tc = '{default: 5'd1}; // M3..M0
    run(5);
    chk(!equ, "unequal priority seen");
    expect_seq("FT", '{1, 1, 1, 1});
    req = 4'b0101;
    run(3);
    expect_seq("FT after M1 leaves", '{2, 2});
    req = 4'b0001;
    run(3);
    expect_seq("FT last", '{0, 0});
    idle();

    // RR: round robin, transaction based (four-beat bursts)
    req = 4'b0111; lvl = '{default: 3'd0}; tc = '{default: 5'd4};
    run(13);
    expect_seq("RR", '{1, 1, 1, 1, 2, 2, 2, 2, 0, 0, 0, 0});
    idle();

    // DL: desired transfer lengths, round robin between M1 (2) and M2 (3)
    req = 4'b0110; lvl = '{default: 3'd5}; tc = '{5'd1, 5'd3, 5'd2, 5'd1};  // M3..M0
    run(8);
    expect_seq("DL", '{2, 2, 2, 1, 1, 2, 2});
    idle();

    // Lock: M0 alone first, then the others join while it is locked
    req = 4'b0001; lvl = '{default: 3'd0}; tc = '{default: 5'd1}; lock = 1;
    run(2);
    req = 4'b0111;
    run(3);
    expect_seq("lock", '{0, 0, 0});
    lock = 0;
    run(3);
    expect_seq("after unlock", '{0, 1});
    idle();

    // Wait states: with HREADY low nothing moves
    req = 4'b0011; tc = '{default: 5'd1};
    run(2);
    hready = 0;
    begin
      logic [1:0] m0;
      logic [4:0] c0;
      m0 = mno;
      c0 = count;
      repeat (4) @(negedge clk);
      chk(mno == m0 && count == c0, $sformatf("owner and counter hold during wait states %0d/%0d %0d/%0d", mno, m0, count, c0));
    end
    hready = 1;
    idle();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

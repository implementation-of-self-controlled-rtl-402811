// tb_rr_block: round-robin selection with eight masters. First the worked
// example of the design (current master 5, requests from 5, 3 and 2: the up
// vector is empty and master 2 wins), then random request vectors against a
// reference that searches circularly from the master after the current one.
module tb_rr_block;
  localparam int N = 8;
  logic [N-1:0] req, up_masked, dn_masked;
  logic [2:0] cur, nm;
  logic found;
  int checks = 0, failures = 0;

  rr_block #(.N_M(N)) dut (.req(req), .cur(cur), .up_masked(up_masked),
                           .dn_masked(dn_masked), .next_master(nm), .found(found));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_rr(logic [N-1:0] r, int c);
    for (int k = 1; k <= N; k++)
      if (r[(c + k) % N]) return (c + k) % N;
    return -1;
  endfunction

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: req=%b cur=%0d nm=%0d", what, req, cur, nm);
    end
  endtask

  initial begin
    req = 8'b0010_1100; cur = 3'd5;
    #1;
    chk(up_masked == 8'b0000_0000, "example up masked vector");
    chk(dn_masked == 8'b0010_1100, "example down masked vector");
    chk(nm == 3'd2 && found, "example next master M2");
    for (int i = 0; i < 2000; i++) begin
      req = 8'($urandom);
      if (i % 7 == 0) req = '0;
      cur = 3'($urandom);
      #1;
      chk(found == (req != 0), "found");
      if (req != 0) chk(int'(nm) == ref_rr(req, int'(cur)), "circular order");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

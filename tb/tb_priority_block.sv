// tb_priority_block: priority selection with eight masters. First the worked
// example of the design (levels 3,7,2,6,1,5,0,4 for masters 0..7: master 6
// holds level 0 and wins), then random levels and requests against a
// reference that takes the smallest level and, on a tie, the lowest master.
module tb_priority_block;
  import ahb_pkg::*;
  localparam int N = 8;
  logic [N-1:0] req;
  logic [N-1:0][2:0] lvl;
  logic [7:0] top;
  logic [2:0] nm;
  logic found;
  int checks = 0, failures = 0;

  priority_block #(.N_M(N)) dut (.req(req), .p_level(lvl), .top_level(top),
                                 .next_master(nm), .found(found));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_pr();
    int best = -1;
    for (int m = 0; m < N; m++)
      if (req[m] && (best < 0 || lvl[m] < lvl[best])) best = m;
    return best;
  endfunction

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: req=%b nm=%0d", what, req, nm);
    end
  endtask

  initial begin
    req = '1;
    lvl = {3'd4, 3'd0, 3'd5, 3'd1, 3'd6, 3'd2, 3'd7, 3'd3};  // M7..M0
    #1;
    chk(top == 8'b0000_0001, "example highest priority vector");
    chk(nm == 3'd6 && found, "example highest priority master M6");
    for (int i = 0; i < 2000; i++) begin
      req = 8'($urandom);
      for (int m = 0; m < N; m++) lvl[m] = 3'($urandom_range(0, (i % 2) ? 7 : 2));
      #1;
      chk(found == (req != 0), "found");
      if (req != 0) chk(int'(nm) == ref_pr(), "highest priority");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

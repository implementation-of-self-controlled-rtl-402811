// tb_dff_en: checks the enabled D flip-flop against a reference register
// under random data, enable and an asynchronous reset in the middle.
module tb_dff_en;
  localparam int W = 8;
  logic clk = 0, rst_n = 1, en = 0;
  logic [W-1:0] d = '0, q, ref_q;
  int checks = 0, failures = 0;

  dff_en #(.WIDTH(W), .RESET_VAL(8'h5A)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== ref_q) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, ref_q);
    end
  endtask

  initial begin
    ref_q = 8'h5A;
    #1 rst_n = 0;
    #1 check("reset value");
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      en = 1'($urandom_range(0, 1));
      d  = 8'($urandom);
      @(posedge clk);
      if (en) ref_q = d;
      #1 check("load/hold");
      if (i == 100) begin
        #2 rst_n = 0;
        ref_q = 8'h5A;
        #1 check("async reset");
        @(negedge clk) rst_n = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bus_mux: drives random inputs and every select value, including ones
// past the last input, and compares with a directly indexed reference.
module tb_bus_mux;
  localparam int N = 5, W = 12;
  logic [N-1:0][W-1:0] din;
  logic [2:0] sel;
  logic [W-1:0] dout, expv;
  int checks = 0, failures = 0;

  bus_mux #(.N(N), .WIDTH(W)) dut (.din(din), .sel(sel), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      for (int k = 0; k < N; k++) din[k] = W'($urandom);
      sel = 3'(i % 8);
      #1;
      expv = (int'(sel) < N) ? din[sel] : '0;
      checks++;
      if (dout !== expv) begin
        failures++;
        $display("FAIL sel=%0d dout=%h expected %h", sel, dout, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

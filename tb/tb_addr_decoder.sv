// tb_addr_decoder: random 32-bit addresses are split and compared with
// fields extracted by shifts and masks; the one-hot slave select and the
// valid flag are checked for every slave number, mapped or not.
module tb_addr_decoder;
  import ahb_pkg::*;
  localparam int NS = 4;
  logic [31:0] haddr;
  logic valid;
  addr_fields_t f;
  logic [NS-1:0] hsel;
  logic dv;
  logic [1:0] slave;
  int checks = 0, failures = 0;

  addr_decoder #(.N_S(NS)) dut (.haddr(haddr), .valid(valid), .fields(f), .hsel(hsel),
                                .dec_valid(dv), .slave(slave));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: haddr=%h", what, haddr);
    end
  endtask

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int sn;
      haddr = $urandom;
      valid = 1'($urandom_range(0, 3) != 0);
      #1;
      sn = int'(haddr >> 29);
      chk(int'(f.s_number) == sn, "s_number");
      chk(int'(f.p_level) == int'((haddr >> 26) & 7), "p_level");
      chk(int'(f.t_length) == int'((haddr >> 22) & 15), "t_length");
      chk(f.offset_add == haddr[21:0], "offset_add");
      chk(dv == (sn < NS), "dec_valid");
      chk(hsel == ((valid && sn < NS) ? 4'(1 << sn) : 4'b0), "hsel");
      if (sn < NS) chk(int'(slave) == sn, "slave");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

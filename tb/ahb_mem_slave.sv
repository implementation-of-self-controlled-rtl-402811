// ahb_mem_slave: behavioural AHB memory slave for the testbenches.
//
// Word-addressed memory of 2**AW words indexed by HADDR[AW+1:2]. An accepted
// address phase (HSEL, HREADY, NONSEQ or SEQ) is followed by a data phase of
// 0..MAX_WAIT wait states, chosen at random; writes store HWDATA at the end
// of the data phase, reads drive HRDATA on its last cycle. HRESP is always
// OKAY. The slave also counts protocol errors it can see: a SEQ transfer that
// does not come from the master of the previous transfer, and a locked
// sequence interrupted by another master (a lock ends at the first cycle
// without a transfer).
module ahb_mem_slave #(
  parameter int AW       = 12,
  parameter int MAX_WAIT = 2,
  parameter int IDX_W    = 2
) (
  input  logic             hclk,
  input  logic             hresetn,
  input  logic             hsel,
  input  logic [21:0]      haddr,
  input  logic [1:0]       htrans,
  input  logic             hwrite,
  input  logic             hmastlock,
  input  logic [IDX_W-1:0] hmaster,
  input  logic [31:0]      hwdata,
  input  logic             hready,
  output logic [31:0]      hrdata,
  output logic             hreadyout,
  output logic             hresp,
  output int               n_xfer,
  output int               n_proto_err
);

  logic [31:0]      mem [2**AW];
  logic             d_act, d_write;
  logic [AW-1:0]    d_idx;
  int               wait_left;
  logic [IDX_W-1:0] prev_master;
  logic             prev_valid, prev_lock;

  initial for (int i = 0; i < 2**AW; i++) mem[i] = 32'hDEAD_0000 | 32'(i);

  assign hresp     = 1'b0;
  assign hreadyout = !d_act || wait_left == 0;
  assign hrdata    = (d_act && !d_write) ? mem[d_idx] : 32'h0;

  always @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      d_act <= 0; d_write <= 0; d_idx <= '0; wait_left <= 0;
      prev_valid <= 0; prev_lock <= 0; prev_master <= '0;
      n_xfer <= 0; n_proto_err <= 0;
    end else begin
      if (d_act && wait_left > 0) begin
        wait_left <= wait_left - 1;
      end else begin
        if (d_act && d_write) mem[d_idx] <= hwdata;
        if (hsel && hready && htrans[1]) begin
          if (htrans == 2'b11 && !(prev_valid && prev_master == hmaster)) n_proto_err <= n_proto_err + 1;
          if (prev_lock && prev_master != hmaster) n_proto_err <= n_proto_err + 1;
          d_act       <= 1;
          d_write     <= hwrite;
          d_idx       <= haddr[AW+1:2];
          wait_left   <= $urandom_range(0, MAX_WAIT);
          prev_valid  <= 1;
          prev_master <= hmaster;
          prev_lock   <= hmastlock;
          n_xfer      <= n_xfer + 1;
        end else begin
          d_act <= 0;
          if (hready) prev_lock <= 0;
        end
      end
    end
  end

endmodule

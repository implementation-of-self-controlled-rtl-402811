// addr_decoder: the serial-to-parallel converter of one master port.
//
// Splits the 32-bit address into its four fields (slave number, priority
// level, transfer length, offset) and decodes the slave number into a one-hot
// select, one bit per slave port. A slave number with no port behind it
// (N_S or above) raises no select and clears dec_valid, so the input stage
// can answer the transfer itself. Purely combinational.
// The four fields and their widths (3, 3, 4, 22 bits) follow the original
// scheme; their order in the word and the unmapped-number rule are choices
// made here.
module addr_decoder
  import ahb_pkg::*;
#(
  parameter int unsigned N_S = 4,
  localparam int unsigned SIDX_W = (N_S > 1) ? $clog2(N_S) : 1
) (
  input  logic [ADDR_W-1:0] haddr,
  input  logic              valid,      // a transfer is offered
  output addr_fields_t      fields,
  output logic [N_S-1:0]    hsel,
  output logic              dec_valid,
  output logic [SIDX_W-1:0] slave
);

  always_comb begin
    fields    = addr_fields_t'(haddr);
    dec_valid = 32'(fields.s_number) < N_S;
    slave     = SIDX_W'(fields.s_number);
    hsel      = '0;
    for (int unsigned s = 0; s < N_S; s++)
      hsel[s] = valid && 32'(fields.s_number) == s;
  end

endmodule

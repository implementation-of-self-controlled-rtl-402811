// bus_mux: N-to-1 multiplexer with a binary select.
//
// Used inside the arbiter to choose between the round-robin and the priority
// candidate, and inside each output stage to route the owning master's
// address phase and write data to the slave. Purely combinational; a select
// value of N or above gives zero. The arbitration scheme only calls for a
// multiplexer; the binary select and the zero default are choices made here.
module bus_mux #(
  parameter int unsigned N     = 2,
  parameter int unsigned WIDTH = 1,
  localparam int unsigned SEL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][WIDTH-1:0] din,
  input  logic [SEL_W-1:0]        sel,
  output logic [WIDTH-1:0]        dout
);

  always_comb begin
    dout = '0;
    for (int unsigned i = 0; i < N; i++)
      if (sel == SEL_W'(i)) dout = din[i];
  end

endmodule

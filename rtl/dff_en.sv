// dff_en: D flip-flop with load enable.
//
// The arbiter keeps its two outputs, the selected master number and the
// data-phase address, in registers of this kind: q takes d on a rising clock
// edge while en is high and holds otherwise. An active-low asynchronous reset
// clears q to RESET_VAL (the reset value is this implementation's choice).
module dff_en #(
  parameter int unsigned        WIDTH     = 1,
  parameter logic [WIDTH-1:0]   RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= RESET_VAL;
    else if (en) q <= d;
  end

endmodule

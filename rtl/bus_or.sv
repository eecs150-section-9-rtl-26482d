// bus_or: a shared bus with output enables, built as an AND-OR structure.
//
// Each of N drivers puts its value on the bus when its enable is asserted.
// A tri-state bus lets at most one driver be enabled at a time; this
// version gates every driver with its enable and ORs the results, which
// gives the same value whenever that rule holds and reads 0 when no driver
// is enabled. An assertion checks the rule each clock. Combinational apart
// from the check. The notes use tri-state drivers; the AND-OR form is this
// design's, so that the bus works in two-state simulation and synthesis.
module bus_or #(
  parameter int unsigned N = 2,
  parameter int unsigned W = 16
) (
  input  logic                 clk,
  input  logic [N-1:0]         en,
  input  logic [N-1:0][W-1:0]  drv,
  output logic [W-1:0]         bus
);

  always_comb begin
    bus = '0;
    for (int i = 0; i < N; i++)
      if (en[i]) bus = bus | drv[i];
  end

  // At most one driver on the bus at a time.
  a_one_driver: assert property (@(posedge clk) $onehot0(en))
    else $error("bus_or: %0d drivers enabled at once", $countones(en));

endmodule

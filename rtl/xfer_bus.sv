// xfer_bus: four registers on one common bus with output enables (the
// third of the notes' three ways of moving data between registers).
//
// Each register (reg_ld_oe) puts its value on the bus while its output
// enable oe[i] is asserted and takes the bus value at the rising clk edge
// while its load enable ld[i] is asserted. An external driver (ext_d,
// enabled by ext_oe, this design's addition) lets values onto the bus. At
// most one driver may be enabled at a time; bus_or checks that rule. Only
// one transfer per cycle is possible, but the wiring is one shared bus.
module xfer_bus #(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic [W-1:0]        ext_d,
  input  logic                ext_oe,
  input  logic [3:0]          oe,
  input  logic [3:0]          ld,
  output logic [W-1:0]        bus,
  output logic [3:0][W-1:0]   q
);

  logic [3:0][W-1:0] qdrv;

  for (genvar i = 0; i < 4; i++) begin : g_reg
    reg_ld_oe #(.W(W)) u_r (
      .CLK(clk), .LD(ld[i]), .OE(oe[i]), .D(bus), .Q(qdrv[i]), .Qint(q[i])
    );
  end

  bus_or #(.N(5), .W(W)) u_bus (
    .clk, .en({ext_oe, oe}), .drv({ext_d, qdrv}), .bus
  );

endmodule

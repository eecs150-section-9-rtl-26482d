// xfer_p2p: four registers joined point to point, each with its own
// multiplexer on its input (the first of the notes' three ways of moving
// data between registers).
//
// Every register's input mux chooses among the outputs of all four
// registers, so in one clock edge each register can take the value of any
// register, and several transfers (even a swap) happen at once. sel[i]
// picks register i's source: 0..3 a register, 4 the external input ext_d;
// register i loads at the rising clk edge when ld[i] is asserted. The
// external input is this design's addition, so the registers can be given
// values; the four registers and the per-register muxes are the notes'.
module xfer_p2p #(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic [W-1:0]        ext_d,
  input  logic [3:0]          ld,
  input  logic [3:0][2:0]     sel,
  output logic [3:0][W-1:0]   q
);

  for (genvar i = 0; i < 4; i++) begin : g_reg
    logic [W-1:0] d;
    always_comb begin
      case (sel[i])
        3'd0:    d = q[0];
        3'd1:    d = q[1];
        3'd2:    d = q[2];
        3'd3:    d = q[3];
        default: d = ext_d;
      endcase
    end
    always_ff @(posedge clk)
      if (ld[i]) q[i] <= d;
  end

endmodule

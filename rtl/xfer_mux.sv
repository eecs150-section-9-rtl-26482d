// xfer_mux: four registers fed from one common multiplexer (the second of
// the notes' three ways of moving data between registers).
//
// A single mux picks one source, a register output (sel = 0..3) or the
// external input ext_d (sel = 4 and above), and drives the common line
// that reaches every register's input; each register has a load enable,
// so one value can be copied into any set of registers per clock edge but
// only one source is read at a time. The external input is this design's
// addition; the common mux and the load enables are the notes'.
module xfer_mux #(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic [W-1:0]        ext_d,
  input  logic [3:0]          ld,
  input  logic [2:0]          sel,
  output logic [W-1:0]        common,
  output logic [3:0][W-1:0]   q
);

  always_comb begin
    case (sel)
      3'd0:    common = q[0];
      3'd1:    common = q[1];
      3'd2:    common = q[2];
      3'd3:    common = q[3];
      default: common = ext_d;
    endcase
  end

  always_ff @(posedge clk)
    for (int i = 0; i < 4; i++)
      if (ld[i]) q[i] <= common;

endmodule

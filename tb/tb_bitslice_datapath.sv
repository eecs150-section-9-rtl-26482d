// tb_bitslice_datapath: a 2-slice and the carry chain across slices;
// loads from memory and from AC, the four ALU operations, carry out.
module tb_bitslice_datapath;
  `include "tb_common.svh"
  localparam int N = 2;
  logic [N-1:0] mem, ac, r0, rs, rt, rd;
  logic fac, acld, ci, co;
  logic [3:0] ld;
  logic [2:0] as, bs;
  logic [1:0] aop;
  logic [N-1:0] m_ac;
  logic [N-1:0] m_r [4];
  bitslice_datapath #(.N(N)) dut (.clk, .mem, .from_ac(fac), .ld, .ac_ld(acld), .a_sel(as), .b_sel(bs),
                                  .alu_op(aop), .CI(ci), .CO(co), .ac, .r0, .rs, .rt, .rd);
  function automatic logic [N-1:0] pick(input logic [2:0] s);
    return s == 0 ? m_ac : m_r[s-1];
  endfunction
  initial begin
    // clear the registers from memory, then AC <- R0 (pass A)
    fac = 0; acld = 0; as = 3'd1; bs = 3'd1; aop = 2'd3; ci = 0; ld = 4'hf; mem = '0;
    for (int k = 0; k < 4; k++) m_r[k] = '0;
    @(negedge clk); ld = 4'h0; acld = 1; m_ac = '0;
    for (int i = 0; i < 400; i++) begin
      logic [N-1:0] x, y, res;
      logic [N:0] sum;
      logic exp_co;
      @(negedge clk);
      mem = N'($urandom); fac = 1'($urandom); ld = 4'($urandom); acld = 1'($urandom);
      as = 3'($urandom_range(0, 4)); bs = 3'($urandom_range(0, 4)); aop = 2'($urandom); ci = 1'($urandom);
      x = pick(as); y = pick(bs);
      sum = {1'b0, x} + {1'b0, y} + (N+1)'(ci);
      case (aop)
        2'd0: res = sum[N-1:0];
        2'd1: res = x & y;
        2'd2: res = x | y;
        default: res = x;
      endcase
      exp_co = (aop == 0) ? sum[N] : 1'b0;
      #1; chk(co == exp_co, $sformatf("CO %b want %b", co, exp_co));
      for (int k = 0; k < 4; k++) if (ld[k]) m_r[k] = fac ? m_ac : mem;
      if (acld) m_ac = res;
      @(posedge clk); #1;
      chk(ac == m_ac && r0 == m_r[0] && rs == m_r[1] && rt == m_r[2] && rd == m_r[3],
          $sformatf("state ac=%b want %b", ac, m_ac));
    end
    `TB_FINISH
  end
endmodule

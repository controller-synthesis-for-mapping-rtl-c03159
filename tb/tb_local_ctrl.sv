// tb_local_ctrl: exhaustive check of the local controllers of all four PE
// types. For every counter value the expected selects are worked out from
// the case order of the a and b recurrences (own register / neighbour /
// long delay line / memory); acc and c_out are checked too.
`timescale 1ns/1ps
module tb_local_ctrl;
  import mm_pkg::*;
  ctrl_t ctl;
  sel_e  sa [4], sb [4];
  logic  acc [4], cout [4];

  for (genvar p = 0; p < 4; p++) begin : g_dut
    local_ctrl #(.P1(p / 2), .P2(p % 2)) dut (
      .ctl, .sel_a(sa[p]), .sel_b(sb[p]), .acc(acc[p]), .c_out(cout[p]));
  end

  function automatic sel_e expect_sel(int jj, int pp, int ll);
    if (jj > 0)            return SEL_SELF;
    else if (jj + pp > 0)  return SEL_NEIGH;
    else if (ll > 0)       return SEL_FIFO;
    else                   return SEL_MEM;
  endfunction

  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << $bits(idx_t)); v++) begin
      for (int e = 0; e < 2; e++) begin
        ctl.en        = e[0];
        ctl.idx       = idx_t'(v);
        ctl.g.j2_pos  = ctl.idx.j2 != 0;
        ctl.g.j1_pos  = ctl.idx.j1 != 0;
        ctl.g.l3_pos  = ctl.idx.l3 != 0;
        ctl.g.l3_last = int'(ctl.idx.l3) == int'(N) - 1;
        #1;
        for (int p = 0; p < 4; p++) begin
          sel_e ea, eb;
          ea = expect_sel(int'(ctl.idx.j2), p % 2, int'(ctl.idx.l2));
          eb = expect_sel(int'(ctl.idx.j1), p / 2, int'(ctl.idx.l1));
          checks++;
          if (sa[p] != ea || sb[p] != eb || acc[p] != (ctl.idx.l3 != 0) ||
              cout[p] != (ctl.en && int'(ctl.idx.l3) == int'(N) - 1)) begin
            failures++;
            $display("FAIL: PE type %0d idx=%p sel_a=%s/%s sel_b=%s/%s", p, ctl.idx,
                     sa[p].name(), ea.name(), sb[p].name(), eb.name());
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

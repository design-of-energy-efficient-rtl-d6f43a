// tb_uvst: random pushes and pops of slot numbers on the VC rows, compared with
// one queue per VC; random writes of the control fields compared with a copy.
module tb_uvst;
  import noc_pkg::*;
  localparam int NVC = NUM_VC, D = VC_CREDITS;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [1:0] push_vc, pop_vc;
  logic [3:0] push_slot;
  logic [3:0] head_slot [NVC];
  logic [2:0] cnt [NVC];
  logic [NVC-1:0] wr_en;
  vc_entry_t wr_entry [NVC], entry [NVC];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  uvst dut (.clk, .rst_n, .push, .push_vc, .push_slot, .pop, .pop_vc, .head_slot, .cnt,
            .wr_en, .wr_entry, .entry);

  int q [NVC][$];
  vc_entry_t m [NVC];
  initial begin
    wr_en = '0;
    for (int v = 0; v < NVC; v++) begin wr_entry[v] = '0; m[v] = '{state: VS_IDLE, bypass: 0, op: 0, ovc: 0}; end
    #12 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int v = 0; v < NVC; v++) begin
        checks += 2;
        if (int'(cnt[v]) != q[v].size() || (q[v].size() > 0 && int'(head_slot[v]) != q[v][0])) begin
          failures++; $display("FAIL vc %0d list", v);
        end
        if (entry[v] != m[v]) begin failures++; $display("FAIL vc %0d entry", v); end
      end
      pop = 0; push = 0;
      pop_vc = 2'($urandom_range(NVC - 1));
      if (q[pop_vc].size() > 0 && $urandom_range(1)) pop = 1;
      push_vc = 2'($urandom_range(NVC - 1));
      push_slot = 4'($urandom_range(11));
      if (q[push_vc].size() < D && $urandom_range(1)) push = 1;
      for (int v = 0; v < NVC; v++) begin
        wr_en[v] = ($urandom_range(3) == 0);
        wr_entry[v] = '{state: vc_state_e'($urandom_range(3)), bypass: 1'($urandom),
                        op: 3'($urandom_range(4)), ovc: 2'($urandom)};
      end
      @(posedge clk);
      if (pop) void'(q[pop_vc].pop_front());
      if (push) q[push_vc].push_back(int'(push_slot));
      for (int v = 0; v < NVC; v++) if (wr_en[v]) m[v] = wr_entry[v];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_vc_allocator: random requests and free-VC masks. Checks: at most one grant,
// only to a requester, none without a free VC, lookahead requests before
// buffered ones, the lowest free VC is given, and round-robin rotation among
// requesters of one group.
module tb_vc_allocator;
  import noc_pkg::*;
  localparam int NP = NUM_PORTS;
  logic clk = 0, rst_n = 0;
  logic [2*NP-1:0] req, gnt;
  logic [NUM_VC-1:0] ovc_free;
  logic [1:0] gnt_vc;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  vc_allocator dut (.clk, .rst_n, .req, .ovc_free, .gnt, .gnt_vc);

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, m); end
  endtask

  initial begin
    req = '0; ovc_free = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int low;
      @(negedge clk);
      req = 10'($urandom); ovc_free = 4'($urandom);
      #1;
      low = -1;
      for (int v = NUM_VC - 1; v >= 0; v--) if (ovc_free[v]) low = v;
      chk($onehot0(gnt), "one grant");
      chk((gnt & ~req) == '0, "grant without request");
      chk((|gnt) == ((|req) && (|ovc_free)), "grant iff request and free VC");
      if (|req[NP-1:0]) chk((gnt[2*NP-1:NP] == '0), "lookahead priority");
      if (|gnt) chk(int'(gnt_vc) == low, "lowest free VC");
    end
    // fairness: all lookahead requests stay on, each must be served within NP cycles
    @(negedge clk);
    req = {{NP{1'b0}}, {NP{1'b1}}}; ovc_free = '1;
    begin
      bit seen [NP];
      for (int c = 0; c < NP; c++) begin
        @(negedge clk);
        for (int k = 0; k < NP; k++) if (gnt[k]) seen[k] = 1;
      end
      for (int k = 0; k < NP; k++) chk(seen[k], $sformatf("requester %0d starved", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_switch_allocator: random requests. Checks: one grant at most, to a
// requester, none while the output is not ready, bypass requests win over
// buffered ones, sel matches the grant, and round-robin service.
module tb_switch_allocator;
  import noc_pkg::*;
  localparam int NP = NUM_PORTS;
  logic clk = 0, rst_n = 0, out_ready, valid;
  logic [2*NP-1:0] req, gnt;
  logic [3:0] sel;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  switch_allocator dut (.clk, .rst_n, .req, .out_ready, .gnt, .sel, .valid);

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, m); end
  endtask

  initial begin
    req = '0; out_ready = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      req = 10'($urandom); out_ready = ($urandom_range(3) != 0);
      #1;
      chk($onehot0(gnt), "one grant");
      chk((gnt & ~req) == '0, "grant without request");
      chk((|gnt) == ((|req) && out_ready), "grant iff request and ready");
      if (|req[NP-1:0]) chk(gnt[2*NP-1:NP] == '0, "bypass priority");
      if (|gnt) chk(gnt[sel] && valid, "sel matches grant");
    end
    @(negedge clk);
    req = {{NP{1'b1}}, {NP{1'b0}}}; out_ready = 1;
    begin
      bit seen [NP];
      for (int c = 0; c < NP; c++) begin
        @(negedge clk);
        for (int k = 0; k < NP; k++) if (gnt[NP + k]) seen[k] = 1;
      end
      for (int k = 0; k < NP; k++) chk(seen[k], $sformatf("buffer input %0d starved", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_output_port: random allocation, sends and credit returns against a model
// of the credit counters and VC ownership. Checks ovc_free, credit_ok,
// credit_ok_next, the output register (flit appears one cycle after the send),
// the lookahead (same cycle as the send) and out_ready.
module tb_output_port;
  import noc_pkg::*;
  localparam int NVC = NUM_VC, CR = VC_CREDITS;
  logic clk = 0, rst_n = 0, alloc_en = 0, send_en = 0, stop_i = 0, out_ready, out_valid;
  logic [1:0] alloc_vc;
  logic [NVC-1:0] ovc_free, credit_ok, credit_ok_next, credit_in;
  flit_t send_flit, out_flit;
  la_t la_o;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  output_port dut (.clk, .rst_n, .alloc_en, .alloc_vc, .ovc_free, .send_en, .send_flit,
                   .out_ready, .credit_ok, .credit_ok_next, .stop_i, .credit_in,
                   .out_valid, .out_flit, .la_o);

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, m); end
  endtask

  int cr [NVC], outstanding [NVC];
  bit busy [NVC];
  bit    prev_send;
  flit_t prev_flit;
  initial begin
    credit_in = '0; send_flit = '0;
    for (int v = 0; v < NVC; v++) begin cr[v] = CR; busy[v] = 0; outstanding[v] = 0; end
    #12 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int sv;
      @(negedge clk);
      // outputs against the model
      for (int v = 0; v < NVC; v++) begin
        chk(ovc_free[v] == (!busy[v] && cr[v] == CR), "ovc_free");
        chk(credit_ok[v] == (cr[v] > 0), "credit_ok");
      end
      chk(out_valid == prev_send && (!prev_send || out_flit == prev_flit), "output register");
      // stimulus
      stop_i = ($urandom_range(4) == 0);
      alloc_en = 0; send_en = 0;
      for (int v = 0; v < NVC; v++) if (ovc_free[v] && $urandom_range(3) == 0) begin alloc_en = 1; alloc_vc = 2'(v); end
      sv = $urandom_range(NVC - 1);
      if (!stop_i && busy[sv] && cr[sv] > 0 && $urandom_range(1)) begin
        send_en = 1;
        send_flit = {$urandom, $urandom, $urandom, $urandom};
        send_flit.vcid = 2'(sv);
        send_flit.tail = ($urandom_range(3) == 0);
        send_flit.head = 0;
      end
      for (int v = 0; v < NVC; v++) credit_in[v] = (outstanding[v] > 0) && $urandom_range(1);
      #1;
      chk(out_ready == !stop_i, "out_ready");
      chk(la_o.valid == send_en && (!send_en || (la_o.vcid == send_flit.vcid &&
          la_o.dest == send_flit.dest && la_o.tail == send_flit.tail)), "lookahead");
      for (int v = 0; v < NVC; v++) begin
        int n;
        n = cr[v] - int'(send_en && send_flit.vcid == 2'(v)) + int'(credit_in[v]);
        chk(credit_ok_next[v] == (n > 0), "credit_ok_next");
      end
      @(posedge clk);
      prev_send = send_en; prev_flit = send_flit;
      for (int v = 0; v < NVC; v++) begin
        if (credit_in[v]) begin cr[v]++; outstanding[v]--; end
      end
      if (send_en) begin
        cr[send_flit.vcid]--; outstanding[send_flit.vcid]++;
        if (send_flit.tail) busy[send_flit.vcid] = 0;
      end
      if (alloc_en) busy[alloc_vc] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

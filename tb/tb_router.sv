// tb_router: one router at (1,1) with the testbench as neighbours.
//  1. A packet from -x to a node further east bypasses: each flit appears in
//     the +x output register one cycle after it arrives, with its lookahead in
//     the arrival cycle, on the lowest free output VC, and a credit goes back
//     on the input VC in the arrival cycle.
//  2. Two packets from -x and -y to +x announced in the same cycle: one wins the
//     lookahead VA and bypasses, the other is buffered and leaves through
//     RC, VA and SA+ST; both arrive complete and in order on different VCs.
// The downstream neighbour returns a credit for every flit it receives.
module tb_router;
  import noc_pkg::*;
  localparam int NP = NUM_PORTS, NVC = NUM_VC;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NP-1:0] in_valid, cong_out, out_valid, stop_in;
  flit_t in_flit [NP], out_flit [NP];
  la_t la_in [NP], la_out [NP];
  logic [NVC-1:0] credit_out [NP], credit_in [NP];
  logic [NP-1:0] ev_bypass, ev_buf_write, ev_cong_bsa, ev_cong_la;

  router #(.X(1), .Y(1)) dut (.clk, .rst_n, .in_valid, .in_flit, .la_in, .cong_out, .credit_out,
    .out_valid, .out_flit, .la_out, .credit_in, .stop_in,
    .ev_bypass, .ev_buf_write, .ev_cong_bsa, .ev_cong_la);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, m); end
  endtask

  function automatic flit_t mk(input int vc, input int idx, input int tag);
    flit_t f;
    f = '0;
    f.head = (idx == 0); f.tail = (idx == PKT_FLITS - 1);
    f.vcid = 2'(vc); f.dest = {3'd1, 3'd3};
    f.payload = PAYLOAD_W'(tag * 16 + idx);
    return f;
  endfunction
  function automatic la_t la_of(input flit_t f);
    return '{valid: 1'b1, head: f.head, tail: f.tail, vcid: f.vcid, dest: f.dest};
  endfunction

  // downstream (+x) monitor: per-VC in-order check and credit return
  int rx_cnt [NVC], rx_tag [NVC], got_pkts = 0;
  int t_out [$];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    for (int p = 0; p < NP; p++) credit_in[p] <= '0;
    if (out_valid[P_XP]) begin
      flit_t f;
      int v, tag, idx;
      f = out_flit[P_XP]; v = int'(f.vcid);
      tag = int'(f.payload) / 16; idx = int'(f.payload) % 16;
      if (idx == 0) begin rx_tag[v] = tag; rx_cnt[v] = 0; end
      chk(tag == rx_tag[v] && idx == rx_cnt[v], "flits of a packet in order on their VC");
      rx_cnt[v]++;
      if (f.tail) got_pkts++;
      credit_in[P_XP][v] <= 1'b1;
      t_out.push_back(int'(cyc));
    end
  end

  task automatic idle_in();
    in_valid = '0;
    for (int p = 0; p < NP; p++) begin in_flit[p] = '0; la_in[p] = '0; end
  endtask

  initial begin
    stop_in = '0; idle_in();
    for (int p = 0; p < NP; p++) credit_in[p] = '0;
    #12 rst_n = 1;
    // ---- 1: bypass
    @(negedge clk);
    la_in[P_XM] = la_of(mk(2, 0, 1));
    for (int k = 0; k < PKT_FLITS; k++) begin
      @(negedge clk);
      idle_in();
      in_valid[P_XM] = 1; in_flit[P_XM] = mk(2, k, 1);
      if (k + 1 < PKT_FLITS) la_in[P_XM] = la_of(mk(2, k + 1, 1));
      #1;
      chk(ev_bypass[P_XM] && !ev_buf_write[P_XM], "1: flit bypasses");
      chk(la_out[P_XP].valid && la_out[P_XP].vcid == 2'd0 && la_out[P_XP].head == (k == 0),
          "1: lookahead to the next router in the arrival cycle");
      chk(credit_out[P_XM] == 4'b0100, "1: credit on the input VC");
      @(posedge clk) #1;
      chk(out_valid[P_XP] && out_flit[P_XP].payload == mk(2, k, 1).payload &&
          out_flit[P_XP].vcid == 2'd0, "1: flit in the output register one cycle later");
    end
    @(negedge clk) idle_in();
    repeat (10) @(negedge clk);
    chk(got_pkts == 1, "1: packet received");

    // ---- 2: two packets compete for +x
    t_out.delete();
    @(negedge clk);
    la_in[P_XM] = la_of(mk(0, 0, 2));
    la_in[P_YM] = la_of(mk(1, 0, 3));
    for (int k = 0; k < PKT_FLITS; k++) begin
      @(negedge clk);
      idle_in();
      in_valid[P_XM] = 1; in_flit[P_XM] = mk(0, k, 2);
      in_valid[P_YM] = 1; in_flit[P_YM] = mk(1, k, 3);
      if (k + 1 < PKT_FLITS) begin
        la_in[P_XM] = la_of(mk(0, k + 1, 2));
        la_in[P_YM] = la_of(mk(1, k + 1, 3));
      end
      #1;
      if (k == 0) chk(ev_bypass[P_XM] ^ ev_bypass[P_YM], "2: exactly one head bypasses");
      chk(ev_buf_write[P_XM] | ev_buf_write[P_YM], "2: the other one is buffered");
    end
    @(negedge clk) idle_in();
    repeat (30) @(negedge clk);
    chk(got_pkts == 3, $sformatf("2: both packets received (%0d)", got_pkts));
    chk(t_out.size() == 2 * PKT_FLITS, "2: eight flits out");
    // the buffered head: arrival cycle + RC + VA + SA/ST, then the output register
    if (t_out.size() == 2 * PKT_FLITS)
      chk(t_out[$] - t_out[0] >= PKT_FLITS, "2: buffered packet follows the bypassed one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

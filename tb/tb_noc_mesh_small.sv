// tb_noc_mesh_small: the end-to-end mesh test on a 3x3 mesh (434D-B routers).
//
// Every node has a processing-element model that creates 4-flit packets, sends
// each flit's lookahead one cycle ahead of the flit, obeys credits and the
// congestion signal of its local input port, and returns a credit for every
// ejected flit after a programmable delay. A scoreboard at every local output
// checks that flits reach the right node, that the flits of each packet arrive
// in order on their VC with intact payload, and that every packet sent arrives.
//
// Phases:
//  1. one packet from node 0 to node 63 in an empty mesh: the head must reach
//     the ejection register hops+1 cycles after injection (one cycle per
//     bypassed router), and every router on the way must bypass it;
//  2. uniform random traffic at low load;
//  3. hotspot traffic into one node with a slow sink, which fills buffers and
//     channel buffers and raises both kinds of congestion;
//  4. drain: everything sent must arrive.
// Mechanisms counted and required at least once: bypass, buffer write, BSA
// congestion, lookahead congestion, flits parked on channel buffers.
module tb_noc_mesh_small;
  import noc_pkg::*;

  localparam int MX = 3, MY = 3, N = MX * MY, NP = NUM_PORTS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]      inj_valid;
  flit_t             inj_flit [N];
  la_t               inj_la [N];
  logic [N-1:0]      inj_cong;
  logic [NUM_VC-1:0] inj_credit [N];
  logic [N-1:0]      ej_valid;
  flit_t             ej_flit [N];
  logic [NUM_VC-1:0] ej_credit [N];
  logic [N*NP-1:0]   ev_bypass, ev_buf_write, ev_cong_bsa, ev_cong_la;
  logic [N-1:0]      link_held;
  logic              link_err;

  // zero-delay simulation: the offset clock coincides with the clock
  noc_mesh #(.MX(MX), .MY(MY)) dut (
    .clk, .clk_dly (clk), .rst_n,
    .inj_valid, .inj_flit, .inj_la, .inj_cong, .inj_credit,
    .ej_valid, .ej_flit, .ej_credit,
    .ev_bypass, .ev_buf_write, .ev_cong_bsa, .ev_cong_la, .link_held, .link_err
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // router address {y, x} of node n = y*MX + x
  function automatic int addr(input int n);
    return ((n / MX) << COORD_W) | (n % MX);
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  function automatic logic [87:0] sig(input int src, input int seq, input int idx);
    logic [31:0] h;
    h = 32'h9e3779b9 * (src + 1) ^ (seq * 32'h85ebca6b) ^ (idx * 32'hc2b2ae35);
    return {h[23:0], h, ~h};
  endfunction

  // ---------------- processing-element models
  int     pend [N];
  int     dest_q [N][$];
  bit     cur_active [N];
  int     cur_dest [N], cur_idx [N], cur_vc [N], cur_seq [N];
  int     seq_ctr [N];
  bit     ann_valid [N];
  flit_t  ann_flit [N];
  int     cr [N][NUM_VC];
  bit     busy [N][NUM_VC];
  int     sent_pkts = 0, recv_pkts = 0;
  longint inj_time [N][int];
  int     ej_delay = 0;
  longint ret_q [N][$];    // credit returns due: {vc, cycle}

  int     rx_src [N][NUM_VC], rx_seq [N][NUM_VC], rx_idx [N][NUM_VC];
  bit     rx_active [N][NUM_VC];
  longint last_head_lat = -1;
  int     last_head_node = -1;

  longint n_bypass = 0, n_bufw = 0, n_cong_bsa = 0, n_cong_la = 0, n_held = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      n_bypass   += $countones(ev_bypass);
      n_bufw     += $countones(ev_buf_write);
      n_cong_bsa += $countones(ev_cong_bsa);
      n_cong_la  += $countones(ev_cong_la);
      n_held     += $countones(link_held);
    end
  end

  always @(posedge clk) begin
    for (int n = 0; n < N; n++) begin
      logic [NUM_VC-1:0] ret;
      inj_valid[n] <= 1'b0;
      inj_la[n]    <= '0;
      if (!rst_n) continue;
      for (int v = 0; v < NUM_VC; v++) if (inj_credit[n][v]) cr[n][v]++;
      // deliver the announced flit unless the port is congested
      if (ann_valid[n] && !inj_cong[n]) begin
        inj_valid[n] <= 1'b1;
        inj_flit[n]  <= ann_flit[n];
        ann_valid[n] = 1'b0;
        if (ann_flit[n].head) inj_time[n][cur_seq[n]] = cyc + 1;
      end
      if (!ann_valid[n]) begin
        if (!cur_active[n] && dest_q[n].size() > 0) begin
          for (int v = NUM_VC - 1; v >= 0; v--)
            if (!busy[n][v] && cr[n][v] == VC_CREDITS) cur_vc[n] = v;
          if (!busy[n][cur_vc[n]] && cr[n][cur_vc[n]] == VC_CREDITS) begin
            cur_active[n] = 1'b1;
            cur_idx[n]    = 0;
            cur_dest[n]   = dest_q[n].pop_front();
            cur_seq[n]    = seq_ctr[n]++;
            busy[n][cur_vc[n]] = 1'b1;
          end
        end
        if (cur_active[n] && cr[n][cur_vc[n]] > 0) begin
          flit_t f;
          la_t   l;
          f.head    = (cur_idx[n] == 0);
          f.tail    = (cur_idx[n] == PKT_FLITS - 1);
          f.vcid    = VC_W'(cur_vc[n]);
          f.dest    = ADDR_W'(addr(cur_dest[n]));
          f.src     = ADDR_W'(n);
          f.payload = {sig(n, cur_seq[n], cur_idx[n]), ADDR_W'(n), 2'(cur_idx[n]), 16'(cur_seq[n])};
          l.valid = 1'b1; l.head = f.head; l.tail = f.tail; l.vcid = f.vcid; l.dest = f.dest;
          inj_la[n]    <= l;
          ann_valid[n] = 1'b1;
          ann_flit[n]  = f;
          cr[n][cur_vc[n]]--;
          if (f.tail) begin
            busy[n][cur_vc[n]] = 1'b0;
            cur_active[n] = 1'b0;
            sent_pkts++;
          end
          cur_idx[n]++;
        end
      end
      // ejection side: scoreboard and credit return
      ret = '0;
      while (ret_q[n].size() > 0 && (ret_q[n][0] & 64'hffff_ffff) <= cyc) begin
        longint e;
        e = ret_q[n].pop_front();
        ret[e >>> 32] = 1'b1;
      end
      ej_credit[n] <= ret;
      if (ej_valid[n]) begin
        flit_t f;
        int v, s, q, ix;
        f  = ej_flit[n];
        v  = int'(f.vcid);
        q  = int'(f.payload[15:0]);
        ix = int'(f.payload[17:16]);
        s  = int'(f.payload[23:18]);
        check(int'(f.dest) == addr(n), $sformatf("flit for %0d ejected at %0d", f.dest, n));
        check(f.payload[111:24] == sig(s, q, ix), "payload corrupted");
        if (f.head) begin
          check(!rx_active[n][v] && ix == 0, "head out of order");
          rx_active[n][v] = 1'b1; rx_src[n][v] = s; rx_seq[n][v] = q; rx_idx[n][v] = 0;
          if (inj_time[s].exists(q)) begin
            last_head_lat  = cyc - inj_time[s][q];
            last_head_node = n;
          end
        end else begin
          check(rx_active[n][v] && s == rx_src[n][v] && q == rx_seq[n][v] &&
                ix == rx_idx[n][v] + 1, "body/tail out of order");
          rx_idx[n][v] = ix;
        end
        if (f.tail) begin
          rx_active[n][v] = 1'b0;
          recv_pkts++;
        end
        ret_q[n].push_back((longint'(v) << 32) | (cyc + ej_delay));
      end
    end
  end

  // ---------------- stimulus
  int hops;
  initial begin
    for (int n = 0; n < N; n++) begin
      inj_flit[n] = '0; inj_la[n] = '0; ej_credit[n] = '0; inj_valid[n] = 1'b0;
      cur_active[n] = 0; ann_valid[n] = 0; seq_ctr[n] = 0;
      for (int v = 0; v < NUM_VC; v++) begin
        cr[n][v] = VC_CREDITS; busy[n][v] = 0; rx_active[n][v] = 0;
      end
    end
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (4) @(posedge clk);

    // phase 1: one packet corner to corner
    dest_q[0].push_back(N - 1);
    repeat (60) @(posedge clk);
    hops = (MX - 1) + (MY - 1);
    check(recv_pkts == 1, "single packet not delivered");
    check(last_head_node == N - 1 && last_head_lat == longint'(hops + 1),
          $sformatf("zero-load head latency %0d, expected %0d", last_head_lat, hops + 1));
    check(n_bypass == longint'(PKT_FLITS * (hops + 1)),
          $sformatf("bypass count %0d, expected %0d", n_bypass, PKT_FLITS * (hops + 1)));
    check(n_bufw == 0, "a flit was buffered in an empty mesh");

    // phase 2: uniform random traffic, low load
    for (int c = 0; c < 400; c++) begin
      @(posedge clk);
      for (int n = 0; n < N; n++)
        if ($urandom_range(999) < 20) begin
          int d;
          d = $urandom_range(N - 1);
          if (d == n) d = (d + 1) % N;
          dest_q[n].push_back(d);
        end
    end
    // phase 3: hotspot into the centre node with a slow sink
    ej_delay = 40;
    for (int c = 0; c < 600; c++) begin
      @(posedge clk);
      for (int n = 0; n < N; n++)
        if (n != N / 2 && $urandom_range(999) < 60) dest_q[n].push_back(N / 2);
    end
    // phase 4: drain
    for (int c = 0; c < 40000; c++) begin
      bit idle;
      @(posedge clk);
      idle = 1;
      for (int n = 0; n < N; n++)
        if (dest_q[n].size() > 0 || cur_active[n] || ann_valid[n]) idle = 0;
      if (idle && recv_pkts == sent_pkts) break;
    end
    check(recv_pkts == sent_pkts, $sformatf("sent %0d packets, received %0d", sent_pkts, recv_pkts));
    check(sent_pkts > 100, "too little traffic");
    check(n_bypass > 0,   "no flit bypassed a router");
    check(n_bufw > 0,     "no flit entered a router buffer");
    check(n_cong_bsa > 0, "buffer congestion never raised");
    check(n_cong_la > 0,  "lookahead congestion never raised");
    check(n_held > 0,     "no flit parked on channel buffers");
    check(!link_err,      "timing error flagged in a zero-delay simulation");
    $display("packets=%0d bypass=%0d buf_write=%0d cong_bsa=%0d cong_la=%0d held=%0d cycles=%0d",
             recv_pkts, n_bypass, n_bufw, n_cong_bsa, n_cong_la, n_held, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_input_port: directed tests of one input port at router (1,1), with the
// testbench playing the allocators.
//  A. bypass: a head's lookahead wins an output VC; the four flits then go to
//     the crossbar's bypass input in their arrival cycle with the VCID
//     rewritten, a credit goes back each time, and nothing is buffered;
//  B. buffered pipeline: the lookahead loses VA; the head is written to the
//     buffer, requests VA two cycles later and SA three cycles later
//     (RC, VA, SA), and the packet leaves in order with credits returned;
//  C. congestion: buffered flits that cannot leave fill the unified buffer;
//     congestion must be raised with one slot left (two for flits whose packet
//     has no output VC yet), and released as the buffer drains.
module tb_input_port;
  import noc_pkg::*;
  localparam int NP = NUM_PORTS, NVC = NUM_VC;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, cong_o, va_la_req, va_la_gnt, va_buf_req, va_buf_gnt;
  logic byp_req, byp_gnt, rd_req, rd_gnt, ev_bypass, ev_buf_write, ev_cong_bsa, ev_cong_la;
  flit_t in_flit, byp_flit, rd_flit;
  la_t la_i;
  logic [NVC-1:0] credit_o;
  logic [2:0] va_la_port, va_buf_port, byp_port, rd_port;
  logic [1:0] va_la_ovc, va_buf_ovc;
  logic [NVC-1:0] credit_ok [NP], credit_ok_next [NP];
  logic [NP-1:0] out_ready;

  input_port dut (
    .clk, .rst_n, .cur_x (3'd1), .cur_y (3'd1),
    .in_valid, .in_flit, .la_i, .cong_o, .credit_o,
    .va_la_req, .va_la_port, .va_la_gnt, .va_la_ovc,
    .va_buf_req, .va_buf_port, .va_buf_gnt, .va_buf_ovc,
    .byp_req, .byp_port, .byp_flit, .byp_gnt,
    .rd_req, .rd_port, .rd_flit, .rd_gnt,
    .credit_ok, .credit_ok_next, .out_ready,
    .ev_bypass, .ev_buf_write, .ev_cong_bsa, .ev_cong_la
  );

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, m); end
  endtask

  function automatic flit_t mk(input int vc, input int idx, input int dx, input int dy, input int tag);
    flit_t f;
    f = '0;
    f.head = (idx == 0); f.tail = (idx == PKT_FLITS - 1);
    f.vcid = 2'(vc); f.dest = {3'(dy), 3'(dx)};
    f.payload = PAYLOAD_W'(tag * 16 + idx);
    return f;
  endfunction

  function automatic la_t la_of(input flit_t f);
    return '{valid: 1'b1, head: f.head, tail: f.tail, vcid: f.vcid, dest: f.dest};
  endfunction

  task automatic idle_inputs();
    in_valid = 0; in_flit = '0; la_i = '0;
    va_la_gnt = 0; va_la_ovc = 0; va_buf_gnt = 0; va_buf_ovc = 0;
    byp_gnt = 0; rd_gnt = 0;
  endtask

  int rd_count [NVC];
  initial begin
    for (int p = 0; p < NP; p++) begin credit_ok[p] = '1; credit_ok_next[p] = '1; end
    out_ready = '1;
    idle_inputs();
    #12 rst_n = 1;

    // ---------------- A: bypass
    begin
      flit_t f [PKT_FLITS];
      for (int k = 0; k < PKT_FLITS; k++) f[k] = mk(1, k, 3, 1, 1);
      @(negedge clk);
      la_i = la_of(f[0]); va_la_gnt = 1; va_la_ovc = 2;
      #1 chk(va_la_req && va_la_port == P_XP, "A: lookahead VA request to +x");
      for (int k = 0; k < PKT_FLITS; k++) begin
        @(negedge clk);
        idle_inputs();
        in_valid = 1; in_flit = f[k];
        if (k + 1 < PKT_FLITS) la_i = la_of(f[k + 1]);
        byp_gnt = 1;
        #1;
        chk(byp_req && byp_port == P_XP, "A: bypass request on arrival");
        chk(byp_flit.vcid == 2'd2 && byp_flit.payload == f[k].payload, "A: VCID rewritten");
        chk(credit_o == 4'b0010 && ev_bypass && !ev_buf_write, "A: credit back, not buffered");
      end
      @(negedge clk) idle_inputs();
      #1 chk(dut.ent[1].state == VS_IDLE, "A: VC idle after tail");
    end

    // ---------------- B: buffered pipeline
    begin
      flit_t f [PKT_FLITS];
      int t_wr, t_va, t_rd, got;
      for (int k = 0; k < PKT_FLITS; k++) f[k] = mk(0, k, 1, 3, 2);
      @(negedge clk);
      la_i = la_of(f[0]); va_la_gnt = 0;
      got = 0; t_va = -1; t_rd = -1; t_wr = -1;
      for (int c = 0; c < 24 && got < PKT_FLITS; c++) begin
        @(negedge clk);
        idle_inputs();
        if (c < PKT_FLITS) begin
          in_valid = 1; in_flit = f[c];
          if (c + 1 < PKT_FLITS) la_i = la_of(f[c + 1]);
        end
        #1;
        if (c < PKT_FLITS) chk(!byp_req && ev_buf_write, "B: flit buffered");
        if (c == 0) t_wr = c;
        if (va_buf_req && t_va < 0) begin
          t_va = c;
          chk(va_buf_port == P_YP, "B: VA for +y");
          va_buf_gnt = 1; va_buf_ovc = 3;
        end
        if (rd_req) begin
          if (t_rd < 0) t_rd = c;
          rd_gnt = 1;
          chk(rd_port == P_YP && rd_flit.vcid == 2'd3 && rd_flit.payload == f[got].payload,
              "B: flits leave in order on the output VC");
          #0 chk(credit_o[0], "B: credit returned on departure");
          got++;
        end
      end
      chk(got == PKT_FLITS, "B: whole packet left");
      chk(t_va - t_wr == 2, $sformatf("B: VA %0d cycles after write, expected 2", t_va - t_wr));
      chk(t_rd - t_wr == 3, $sformatf("B: SA %0d cycles after write, expected 3", t_rd - t_wr));
    end

    // ---------------- C: buffer congestion
    begin
      int n;
      bit seen_cong;
      n = 0; seen_cong = 0;
      for (int vc = 0; vc < 3; vc++)
        for (int k = 0; k < PKT_FLITS; k++) begin
          flit_t f;
          f = mk(vc, k, 0, 1, 3 + vc);
          @(negedge clk);
          idle_inputs();
          la_i = la_of(f);
          #1;
          if (n >= 11) chk(cong_o, "C: congested with one slot left");
          if (cong_o) begin seen_cong = 1; break; end
          @(negedge clk);
          idle_inputs();
          in_valid = 1; in_flit = f;
          n++;
        end
      @(negedge clk) idle_inputs();
      #1;
      chk(seen_cong && cong_o && ev_cong_bsa, "C: congestion raised");
      chk(n >= 10 && n <= 11, $sformatf("C: %0d flits buffered before congestion", n));
      // drain: grant VA and reads, the buffered flits leave and congestion drops
      for (int c = 0; c < 80; c++) begin
        @(negedge clk);
        idle_inputs();
        #1;
        if (va_buf_req) begin va_buf_gnt = 1; va_buf_ovc = 2'(c % 4); end
        if (rd_req) rd_gnt = 1;
      end
      @(negedge clk) idle_inputs();
      #1 chk(!cong_o && int'(dut.u_bsa.free_cnt) == BUF_SLOTS, "C: drained");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

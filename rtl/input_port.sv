// input_port: one input port of the bypass router with a unified, dynamically
// allocated buffer.
//
// Every flit is announced by a lookahead one cycle before it can arrive. A
// head's lookahead performs route computation and bids for an output VC at
// once; if it wins, the VC's row in the unified VC state table (UVST) is set to
// "bypass" with its output port (OP) and output VC (OVC). When a flit of such a
// VC arrives, finds no older flit of its VC in the buffer and has a downstream
// credit, it asks the switch allocator for the bypass input of the crossbar.
// If it is granted, the flit goes straight to the crossbar with its VCID
// rewritten to the OVC and a credit goes back upstream at once: it is never
// written into the buffer.
//
// Any other flit is written into the unified buffer at the slot handed out by
// the Buffer Slot Availability tracker (BSA), and its slot number is appended
// to its VC's list in the UVST. A buffered head then goes through RC, VA and
// SA, one cycle each; body and tail flits follow through SA. The buffer read
// MUX offers one flit per cycle (round-robin over ready VCs) to the crossbar's
// second input of this port. A departing flit frees its slot and returns a
// credit.
//
// The congestion output is the OR of the causes: the BSA has at most one free
// slot; or the next flit on the link belongs to a packet without an output VC
// yet and only RSV slots are left above that threshold (a reserve that keeps
// packets which own an output VC able to drain, so shared slots cannot
// deadlock); or the next flit belongs to a bypassing packet whose output VC has
// no credit, in which case the flit is kept on the channel buffers until the
// credit is back. A lookahead queue (one entry per flit announced but not
// yet arrived, in link order) tells which flit comes next.
//
// Timing: arrival, bypass and buffer write share one cycle; a buffered head
// leaves no earlier than three cycles after it was written (RC, VA, SA+ST).
// cong_o in cycle t stops link deliveries in cycle t+1.
// This design's own choices: a bypass bid that loses the switch or finds no
// credit at arrival falls back to the buffer; the separable round-robin
// arbitration; the lookahead queue.
module input_port
  import noc_pkg::*;
#(
  parameter int NVC   = NUM_VC,
  parameter int SLOTS = BUF_SLOTS,
  parameter int D     = VC_CREDITS,
  parameter int LQ    = LINK_BUFS + 2,
  parameter int RSV   = 1,
  localparam int NP    = NUM_PORTS,
  localparam int IDX_W = $clog2(SLOTS),
  localparam int V_W   = (NVC > 1) ? $clog2(NVC) : 1,
  localparam int CNT_W = $clog2(D + 1),
  localparam int LQ_W  = $clog2(LQ),
  localparam int LQC_W = $clog2(LQ + 1),
  localparam int FC_W  = $clog2(SLOTS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  // from the link / upstream router
  input  logic               in_valid,
  input  flit_t              in_flit,
  input  la_t                la_i,
  output logic               cong_o,
  output logic [NVC-1:0]     credit_o,
  // VC allocation
  output logic               va_la_req,
  output logic [PORT_W-1:0]  va_la_port,
  input  logic               va_la_gnt,
  input  logic [V_W-1:0]     va_la_ovc,
  output logic               va_buf_req,
  output logic [PORT_W-1:0]  va_buf_port,
  input  logic               va_buf_gnt,
  input  logic [V_W-1:0]     va_buf_ovc,
  // switch allocation and crossbar inputs
  output logic               byp_req,
  output logic [PORT_W-1:0]  byp_port,
  output flit_t              byp_flit,
  input  logic               byp_gnt,
  output logic               rd_req,
  output logic [PORT_W-1:0]  rd_port,
  output flit_t              rd_flit,
  input  logic               rd_gnt,
  // credit state of all output ports
  input  logic [NVC-1:0]     credit_ok      [NP],
  input  logic [NVC-1:0]     credit_ok_next [NP],
  input  logic [NP-1:0]      out_ready,
  // event flags
  output logic               ev_bypass,
  output logic               ev_buf_write,
  output logic               ev_cong_bsa,
  output logic               ev_cong_la
);
  typedef struct packed {
    logic [V_W-1:0] vc;
    logic           head;
  } laq_t;

  flit_t            buf_q [SLOTS];
  vc_entry_t        ent   [NVC];
  vc_entry_t        wr_entry [NVC];
  logic [NVC-1:0]   wr_en;
  logic [IDX_W-1:0] head_slot [NVC];
  logic [CNT_W-1:0] cnt [NVC];
  logic [PORT_W-1:0] rc_port [NVC];
  logic [PORT_W-1:0] la_port;

  // ---- lookahead: route computation and VC bid for heads
  route_compute u_rc_la (.cur_x, .cur_y, .dest(la_i.dest), .port(la_port));

  always_comb begin
    va_la_req  = la_i.valid && la_i.head;
    va_la_port = la_port;
  end

  // ---- arrival: bypass or buffer
  logic [V_W-1:0]   avc;
  vc_entry_t        ae;
  logic             bypass_now, to_buf;
  logic [IDX_W-1:0] alloc_idx;
  logic             alloc_ok, cong_bsa, cong_rsv;
  logic [FC_W-1:0]  free_cnt;

  always_comb begin
    avc      = in_flit.vcid[V_W-1:0];
    ae       = ent[avc];
    byp_req  = in_valid && ae.state == VS_ACTIVE && ae.bypass && cnt[avc] == '0 &&
               credit_ok[ae.op][ae.ovc];
    byp_port = ae.op;
    byp_flit = in_flit;
    byp_flit.vcid = VC_W'(ae.ovc);
    bypass_now = byp_req && byp_gnt;
    to_buf     = in_valid && !bypass_now;
  end

  // ---- buffer read: one ready VC per cycle
  logic [NVC-1:0] rd_cand;
  logic [V_W-1:0] rd_vc, rr_rd;
  logic           rd_now;
  flit_t          rd_raw;

  always_comb begin
    for (int v = 0; v < NVC; v++)
      rd_cand[v] = ent[v].state == VS_ACTIVE && cnt[v] != '0 &&
                   credit_ok[ent[v].op][ent[v].ovc];
    rd_req = |rd_cand;
    rd_vc  = '0;
    for (int k = NVC - 1; k >= 0; k--) begin
      if (rd_cand[((int'(rr_rd) + k) % NVC)]) rd_vc = V_W'(((int'(rr_rd) + k) % NVC));
    end
    rd_port = ent[rd_vc].op;
    rd_raw  = buf_q[head_slot[rd_vc]];
    rd_flit = rd_raw;
    rd_flit.vcid = VC_W'(ent[rd_vc].ovc);
  end
  assign rd_now = rd_req && rd_gnt;

  // ---- VA for buffered heads: lowest VC waiting
  logic [V_W-1:0] va_vc;
  always_comb begin
    va_buf_req = 1'b0;
    va_vc      = '0;
    for (int v = NVC - 1; v >= 0; v--)
      if (ent[v].state == VS_VA) begin
        va_buf_req = 1'b1;
        va_vc      = V_W'(v);
      end
    va_buf_port = ent[va_vc].op;
  end

  for (genvar v = 0; v < NVC; v++) begin : g_rc
    route_compute u_rc (.cur_x, .cur_y, .dest(buf_q[head_slot[v]].dest), .port(rc_port[v]));
  end

  // ---- next state of every UVST row
  always_comb begin
    for (int v = 0; v < NVC; v++) begin
      vc_entry_t n;
      n = ent[v];
      case (ent[v].state)
        VS_RC: begin
          n.op    = rc_port[v];
          n.state = VS_VA;
        end
        VS_VA: if (va_buf_req && va_vc == V_W'(v) && va_buf_gnt) begin
          n.ovc   = va_buf_ovc;
          n.state = VS_ACTIVE;
        end
        default: ;
      endcase
      if (va_la_req && va_la_gnt && la_i.vcid[V_W-1:0] == V_W'(v))
        n = '{state: VS_ACTIVE, bypass: 1'b1, op: la_port, ovc: va_la_ovc};
      if (in_valid && avc == V_W'(v)) begin
        if (bypass_now) begin
          if (in_flit.tail) n = '{state: VS_IDLE, bypass: 1'b0, op: '0, ovc: '0};
        end else begin
          n.bypass = 1'b0;
          if (in_flit.head && ent[v].state == VS_IDLE) n.state = VS_RC;
        end
      end
      if (rd_now && rd_vc == V_W'(v) && rd_raw.tail)
        n = '{state: VS_IDLE, bypass: 1'b0, op: '0, ovc: '0};
      wr_entry[v] = n;
      wr_en[v]    = (n != ent[v]);
    end
  end

  uvst #(.NVC(NVC), .SLOTS(SLOTS), .D(D)) u_uvst (
    .clk, .rst_n,
    .push      (to_buf),
    .push_vc   (avc),
    .push_slot (alloc_idx),
    .pop       (rd_now),
    .pop_vc    (rd_vc),
    .head_slot (head_slot),
    .cnt       (cnt),
    .wr_en     (wr_en),
    .wr_entry  (wr_entry),
    .entry     (ent)
  );

  bsa #(.SLOTS(SLOTS)) u_bsa (
    .clk, .rst_n,
    .alloc_req   (to_buf),
    .alloc_idx   (alloc_idx),
    .alloc_ok    (alloc_ok),
    .dealloc_req (rd_now),
    .dealloc_idx (head_slot[rd_vc]),
    .free_cnt    (free_cnt),
    .cong_o      (cong_bsa)
  );

  always_ff @(posedge clk)
    if (to_buf) buf_q[alloc_idx] <= in_flit;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rr_rd <= '0;
    else if (rd_now) rr_rd <= V_W'((int'(rd_vc) + 1) % NVC);

  // ---- lookahead queue and lookahead-driven congestion
  laq_t             laq [LQ];
  logic [LQ_W-1:0]  lq_rd, lq_wr;
  logic [LQC_W-1:0] lq_cnt;
  laq_t             nxt;
  logic             nxt_valid, cong_la;

  function automatic logic [LQ_W-1:0] lq_inc(input logic [LQ_W-1:0] p);
    return (int'(p) == LQ - 1) ? '0 : p + LQ_W'(1);
  endfunction

  always_comb begin
    // the entry that will be at the head of the queue after this cycle
    nxt_valid = 1'b0;
    nxt       = '{vc: la_i.vcid[V_W-1:0], head: la_i.head};
    if (int'(lq_cnt) > int'(in_valid)) begin
      nxt_valid = 1'b1;
      nxt       = laq[in_valid ? lq_inc(lq_rd) : lq_rd];
    end else if (la_i.valid) begin
      nxt_valid = 1'b1;
    end
    cong_la = nxt_valid && !nxt.head && ent[nxt.vc].state == VS_ACTIVE &&
              ent[nxt.vc].bypass && cnt[nxt.vc] == '0 &&
              (!credit_ok_next[ent[nxt.vc].op][ent[nxt.vc].ovc] ||
               !out_ready[ent[nxt.vc].op]);
    // the last RSV slots above the congestion threshold are kept for flits
    // of packets that already own an output VC, so those can always drain
    cong_rsv = nxt_valid && ent[nxt.vc].state != VS_ACTIVE &&
               int'(free_cnt) <= RSV + 1;
    cong_o       = cong_bsa | cong_rsv | cong_la;
    credit_o     = '0;
    if (bypass_now) credit_o[avc] = 1'b1;
    if (rd_now)     credit_o[rd_vc] = 1'b1;
    ev_bypass    = bypass_now;
    ev_buf_write = to_buf;
    ev_cong_bsa  = cong_bsa | cong_rsv;
    ev_cong_la   = cong_la;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      lq_rd  <= '0;
      lq_wr  <= '0;
      lq_cnt <= '0;
    end else begin
      if (la_i.valid) lq_wr <= lq_inc(lq_wr);
      if (in_valid)   lq_rd <= lq_inc(lq_rd);
      lq_cnt <= lq_cnt + LQC_W'(la_i.valid) - LQC_W'(in_valid);
    end

  always_ff @(posedge clk)
    if (la_i.valid) laq[lq_wr] <= '{vc: la_i.vcid[V_W-1:0], head: la_i.head};

  a_flit_announced: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (lq_cnt != '0 && laq[lq_rd].vc == avc));
  a_laq_room: assert property (@(posedge clk) disable iff (!rst_n)
    la_i.valid |-> (int'(lq_cnt) < LQ || in_valid));
  a_buffer_room: assert property (@(posedge clk) disable iff (!rst_n)
    to_buf |-> alloc_ok);
endmodule

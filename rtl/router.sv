// router: 5-port wormhole router with lookahead bypassing and dynamically
// allocated input buffers.
//
// Five input ports (+x, -x, +y, -y, local) feed a 10x5 crossbar through two
// inputs each: the bypass path and the buffer read MUX. Each output port has
// its own VC allocator and switch allocator. A flit whose lookahead set up its
// route and output VC in advance crosses the router in its arrival cycle and
// is on the next link one cycle later; a flit that has to be buffered takes the
// RC, VA, SA+ST pipeline. Flits leave through output registers that drive the
// links, together with a lookahead for the next router.
//
// Interface per port p: in_valid/in_flit/la_in arrive from the upstream link
// and router, cong_out and credit_out go back to them; out_valid/out_flit/
// la_out go downstream, credit_in and stop_in come back. The ev_* outputs flag,
// per input port and cycle, a bypass, a buffer write and the two causes of
// congestion.
module router
  import noc_pkg::*;
#(
  parameter int X     = 0,
  parameter int Y     = 0,
  parameter int NVC   = NUM_VC,
  parameter int SLOTS = BUF_SLOTS,
  parameter int CRED  = VC_CREDITS,
  parameter int LQ    = LINK_BUFS + 2,
  localparam int NP  = NUM_PORTS,
  localparam int V_W = (NVC > 1) ? $clog2(NVC) : 1,
  localparam int S_W = $clog2(2 * NP)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NP-1:0]  in_valid,
  input  flit_t          in_flit    [NP],
  input  la_t            la_in      [NP],
  output logic [NP-1:0]  cong_out,
  output logic [NVC-1:0] credit_out [NP],
  output logic [NP-1:0]  out_valid,
  output flit_t          out_flit   [NP],
  output la_t            la_out     [NP],
  input  logic [NVC-1:0] credit_in  [NP],
  input  logic [NP-1:0]  stop_in,
  output logic [NP-1:0]  ev_bypass,
  output logic [NP-1:0]  ev_buf_write,
  output logic [NP-1:0]  ev_cong_bsa,
  output logic [NP-1:0]  ev_cong_la
);
  localparam logic [COORD_W-1:0] CX = COORD_W'(X);
  localparam logic [COORD_W-1:0] CY = COORD_W'(Y);

  // input port side
  logic [NP-1:0]     va_la_req, va_la_gnt, va_buf_req, va_buf_gnt;
  logic [PORT_W-1:0] va_la_port [NP], va_buf_port [NP];
  logic [V_W-1:0]    va_la_ovc [NP], va_buf_ovc [NP];
  logic [NP-1:0]     byp_req, byp_gnt, rd_req, rd_gnt;
  logic [PORT_W-1:0] byp_port [NP], rd_port [NP];
  flit_t             xin [2*NP];
  // output port side
  logic [NVC-1:0]    ovc_free [NP], credit_ok [NP], credit_ok_next [NP];
  logic [NP-1:0]     out_ready, xout_valid, xbar_valid;
  logic [2*NP-1:0]   va_req [NP], va_gnt [NP], sa_req [NP], sa_gnt [NP];
  logic [V_W-1:0]    gnt_vc [NP];
  logic [S_W-1:0]    sel [NP];
  flit_t             xout [NP];

  for (genvar i = 0; i < NP; i++) begin : g_in
    input_port #(.NVC(NVC), .SLOTS(SLOTS), .D(CRED), .LQ(LQ)) u_in (
      .clk, .rst_n,
      .cur_x (CX), .cur_y (CY),
      .in_valid (in_valid[i]), .in_flit (in_flit[i]), .la_i (la_in[i]),
      .cong_o (cong_out[i]), .credit_o (credit_out[i]),
      .va_la_req (va_la_req[i]), .va_la_port (va_la_port[i]),
      .va_la_gnt (va_la_gnt[i]), .va_la_ovc (va_la_ovc[i]),
      .va_buf_req (va_buf_req[i]), .va_buf_port (va_buf_port[i]),
      .va_buf_gnt (va_buf_gnt[i]), .va_buf_ovc (va_buf_ovc[i]),
      .byp_req (byp_req[i]), .byp_port (byp_port[i]), .byp_flit (xin[i]),
      .byp_gnt (byp_gnt[i]),
      .rd_req (rd_req[i]), .rd_port (rd_port[i]), .rd_flit (xin[NP+i]),
      .rd_gnt (rd_gnt[i]),
      .credit_ok (credit_ok), .credit_ok_next (credit_ok_next),
      .out_ready (out_ready),
      .ev_bypass (ev_bypass[i]), .ev_buf_write (ev_buf_write[i]),
      .ev_cong_bsa (ev_cong_bsa[i]), .ev_cong_la (ev_cong_la[i])
    );
  end

  // request routing to the per-output allocators, grants back to the inputs
  always_comb begin
    for (int o = 0; o < NP; o++)
      for (int i = 0; i < NP; i++) begin
        va_req[o][i]      = va_la_req[i]  && va_la_port[i]  == PORT_W'(o);
        va_req[o][NP + i] = va_buf_req[i] && va_buf_port[i] == PORT_W'(o);
        sa_req[o][i]      = byp_req[i]    && byp_port[i]    == PORT_W'(o);
        sa_req[o][NP + i] = rd_req[i]     && rd_port[i]     == PORT_W'(o);
      end
  end

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      va_la_gnt[i]  = va_gnt[va_la_port[i]][i];
      va_la_ovc[i]  = gnt_vc[va_la_port[i]];
      va_buf_gnt[i] = va_gnt[va_buf_port[i]][NP + i];
      va_buf_ovc[i] = gnt_vc[va_buf_port[i]];
      byp_gnt[i]    = sa_gnt[byp_port[i]][i];
      rd_gnt[i]     = sa_gnt[rd_port[i]][NP + i];
    end
  end

  for (genvar o = 0; o < NP; o++) begin : g_out
    vc_allocator #(.NP(NP), .NVC(NVC)) u_va (
      .clk, .rst_n,
      .req (va_req[o]), .ovc_free (ovc_free[o]),
      .gnt (va_gnt[o]), .gnt_vc (gnt_vc[o])
    );
    switch_allocator #(.NP(NP)) u_sa (
      .clk, .rst_n,
      .req (sa_req[o]), .out_ready (out_ready[o]),
      .gnt (sa_gnt[o]), .sel (sel[o]), .valid (xout_valid[o])
    );
    output_port #(.NVC(NVC), .CREDITS(CRED)) u_out (
      .clk, .rst_n,
      .alloc_en (|va_gnt[o]), .alloc_vc (gnt_vc[o]), .ovc_free (ovc_free[o]),
      .send_en (xbar_valid[o]), .send_flit (xout[o]),
      .out_ready (out_ready[o]),
      .credit_ok (credit_ok[o]), .credit_ok_next (credit_ok_next[o]),
      .stop_i (stop_in[o]), .credit_in (credit_in[o]),
      .out_valid (out_valid[o]), .out_flit (out_flit[o]), .la_o (la_out[o])
    );
  end

  crossbar #(.NP(NP)) u_xbar (
    .in_flit (xin), .sel (sel), .sel_valid (xout_valid),
    .out_flit (xout), .out_valid (xbar_valid)
  );
endmodule

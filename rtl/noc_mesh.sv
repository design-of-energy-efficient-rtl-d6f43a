// noc_mesh: MX x MY mesh of bypass routers joined by dual-function links.
//
// Router (x,y) has address {y,x}. Its +x output feeds, through a channel_link
// with C channel buffers, the -x input of router (x+1,y), and likewise for the
// other directions. The lookahead of each flit travels on its own wires from
// the sending router's switch stage to the receiving input port; credits and
// congestion flow back. Ports at the mesh edge are tied off.
//
// The processing elements are outside: each node's local input (inj_*) and
// local output (ej_*) are brought out. A processing element must send a
// flit's lookahead one cycle before the flit, send only with a credit for the
// flit's VC, and send nothing in the cycle after inj_cong was high. It returns
// a credit per ejected flit on ej_credit.
// clk_dly is the offset clock of the links' double-sampling control blocks.
// The ev_* vectors (one bit per node and input port) and link_held (one bit per
// node, any channel buffer into that node holding a flit) are activity flags.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int MX = MESH_X,
  parameter int MY = MESH_Y,
  parameter int C  = LINK_BUFS,
  localparam int N  = MX * MY,
  localparam int NP = NUM_PORTS
) (
  input  logic             clk,
  input  logic             clk_dly,
  input  logic             rst_n,
  input  logic [N-1:0]     inj_valid,
  input  flit_t            inj_flit   [N],
  input  la_t              inj_la     [N],
  output logic [N-1:0]     inj_cong,
  output logic [NUM_VC-1:0] inj_credit [N],
  output logic [N-1:0]     ej_valid,
  output flit_t            ej_flit    [N],
  input  logic [NUM_VC-1:0] ej_credit  [N],
  output logic [N*NP-1:0]  ev_bypass,
  output logic [N*NP-1:0]  ev_buf_write,
  output logic [N*NP-1:0]  ev_cong_bsa,
  output logic [N*NP-1:0]  ev_cong_la,
  output logic [N-1:0]     link_held,
  output logic             link_err
);
  // per node, per port signals
  logic [NP-1:0]     r_in_valid [N], r_cong [N], r_out_valid [N], r_stop [N];
  flit_t             r_in_flit [N][NP], r_out_flit [N][NP];
  la_t               r_la_in [N][NP], r_la_out [N][NP];
  logic [NUM_VC-1:0] r_cr_out [N][NP], r_cr_in [N][NP];
  logic [NP-1:0]     held_any [N], err_link [N];

  function automatic int nb(input int x, input int y, input int p);
    case (p)
      0: return (x + 1 < MX) ? y * MX + x + 1 : -1;
      1: return (x > 0)      ? y * MX + x - 1 : -1;
      2: return (y + 1 < MY) ? (y + 1) * MX + x : -1;
      3: return (y > 0)      ? (y - 1) * MX + x : -1;
      default: return -1;
    endcase
  endfunction

  // the port of the neighbour that faces port p
  function automatic int opp(input int p);
    return (p == 0) ? 1 : (p == 1) ? 0 : (p == 2) ? 3 : 2;
  endfunction

  for (genvar y = 0; y < MY; y++) begin : g_y
    for (genvar x = 0; x < MX; x++) begin : g_x
      localparam int ID = y * MX + x;

      router #(.X(x), .Y(y)) u_router (
        .clk, .rst_n,
        .in_valid (r_in_valid[ID]), .in_flit (r_in_flit[ID]), .la_in (r_la_in[ID]),
        .cong_out (r_cong[ID]), .credit_out (r_cr_out[ID]),
        .out_valid (r_out_valid[ID]), .out_flit (r_out_flit[ID]), .la_out (r_la_out[ID]),
        .credit_in (r_cr_in[ID]), .stop_in (r_stop[ID]),
        .ev_bypass    (ev_bypass   [ID*NP +: NP]),
        .ev_buf_write (ev_buf_write[ID*NP +: NP]),
        .ev_cong_bsa  (ev_cong_bsa [ID*NP +: NP]),
        .ev_cong_la   (ev_cong_la  [ID*NP +: NP])
      );

      // local port
      assign r_in_valid[ID][P_LOCAL] = inj_valid[ID];
      assign r_in_flit[ID][P_LOCAL]  = inj_flit[ID];
      assign r_la_in[ID][P_LOCAL]    = inj_la[ID];
      assign inj_cong[ID]            = r_cong[ID][P_LOCAL];
      assign inj_credit[ID]          = r_cr_out[ID][P_LOCAL];
      assign ej_valid[ID]            = r_out_valid[ID][P_LOCAL];
      assign ej_flit[ID]             = r_out_flit[ID][P_LOCAL];
      assign r_cr_in[ID][P_LOCAL]    = ej_credit[ID];
      assign r_stop[ID][P_LOCAL]     = 1'b0;
      assign held_any[ID][P_LOCAL]   = 1'b0;
      assign err_link[ID][P_LOCAL]   = 1'b0;

      for (genvar p = 0; p < 4; p++) begin : g_p
        localparam int NB = nb(x, y, p);
        if (NB >= 0) begin : g_link
          // link from this node's input port p's neighbour: neighbour NB sends
          // through its port opp(p) into our port p
          logic [C-1:0] held;
          channel_link #(.C(C)) u_link (
            .clk, .clk_dly, .rst_n,
            .in_valid  (r_out_valid[NB][opp(p)]),
            .in_flit   (r_out_flit[NB][opp(p)]),
            .out_valid (r_in_valid[ID][p]),
            .out_flit  (r_in_flit[ID][p]),
            .cong_i    (r_cong[ID][p]),
            .stop_o    (r_stop[NB][opp(p)]),
            .err_o     (err_link[ID][p]),
            .held_o    (held)
          );
          assign r_la_in[ID][p]  = r_la_out[NB][opp(p)];
          assign r_cr_in[NB][opp(p)] = r_cr_out[ID][p];
          assign held_any[ID][p] = |held;
        end else begin : g_edge
          assign r_in_valid[ID][p] = 1'b0;
          assign r_in_flit[ID][p]  = '0;
          assign r_la_in[ID][p]    = '0;
          assign held_any[ID][p]   = 1'b0;
          assign err_link[ID][p]   = 1'b0;
          // nothing is ever routed off the mesh; the output is held stopped
          assign r_stop[ID][p]     = 1'b1;
          assign r_cr_in[ID][p]    = '0;
        end
      end
      assign link_held[ID] = |held_any[ID];
    end
  end

  always_comb begin
    link_err = 1'b0;
    for (int n = 0; n < N; n++) link_err |= |err_link[n];
  end
endmodule

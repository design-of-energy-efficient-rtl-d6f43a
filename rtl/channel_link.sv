// channel_link: dual-function inter-router link built from C stages of
// three-state repeaters, each with its own double-sampling control block.
//
// Stage 0 is next to the sending router A, stage C-1 next to the receiving
// router B. A flit crosses all transparent stages in one cycle (link
// traversal). B's congestion signal enters the control block of stage C-1; each
// control block delays it one clock and hands it to the block upstream, so the
// stages tri-state one after the other, from B towards A, and each one parks
// the flit that reaches it. When B releases the congestion the stages reopen
// in the same order and the parked flits reach B one per cycle, in order. The
// link thus stores up to C flits on its wires.
//
// Interface timing:
//  * a flit presented on in_* in cycle t arrives on out_* in cycle t unless a
//    stage holds it;
//  * cong_i in cycle t stops deliveries in cycle t+1 (B may raise it with one
//    free slot left);
//  * stop_o in cycle t means A must not present a flit in cycle t+1: stage 0
//    holds (or is capturing) a flit now, so next cycle it is either still
//    full or releasing that flit onto the wire.
// The one-clock-per-stage delay of the congestion line is the control block of
// the design; stop_o, which lets A use stage 0 as well, is this design's own
// flow-control rule towards the sender.
module channel_link
  import noc_pkg::*;
#(
  parameter int C = LINK_BUFS
) (
  input  logic  clk,
  input  logic  clk_dly,
  input  logic  rst_n,
  input  logic  in_valid,
  input  flit_t in_flit,
  output logic  out_valid,
  output flit_t out_flit,
  input  logic  cong_i,     // from router B
  output logic  stop_o,     // to router A
  output logic  err_o,      // a control block corrected a timing error
  output logic [C-1:0] held_o
);
  logic [C:0]   ctrl_in;    // ctrl_in[k] = congestion input of stage k's block
  logic [C-1:0] ctrl, err;
  logic [C:0]   v;
  flit_t        f [C+1];

  assign ctrl_in[C] = cong_i;
  assign v[0] = in_valid;
  assign f[0] = in_flit;

  for (genvar k = 0; k < C; k++) begin : g_stage
    congestion_ctrl u_ctrl (
      .clk, .clk_dly, .rst_n,
      .cong_i (ctrl_in[k+1]),
      .ctrl_o (ctrl[k]),
      .err_o  (err[k])
    );
    assign ctrl_in[k] = ctrl[k];
    repeater_stage u_rep (
      .clk, .rst_n,
      .hold_i    (ctrl[k]),
      .in_valid  (v[k]),
      .in_flit   (f[k]),
      .out_valid (v[k+1]),
      .out_flit  (f[k+1]),
      .held_o    (held_o[k])
    );
  end

  assign out_valid = v[C];
  assign out_flit  = f[C];
  assign err_o     = |err;
  // Stage 0 is tri-stated and holds, or is capturing, a flit.
  assign stop_o = ctrl[0] & (held_o[0] | in_valid);
endmodule

// uvst: Unified VC State Table of one input port.
//
// One row per virtual channel. Each row holds the list of buffer slots
// F0..F(D-1) occupied by the VC's flits in arrival order, managed as a small
// circular list with a write pointer WP (where the next slot number goes) and a
// read pointer RP (the slot of the oldest flit), a flit count, and the control
// fields of the packet: state, bypass status, output port OP and output VC OVC.
// D = (z+c)/v, the number of credits per VC, bounds how many flits of a VC can be
// held.
//
// Interface: push appends a slot number to a VC's list, pop removes the oldest
// one; both may hit the same VC in one cycle. head_slot/cnt give each VC's
// oldest slot and count. The control fields are written per VC through wr_en/
// wr_entry. All outputs are registered state; writes take effect at the clock
// edge. Reset empties every list and sets every VC idle.
module uvst
  import noc_pkg::*;
#(
  parameter int NVC   = NUM_VC,
  parameter int SLOTS = BUF_SLOTS,
  parameter int D     = VC_CREDITS,
  localparam int IDX_W = $clog2(SLOTS),
  localparam int PTR_W = (D > 1) ? $clog2(D) : 1,
  localparam int CNT_W = $clog2(D + 1),
  localparam int V_W   = (NVC > 1) ? $clog2(NVC) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [V_W-1:0]   push_vc,
  input  logic [IDX_W-1:0] push_slot,
  input  logic             pop,
  input  logic [V_W-1:0]   pop_vc,
  output logic [IDX_W-1:0] head_slot [NVC],
  output logic [CNT_W-1:0] cnt       [NVC],
  input  logic [NVC-1:0]   wr_en,
  input  vc_entry_t        wr_entry  [NVC],
  output vc_entry_t        entry     [NVC]
);
  logic [IDX_W-1:0] f  [NVC][D];
  logic [PTR_W-1:0] rp [NVC];
  logic [PTR_W-1:0] wp [NVC];

  function automatic logic [PTR_W-1:0] inc(input logic [PTR_W-1:0] p);
    return (int'(p) == D - 1) ? '0 : p + PTR_W'(1);
  endfunction

  always_comb
    for (int v = 0; v < NVC; v++) head_slot[v] = f[v][rp[v]];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int v = 0; v < NVC; v++) begin
        rp[v]    <= '0;
        wp[v]    <= '0;
        cnt[v]   <= '0;
        entry[v] <= '{state: VS_IDLE, bypass: 1'b0, op: '0, ovc: '0};
      end
    end else begin
      for (int v = 0; v < NVC; v++) begin
        logic do_push, do_pop;
        do_push = push && (push_vc == V_W'(v));
        do_pop  = pop  && (pop_vc  == V_W'(v));
        if (do_push) wp[v] <= inc(wp[v]);
        if (do_pop)  rp[v] <= inc(rp[v]);
        cnt[v] <= cnt[v] + CNT_W'(do_push) - CNT_W'(do_pop);
        if (wr_en[v]) entry[v] <= wr_entry[v];
      end
    end

  always_ff @(posedge clk)
    if (push) f[push_vc][wp[push_vc]] <= push_slot;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> (int'(cnt[push_vc]) < D || (pop && pop_vc == push_vc)));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> cnt[pop_vc] != '0);
endmodule

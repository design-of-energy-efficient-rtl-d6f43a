// output_port: output side of one router port.
//
// Holds, for every VC of the downstream input port, a busy bit (the VC belongs
// to a packet) and a credit counter. A VC is offered to the allocator only when
// it is idle and all its credits are back, i.e. the downstream row of the VC
// state table is empty again. The counter starts at (z+c)/v, drops when a flit
// leaves on that VC and rises on each credit returned by the downstream port.
// The tail flit frees the VC.
//
// The flit chosen by the switch allocator crosses the crossbar in the ST cycle
// and is captured in the output register, which drives the link in the next
// cycle (LT). In the ST cycle the port also emits the lookahead for the next
// router (destination, VCID, head/tail), so the lookahead reaches it one cycle
// ahead of the flit. out_ready tells the allocator whether a flit may be sent
// this cycle: the link must not be stopped.
module output_port
  import noc_pkg::*;
#(
  parameter int NVC     = NUM_VC,
  parameter int CREDITS = VC_CREDITS,
  localparam int V_W   = (NVC > 1) ? $clog2(NVC) : 1,
  localparam int CR_W  = $clog2(CREDITS + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // VC allocation
  input  logic           alloc_en,
  input  logic [V_W-1:0] alloc_vc,
  output logic [NVC-1:0] ovc_free,
  // switch traversal
  input  logic           send_en,
  input  flit_t          send_flit,    // VCID already rewritten to the OVC
  output logic           out_ready,
  output logic [NVC-1:0] credit_ok,    // at least one credit now
  output logic [NVC-1:0] credit_ok_next, // at least one credit after this cycle
  // downstream side
  input  logic           stop_i,       // link cannot take a flit next cycle
  input  logic [NVC-1:0] credit_in,    // credit returns, one bit per VC
  output logic           out_valid,
  output flit_t          out_flit,
  output la_t            la_o
);
  logic [NVC-1:0]  busy;
  logic [CR_W-1:0] cr [NVC];

  always_comb begin
    out_ready = !stop_i;
    for (int v = 0; v < NVC; v++) begin
      logic [CR_W-1:0] nxt;
      nxt = cr[v] - CR_W'(send_en && send_flit.vcid == V_W'(v)) + CR_W'(credit_in[v]);
      ovc_free[v]       = !busy[v] && (int'(cr[v]) == CREDITS);
      credit_ok[v]      = (cr[v] != '0);
      credit_ok_next[v] = (nxt != '0);
    end
    la_o.valid = send_en;
    la_o.head  = send_flit.head;
    la_o.tail  = send_flit.tail;
    la_o.vcid  = send_flit.vcid;
    la_o.dest  = send_flit.dest;
  end

  // one-hot: the VC the flit in the ST cycle is sent on
  logic [NVC-1:0] snd_vc;
  always_comb
    for (int v = 0; v < NVC; v++) snd_vc[v] = send_en && (send_flit.vcid == V_W'(v));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy      <= '0;
      out_valid <= 1'b0;
      for (int v = 0; v < NVC; v++) cr[v] <= CR_W'(CREDITS);
    end else begin
      out_valid <= send_en;
      for (int v = 0; v < NVC; v++) begin
        cr[v] <= cr[v] - CR_W'(snd_vc[v]) + CR_W'(credit_in[v]);
        if (alloc_en && alloc_vc == V_W'(v)) busy[v] <= 1'b1;
        else if (snd_vc[v] && send_flit.tail) busy[v] <= 1'b0;
      end
    end

  always_ff @(posedge clk)
    if (send_en) out_flit <= send_flit;

  a_credit_avail: assert property (@(posedge clk) disable iff (!rst_n)
    send_en |-> credit_ok[send_flit.vcid]);
  a_send_ready: assert property (@(posedge clk) disable iff (!rst_n)
    send_en |-> out_ready);
  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n)
    alloc_en |-> ovc_free[alloc_vc]);
endmodule

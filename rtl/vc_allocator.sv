// vc_allocator: virtual-channel allocation (VA) for one output port.
//
// Requesters are the head flits that want an output VC of this port: first the
// lookaheads of the NP input ports (indices 0..NP-1), then the buffered heads of
// the NP input ports (indices NP..2NP-1). At most one request is granted per
// cycle. Lookahead requests win over buffered ones so that a packet can set up
// its bypass before its head flit arrives; within each group a round-robin
// pointer rotates the priority. The granted VC is the lowest-numbered free one.
//
// Timing: grant and VC are combinational from the requests and ovc_free; the
// round-robin pointers move at the clock edge after a grant.
// Lookahead priority and round-robin order are this design's choices.
module vc_allocator
  import noc_pkg::*;
#(
  parameter int NP  = NUM_PORTS,
  parameter int NVC = NUM_VC,
  localparam int NR  = 2 * NP,
  localparam int P_W = $clog2(NP),
  localparam int V_W = (NVC > 1) ? $clog2(NVC) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NR-1:0]  req,
  input  logic [NVC-1:0] ovc_free,
  output logic [NR-1:0]  gnt,
  output logic [V_W-1:0] gnt_vc
);
  logic [P_W-1:0] ptr_la, ptr_buf;
  logic           any_free;

  always_comb begin
    gnt      = '0;
    gnt_vc   = '0;
    any_free = 1'b0;
    for (int v = NVC - 1; v >= 0; v--)
      if (ovc_free[v]) begin
        gnt_vc   = V_W'(v);
        any_free = 1'b1;
      end
    if (any_free) begin
      if (|req[NP-1:0]) begin
        for (int k = NP - 1; k >= 0; k--) begin
          if (req[((int'(ptr_la) + k) % NP)]) gnt = NR'(1) << ((int'(ptr_la) + k) % NP);
        end
      end else begin
        for (int k = NP - 1; k >= 0; k--) begin
          if (req[NP + ((int'(ptr_buf) + k) % NP)]) gnt = NR'(1) << (NP + ((int'(ptr_buf) + k) % NP));
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ptr_la  <= '0;
      ptr_buf <= '0;
    end else begin
      for (int i = 0; i < NP; i++) begin
        if (gnt[i])      ptr_la  <= P_W'((i + 1) % NP);
        if (gnt[NP + i]) ptr_buf <= P_W'((i + 1) % NP);
      end
    end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule

// switch_allocator: switch allocation (SA) for one output port of the 10x5
// crossbar.
//
// Each input port has two crossbar inputs: its bypass path (requests 0..NP-1)
// and its buffer read path (requests NP..2NP-1). One request is granted per
// cycle, and none while the output may not send (the link ahead is stopped).
// Bypass requests win over buffered ones, because a bypassing flit is already
// on its way and would otherwise have to be written into the buffer; within each
// group a round-robin pointer rotates the priority.
//
// Timing: gnt/sel are combinational; the pointers move at the clock edge.
// Bypass priority and round-robin order are this design's choices.
module switch_allocator
  import noc_pkg::*;
#(
  parameter int NP = NUM_PORTS,
  localparam int NR  = 2 * NP,
  localparam int P_W = $clog2(NP),
  localparam int S_W = $clog2(NR)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NR-1:0] req,
  input  logic          out_ready,
  output logic [NR-1:0] gnt,
  output logic [S_W-1:0] sel,
  output logic          valid
);
  logic [P_W-1:0] ptr_byp, ptr_buf;

  always_comb begin
    gnt = '0;
    sel = '0;
    if (out_ready) begin
      if (|req[NP-1:0]) begin
        for (int k = NP - 1; k >= 0; k--) begin
          if (req[((int'(ptr_byp) + k) % NP)]) begin
            gnt = NR'(1) << ((int'(ptr_byp) + k) % NP);
            sel = S_W'(((int'(ptr_byp) + k) % NP));
          end
        end
      end else begin
        for (int k = NP - 1; k >= 0; k--) begin
          if (req[NP + ((int'(ptr_buf) + k) % NP)]) begin
            gnt = NR'(1) << (NP + ((int'(ptr_buf) + k) % NP));
            sel = S_W'(NP + ((int'(ptr_buf) + k) % NP));
          end
        end
      end
    end
    valid = |gnt;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ptr_byp <= '0;
      ptr_buf <= '0;
    end else begin
      for (int i = 0; i < NP; i++) begin
        if (gnt[i])      ptr_byp <= P_W'((i + 1) % NP);
        if (gnt[NP + i]) ptr_buf <= P_W'((i + 1) % NP);
      end
    end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule

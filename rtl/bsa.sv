// bsa: Buffer Slot Availability tracker of one input port's unified buffer.
//
// A free bit per slot and a free-slot counter. An arriving flit that enters the
// router buffer is given the lowest-numbered free slot (alloc_idx, valid while
// alloc_ok); a departing flit returns its slot (dealloc_idx). Both may happen in
// the same cycle. The port is declared congested while at most one slot is free,
// which leaves room for the one flit that may still arrive before the link has
// stopped delivering.
//
// Timing: alloc_idx is combinational from the registered free map; the map and
// counter update at the clock edge. Reset marks every slot free. First-free
// allocation and the "one free slot left" congestion threshold follow the
// design; the bitmap encoding is this design's choice.
module bsa #(
  parameter int SLOTS = noc_pkg::BUF_SLOTS,
  localparam int IDX_W = $clog2(SLOTS),
  localparam int CNT_W = $clog2(SLOTS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             alloc_req,
  output logic [IDX_W-1:0] alloc_idx,
  output logic             alloc_ok,
  input  logic             dealloc_req,
  input  logic [IDX_W-1:0] dealloc_idx,
  output logic [CNT_W-1:0] free_cnt,
  output logic             cong_o
);
  logic [SLOTS-1:0] free_q;

  always_comb begin
    alloc_idx = '0;
    alloc_ok  = 1'b0;
    for (int i = SLOTS - 1; i >= 0; i--)
      if (free_q[i]) begin
        alloc_idx = IDX_W'(i);
        alloc_ok  = 1'b1;
      end
    cong_o = (free_cnt <= CNT_W'(1));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      free_q   <= '1;
      free_cnt <= CNT_W'(SLOTS);
    end else begin
      if (alloc_req && alloc_ok) free_q[alloc_idx] <= 1'b0;
      if (dealloc_req)           free_q[dealloc_idx] <= 1'b1;
      free_cnt <= free_cnt - CNT_W'(alloc_req && alloc_ok) + CNT_W'(dealloc_req);
    end

  a_alloc_has_slot: assert property (@(posedge clk) disable iff (!rst_n)
    alloc_req |-> alloc_ok);
  a_dealloc_used: assert property (@(posedge clk) disable iff (!rst_n)
    dealloc_req |-> !free_q[dealloc_idx]);
endmodule

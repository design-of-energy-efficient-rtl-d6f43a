// repeater_stage: one stage of three-state repeaters across all wires of a link,
// modelled at the flit level.
//
// With hold_i low the stage is an ordinary repeater: a flit passes straight
// through in the same cycle, and a flit the stage was holding is released
// downstream. With hold_i high the repeaters are tri-stated and keep the value on
// their output node: the stage captures the first flit that reaches it and
// passes nothing on. The held value is modelled by a flit register plus a valid
// bit; in silicon it is the charge held by the tri-stated repeaters.
//
// hold_i comes from the stage's control block and changes only once per cycle.
// The link's congestion timing guarantees that a held stage never sees a second
// flit and that a releasing stage never meets an incoming one; both rules are
// checked by assertions.
module repeater_stage
  import noc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  hold_i,
  input  logic  in_valid,
  input  flit_t in_flit,
  output logic  out_valid,
  output flit_t out_flit,
  output logic  held_o      // the stage stores a flit
);
  logic  held_v;
  flit_t held_f;

  always_comb begin
    if (!hold_i) begin
      out_valid = held_v | in_valid;
      out_flit  = held_v ? held_f : in_flit;
    end else begin
      out_valid = 1'b0;
      out_flit  = held_f;
    end
    held_o = held_v;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) held_v <= 1'b0;
    else if (!hold_i) held_v <= 1'b0;
    else if (!held_v && in_valid) held_v <= 1'b1;

  always_ff @(posedge clk)
    if (hold_i && !held_v && in_valid) held_f <= in_flit;

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    !(hold_i && held_v && in_valid));
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(!hold_i && held_v && in_valid));
endmodule

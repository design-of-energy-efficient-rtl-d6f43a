// congestion_ctrl: control block of one repeater stage of a dual-function link.
//
// The congestion line is sampled twice: by a flip-flop on the link clock and by
// a shadow flip-flop on a slightly delayed copy of that clock. An XOR of the two
// samples flags a timing error (the congestion input settled after the first
// edge), and a 2:1 MUX then passes the late, correct sample. Without an error
// the main sample is passed. The MUX output drives the three-state control of
// the stage and is the congestion input of the next control block upstream, so
// a chain of these blocks moves congestion one stage per clock towards the
// sender.
//
// Timing: ctrl_o follows cong_i one clock later (it settles at the clk_dly edge
// when the two samples differ). Reset clears both samples. The structure
// (two flops, XOR, MUX with the error as select) follows the double-sampling
// control block of the design; the asynchronous active-low reset is this
// design's choice. The clock gating of an idle block is left out.
module congestion_ctrl (
  input  logic clk,      // link clock
  input  logic clk_dly,  // same clock, slightly offset (delay buffer output)
  input  logic rst_n,
  input  logic cong_i,   // congestion from downstream
  output logic ctrl_o,   // 1 = tri-state (hold) this stage, also to upstream
  output logic err_o     // samples differed: late sample selected
);
  logic s_main, s_late;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s_main <= 1'b0;
    else        s_main <= cong_i;

  always_ff @(posedge clk_dly or negedge rst_n)
    if (!rst_n) s_late <= 1'b0;
    else        s_late <= cong_i;

  always_comb begin
    err_o  = s_main ^ s_late;
    ctrl_o = err_o ? s_late : s_main;
  end
endmodule

// tb_channel_link: random traffic through a 4-stage dual-function link.
// The sender obeys stop_o; the receiver raises congestion at random. Checks:
// every flit arrives exactly once and in order, nothing arrives in the cycle
// after congestion was high, and when congestion rises under a continuous
// stream the wire stores exactly C flits before the sender is stopped.
module tb_channel_link;
  import noc_pkg::*;
  localparam int C = LINK_BUFS;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, cong_i = 0, stop_o, err_o;
  flit_t in_flit, out_flit;
  logic [C-1:0] held_o;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  channel_link #(.C(C)) dut (.clk, .clk_dly(clk), .rst_n, .in_valid, .in_flit, .out_valid,
                             .out_flit, .cong_i, .stop_o, .err_o, .held_o);

  int sent = 0, rcvd = 0, parked = 0;
  bit cong_prev = 0;
  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, m); end
  endtask

  // receiver side: sample before the edge
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      chk(!cong_prev, "delivery in the cycle after congestion");
      chk(out_flit.payload[31:0] == 32'(rcvd), $sformatf("order: got %0d want %0d", out_flit.payload[31:0], rcvd));
      rcvd++;
    end
    cong_prev <= cong_i;
    parked += $countones(held_o);
  end

  initial begin
    in_flit = '0;
    #12 rst_n = 1;
    // random phase
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      if (!stop_o && $urandom_range(3) != 0) begin
        in_valid <= 1; in_flit <= '{default: '0, payload: PAYLOAD_W'(sent)}; sent++;
      end else in_valid <= 0;
      cong_i <= ($urandom_range(9) < 4);
    end
    @(posedge clk) in_valid <= 0; cong_i <= 0;
    repeat (20) @(posedge clk);
    chk(rcvd == sent, $sformatf("sent %0d received %0d", sent, rcvd));
    // capacity: the sender streams, then congestion rises and stays high
    begin
      for (int i = 0; i < 40; i++) begin
        @(posedge clk);
        if (!stop_o) begin in_valid <= 1; in_flit <= '{default: '0, payload: PAYLOAD_W'(sent)}; sent++; end
        else in_valid <= 0;
        if (i == 10) cong_i <= 1;
      end
      @(posedge clk) in_valid <= 0;
      repeat (2) @(posedge clk);
      chk(sent - rcvd == C, $sformatf("stored %0d flits on the wire, expected %0d", sent - rcvd, C));
      chk(held_o == '1, "all stages hold");
    end
    cong_i <= 0;
    repeat (20) @(posedge clk);
    chk(rcvd == sent, "stored flits released");
    chk(parked > 0, "no flit parked");
    chk(!err_o, "no timing error with aligned clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

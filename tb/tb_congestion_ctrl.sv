// tb_congestion_ctrl: checks the double-sampling control block.
// An on-time congestion change must appear on ctrl_o one clock later with no
// error flag. A late change, made between the clock edge and the delayed clock
// edge, is missed by the main flip-flop and caught by the shadow one: the error
// flag must rise and ctrl_o must carry the late (correct) value.
module tb_congestion_ctrl;
  logic clk = 0, clk_dly = 0, rst_n = 0, cong_i = 0;
  logic ctrl_o, err_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(clk) clk_dly <= #2 clk;

  congestion_ctrl dut (.clk, .clk_dly, .rst_n, .cong_i, .ctrl_o, .err_o);

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, m); end
  endtask

  logic val;
  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      val = $urandom_range(1);
      @(negedge clk) cong_i = val;          // on time
      @(posedge clk) #4;                    // after both edges
      chk(ctrl_o == val && !err_o, "on-time sample");
    end
    for (int i = 0; i < 40; i++) begin
      val = ~ctrl_o;
      @(posedge clk) #1 cong_i = val;       // late: after clk, before clk_dly
      #3;                                   // after clk_dly
      chk(err_o == 1'b1, "late change flagged");
      chk(ctrl_o == val, "late value selected");
      @(posedge clk) #4;
      chk(ctrl_o == val && !err_o, "settled after late change");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

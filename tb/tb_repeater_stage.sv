// tb_repeater_stage: a transparent stage passes flits in the same cycle; a held
// stage captures the first flit and outputs nothing; on release the held flit
// comes out in the first transparent cycle. Random sequences respecting the
// stage's rules are compared with a reference model.
module tb_repeater_stage;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, hold_i = 0, in_valid = 0, out_valid, held_o;
  flit_t in_flit, out_flit;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  repeater_stage dut (.clk, .rst_n, .hold_i, .in_valid, .in_flit, .out_valid, .out_flit, .held_o);

  bit    m_v;
  flit_t m_f;
  initial begin
    in_flit = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      hold_i  = $urandom_range(1);
      // the link never offers a flit to a full held stage or a releasing one
      in_valid = m_v ? 1'b0 : $urandom_range(1);
      in_flit  = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (!hold_i) begin
        if (out_valid !== (m_v | in_valid) || (out_valid && out_flit !== (m_v ? m_f : in_flit))) begin
          failures++; $display("FAIL %0t transparent", $time);
        end
      end else if (out_valid) begin
        failures++; $display("FAIL %0t held stage drove the wire", $time);
      end
      checks++;
      if (held_o !== m_v) begin failures++; $display("FAIL held flag"); end
      @(posedge clk);
      if (!hold_i) m_v = 0;
      else if (!m_v && in_valid) begin m_v = 1; m_f = in_flit; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

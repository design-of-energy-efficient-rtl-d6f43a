// tb_crossbar: random flits on the 10 inputs and random selections; every
// output must carry the selected input.
module tb_crossbar;
  import noc_pkg::*;
  localparam int NP = NUM_PORTS;
  flit_t in_flit [2*NP], out_flit [NP];
  logic [3:0] sel [NP];
  logic [NP-1:0] sel_valid, out_valid;
  int checks = 0, failures = 0;
  crossbar dut (.in_flit, .sel, .sel_valid, .out_flit, .out_valid);
  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int k = 0; k < 2 * NP; k++) in_flit[k] = {$urandom, $urandom, $urandom, $urandom};
      for (int o = 0; o < NP; o++) sel[o] = 4'($urandom_range(2 * NP - 1));
      sel_valid = 5'($urandom);
      #1;
      for (int o = 0; o < NP; o++) begin
        checks++;
        if (out_flit[o] != in_flit[sel[o]] || out_valid[o] != sel_valid[o]) begin
          failures++; if (failures < 10) $display("FAIL output %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

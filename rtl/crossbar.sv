// crossbar: the router's 10x5 switch.
//
// Every input port feeds the crossbar twice, once from its bypass path
// (inputs 0..NP-1) and once from its buffer read MUX (inputs NP..2NP-1), so a
// flit held in the buffer can leave while a bypassing flit of the same port
// goes to another output. Each output takes the input chosen by its switch
// allocator. Purely combinational.
module crossbar
  import noc_pkg::*;
#(
  parameter int NP = NUM_PORTS,
  localparam int NI  = 2 * NP,
  localparam int S_W = $clog2(NI)
) (
  input  flit_t          in_flit  [NI],
  input  logic [S_W-1:0] sel      [NP],
  input  logic [NP-1:0]  sel_valid,
  output flit_t          out_flit [NP],
  output logic [NP-1:0]  out_valid
);
  always_comb
    for (int o = 0; o < NP; o++) begin
      out_flit[o]  = in_flit[sel[o]];
      out_valid[o] = sel_valid[o];
    end
endmodule

// crossbar: the NPORT x NPORT switch of the router's second stage.
//
// Each input port presents the flit held in its flit register together with a one-hot
// output selection and the number of the downstream VC. Each output port ORs together
// the flits of the inputs that select it; the switch allocator guarantees that at most one
// input selects an output in a cycle (the router asserts this). Combinational: the flit
// crosses the switch and the link in the same cycle and is written into the downstream
// buffer at the end of it.
module crossbar
  import ecdr2_pkg::*;
(
  input  flit_t       in_flit  [NPORT],
  input  logic        in_valid [NPORT],
  input  dir_t        in_sel   [NPORT],
  input  logic [0:0]  in_vc    [NPORT],
  output flit_t       out_flit  [NPORT],
  output logic        out_valid [NPORT],
  output logic [0:0]  out_vc    [NPORT]
);
  always_comb begin
    for (int o = 0; o < NPORT; o++) begin
      out_flit[o]  = '0;
      out_valid[o] = 1'b0;
      out_vc[o]    = '0;
      for (int i = 0; i < NPORT; i++) begin
        if (in_valid[i] && in_sel[i][o]) begin
          out_flit[o]  = out_flit[o] | in_flit[i];
          out_valid[o] = 1'b1;
          out_vc[o]    = out_vc[o] | in_vc[i];
        end
      end
    end
  end

endmodule

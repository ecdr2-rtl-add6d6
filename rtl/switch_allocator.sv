// switch_allocator: SA with speculative switch allocation (SSA).
//
// Every input VC may request its output port; a request is either non-speculative (the
// packet already owns a downstream VC) or speculative (a head flit asking for VA in the
// same cycle). Allocation is separable, input first: each input port picks one of its
// VCs, then each output port picks one of the input ports that chose it. At both steps
// non-speculative requests are served before speculative ones, so a failed speculation
// never takes the switch from a packet that already holds a VC. Round-robin arbiters
// break ties; grants are combinational and the arbiter pointers move when a grant is
// given. A speculative grant is used only if VA succeeds in the same cycle; otherwise
// that switch slot is lost.
// Priority of non-speculative requests follows the design; the separable input-first
// organisation and round-robin policy are this implementation's choices.
module switch_allocator
  import ecdr2_pkg::*;
#(
  parameter int unsigned NIN = NPORT * NVC
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NIN-1:0] req,
  input  dir_t           req_port [NIN],
  input  logic [NIN-1:0] spec,
  output logic [NIN-1:0] gnt
);
  // input stage
  logic [NVC-1:0]   in_gnt  [NPORT];
  logic [NPORT-1:0] in_win;          // input port has a winner
  logic [NPORT-1:0] in_nspec;        // its winner is non-speculative
  dir_t             in_port [NPORT]; // its winner's output port

  for (genvar p = 0; p < NPORT; p++) begin : g_in
    logic [NVC-1:0] r, rn, rsel;
    always_comb begin
      for (int v = 0; v < NVC; v++) begin
        r[v]  = req[p*NVC + v];
        rn[v] = req[p*NVC + v] && !spec[p*NVC + v];
      end
      rsel = (rn != '0) ? rn : r;
    end
    rr_arbiter #(.N(NVC)) u_arb (.clk, .rst_n, .req(rsel), .update(1'b1), .gnt(in_gnt[p]));
    always_comb begin
      in_win[p]   = (in_gnt[p] != '0);
      in_nspec[p] = (rn != '0);
      in_port[p]  = '0;
      for (int v = 0; v < NVC; v++)
        if (in_gnt[p][v]) in_port[p] = req_port[p*NVC + v];
    end
  end

  // output stage
  logic [NPORT-1:0] out_gnt [NPORT];   // [output][input port]
  for (genvar o = 0; o < NPORT; o++) begin : g_out
    logic [NPORT-1:0] r, rn, rsel;
    always_comb begin
      for (int p = 0; p < NPORT; p++) begin
        r[p]  = in_win[p] && in_port[p][o];
        rn[p] = r[p] && in_nspec[p];
      end
      rsel = (rn != '0) ? rn : r;
    end
    rr_arbiter #(.N(NPORT)) u_arb (.clk, .rst_n, .req(rsel), .update(1'b1), .gnt(out_gnt[o]));
  end

  always_comb begin
    gnt = '0;
    for (int p = 0; p < NPORT; p++) begin
      logic won;
      won = 1'b0;
      for (int o = 0; o < NPORT; o++) if (out_gnt[o][p]) won = 1'b1;
      for (int v = 0; v < NVC; v++)
        gnt[p*NVC + v] = won && in_gnt[p][v];
    end
  end
endmodule

// vc_allocator: VA, the virtual-channel allocator of a router.
//
// Each input VC holding a new head flit asks for one downstream VC, named by its DIR
// (output port) and VC_ID (VC at that port). Every output VC has a round-robin arbiter
// over all NIN input VCs and a busy flag; a free output VC grants one of its requesters.
// The grant is held (busy) until the tail flit of the packet leaves the router, signalled
// by release. A grant may be abandoned by the requester (kill, raised when the one-hot
// checker found the DIR/VC_ID it was made from corrupted): the output VC then stays
// free and the arbiter keeps its priority. Grants are combinational; busy flags and
// arbiter pointers are updated at the clock edge.
// Input VC i belongs to input port i / NVC. Separate per-output-VC arbiters and the
// hold-until-tail rule follow the usual VA organisation; the arbitration policy is this
// implementation's choice.
module vc_allocator
  import ecdr2_pkg::*;
#(
  parameter int unsigned NIN = NPORT * NVC
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NIN-1:0]  req,
  input  dir_t            req_port [NIN],
  input  vcid_t           req_vc   [NIN],
  input  logic [NIN-1:0]  kill,
  output logic [NIN-1:0]  gnt,
  input  logic [NIN-1:0]  release_vc,          // tail of the packet of input VC i left
  input  dir_t            rel_port [NIN],
  input  vcid_t           rel_vc   [NIN],
  output logic [NPORT-1:0][NVC-1:0] busy
);
  logic [NIN-1:0] arb_gnt [NPORT][NVC];
  logic [NPORT-1:0][NVC-1:0] take;

  for (genvar o = 0; o < NPORT; o++) begin : g_o
    for (genvar v = 0; v < NVC; v++) begin : g_v
      logic [NIN-1:0] r;
      always_comb begin
        for (int i = 0; i < int'(NIN); i++)
          r[i] = req[i] && req_port[i][o] && req_vc[i][v] && !busy[o][v];
      end
      rr_arbiter #(.N(NIN)) u_arb (
        .clk, .rst_n, .req(r), .update(take[o][v]), .gnt(arb_gnt[o][v])
      );
      assign take[o][v] = |(arb_gnt[o][v] & ~kill);
    end
  end

  always_comb begin
    gnt = '0;
    for (int o = 0; o < NPORT; o++)
      for (int v = 0; v < NVC; v++)
        gnt = gnt | arb_gnt[o][v];
  end

  logic [NPORT-1:0][NVC-1:0] rel;   // holder's tail left
  always_comb begin
    rel = '0;
    for (int o = 0; o < NPORT; o++)
      for (int v = 0; v < NVC; v++)
        for (int i = 0; i < int'(NIN); i++)
          if (release_vc[i] && rel_port[i][o] && rel_vc[i][v]) rel[o][v] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy <= '0;
    else begin
      for (int o = 0; o < NPORT; o++)
        for (int v = 0; v < NVC; v++) begin
          if (take[o][v])         busy[o][v] <= 1'b1;
          else if (rel[o][v])     busy[o][v] <= 1'b0;
        end
    end
  end
endmodule

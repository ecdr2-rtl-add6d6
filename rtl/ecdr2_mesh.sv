// ecdr2_mesh: a MESH_X x MESH_Y mesh network-on-chip of ECDR2 routers with XY routing,
// each router with a network interface (encoder on the injection side, decoder on the
// ejection side). This is the top of the design; the default 8 x 8 mesh with 2 VCs of
// 4 flits per input port is the configuration the design is evaluated in.
//
// Node n = y * MESH_X + x sits at (x, y); y grows towards South. Router ports N/E/S/W are
// wired to the neighbours (a flit leaving East of (x, y) enters West of (x+1, y), and the
// credits run back the other way); ports on the mesh edge are tied off. The Local port
// connects to the node's network interface.
// Injection: a traffic source presents the raw fields of one flit (type, destination,
// VC, 64-bit payload or 45-bit RB) with inj_valid; the encoder codes it and it is written
// into the local input VC in the same cycle. The source must hold a credit for that VC:
// inj_credit returns one per freed slot (each VC starts with DEPTH credits). Flits of a
// packet are injected in order on one VC: head, bodies, tail.
// Ejection: flits leaving a router's Local port are corrected and decoded, and appear on
// ej_* one cycle later; the interface always accepts them.
// Fault injection: err_flip[n][p] is XORed into the flit entering input port p of router
// n, modelling bit flips on links and on injection; tie it to zero for normal use.
// ev[n] carries each router's event pulses for monitoring.
module ecdr2_mesh
  import ecdr2_pkg::*;
#(
  parameter int unsigned MESH_X = 8,
  parameter int unsigned MESH_Y = 8,
  parameter int unsigned DEPTH  = 4,
  localparam int unsigned NN    = MESH_X * MESH_Y
) (
  input  logic            clk,
  input  logic            rst_n,
  // injection
  input  logic            inj_valid [NN],
  input  logic [0:0]      inj_vc    [NN],
  input  ft_e             inj_ft    [NN],
  input  logic [5:0]      inj_dst   [NN],
  input  logic [63:0]     inj_data  [NN],
  output logic [NVC-1:0]  inj_credit[NN],
  // fault injection
  input  flit_t           err_flip  [NN][NPORT],
  // ejection
  output logic            ej_valid  [NN],
  output logic [0:0]      ej_vc     [NN],
  output ft_e             ej_ft     [NN],
  output logic [5:0]      ej_dst    [NN],
  output logic [63:0]     ej_data   [NN],
  output logic            ej_corrected     [NN],
  output logic            ej_uncorrectable [NN],
  output logic            ej_misrouted     [NN],
  output ev_t             ev        [NN]
);
  // router-side link signals
  flit_t          r_in_flit   [NN][NPORT];
  logic           r_in_valid  [NN][NPORT];
  logic [0:0]     r_in_vc     [NN][NPORT];
  logic [NVC-1:0] r_cred_out  [NN][NPORT];
  flit_t          r_out_flit  [NN][NPORT];
  logic           r_out_valid [NN][NPORT];
  logic [0:0]     r_out_vc    [NN][NPORT];
  logic [NVC-1:0] r_cred_in   [NN][NPORT];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;
      localparam coord_t CX = coord_t'(x);
      localparam coord_t CY = coord_t'(y);

      flit_t raw_in [NPORT];
      flit_t enc_flit;

      ni_encoder u_enc (
        .my_x(CX), .my_y(CY), .ft(inj_ft[N]), .dst(inj_dst[N]), .vc(inj_vc[N]),
        .data(inj_data[N]), .flit(enc_flit)
      );

      // North neighbour (x, y-1): its South output feeds our North input.
      if (y > 0) begin : g_n
        assign raw_in[P_N]          = r_out_flit[N - MESH_X][P_S];
        assign r_in_valid[N][P_N]   = r_out_valid[N - MESH_X][P_S];
        assign r_in_vc[N][P_N]      = r_out_vc[N - MESH_X][P_S];
        assign r_cred_in[N][P_N]    = r_cred_out[N - MESH_X][P_S];
      end else begin : g_n_edge
        assign raw_in[P_N]          = '0;
        assign r_in_valid[N][P_N]   = 1'b0;
        assign r_in_vc[N][P_N]      = '0;
        assign r_cred_in[N][P_N]    = '0;
      end
      if (y < MESH_Y - 1) begin : g_s
        assign raw_in[P_S]          = r_out_flit[N + MESH_X][P_N];
        assign r_in_valid[N][P_S]   = r_out_valid[N + MESH_X][P_N];
        assign r_in_vc[N][P_S]      = r_out_vc[N + MESH_X][P_N];
        assign r_cred_in[N][P_S]    = r_cred_out[N + MESH_X][P_N];
      end else begin : g_s_edge
        assign raw_in[P_S]          = '0;
        assign r_in_valid[N][P_S]   = 1'b0;
        assign r_in_vc[N][P_S]      = '0;
        assign r_cred_in[N][P_S]    = '0;
      end
      if (x < MESH_X - 1) begin : g_e
        assign raw_in[P_E]          = r_out_flit[N + 1][P_W];
        assign r_in_valid[N][P_E]   = r_out_valid[N + 1][P_W];
        assign r_in_vc[N][P_E]      = r_out_vc[N + 1][P_W];
        assign r_cred_in[N][P_E]    = r_cred_out[N + 1][P_W];
      end else begin : g_e_edge
        assign raw_in[P_E]          = '0;
        assign r_in_valid[N][P_E]   = 1'b0;
        assign r_in_vc[N][P_E]      = '0;
        assign r_cred_in[N][P_E]    = '0;
      end
      if (x > 0) begin : g_w
        assign raw_in[P_W]          = r_out_flit[N - 1][P_E];
        assign r_in_valid[N][P_W]   = r_out_valid[N - 1][P_E];
        assign r_in_vc[N][P_W]      = r_out_vc[N - 1][P_E];
        assign r_cred_in[N][P_W]    = r_cred_out[N - 1][P_E];
      end else begin : g_w_edge
        assign raw_in[P_W]          = '0;
        assign r_in_valid[N][P_W]   = 1'b0;
        assign r_in_vc[N][P_W]      = '0;
        assign r_cred_in[N][P_W]    = '0;
      end
      assign raw_in[P_L]        = enc_flit;
      assign r_in_valid[N][P_L] = inj_valid[N];
      assign r_in_vc[N][P_L]    = inj_vc[N];
      assign inj_credit[N]      = r_cred_out[N][P_L];

      for (genvar p = 0; p < NPORT; p++) begin : g_flip
        assign r_in_flit[N][p] = raw_in[p] ^ err_flip[N][p];
      end

      ecdr2_router #(.DEPTH(DEPTH)) u_router (
        .clk, .rst_n, .my_x(CX), .my_y(CY),
        .in_flit(r_in_flit[N]), .in_valid(r_in_valid[N]), .in_vc(r_in_vc[N]),
        .credit_out(r_cred_out[N]),
        .out_flit(r_out_flit[N]), .out_valid(r_out_valid[N]), .out_vc(r_out_vc[N]),
        .credit_in(r_cred_in[N]),
        .ev(ev[N])
      );

      ni_decoder u_dec (
        .clk, .rst_n, .my_x(CX), .my_y(CY),
        .in_valid(r_out_valid[N][P_L]), .in_vc(r_out_vc[N][P_L]), .in_flit(r_out_flit[N][P_L]),
        .credit_out(r_cred_in[N][P_L]),
        .ej_valid(ej_valid[N]), .ej_vc(ej_vc[N]), .ej_ft(ej_ft[N]), .ej_dst(ej_dst[N]),
        .ej_data(ej_data[N]), .ej_corrected(ej_corrected[N]),
        .ej_uncorrectable(ej_uncorrectable[N]), .ej_misrouted(ej_misrouted[N])
      );
    end
  end
endmodule

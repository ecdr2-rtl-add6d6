// ecdr2_router: the ECDR2 two-stage error-correcting virtual-channel router.
//
// Five input and five output ports (N, E, S, W, Local), NVC = 2 virtual channels per
// input port, DEPTH-flit buffers and credit-based flow control.
// Stage 1 (one cycle after the flit is written into a VC buffer): error correction and
// detection of the critical fields, lookahead routing (LRC), VC allocation (VA) and
// speculative switch allocation (SSA) for head flits, switch allocation (SA) for the
// others; the Payload-ECC corrector runs alongside. The result goes into the flit
// register of the VC. Stage 2: the flit register drives the crossbar and the output link;
// the flit is written into the downstream buffer at the end of that cycle. A flit thus
// needs two cycles per hop, three for a head flit whose DIR/VC_ID failed the one-hot check.
// Links: every input port takes a 77-bit coded flit, a valid bit and the number of the
// VC to write; it returns one credit bit per VC, high for one cycle per freed slot.
// Outputs mirror this. Credit counters (one per output VC, reset to DEPTH) gate switch
// requests; a counter is decremented when a flit is granted and incremented on a
// returned credit. A flit written with no free slot is a protocol error (asserted in the
// buffer). The router's coordinates are inputs so every router of a mesh is the same module.
// The ev output pulses for each mechanism (corrections, RC cycles, allocation outcomes,
// credit stalls) and is meant for monitoring only.
// The pipeline, the placement of the checkers and the allocator priorities follow the
// design; credit counters and the link signalling are this implementation's choices.
module ecdr2_router
  import ecdr2_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  coord_t                  my_x,
  input  coord_t                  my_y,
  input  flit_t                   in_flit   [NPORT],
  input  logic                    in_valid  [NPORT],
  input  logic [0:0]              in_vc     [NPORT],
  output logic [NVC-1:0]          credit_out[NPORT],
  output flit_t                   out_flit  [NPORT],
  output logic                    out_valid [NPORT],
  output logic [0:0]              out_vc    [NPORT],
  input  logic [NVC-1:0]          credit_in [NPORT],
  output ev_t                     ev
);
  localparam int unsigned NIN = NPORT * NVC;
  localparam int unsigned CW  = $clog2(DEPTH + 1);

  logic [NPORT-1:0][NVC-1:0] cred_avail;
  logic [CW-1:0] cnt [NPORT][NVC];

  logic [NIN-1:0] va_req, va_kill, va_gnt, sa_req, sa_spec, sa_gnt;
  logic [NIN-1:0] sent, sent_tail, fr_valid;
  dir_t           va_port [NIN];
  vcid_t          va_vc   [NIN];
  dir_t           sa_port [NIN];
  dir_t           sent_port [NIN];
  vcid_t          sent_vc [NIN];
  flit_t          fr_flit [NIN];
  dir_t           fr_port [NIN];
  logic [0:0]     fr_vc   [NIN];
  ev_t            vc_ev   [NIN];
  logic [NPORT-1:0][NVC-1:0] busy;

  for (genvar p = 0; p < NPORT; p++) begin : g_port
    for (genvar v = 0; v < NVC; v++) begin : g_vc
      localparam int I = p * NVC + v;
      input_vc #(.DEPTH(DEPTH), .VC_IDX(v)) u_vc (
        .clk, .rst_n, .my_x, .my_y,
        .wr_en(in_valid[p] && (32'(in_vc[p]) == v)),
        .wr_flit(in_flit[p]),
        .credit_out(credit_out[p][v]),
        .cred_avail,
        .va_req(va_req[I]), .va_port(va_port[I]), .va_vc(va_vc[I]), .va_kill(va_kill[I]),
        .va_gnt(va_gnt[I]),
        .sa_req(sa_req[I]), .sa_port(sa_port[I]), .sa_spec(sa_spec[I]), .sa_gnt(sa_gnt[I]),
        .sent(sent[I]), .sent_port(sent_port[I]), .sent_vc(sent_vc[I]),
        .sent_tail(sent_tail[I]),
        .fr_valid(fr_valid[I]), .fr_flit(fr_flit[I]), .fr_port(fr_port[I]), .fr_vc(fr_vc[I]),
        .ev(vc_ev[I])
      );
    end
  end

  vc_allocator #(.NIN(NIN)) u_va (
    .clk, .rst_n, .req(va_req), .req_port(va_port), .req_vc(va_vc), .kill(va_kill),
    .gnt(va_gnt), .release_vc(sent_tail), .rel_port(sent_port), .rel_vc(sent_vc), .busy
  );

  switch_allocator #(.NIN(NIN)) u_sa (
    .clk, .rst_n, .req(sa_req), .req_port(sa_port), .spec(sa_spec), .gnt(sa_gnt)
  );

  // ---------------------------------------------------------------- credit counters
  logic [NPORT-1:0][NVC-1:0] dec;   // a flit was granted to this output VC
  always_comb begin
    dec = '0;
    for (int o = 0; o < NPORT; o++)
      for (int v = 0; v < NVC; v++)
        for (int i = 0; i < int'(NIN); i++)
          if (sent[i] && sent_port[i][o] && sent_vc[i][v]) dec[o][v] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NPORT; o++)
        for (int v = 0; v < NVC; v++) cnt[o][v] <= CW'(DEPTH);
    end else begin
      for (int o = 0; o < NPORT; o++)
        for (int v = 0; v < NVC; v++)
          cnt[o][v] <= cnt[o][v] + CW'(credit_in[o][v]) - CW'(dec[o][v]);
    end
  end

  always_comb begin
    for (int o = 0; o < NPORT; o++)
      for (int v = 0; v < NVC; v++) cred_avail[o][v] = (cnt[o][v] != '0);
  end

  // ---------------------------------------------------------------- stage 2: crossbar
  flit_t      xb_flit  [NPORT];
  logic       xb_valid [NPORT];
  dir_t       xb_sel   [NPORT];
  logic [0:0] xb_vc    [NPORT];

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      xb_flit[p]  = '0;
      xb_valid[p] = 1'b0;
      xb_sel[p]   = '0;
      xb_vc[p]    = '0;
      for (int v = 0; v < NVC; v++) begin
        if (fr_valid[p*NVC + v]) begin
          xb_flit[p]  = fr_flit[p*NVC + v];
          xb_valid[p] = 1'b1;
          xb_sel[p]   = fr_port[p*NVC + v];
          xb_vc[p]    = fr_vc[p*NVC + v];
        end
      end
    end
  end

  crossbar u_xb (
    .in_flit(xb_flit), .in_valid(xb_valid), .in_sel(xb_sel), .in_vc(xb_vc),
    .out_flit, .out_valid, .out_vc
  );

  always_comb begin
    ev = '0;
    for (int i = 0; i < int'(NIN); i++) ev = ev | vc_ev[i];
  end

  // One flit per input port and per output port per cycle.
  for (genvar p = 0; p < NPORT; p++) begin : g_chk
    a_one_vc_per_input: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0(fr_valid[p*NVC +: NVC]))
      else $error("router: two VCs of input %0d in the switch", p);
  end
endmodule

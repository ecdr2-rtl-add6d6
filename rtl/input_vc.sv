// input_vc: one virtual channel of an ECDR2 router input port, with the error correctors
// and detectors moved into the routing stage.
//
// The flit at the head of the VC buffer is split into its fields, each going to its own
// checker in the same cycle as routing and allocation:
//   * FT-ECC (TMR vote) -> the VC controller, which decides what the flit may request;
//   * RI-ECC (two HM(6,3)) -> the LRC unit and the outgoing head flit;
//   * one-hot checker on DIR/VC_ID -> the LRC unit (switches it to standard RC);
//   * Payload-ECC (HM(71,64)) on the payload, or on the zero-padded RB of a head flit,
//     in parallel with everything else -> the flit register only.
// DIR and VC_ID for this router come through a 2-to-1 multiplexer: normally from the head
// flit (computed one hop ahead by the upstream router), and for one packet from the RC
// result register. If the one-hot check fails, that cycle's VA and SA results are
// thrown away, the LRC unit computes DIR/VC_ID for this router (standard RC) and the RC
// result register keeps them; the next cycle proceeds as for a clean head flit. A head
// flit therefore spends one cycle here normally and two after a DIR/VC_ID error.
// A head flit without a VC issues a VA request and a speculative SA request together; once
// it holds a VC every flit issues non-speculative SA requests, each only when a credit for
// the downstream VC is available. On a switch grant the flit leaves the buffer and the
// corrected flit (with the newly computed DIR/VC_ID in a head flit) is written into the
// flit register, which feeds the crossbar in the next cycle. A credit is returned
// upstream one cycle after a flit leaves the buffer.
// The field split, the check locations, the RC result register and the flit register
// follow the design. Dropping a body/tail flit that arrives while no packet is open is
// this implementation's choice (it can only follow an uncorrectable FT error).
module input_vc
  import ecdr2_pkg::*;
#(
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned VC_IDX = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  coord_t    my_x,
  input  coord_t    my_y,
  // buffer write from the link
  input  logic      wr_en,
  input  flit_t     wr_flit,
  output logic      credit_out,            // registered: one buffer slot freed
  // downstream credit availability of this router's output VCs
  input  logic [NPORT-1:0][NVC-1:0] cred_avail,
  // VC allocation
  output logic      va_req,
  output dir_t      va_port,
  output vcid_t     va_vc,
  output logic      va_kill,               // abandon this cycle's allocation results
  input  logic      va_gnt,
  // switch allocation
  output logic      sa_req,
  output dir_t      sa_port,
  output logic      sa_spec,
  input  logic      sa_gnt,
  // flit leaving the buffer this cycle (for credit counters and VC release)
  output logic      sent,
  output dir_t      sent_port,
  output vcid_t     sent_vc,
  output logic      sent_tail,
  // flit register (second stage)
  output logic      fr_valid,
  output flit_t     fr_flit,
  output dir_t      fr_port,
  output logic [0:0] fr_vc,
  output ev_t       ev
);
  // ---------------------------------------------------------------- buffer
  flit_t front;
  logic  empty, full, rd_en;

  vc_fifo #(.W(FLIT_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en, .wr_data(wr_flit), .rd_en, .rd_data(front), .empty, .full
  );

  logic has;
  assign has = !empty;

  // ---------------------------------------------------------------- correctors
  logic [1:0] ft_c;
  logic [3:0] ft_rdc_c;
  logic       ft_fix;
  ft_ecc_corrector u_ftecc (
    .ft_in(front.h.ft), .rdc_in(front.h.ft_rdc), .ft_out(ft_c), .rdc_out(ft_rdc_c),
    .corrected(ft_fix)
  );

  logic is_head, is_tail;
  assign is_head = (ft_c == FT_HEAD);
  assign is_tail = (ft_c == FT_TAIL);

  logic [63:0] pe_in, pe_out;
  logic [6:0]  pe_rdc_in, pe_rdc_out;
  logic        pe_fix, pe_bad;
  always_comb begin
    if (is_head) begin
      pe_in     = {19'b0, front.h.rb};
      pe_rdc_in = front.h.rb_rdc;
    end else begin
      pe_in     = front.b.payload;
      pe_rdc_in = front.b.pl_rdc;
    end
  end
  payload_ecc_corrector u_pecc (
    .data_in(pe_in), .rdc_in(pe_rdc_in), .data_out(pe_out), .rdc_out(pe_rdc_out),
    .corrected(pe_fix), .uncorrectable(pe_bad)
  );

  logic [5:0] ri_c, ri_rdc_c;
  logic       ri_fix;
  ri_ecc_corrector u_riecc (
    .ri_in(front.h.ri), .rdc_in(front.h.ri_rdc), .ri_out(ri_c), .rdc_out(ri_rdc_c),
    .corrected(ri_fix)
  );

  // ---------------------------------------------------------------- DIR / VC_ID path
  logic  rc_valid;
  dir_t  rc_dir;
  vcid_t rc_vc;
  dir_t  dv_dir;
  vcid_t dv_vc;
  assign dv_dir = rc_valid ? rc_dir : front.h.dir;
  assign dv_vc  = rc_valid ? rc_vc  : front.h.vcid;

  logic ohc_err;
  logic ohc_dir_ok, ohc_vc_ok;
  onehot_checker u_ohc (.dir(dv_dir), .vcid(dv_vc), .dir_ok(ohc_dir_ok), .vcid_ok(ohc_vc_ok),
                        .error(ohc_err));

  dir_t  lrc_dir;
  vcid_t lrc_vc;
  lrc_unit u_lrc (
    .my_x, .my_y, .ri(ri_c), .dir_cur(dv_dir), .vcid_cur(dv_vc), .in_vc(1'(VC_IDX)),
    .rc_mode(ohc_err), .dir_out(lrc_dir), .vcid_out(lrc_vc)
  );

  // ---------------------------------------------------------------- VC controller
  logic  active;        // a downstream VC is held for the current packet
  dir_t  out_port;
  vcid_t out_vc;

  logic head_new, orphan, cred_ok;
  assign head_new = has && !active && is_head;
  assign orphan   = has && !active && !is_head;

  always_comb begin
    dir_t  p;
    vcid_t v;
    p = active ? out_port : dv_dir;
    v = active ? out_vc   : dv_vc;
    cred_ok = 1'b0;
    for (int o = 0; o < NPORT; o++)
      for (int k = 0; k < NVC; k++)
        if (p[o] && v[k] && cred_avail[o][k]) cred_ok = 1'b1;
  end

  assign va_req  = head_new;
  assign va_port = dv_dir;
  assign va_vc   = dv_vc;
  assign va_kill = ohc_err;

  assign sa_req  = ((active && has) || head_new) && cred_ok;
  assign sa_port = active ? out_port : dv_dir;
  assign sa_spec = !active;

  logic va_ok, take_head, take;
  assign va_ok     = head_new && !ohc_err && va_gnt;
  assign take_head = va_ok && sa_gnt;
  assign take      = take_head || (active && has && sa_gnt);
  assign rd_en     = take || orphan;

  assign sent      = take;
  assign sent_port = active ? out_port : dv_dir;
  assign sent_vc   = active ? out_vc   : dv_vc;
  assign sent_tail = take && is_tail;

  flit_t nf;
  always_comb begin
    nf = front;
    if (is_head) begin
      nf.h.ft_rdc = ft_rdc_c;
      nf.h.ft     = ft_c;
      nf.h.ri_rdc = ri_rdc_c;
      nf.h.ri     = ri_c;
      nf.h.dir    = lrc_dir;
      nf.h.vcid   = lrc_vc;
      nf.h.rb_rdc = pe_rdc_out;
      nf.h.rb     = pe_out[RB_W-1:0];
    end else begin
      nf.b.ft_rdc  = ft_rdc_c;
      nf.b.ft      = ft_c;
      nf.b.pl_rdc  = pe_rdc_out;
      nf.b.payload = pe_out;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      out_port   <= '0;
      out_vc     <= '0;
      rc_valid   <= 1'b0;
      rc_dir     <= '0;
      rc_vc      <= '0;
      fr_valid   <= 1'b0;
      fr_flit    <= '0;
      fr_port    <= '0;
      fr_vc      <= '0;
      credit_out <= 1'b0;
    end else begin
      credit_out <= rd_en;
      fr_valid   <= take;
      if (take) begin
        fr_flit <= nf;
        fr_port <= sent_port;
        fr_vc   <= (sent_vc[1]) ? 1'b1 : 1'b0;
      end
      // RC result register: written only when DIR/VC_ID of a waiting head is corrupted
      if (head_new && ohc_err) begin
        rc_valid <= 1'b1;
        rc_dir   <= lrc_dir;
        rc_vc    <= lrc_vc;
      end else if (take && is_head) begin
        rc_valid <= 1'b0;
      end
      if (va_ok) begin
        active   <= 1'b1;
        out_port <= dv_dir;
        out_vc   <= dv_vc;
      end
      if (take && is_tail) active <= 1'b0;
    end
  end

  always_comb begin
    ev              = '0;
    ev.ft_corr      = rd_en && ft_fix;
    ev.ri_corr      = take && is_head && ri_fix;
    ev.pl_corr      = take && pe_fix;
    ev.ohc_fail     = head_new && ohc_err;
    ev.va_fail      = head_new && !ohc_err && !va_gnt;
    ev.ssa_win      = take_head;
    ev.ssa_lose     = va_ok && !sa_gnt;
    ev.credit_stall = ((active && has) || (head_new && !ohc_err)) && !cred_ok;
    ev.drop         = orphan;
  end
endmodule

// ni_encoder: the encoder of a network interface, which turns the raw fields of a flit
// into the 77-bit coded flit injected into the local router port.
//
// Flit type: triplicated (TMR). Head flit: the destination (RI = {dst_y, dst_x}) is
// coded with two HM(6,3) codes; DIR is computed by XY routing at the source router and
// VC_ID is the one-hot number of the injection VC, both one-hot; the 45 reserved bits are
// padded with 19 zeros and coded with HM(71,64). Body/tail flits: the 64-bit payload is
// coded with HM(71,64). Combinational.
// Encoding at the network interface follows the design; computing the first DIR here is
// what the lookahead scheme needs at the source and is this implementation's choice.
module ni_encoder
  import ecdr2_pkg::*;
(
  input  coord_t      my_x,
  input  coord_t      my_y,
  input  ft_e         ft,
  input  logic [5:0]  dst,       // {dst_y, dst_x}
  input  logic [0:0]  vc,        // injection VC
  input  logic [63:0] data,      // payload, or RB in data[44:0] for a head flit
  output flit_t       flit
);
  always_comb begin
    flit = '0;
    if (ft == FT_HEAD) begin
      flit.h.ft     = ft;
      flit.h.ft_rdc = {ft, ft};
      flit.h.ri     = dst;
      flit.h.ri_rdc = {hm63_parity(dst[5:3]), hm63_parity(dst[2:0])};
      flit.h.dir    = xy_route(my_x, my_y, dst[2:0], dst[5:3]);
      flit.h.vcid   = vc_onehot(32'(vc));
      flit.h.rb     = data[RB_W-1:0];
      flit.h.rb_rdc = hm7164_parity({19'b0, data[RB_W-1:0]});
    end else begin
      flit.b.ft      = ft;
      flit.b.ft_rdc  = {ft, ft};
      flit.b.payload = data;
      flit.b.pl_rdc  = hm7164_parity(data);
    end
  end
endmodule

// tb_ref_pkg: reference models for the testbenches, written independently of the RTL:
// a flit encoder (TMR flit type, HM(6,3) destination, XY direction, one-hot VC, HM(71,64)
// payload/RB built as a position-ordered Hamming code word), bit-flip helpers and an XY
// route model.
package tb_ref_pkg;
  import ecdr2_pkg::*;

  function automatic logic [6:0] ref_hamming_parity(logic [63:0] d);
    logic [71:1] c;
    logic [6:0]  p;
    int k;
    c = '0;
    k = 0;
    for (int pos = 1; pos <= 71; pos++)
      if ($countones(pos) != 1) begin
        c[pos] = d[k];
        k++;
      end
    for (int i = 0; i < 7; i++) begin
      p[i] = 1'b0;
      for (int pos = 1; pos <= 71; pos++)
        if ($countones(pos) != 1 && ((pos >> i) & 1) == 1) p[i] ^= c[pos];
    end
    return p;
  endfunction

  function automatic logic [2:0] ref_hm63(logic [2:0] d);
    // columns of the data bits: d0 -> 011, d1 -> 101, d2 -> 110
    return (d[0] ? 3'b011 : 3'b000) ^ (d[1] ? 3'b101 : 3'b000) ^ (d[2] ? 3'b110 : 3'b000);
  endfunction

  // XY route as a port number: 0 N, 1 E, 2 S, 3 W, 4 L (y grows southwards)
  function automatic int ref_xy(int cx, int cy, int dx, int dy);
    if (dx > cx) return 1;
    if (dx < cx) return 3;
    if (dy > cy) return 2;
    if (dy < cy) return 0;
    return 4;
  endfunction

  function automatic flit_t ref_head(int dx, int dy, int dir_port, int vcid, logic [44:0] rb);
    flit_t f;
    f = '0;
    f.h.ft     = 2'b01;
    f.h.ft_rdc = 4'b0101;
    f.h.ri     = {3'(dy), 3'(dx)};
    f.h.ri_rdc = {ref_hm63(3'(dy)), ref_hm63(3'(dx))};
    f.h.dir    = 5'(1 << dir_port);
    f.h.vcid   = 2'(1 << vcid);
    f.h.rb     = rb;
    f.h.rb_rdc = ref_hamming_parity({19'b0, rb});
    return f;
  endfunction

  function automatic flit_t ref_body(logic [1:0] ft, logic [63:0] payload);
    flit_t f;
    f = '0;
    f.b.ft      = ft;
    f.b.ft_rdc  = {ft, ft};
    f.b.payload = payload;
    f.b.pl_rdc  = ref_hamming_parity(payload);
    return f;
  endfunction

  function automatic flit_t flip(flit_t f, int bitpos);
    flit_t g;
    g = f;
    g[bitpos] = ~g[bitpos];
    return g;
  endfunction
endpackage

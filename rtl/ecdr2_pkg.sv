// ecdr2_pkg: types, flit layout and code functions shared by every ECDR2 block.
//
// A flit is 77 bits. Its field widths follow the coding example of the design:
// a head flit carries a triplicated 2-bit flit type (FT plus 4 redundant bits), a 6-bit
// routing-information field (RI, the destination) protected by two HM(6,3) codes
// (6 redundant bits), a one-hot 5-bit output direction (DIR), a one-hot 2-bit VC_ID and
// 45 reserved bits (RB) protected by HM(71,64) (7 redundant bits). Body and tail flits
// carry the same FT code and a 64-bit payload protected by HM(71,64).
// The order of the fields inside the flit, the FT encoding, the split of RI into
// x (RI[2:0]) and y (RI[5:3]), the port order and the parity-check matrices are
// choices of this implementation.
package ecdr2_pkg;

  localparam int FLIT_W = 77;
  localparam int NPORT  = 5;   // N, E, S, W, Local
  localparam int NVC    = 2;   // VCs per input port (fixed by the 2-bit one-hot VC_ID)
  localparam int COORD_W = 3;  // a 6-bit RI holds a 3-bit x and a 3-bit y
  localparam int RB_W   = 45;
  localparam int PL_W   = 64;

  // Port numbering (bit positions of the one-hot DIR field).
  localparam int P_N = 0;  // towards y-1
  localparam int P_E = 1;  // towards x+1
  localparam int P_S = 2;  // towards y+1
  localparam int P_W = 3;  // towards x-1
  localparam int P_L = 4;  // local ejection / injection

  typedef enum logic [1:0] {
    FT_NONE = 2'b00,
    FT_HEAD = 2'b01,
    FT_BODY = 2'b10,
    FT_TAIL = 2'b11
  } ft_e;

  typedef logic [NPORT-1:0]   dir_t;    // one-hot output direction
  typedef logic [NVC-1:0]     vcid_t;   // one-hot VC number
  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    logic [3:0]      ft_rdc;   // two more copies of FT: {copy2, copy1}
    logic [1:0]      ft;
    logic [5:0]      ri_rdc;   // {HM(6,3) parity of y, HM(6,3) parity of x}
    logic [5:0]      ri;       // {dst_y, dst_x}
    dir_t            dir;
    vcid_t           vcid;
    logic [6:0]      rb_rdc;   // HM(71,64) parity of {19'b0, rb}
    logic [RB_W-1:0] rb;
  } head_t;

  typedef struct packed {
    logic [3:0]      ft_rdc;
    logic [1:0]      ft;
    logic [6:0]      pl_rdc;   // HM(71,64) parity of payload
    logic [PL_W-1:0] payload;
  } body_t;

  typedef union packed {
    head_t h;
    body_t b;
  } flit_t;

  // Per-router event pulses, one cycle wide, for monitoring.
  typedef struct packed {
    logic ft_corr;      // FT-ECC corrected a flit type
    logic ri_corr;      // RI-ECC corrected a routing information bit
    logic pl_corr;      // Payload-ECC corrected a payload or RB bit
    logic ohc_fail;     // one-hot check failed, standard RC cycle taken
    logic va_fail;      // a head flit requested VA and did not get it
    logic ssa_win;      // head flit got VA and speculative SA in one cycle
    logic ssa_lose;     // head flit got VA but its speculative SA failed
    logic credit_stall; // a flit waited for a downstream credit
    logic drop;         // a body/tail flit found no packet to belong to and was dropped
  } ev_t;

  // ------------------------------------------------------------------ HM(6,3)
  // Data d[2:0], parity p[2:0]: p0 = d0^d1, p1 = d0^d2, p2 = d1^d2.
  function automatic logic [2:0] hm63_parity(logic [2:0] d);
    return {d[1] ^ d[2], d[0] ^ d[2], d[0] ^ d[1]};
  endfunction

  // ---------------------------------------------------------------- HM(71,64)
  // Hamming code over positions 1..71: the 7 parity bits sit at positions 1,2,4,...,64
  // and the 64 data bits fill the other positions in increasing order. Parity bit i
  // is the XOR of the data bits whose position has bit i set, so the syndrome of a
  // single error equals its position.
  function automatic logic [6:0] hm7164_parity(logic [63:0] d);
    logic [6:0] p;
    int k;
    p = '0;
    k = 0;
    for (int pos = 1; pos <= 71; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        if (d[k]) p = p ^ 7'(pos);
        k++;
      end
    end
    return p;
  endfunction

  // -------------------------------------------------------------- XY routing
  // One-hot output direction at router (cx, cy) for destination (dx, dy):
  // X first, then Y, Local when both match.
  function automatic dir_t xy_route(coord_t cx, coord_t cy, coord_t dx, coord_t dy);
    dir_t d;
    d = '0;
    if (dx > cx)      d[P_E] = 1'b1;
    else if (dx < cx) d[P_W] = 1'b1;
    else if (dy > cy) d[P_S] = 1'b1;
    else if (dy < cy) d[P_N] = 1'b1;
    else              d[P_L] = 1'b1;
    return d;
  endfunction

  function automatic vcid_t vc_onehot(int unsigned v);
    return vcid_t'(1) << v;
  endfunction

endpackage

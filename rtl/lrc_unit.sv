// lrc_unit: lookahead routing computation (LRC) with XY routing, reusable as standard RC.
//
// In lookahead mode the unit works out the output direction the packet will take at the
// next router: it steps from this router's coordinates one hop in the current DIR and
// applies XY routing there. In standard-RC mode (selected when the one-hot checker found
// DIR or VC_ID corrupted) it applies XY routing at this router itself, rebuilding the DIR
// the upstream router should have sent. Both modes share the same XY logic; only the
// coordinate fed to it changes, which is how the design reuses the LRC unit for RC.
// VC_ID: a packet keeps the VC number it was injected with along its whole path (this
// implementation's choice), so lookahead passes VC_ID on and standard RC rebuilds it from
// the number of the VC the packet sits in. A packet whose DIR is Local gets Local again.
// Combinational.
module lrc_unit
  import ecdr2_pkg::*;
(
  input  coord_t      my_x,
  input  coord_t      my_y,
  input  logic [5:0]  ri,        // corrected {dst_y, dst_x}
  input  dir_t        dir_cur,   // DIR for this router
  input  vcid_t       vcid_cur,  // VC_ID for this router
  input  logic [0:0]  in_vc,     // number of the VC holding the packet
  input  logic        rc_mode,   // 1: standard RC for this router
  output dir_t        dir_out,
  output vcid_t       vcid_out
);
  coord_t dx, dy, nx, ny, cx, cy;

  always_comb begin
    dx = ri[2:0];
    dy = ri[5:3];
    // neighbour reached through dir_cur
    nx = my_x;
    ny = my_y;
    if (dir_cur[P_E]) nx = my_x + 3'd1;
    if (dir_cur[P_W]) nx = my_x - 3'd1;
    if (dir_cur[P_S]) ny = my_y + 3'd1;
    if (dir_cur[P_N]) ny = my_y - 3'd1;
    cx = rc_mode ? my_x : nx;
    cy = rc_mode ? my_y : ny;
    if (!rc_mode && dir_cur[P_L]) dir_out = dir_t'(1 << P_L);
    else                          dir_out = xy_route(cx, cy, dx, dy);
    vcid_out = rc_mode ? vc_onehot(32'(in_vc)) : vcid_cur;
  end
endmodule

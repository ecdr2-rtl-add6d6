// tb_ecdr2_router: one ECDR2 router at (2,2) with the testbench as all four neighbours
// and the local network interface. Upstream senders respect the router's credits; the
// downstream receivers return credits two cycles after each flit (or hold them to create
// back-pressure). Every packet (head, 3 bodies, tail) is built with the reference encoder
// and the receiver checks, per output port and VC, that packets arrive whole, in order,
// with corrected payload/RB/RI/FT and the lookahead DIR of the next router.
// Timing: a flit sampled into an input buffer at edge c is sampled by the downstream
// buffer at edge c+2 (two cycles per hop), c+3 for a head flit whose DIR failed the
// one-hot check. Scenarios: single packet (latency), single-bit errors in every field,
// corrupted DIR (standard RC), two packets competing for one output VC (VA conflict),
// two packets sharing an output on different VCs (SA conflict, interleaving), stalled
// credits (back-pressure), and speculation lost to a non-speculative request.
module tb_ecdr2_router;
  import ecdr2_pkg::*;
  import tb_ref_pkg::*;

  localparam int MX = 2, MY = 2;
  logic clk = 0, rst_n = 0;
  flit_t          in_flit   [NPORT];
  logic           in_valid  [NPORT];
  logic [0:0]     in_vc     [NPORT];
  logic [NVC-1:0] credit_out[NPORT];
  flit_t          out_flit  [NPORT];
  logic           out_valid [NPORT];
  logic [0:0]     out_vc    [NPORT];
  logic [NVC-1:0] credit_in [NPORT];
  ev_t            ev;
  int checks = 0, failures = 0;
  int cyc = 0;

  ecdr2_router #(.DEPTH(4)) dut (.clk, .rst_n, .my_x(3'(MX)), .my_y(3'(MY)), .*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (cycle %0d)", msg, cyc);
    end
  endtask

  // ---------------------------------------------------------------- event counters
  int n_ohc = 0, n_vafail = 0, n_ssawin = 0, n_ssalose = 0, n_stall = 0;
  int n_ftc = 0, n_ric = 0, n_plc = 0;
  always @(posedge clk) if (rst_n) begin
    n_ohc     += int'(ev.ohc_fail);
    n_vafail  += int'(ev.va_fail);
    n_ssawin  += int'(ev.ssa_win);
    n_ssalose += int'(ev.ssa_lose);
    n_stall   += int'(ev.credit_stall);
    n_ftc     += int'(ev.ft_corr);
    n_ric     += int'(ev.ri_corr);
    n_plc     += int'(ev.pl_corr);
  end

  // ---------------------------------------------------------------- senders
  int cred [NPORT][NVC];
  always @(posedge clk) begin
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NVC; v++)
        if (rst_n && credit_out[p][v]) cred[p][v]++;
  end

  int head_in_cyc [int];   // packet id -> cycle its head was sampled

  // sends a 5-flit packet; err: 0 none, 1 one bit in every code, 2 corrupted DIR
  task automatic send(input int p, input int v, input int dx, input int dy, input int id,
                      input int err);
    for (int k = 0; k < 5; k++) begin
      flit_t f;
      if (k == 0) begin
        f = ref_head(dx, dy, ref_xy(MX, MY, dx, dy), v, 45'(id));
        if (err == 1) f = flip(flip(flip(f, 73), 62), 20);    // FT copy, RI, RB
        if (err == 2) f = flip(f, 54 + ((ref_xy(MX, MY, dx, dy) + 1) % 5));
      end else begin
        f = ref_body((k == 4) ? 2'b11 : 2'b10, {32'(id), 32'(k)});
        if (err == 1) f = flip(flip(f, 71), k * 13);          // FT, payload/parity
      end
      @(negedge clk);
      while (cred[p][v] == 0) @(negedge clk);
      cred[p][v]--;
      in_valid[p] = 1;
      in_vc[p]    = 1'(v);
      in_flit[p]  = f;
      @(posedge clk);
      if (k == 0) head_in_cyc[id] = cyc;
      #1;
      in_valid[p] = 0;
    end
  endtask

  // ---------------------------------------------------------------- receivers
  bit   hold [NPORT];
  int   pend [NPORT][NVC];            // credits owed
  int   pkt_k [NPORT][NVC];           // flit index inside current packet
  int   pkt_id [NPORT][NVC];
  int   head_out_cyc [int];
  int   delivered [int];
  int   order [$];                    // output port of delivered heads, for ordering checks
  int   seen_ids [$];
  logic [NVC-1:0] cr_q1 [NPORT];

  always @(posedge clk) begin
    for (int o = 0; o < NPORT; o++) begin
      for (int v = 0; v < NVC; v++) begin
        if (!hold[o] && pend[o][v] > 0) begin
          cr_q1[o][v] <= 1'b1;
          pend[o][v]--;
        end else cr_q1[o][v] <= 1'b0;
      end
      if (rst_n && out_valid[o]) begin
        int v, k;
        flit_t f;
        v = int'(out_vc[o]);
        f = out_flit[o];
        k = pkt_k[o][v];
        pend[o][v]++;
        if (k == 0) begin
          int id, dx, dy, nx, ny, la;
          id = int'(f.h.rb);
          dx = int'(f.h.ri[2:0]);
          dy = int'(f.h.ri[5:3]);
          pkt_id[o][v] = id;
          head_out_cyc[id] = cyc;
          seen_ids.push_back(id);
          chk(o == ref_xy(MX, MY, dx, dy), "head on XY output port");
          nx = MX + ((o == 1) ? 1 : (o == 3) ? -1 : 0);
          ny = MY + ((o == 2) ? 1 : (o == 0) ? -1 : 0);
          la = (o == 4) ? 4 : ref_xy(nx, ny, dx, dy);
          chk(f == ref_head(dx, dy, la, v, 45'(id)), "head corrected, lookahead DIR");
        end else begin
          chk(f == ref_body((k == 4) ? 2'b11 : 2'b10, {32'(pkt_id[o][v]), 32'(k)}),
              "body/tail corrected and in order");
        end
        if (k == 4) begin
          pkt_k[o][v] <= 0;
          delivered[pkt_id[o][v]] = 1;
        end else pkt_k[o][v] <= k + 1;
      end
    end
  end
  assign credit_in = cr_q1;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NPORT; p++) begin
      in_valid[p] = 0; in_vc[p] = 0; in_flit[p] = '0; hold[p] = 0; cr_q1[p] = '0;
      for (int v = 0; v < NVC; v++) begin
        cred[p][v] = 4; pend[p][v] = 0; pkt_k[p][v] = 0; pkt_id[p][v] = 0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. single packet Local -> (5,2): East, two cycles per hop
    send(4, 0, 5, 2, 1, 0);
    repeat (8) @(posedge clk);
    chk(delivered.exists(1), "packet 1 delivered");
    chk(head_out_cyc[1] - head_in_cyc[1] == 2, "head hop latency 2 cycles");

    // 2. errors in every code, towards North (2,0)
    send(4, 1, 2, 0, 2, 1);
    repeat (8) @(posedge clk);
    chk(delivered.exists(2), "packet 2 delivered with corrected errors");

    // 3. corrupted DIR: standard RC, one extra cycle
    send(3, 0, 2, 5, 3, 2);
    repeat (8) @(posedge clk);
    chk(delivered.exists(3), "packet 3 delivered after standard RC");
    chk(head_out_cyc[3] - head_in_cyc[3] == 3, "head hop latency 3 cycles after DIR error");

    // 4. VA conflict: West VC0 and North VC0 both want East VC0 (same downstream VC)
    fork
      send(3, 0, 6, 2, 4, 0);
      send(0, 0, 7, 2, 5, 0);
    join
    repeat (15) @(posedge clk);
    chk(delivered.exists(4) && delivered.exists(5), "VA conflict: both packets delivered");

    // 5. SA conflict: West VC0 -> East VC0 and South VC1 -> East VC1 interleave
    fork
      send(3, 0, 6, 2, 6, 0);
      send(2, 1, 6, 2, 7, 0);
    join
    repeat (15) @(posedge clk);
    chk(delivered.exists(6) && delivered.exists(7), "SA conflict: both packets delivered");

    // 6. back-pressure: East holds its credits, two packets on the same VC
    hold[1] = 1;
    fork
      send(4, 0, 4, 2, 8, 0);
      send(3, 0, 5, 2, 9, 0);
    join_none
    repeat (30) @(posedge clk);
    chk(!delivered.exists(9), "stalled while credits held");
    hold[1] = 0;
    repeat (40) @(posedge clk);
    chk(delivered.exists(8) && delivered.exists(9), "stalled packets delivered after release");

    // 7. speculation lost: a body stream to South keeps SA busy while a new head arrives
    fork
      send(0, 0, 2, 6, 10, 0);
      begin
        repeat (2) @(posedge clk);
        send(3, 1, 2, 7, 11, 0);
      end
      begin
        repeat (1) @(posedge clk);
        send(4, 1, 2, 5, 12, 0);
      end
    join
    repeat (20) @(posedge clk);
    chk(delivered.exists(10) && delivered.exists(11) && delivered.exists(12),
        "South stream delivered");

    chk(n_ohc > 0, "one-hot failure happened");
    chk(n_vafail > 0, "VA failure happened");
    chk(n_ssawin > 0, "speculative SA success happened");
    chk(n_ssalose > 0, "speculative SA failure happened");
    chk(n_stall > 0, "credit stall happened");
    chk(n_ftc > 0 && n_ric > 0 && n_plc > 0, "FT, RI and payload corrections happened");
    chk(seen_ids.size() == 12, "twelve packets seen");
    $display("events: ohc=%0d va_fail=%0d ssa_win=%0d ssa_lose=%0d stall=%0d ft=%0d ri=%0d pl=%0d",
             n_ohc, n_vafail, n_ssawin, n_ssalose, n_stall, n_ftc, n_ric, n_plc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

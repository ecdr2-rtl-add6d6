// tb_ecdr2_mesh_full: end-to-end test of the full 8 x 8 ECDR2 mesh at its default parameters
// (2 VCs of 4 flits per port). Every node has a traffic source and a checking sink.
// Packets are 5 flits (head + 3 bodies + tail); the head's RB carries the source and a
// sequence number and every payload word is a known function of (source, sequence, flit
// index), so the sink checks every packet without a scoreboard of data.
// Phases:
//   1. zero load: one packet from corner to corner and back; the head must reach the
//      destination's interface 2 cycles per router traversed (plus the interface register);
//   2. uniform random traffic, error free;
//   3. uniform random traffic with bit flips: each cycle each router input link flips one
//      random bit of its flit with a small probability, including bits of DIR/VC_ID (which
//      triggers standard RC). A flit never gets more than one flip per hop, so every code
//      can correct it and every packet must still arrive intact;
//   4. hotspot, transpose, bit-reversal, shuffle and butterfly patterns, error free.
// At the end every injected packet must have been delivered exactly once, intact, at its
// destination, and each router mechanism (one-hot failure with standard RC, VA conflict,
// speculative SA won and lost, credit stall, FT/RI/payload correction) must have happened.
// Average packet latency (head injection to tail ejection) is printed for each phase.
module tb_ecdr2_mesh_full;
  import ecdr2_pkg::*;
  import tb_ref_pkg::*;

  localparam int MX = 8, MY = 8, NN = MX * MY;
  localparam int PKT_LEN = 5;

  logic clk = 0, rst_n = 0;
  logic            inj_valid [NN];
  logic [0:0]      inj_vc    [NN];
  ft_e             inj_ft    [NN];
  logic [5:0]      inj_dst   [NN];
  logic [63:0]     inj_data  [NN];
  logic [NVC-1:0]  inj_credit[NN];
  flit_t           err_flip  [NN][NPORT];
  logic            ej_valid  [NN];
  logic [0:0]      ej_vc     [NN];
  ft_e             ej_ft     [NN];
  logic [5:0]      ej_dst    [NN];
  logic [63:0]     ej_data   [NN];
  logic            ej_corrected [NN];
  logic            ej_uncorrectable [NN];
  logic            ej_misrouted [NN];
  ev_t             ev        [NN];

  ecdr2_mesh dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", msg, cyc);
    end
  endtask

  function automatic logic [63:0] pl_word(int src, int seq, int k);
    return {8'(src), 16'(seq), 8'(k), 32'(src * 7919 + seq * 104729 + k * 13 + 5)};
  endfunction

  // ---------------------------------------------------------------- traffic control
  int   pattern = 0;      // 0 uniform, 1 hotspot, 2 transpose, 3 bitrev, 4 shuffle, 5 butterfly
  int   rate_pct = 0;     // packet generation probability per node per cycle, in 1/1000
  int   quota = 0;        // packets still to generate per node in this phase
  int   err_ppm = 0;      // per link per cycle flip probability, parts per million
  int   gen_cnt [NN];
  int   sent_pkts = 0, recv_pkts = 0;
  longint lat_sum = 0;
  int   lat_n = 0;
  int   inj_cycle [int];   // key src*65536+seq
  int   head_lat_one = -1;
  int   directed = 0;      // 1: node 0 sends one packet to the far corner

  // Synthetic patterns on the ABITS-bit node number (MX = MY, powers of two).
  // Hotspot: a quarter of the packets go to one of the two central nodes.
  localparam int ABITS = $clog2(NN);
  localparam int HOT0 = (MY / 2 - 1) * MX + (MX / 2 - 1);
  localparam int HOT1 = (MY / 2) * MX + (MX / 2);
  function automatic int dest_of(int src);
    int x, y, d;
    x = src % MX;
    y = src / MX;
    case (pattern)
      1: d = ($urandom % 4 == 0) ? ((($urandom % 2) == 0) ? HOT0 : HOT1) : $urandom % NN;
      2: d = x * MX + y;
      3: begin
        d = 0;
        for (int b = 0; b < ABITS; b++) d |= ((src >> b) & 1) << (ABITS - 1 - b);
      end
      4: d = ((src << 1) | (src >> (ABITS - 1))) & (NN - 1);
      5: d = (src & ((NN - 1) & ~(NN / 2) & ~1)) | ((src & 1) << (ABITS - 1)) |
             ((src >> (ABITS - 1)) & 1);
      default: d = $urandom % NN;
    endcase
    if (d == src) d = (src + 1 + ($urandom % (NN - 1))) % NN;
    return d;
  endfunction

  // ---------------------------------------------------------------- sources
  for (genvar n = 0; n < NN; n++) begin : g_src
    int cred [NVC];
    int seq;
    int q_dst [$];
    always @(posedge clk) if (rst_n) for (int v = 0; v < NVC; v++) cred[v] += int'(inj_credit[n][v]);
    initial begin
      cred[0] = 4; cred[1] = 4;
      seq = 0;
      inj_valid[n] = 0; inj_vc[n] = 0; inj_ft[n] = FT_NONE; inj_dst[n] = 0; inj_data[n] = 0;
      gen_cnt[n] = 0;
      @(posedge rst_n);
      forever begin
        @(negedge clk);
        if (q_dst.size() == 0) continue;
        begin
          int d, v, s;
          d = q_dst.pop_front();
          v = $urandom % NVC;
          s = seq;
          seq = seq + 1;
          for (int k = 0; k < PKT_LEN; k++) begin
            while (cred[v] == 0) @(negedge clk);
            cred[v]--;
            inj_valid[n] = 1;
            inj_vc[n]    = 1'(v);
            inj_dst[n]   = {3'(d / MX), 3'(d % MX)};
            if (k == 0) begin
              inj_ft[n]   = FT_HEAD;
              inj_data[n] = {19'b0, 7'(n), 16'(s), 22'h2a5a5};  // RB: source, sequence, marker
            end else begin
              inj_ft[n]   = (k == PKT_LEN - 1) ? FT_TAIL : FT_BODY;
              inj_data[n] = pl_word(n, s, k);
            end
            @(posedge clk);
            if (k == 0) begin
              inj_cycle[n * 65536 + s] = cyc;
              sent_pkts++;
            end
            #1;
            inj_valid[n] = 0;
            if (k < PKT_LEN - 1) @(negedge clk);
          end
        end
      end
    end
    // generator
    always @(posedge clk) begin
      if (n == 0 && directed == 1) begin
        q_dst.push_back(NN - 1);
        directed <= 2;
      end
      if (rst_n && quota > gen_cnt[n] && ($urandom % 1000) < rate_pct) begin
        q_dst.push_back(dest_of(n));
        gen_cnt[n]++;
      end
    end
  end

  // ---------------------------------------------------------------- sinks
  for (genvar n = 0; n < NN; n++) begin : g_sink
    int cur_src [NVC];
    int cur_seq [NVC];
    int cur_k   [NVC];
    initial for (int v = 0; v < NVC; v++) cur_k[v] = 0;
    always @(posedge clk) begin
      if (rst_n && ej_valid[n]) begin
        int v, k;
        v = int'(ej_vc[n]);
        k = cur_k[v];
        chk(!ej_uncorrectable[n], "no uncorrectable word");
        if (k == 0) begin
          chk(ej_ft[n] == FT_HEAD, "packet starts with a head");
          chk(!ej_misrouted[n] && ej_dst[n] == {3'(n / MX), 3'(n % MX)}, "delivered at its destination");
          chk(ej_data[n][63:45] == '0 && ej_data[n][21:0] == 22'h2a5a5, "RB intact");
          cur_src[v] = int'(ej_data[n][44:38]);
          cur_seq[v] = int'(ej_data[n][37:22]);
          if (cur_src[v] == 0 && n == NN - 1 && head_lat_one < 0)
            head_lat_one = cyc - inj_cycle[cur_src[v] * 65536 + cur_seq[v]];
        end else begin
          chk(ej_ft[n] == ((k == PKT_LEN - 1) ? FT_TAIL : FT_BODY), "flit type in order");
          chk(ej_data[n] == pl_word(cur_src[v], cur_seq[v], k), "payload intact");
        end
        if (k == PKT_LEN - 1) begin
          int key;
          key = cur_src[v] * 65536 + cur_seq[v];
          chk(inj_cycle.exists(key), "packet was injected, delivered once");
          if (inj_cycle.exists(key)) begin
            lat_sum += longint'(cyc - inj_cycle[key]);
            lat_n++;
            inj_cycle.delete(key);
          end
          recv_pkts++;
          cur_k[v] = 0;
        end else cur_k[v] = k + 1;
      end
    end
  end

  // ---------------------------------------------------------------- fault injection
  int n_flips = 0, n_dir_flips = 0;
  always @(negedge clk) begin
    for (int n = 0; n < NN; n++)
      for (int p = 0; p < NPORT; p++) begin
        err_flip[n][p] = '0;
        if (err_ppm > 0 && ($urandom % 1000000) < err_ppm) begin
          int b;
          // a quarter of the flips target the DIR/VC_ID bits (52..58)
          b = ($urandom % 4 == 0) ? 52 + ($urandom % 7) : $urandom % FLIT_W;
          err_flip[n][p][b] = 1'b1;
          n_flips++;
          if (b >= 52 && b <= 58) n_dir_flips++;
        end
      end
  end

  // ---------------------------------------------------------------- event counters
  int n_ohc = 0, n_vafail = 0, n_ssawin = 0, n_ssalose = 0, n_stall = 0;
  int n_ftc = 0, n_ric = 0, n_plc = 0, n_drop = 0;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      n_ohc     += int'(ev[n].ohc_fail);
      n_vafail  += int'(ev[n].va_fail);
      n_ssawin  += int'(ev[n].ssa_win);
      n_ssalose += int'(ev[n].ssa_lose);
      n_stall   += int'(ev[n].credit_stall);
      n_ftc     += int'(ev[n].ft_corr);
      n_ric     += int'(ev[n].ri_corr);
      n_plc     += int'(ev[n].pl_corr);
      n_drop    += int'(ev[n].drop);
    end
  end

  // Waits until every packet of the phase has been generated and delivered; gives up after
  // max_cycles, or after 5000 cycles in which no packet arrived (a wedged network).
  task automatic drain(input int max_cycles);
    int c, idle, last;
    c = 0; idle = 0; last = recv_pkts;
    while ((recv_pkts != sent_pkts || inj_cycle.size() != 0 ||
            quota_total() < quota * NN || sent_pkts < quota_total() + 1) &&
           c < max_cycles && idle < 5000) begin
      @(posedge clk);
      c++;
      idle = (recv_pkts == last) ? idle + 1 : 0;
      last = recv_pkts;
    end
  endtask

  function automatic int quota_total();
    int t;
    t = 0;
    for (int n = 0; n < NN; n++) t += gen_cnt[n];
    return t;
  endfunction

  task automatic run_phase(input string name, input int pat, input int rate, input int pkts,
                           input int ppm);
    longint l0;
    int n0, sent0;
    l0 = lat_sum; n0 = lat_n; sent0 = sent_pkts;
    pattern = pat; rate_pct = rate; err_ppm = ppm;
    quota = quota + pkts;
    drain(200000);
    err_ppm = 0;
    chk(recv_pkts == sent_pkts && inj_cycle.size() == 0, {name, ": every packet delivered"});
    $display("phase %-12s packets=%0d avg_latency=%0.2f cycles", name, sent_pkts - sent0,
             (lat_n > n0) ? real'(lat_sum - l0) / real'(lat_n - n0) : 0.0);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: sent=%0d received=%0d", sent_pkts, recv_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NN; n++)
      for (int p = 0; p < NPORT; p++) err_flip[n][p] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. zero load: (0,0) -> far corner
    directed = 1;
    repeat (60) @(posedge clk);
    chk(head_lat_one == 2 * (MX + MY - 1) + 1, "zero-load head latency = 2 cycles per router + 1");
    $display("zero-load head latency over %0d routers: %0d cycles", MX + MY - 1, head_lat_one);
    chk(recv_pkts == 1, "single packet delivered");

    run_phase("uniform", 0, 20, 12, 0);
    run_phase("uniform+err", 0, 20, 12, 10000);
    run_phase("hotspot", 1, 25, 8, 0);
    run_phase("transpose", 2, 20, 6, 0);
    run_phase("bitreversal", 3, 20, 6, 0);
    run_phase("shuffle", 4, 20, 6, 0);
    run_phase("butterfly", 5, 20, 6, 0);

    $display("flips=%0d (DIR/VC_ID %0d)", n_flips, n_dir_flips);
    $display("events: ohc=%0d va_fail=%0d ssa_win=%0d ssa_lose=%0d stall=%0d ft=%0d ri=%0d pl=%0d drop=%0d",
             n_ohc, n_vafail, n_ssawin, n_ssalose, n_stall, n_ftc, n_ric, n_plc, n_drop);
    chk(n_ohc > 0, "standard RC after one-hot failure happened");
    chk(n_vafail > 0, "VA conflict happened");
    chk(n_ssawin > 0, "speculative SA success happened");
    chk(n_ssalose > 0, "speculative SA failure happened");
    chk(n_stall > 0, "credit stall happened");
    chk(n_ftc > 0, "FT correction happened");
    chk(n_ric > 0, "RI correction happened");
    chk(n_plc > 0, "payload/RB correction happened");
    chk(n_drop == 0, "no flit dropped");
    $display("packets sent=%0d received=%0d", sent_pkts, recv_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vc_allocator: directed VA scenarios: a single request is granted at once; competing
// requests for the same output VC get exactly one grant per cycle and take turns; a held
// output VC refuses new requests until its packet releases it; an abandoned (killed)
// grant leaves the output VC free; requests for different output VCs are all granted.
module tb_vc_allocator;
  import ecdr2_pkg::*;
  localparam int NIN = NPORT * NVC;
  logic clk = 0, rst_n = 0;
  logic [NIN-1:0] req = '0, kill = '0, gnt, release_vc = '0;
  dir_t  req_port [NIN];
  vcid_t req_vc   [NIN];
  dir_t  rel_port [NIN];
  vcid_t rel_vc   [NIN];
  logic [NPORT-1:0][NVC-1:0] busy;
  int checks = 0, failures = 0;

  vc_allocator dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (gnt=%b busy=%b)", msg, gnt, busy);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NIN; i++) begin
      req_port[i] = '0; req_vc[i] = '0; rel_port[i] = '0; rel_vc[i] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. single request for (E, vc1)
    req[3] = 1; req_port[3] = 5'b00010; req_vc[3] = 2'b10;
    #1 chk(gnt == 10'(1 << 3), "single request granted");
    @(negedge clk);
    req = '0;
    #1 chk(busy[1][1] == 1'b1, "output VC held after grant");
    // 2. another request for the held VC is refused
    req[5] = 1; req_port[5] = 5'b00010; req_vc[5] = 2'b10;
    #1 chk(gnt == '0, "held output VC refuses");
    @(negedge clk);
    // release it: the holder's tail leaves
    release_vc[3] = 1; rel_port[3] = 5'b00010; rel_vc[3] = 2'b10;
    @(negedge clk);
    release_vc = '0;
    #1 chk(busy[1][1] == 1'b0, "released");
    chk(gnt == 10'(1 << 5), "waiting request granted after release");
    // 3. kill: grant abandoned, VC stays free
    kill[5] = 1;
    @(negedge clk);
    #1 chk(busy[1][1] == 1'b0, "killed grant does not hold VC");
    kill = '0;
    req = '0;
    // 4. contention: inputs 0, 4, 8 want (S, vc0); grants rotate
    begin
      int seen [NIN];
      foreach (seen[i]) seen[i] = 0;
      for (int r = 0; r < 3; r++) begin
        @(negedge clk);
        req = '0;
        foreach (seen[i]) if (i % 4 == 0 && seen[i] == 0) begin
          req[i] = 1; req_port[i] = 5'b00100; req_vc[i] = 2'b01;
        end
        #1 chk($onehot(gnt), "exactly one grant under contention");
        for (int i = 0; i < NIN; i++) if (gnt[i]) seen[i]++;
        @(negedge clk);
        req = '0;
        for (int i = 0; i < NIN; i++) if (seen[i] == 1 && busy[2][0]) begin
          release_vc[i] = 1; rel_port[i] = 5'b00100; rel_vc[i] = 2'b01;
        end
        @(negedge clk);
        release_vc = '0;
      end
      chk(seen[0] == 1 && seen[4] == 1 && seen[8] == 1, "each competitor served once");
    end
    // 5. different output VCs granted together
    @(negedge clk);
    req = '0;
    req[1] = 1; req_port[1] = 5'b10000; req_vc[1] = 2'b01;
    req[2] = 1; req_port[2] = 5'b10000; req_vc[2] = 2'b10;
    req[7] = 1; req_port[7] = 5'b00001; req_vc[7] = 2'b01;
    #1 chk(gnt == 10'b0010000110, "independent output VCs all granted");
    @(negedge clk);
    req = '0;
    #1 chk(busy[4] == 2'b11 && busy[0][0], "three output VCs held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_switch_allocator: random request patterns checked for the allocation rules: only
// requesters are granted, one grant per input port and per output port, and a speculative
// request
// never beats a non-speculative one for the same output (checked where the input stage
// has no choice: the input port holds a single non-speculative request). Directed cases check the
// non-speculative priority at both allocation steps.
module tb_switch_allocator;
  import ecdr2_pkg::*;
  localparam int NIN = NPORT * NVC;
  logic clk = 0, rst_n = 0;
  logic [NIN-1:0] req = '0, spec = '0, gnt;
  dir_t req_port [NIN];
  int checks = 0, failures = 0;

  switch_allocator dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s req=%b spec=%b gnt=%b", msg, req, spec, gnt);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (req_port[i]) req_port[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: inputs 0 (spec) and 2 (non-spec) both want East
    @(negedge clk);
    req = '0; spec = '0;
    req[0] = 1; spec[0] = 1; req_port[0] = 5'b00010;
    req[2] = 1; spec[2] = 0; req_port[2] = 5'b00010;
    #1 chk(gnt == 10'b0000000100, "non-speculative wins output");
    // directed: two VCs of one input port, spec and non-spec, different outputs
    @(negedge clk);
    req = '0; spec = '0;
    req[6] = 1; spec[6] = 1; req_port[6] = 5'b00001;
    req[7] = 1; spec[7] = 0; req_port[7] = 5'b00100;
    #1 chk(gnt == 10'b0010000000, "non-speculative VC wins input port");
    // random
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int i = 0; i < NIN; i++) begin
        req[i]  = ($urandom % 3) != 0;
        spec[i] = ($urandom % 2) == 0;
        req_port[i] = dir_t'(1 << ($urandom % NPORT));
      end
      #1;
      begin
        logic ok;
        ok = 1;
        for (int i = 0; i < NIN; i++) if (gnt[i] && !req[i]) ok = 0;
        chk(ok, "grant without request");
        for (int p = 0; p < NPORT; p++) chk($onehot0(gnt[p*NVC +: NVC]), "one grant per input");
        for (int o = 0; o < NPORT; o++) begin
          logic [NIN-1:0] g;
          bit any_ns_req, granted_spec, busy_out;
          for (int i = 0; i < NIN; i++) g[i] = gnt[i] && req_port[i][o];
          chk($onehot0(g), "one grant per output");
          busy_out = (g != '0);
          // speculation must never win over a non-speculative request of a free input port
          granted_spec = 0;
          any_ns_req = 0;
          for (int i = 0; i < NIN; i++) if (g[i] && spec[i]) granted_spec = 1;
          for (int p = 0; p < NPORT; p++) begin
            int n_ns;
            bit port_has_ns;
            n_ns = 0;
            for (int v = 0; v < NVC; v++)
              if (req[p*NVC+v] && !spec[p*NVC+v]) n_ns++;
            // with a single non-speculative VC the input stage must pick it
            port_has_ns = (n_ns == 1);
            for (int v = 0; v < NVC; v++) begin
              int i;
              i = p*NVC + v;
              if (req[i] && !spec[i] && req_port[i][o] && gnt[p*NVC +: NVC] == '0 &&
                  port_has_ns) any_ns_req = 1;
            end
          end
          chk(!(granted_spec && any_ns_req), "speculative beat non-speculative");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

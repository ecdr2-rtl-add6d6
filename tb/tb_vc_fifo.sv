// tb_vc_fifo: random writes and reads against a queue model, never writing a full buffer
// (as credit flow control guarantees); checks order, head data, empty and full.
module tb_vc_fifo;
  localparam int W = 77, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full;
  int checks = 0, failures = 0;
  logic [W-1:0] q [$];

  vc_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == DEPTH) ||
          (q.size() > 0 && rd_data !== q[0])) begin
        failures++;
        $display("FAIL cycle %0d size=%0d empty=%b full=%b", n, q.size(), empty, full);
      end
      wr_en   = (q.size() < DEPTH) && ($urandom % 3 != 0);
      rd_en   = (q.size() > 0) && ($urandom % 2 == 0);
      wr_data = {$urandom, $urandom, $urandom};
      @(posedge clk);
      #1;
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

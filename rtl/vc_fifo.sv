// vc_fifo: the flit buffer of one virtual channel, a DEPTH-slot first-in first-out queue.
//
// Flits arriving from the link are written at the tail; the head of the queue is visible
// combinationally on rd_data so that the routing stage can work on it in the cycle after
// it was written. rd_en removes it. Credit-based flow control upstream guarantees that a
// full buffer is never written; an assertion checks this. Storage is a register array
// with wrap-around read and write pointers. Four slots per VC follow the design's
// evaluated configuration.
module vc_fifo #(
  parameter int unsigned W     = 77,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign empty   = (cnt == 0);
  assign full    = (32'(cnt) == DEPTH);
  assign rd_data = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (wr_en) wp <= inc(wp);
      if (rd_en && !empty) rp <= inc(rp);
      cnt <= cnt + (AW+1)'(wr_en) - (AW+1)'(rd_en && !empty);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wp] <= wr_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full)
    else $error("vc_fifo: write into a full buffer");
endmodule

// Deficit Round Robin arbiter for one crossbar output.
//
// N queues (the crosspoint buffers feeding one output) present the length
// of their head frame in words. The arbiter visits the queues in turn; on
// each visit a backlogged queue's deficit counter grows by QUANTUM and the
// queue may send its head frame if the frame is not longer than the
// deficit, which then shrinks by the frame length. A queue keeps the turn
// while its head frame fits; otherwise the turn moves on and the unused
// deficit is kept for its next visit. An empty queue's deficit is cleared.
// Over time each backlogged queue gets the same share of the output in
// words, whatever its frame sizes.
//
// Interface: while busy is low, one decision is made per cycle; grant
// pulses for one cycle with grant_idx naming the queue whose head frame is
// to be sent, and the caller raises busy from the next cycle until that
// frame has left.
//
// From the design: fair queuing with Deficit Round Robin in the crossbar.
// Own choices: lengths and quantum counted in 128-bit words, QUANTUM = 96
// words (one maximum-size Ethernet frame with its FrameLink header), one
// decision per cycle.
module drr_arbiter #(
  parameter int unsigned N       = 3,
  parameter int unsigned LEN_W   = 8,
  parameter int unsigned QUANTUM = 96
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         head_valid,
  input  logic [LEN_W-1:0]     head_len [N],
  input  logic                 busy,
  output logic                 grant,
  output logic [$clog2(N)-1:0] grant_idx
);
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned DW = LEN_W + 2;

  logic [DW-1:0] deficit [N];
  logic [IW-1:0] ptr, nxt;
  logic          fresh;
  logic [DW-1:0] eff;

  assign nxt       = (ptr == IW'(N - 1)) ? '0 : ptr + 1'b1;
  assign eff       = deficit[ptr] + (fresh ? DW'(QUANTUM) : '0);
  assign grant     = !busy && head_valid[ptr] && (DW'(head_len[ptr]) <= eff);
  assign grant_idx = ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) deficit[i] <= '0;
      ptr   <= '0;
      fresh <= 1'b1;
    end else if (!busy) begin
      if (!head_valid[ptr]) begin
        deficit[ptr] <= '0;
        ptr          <= nxt;
        fresh        <= 1'b1;
      end else if (grant) begin
        deficit[ptr] <= eff - DW'(head_len[ptr]);
        fresh        <= 1'b0;
      end else begin
        deficit[ptr] <= eff;
        ptr          <= nxt;
        fresh        <= 1'b1;
      end
    end
  end
endmodule

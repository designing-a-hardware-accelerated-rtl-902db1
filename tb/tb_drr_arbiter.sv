// Self-checking testbench of drr_arbiter: three always-backlogged queues
// with different fixed frame lengths (12, 40, 96 words) share one output.
// A cycle-level reference of Deficit Round Robin runs beside the block and
// must make the same grant sequence; the words sent per queue must also
// come out within one quantum plus one frame of each other (fair share).
// A fourth phase empties a queue and checks that it is skipped.
module tb_drr_arbiter;
  localparam int N = 3, LW = 8, Q = 96;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] head_valid = '1;
  logic [LW-1:0] head_len [N];
  logic busy = 0, grant;
  logic [1:0] grant_idx;
  int checks = 0, failures = 0, grants = 0;
  int sent [N];
  int rdef [N];
  int rptr = 0, busy_left = 0;
  bit rfresh = 1;

  drr_arbiter #(.N(N), .LEN_W(LW), .QUANTUM(Q)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    head_len[0] = 12; head_len[1] = 40; head_len[2] = 96;
    foreach (sent[i]) begin sent[i] = 0; rdef[i] = 0; end
  end

  // reference DRR decision for this cycle, then update
  always @(posedge clk) if (rst_n) begin
    if (!busy) begin
      int eff;
      bit g;
      eff = rdef[rptr] + (rfresh ? Q : 0);
      g = head_valid[rptr] && head_len[rptr] <= eff;
      checks++;
      if (grant !== g || (g && grant_idx !== 2'(rptr))) begin
        failures++; $display("grant %0d/%0d idx %0d/%0d", grant, g, grant_idx, rptr);
      end
      if (!head_valid[rptr]) begin rdef[rptr] = 0; rptr = (rptr + 1) % N; rfresh = 1; end
      else if (g) begin
        rdef[rptr] = eff - head_len[rptr]; rfresh = 0;
        sent[rptr] += head_len[rptr]; grants++;
        busy_left = head_len[rptr];
      end else begin rdef[rptr] = eff; rptr = (rptr + 1) % N; rfresh = 1; end
    end
  end

  // model of the output: busy for the frame's words after a grant
  always @(negedge clk) begin
    if (busy_left > 0) begin busy <= 1; busy_left--; end
    else busy <= 0;
  end

  initial begin
    int mx, mn;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (20000) @(posedge clk);
    mx = 0; mn = 1 << 30;
    foreach (sent[i]) begin if (sent[i] > mx) mx = sent[i]; if (sent[i] < mn) mn = sent[i]; end
    checks++;
    if (mx - mn > Q + 96) begin failures++; $display("unfair: %0d %0d %0d", sent[0], sent[1], sent[2]); end
    @(negedge clk); head_valid = 3'b101;
    repeat (3000) @(posedge clk);
    if (grants == 0) failures++;
    $display("words sent %0d %0d %0d", sent[0], sent[1], sent[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of mac_cam: random ternary entries are written,
// then keys (copies of entries with random bits flipped under or outside
// their masks, and random keys) are looked up one per cycle. Every fourth
// entry overlaps its predecessor with a wider mask, to test priority. The code is
// compared with a first-match search over the same entries; latency 1.
module tb_mac_cam;
  localparam int KW = 48, CW = 5, N = (1 << CW) - 1;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [KW-1:0] in_key = '0;
  logic [CW-1:0] out_code;
  logic cfg_we = 0;
  logic [15:0] cfg_addr = '0;
  logic [2*KW:0] cfg_wdata = '0;
  logic [KW-1:0] val [N], msk [N];
  logic          vl  [N];
  int checks = 0, failures = 0, hits = 0, overlaps = 0;
  logic [CW-1:0] exp_q;
  logic          expv_q = 0;

  mac_cam #(.KEY_W(KW), .CODE_W(CW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [CW-1:0] ref_code(logic [KW-1:0] k);
    for (int i = 0; i < N; i++) if (vl[i] && ((k ^ val[i]) & msk[i]) == '0) return CW'(i + 1);
    return '0;
  endfunction

  function automatic int n_match(logic [KW-1:0] k);
    int c = 0;
    for (int i = 0; i < N; i++) if (vl[i] && ((k ^ val[i]) & msk[i]) == '0) c++;
    return c;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      val[i] = 48'({$urandom(), $urandom()});
      msk[i] = (i % 3 == 0) ? {48{1'b1}} : ({48{1'b1}} << $urandom_range(0, 24));
      vl[i]  = ($urandom_range(0, 7) != 0);
      // every fourth entry overlaps the one before it, so priority matters
      if (i % 4 == 1) begin
        val[i] = val[i-1] ^ 48'($urandom_range(0, 255));
        msk[i] = msk[i-1] << 8;
        vl[i]  = 1'b1;
      end
      @(negedge clk); cfg_we = 1; cfg_addr = 16'(i); cfg_wdata = {vl[i], msk[i], val[i]};
    end
    @(negedge clk); cfg_we = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [KW-1:0] k;
      int e;
      e = $urandom_range(0, N - 1);
      k = (n % 4 == 0) ? 48'({$urandom(), $urandom()}) : (val[e] ^ (~msk[e] & 48'({$urandom(), $urandom()})));
      @(negedge clk);
      if (expv_q) begin
        checks++;
        if (!out_valid || out_code !== exp_q) begin
          failures++; $display("mismatch: got %0d exp %0d", out_code, exp_q);
        end
      end
      in_valid = 1; in_key = k; exp_q = ref_code(k); expv_q = 1;
      if (exp_q != 0) hits++;
      if (n_match(k) > 1) overlaps++;
    end
    if (hits == 0 || overlaps == 0) failures++;
    $display("hits=%0d overlapping keys=%0d", hits, overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

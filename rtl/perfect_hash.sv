// Perfect hash of the 67-bit classification word to a rule number.
//
// The function is of the random acyclic graph kind: two hash functions h1
// and h2 map a word to two vertices, the g table (held in the external
// QDR-II SRAM) stores one number per vertex, and the rule number is
//   rule = (g[h1(w)] + g[h2(w)]) mod N.
// Configuration software chooses h1 and h2 so that the graph whose edges are
// the words is acyclic and then solves for g, so that every word of one rule
// (all its pseudorules) lands on that rule's number: intended collisions.
//
// h1 and h2 are H3 hashes: h(w) = XOR of row i of a random matrix for every
// bit i of w that is set. The two matrices and N are registers written
// through the configuration port, so software can draw new ones whenever the
// graph turns out cyclic.
//
// Timing: the two table reads go out on one QDR-II read port in consecutive
// cycles (h1 with the word, h2 one cycle later), so a word may arrive at
// most every second cycle (assertion). Read data returns RD_LAT cycles after
// its request. out_valid follows in_valid by RD_LAT + 2 cycles; in_tag is
// carried along unchanged.
//
// From the design: the acyclic-graph perfect hash, two memory accesses per
// word, the table in external memory. Own choices: H3 hash functions,
// single-port read scheduling, latency, the modulus register.
module perfect_hash #(
  parameter int unsigned KEY_W  = 67,
  parameter int unsigned G_AW   = 19,
  parameter int unsigned RULE_W = 10,
  parameter int unsigned TAG_W  = 8,
  parameter int unsigned RD_LAT = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [KEY_W-1:0]  in_key,
  input  logic [TAG_W-1:0]  in_tag,
  output logic              out_valid,
  output logic [RULE_W-1:0] out_rule,
  output logic [TAG_W-1:0]  out_tag,
  // QDR-II read port
  output logic              qdr_rd_en,
  output logic [G_AW-1:0]   qdr_rd_addr,
  input  logic [RULE_W-1:0] qdr_rd_data,
  // configuration
  input  logic              cfg_we,
  input  logic [15:0]       cfg_addr,
  input  logic [31:0]       cfg_wdata
);
  logic [G_AW-1:0]   q1 [KEY_W];
  logic [G_AW-1:0]   q2 [KEY_W];
  logic [RULE_W:0]   modulus;
  logic [KEY_W-1:0]  key_q;
  logic              second_q;
  logic [G_AW-1:0]   h1, h2;
  logic              cap1, cap2;
  logic [RULE_W-1:0] g1_q;
  logic [RULE_W:0]   sum;

  always_ff @(posedge clk) begin
    if (cfg_we && !cfg_addr[8] && cfg_addr[6:0] < 7'(KEY_W)) begin
      if (cfg_addr[7]) q2[cfg_addr[6:0]] <= cfg_wdata[G_AW-1:0];
      else             q1[cfg_addr[6:0]] <= cfg_wdata[G_AW-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              modulus <= (RULE_W+1)'(1 << RULE_W);
    else if (cfg_we && cfg_addr == 16'h100)  modulus <= cfg_wdata[RULE_W:0];
  end

  always_comb begin
    h1 = '0;
    h2 = '0;
    for (int i = 0; i < KEY_W; i++) begin
      if (in_key[i]) h1 ^= q1[i];
      if (key_q[i])  h2 ^= q2[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q    <= '0;
      second_q <= 1'b0;
    end else begin
      second_q <= in_valid;
      if (in_valid) key_q <= in_key;
    end
  end

  assign qdr_rd_en   = in_valid || second_q;
  assign qdr_rd_addr = second_q ? h2 : h1;

  delay_line #(.WIDTH(1), .DELAY(RD_LAT)) u_cap (
    .clk, .rst_n, .d(in_valid), .q(cap1));
  delay_line #(.WIDTH(1), .DELAY(1)) u_cap2 (
    .clk, .rst_n, .d(cap1), .q(cap2));
  delay_line #(.WIDTH(TAG_W), .DELAY(RD_LAT + 2)) u_tag (
    .clk, .rst_n, .d(in_tag), .q(out_tag));

  assign sum = {1'b0, g1_q} + {1'b0, qdr_rd_data};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g1_q      <= '0;
      out_valid <= 1'b0;
      out_rule  <= '0;
    end else begin
      if (cap1) g1_q <= qdr_rd_data;
      out_valid <= cap2;
      if (cap2) out_rule <= RULE_W'((sum >= modulus) ? sum - modulus : sum);
    end
  end

  a_issue_interval: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> !second_q);
endmodule

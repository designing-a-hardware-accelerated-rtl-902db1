// Self-checking testbench of perfect_hash with a behavioural QDR-II model:
// 400 random 67-bit words are assigned random rule numbers, several words
// per rule (pseudorules). The software model finds an acyclic graph and the
// g table; after loading, every word is hashed (one every second cycle, the
// block's issue rate) and must give its rule, its tag, and the latency
// RD_LAT + 2.
module tb_perfect_hash;
  import fw_pkg::*;
  import tb_fw_sw_pkg::*;
  localparam int RD_LAT = 2, LAT = RD_LAT + 2, TW = 16, NR = 1000;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [66:0] in_key = '0;
  logic [TW-1:0] in_tag = '0, out_tag;
  logic [RULE_W-1:0] out_rule;
  logic qdr_rd_en, qdr_wr_en = 0;
  logic [G_AW-1:0] qdr_rd_addr, qdr_wr_addr = '0;
  logic [RULE_W-1:0] qdr_rd_data, qdr_wr_data = '0;
  logic cfg_we = 0;
  logic [15:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  int checks = 0, failures = 0, cyc = 0;
  chm_builder chm;
  cfg_write_t q[$];
  int unsigned exp_rule[$], exp_tag[$];
  int exp_time[$];

  perfect_hash #(.KEY_W(67), .G_AW(G_AW), .RULE_W(RULE_W), .TAG_W(TW), .RD_LAT(RD_LAT)) dut (.*);
  qdr_model #(.AW(G_AW), .DW(RULE_W), .RD_LAT(RD_LAT)) u_qdr (
    .clk, .rd_en(qdr_rd_en), .rd_addr(qdr_rd_addr), .rd_data(qdr_rd_data),
    .wr_en(qdr_wr_en), .wr_addr(qdr_wr_addr), .wr_data(qdr_wr_data));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int unsigned r, t;
    int tm;
    checks++;
    if (exp_rule.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      r = exp_rule.pop_front(); t = exp_tag.pop_front(); tm = exp_time.pop_front();
      if (out_rule !== RULE_W'(r) || out_tag !== TW'(t) || cyc - tm != LAT) begin
        failures++;
        $display("mismatch: rule %0d/%0d tag %0d/%0d latency %0d", out_rule, r, out_tag, t, cyc - tm);
      end
    end
  end

  initial begin
    chm = new(G_AW, NR);
    for (int i = 0; i < 400; i++) begin
      chm.keys.push_back({$urandom(), $urandom(), 3'($urandom())});
      chm.vals.push_back(($urandom_range(0, NR - 1) / 4) * 4);
    end
    if (!chm.build()) begin failures++; $display("no acyclic graph found"); end
    chm.writes(q);
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (q[i]) begin
      @(negedge clk);
      cfg_we = 0; qdr_wr_en = 0;
      if (q[i].addr[19:16] == CT_GTAB) begin
        qdr_wr_en = 1; qdr_wr_addr = q[i].data[32 +: G_AW]; qdr_wr_data = q[i].data[RULE_W-1:0];
      end else begin
        cfg_we = 1; cfg_addr = q[i].addr[15:0]; cfg_wdata = q[i].data[31:0];
      end
    end
    @(negedge clk); cfg_we = 0; qdr_wr_en = 0;
    foreach (chm.keys[i]) begin
      @(negedge clk);
      in_valid = 1; in_key = chm.keys[i]; in_tag = TW'(i);
      exp_rule.push_back(chm.vals[i]); exp_tag.push_back(i); exp_time.push_back(cyc);
      @(negedge clk);
      in_valid = 0;
    end
    repeat (20) @(posedge clk);
    if (exp_rule.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

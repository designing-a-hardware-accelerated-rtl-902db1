// Self-checking testbench of the classifier with a behavioural QDR-II.
// A 12-rule set is compiled by the software model (Tree Bitmap tries,
// tables, rule table, perfect hash over all pseudorules) and loaded over
// the configuration port. Then the three lines send header records: most
// built to hit a chosen rule, the rest random. Every result must equal the
// first matching rule found by a linear search over the header fields
// (or no match with the default action), per line in order. A saturated
// phase checks the issue rate of one header every two cycles.
module tb_classifier;
  import fw_pkg::*;
  import tb_fw_sw_pkg::*;
  localparam int N = NLINES, NH = 400, RD_LAT = 2;
  logic clk = 0, rst_n = 0;
  hdr_fields_t fld [N];
  logic [N-1:0] fld_valid = '0, fld_ready;
  cls_result_t res [N];
  logic [N-1:0] res_valid, res_ready = '0;
  logic qdr_rd_en, qdr_wr_en;
  logic [G_AW-1:0] qdr_rd_addr, qdr_wr_addr;
  logic [RULE_W-1:0] qdr_rd_data, qdr_wr_data;
  logic cfg_we = 0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [CFG_DW-1:0] cfg_wdata = '0;
  int checks = 0, failures = 0, matched = 0, unmatched = 0, issued = 0, cyc = 0;
  bit saturate = 0;
  int sat_start, sat_issued;
  ruleset rs;
  cfg_write_t q[$];
  hdr_fields_t hdrs [N][$];
  cls_result_t exp_r [N][$];
  int hi [N];

  classifier #(.RD_LAT(RD_LAT)) dut (.*);
  qdr_model #(.AW(G_AW), .DW(RULE_W), .RD_LAT(RD_LAT)) u_qdr (
    .clk, .rd_en(qdr_rd_en), .rd_addr(qdr_rd_addr), .rd_data(qdr_rd_data),
    .wr_en(qdr_wr_en), .wr_addr(qdr_wr_addr), .wr_data(qdr_wr_data));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rs = new();
    rs.example(12);
    if (!rs.build(G_AW)) begin failures++; $display("perfect hash not found"); end
    $display("%0d pseudorule words, %0d hash tries", rs.n_keys, rs.chm.tries);
    rs.writes(q);
    for (int i = 0; i < N; i++) begin
      hi[i] = 0; fld[i] = '0;
      for (int n = 0; n < NH; n++) begin
        hdr_fields_t f;
        f = rs.random_header((n % 5 == 4) ? -1 : $urandom_range(0, 11));
        hdrs[i].push_back(f);
        exp_r[i].push_back(rs.classify(f));
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (q[k]) begin
      @(negedge clk); cfg_we = 1; cfg_addr = q[k].addr; cfg_wdata = q[k].data;
    end
    @(negedge clk); cfg_we = 0;
    repeat (5) @(negedge clk);
    saturate = 1;
    sat_start = cyc; sat_issued = issued;
    repeat (200) @(negedge clk);
    checks++;
    $display("saturated: %0d headers in 200 cycles", issued - sat_issued);
    if (issued - sat_issued < 98) begin failures++; $display("issue rate too low"); end
    saturate = 0;
  end

  always @(negedge clk) if (rst_n && !cfg_we) begin
    for (int i = 0; i < N; i++) begin
      fld_valid[i] <= (hi[i] < NH) && (saturate || $urandom_range(0, 5) == 0);
      fld[i]       <= (hi[i] < NH) ? hdrs[i][hi[i]] : '0;
      res_ready[i] <= saturate || ($urandom_range(0, 2) != 0);
    end
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.is_valid) issued++;
    for (int i = 0; i < N; i++) begin
      if (fld_valid[i] && fld_ready[i]) hi[i]++;
      if (res_valid[i] && res_ready[i]) begin
        cls_result_t e;
        e = exp_r[i].pop_front();
        checks++;
        if (e.match) matched++; else unmatched++;
        if (res[i] !== e && !(e.match == 0 && res[i].match == 0 && res[i].action == e.action)) begin
          failures++; $display("line %0d: got %h expected %h", i, res[i], e);
        end
      end
    end
    if (exp_r[0].size() == 0 && exp_r[1].size() == 0 && exp_r[2].size() == 0 && hi[0] == NH) begin
      if (matched == 0 || unmatched == 0) begin failures++; $display("no match/no-match case"); end
      $display("matched %0d unmatched %0d", matched, unmatched);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule

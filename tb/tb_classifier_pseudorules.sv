// Directed testbench of the classifier on the classic two-dimensional
// pseudorule example. Three rules use the source address (dimension 1)
// and the destination address (dimension 2):
//   R1: 1*   / *      R2: 1*   / 00*      R3: 101* / 100*
// The expected results (for example (101*, 00*) -> R2) hold only if the more
// specific rules come first, so the rule table is loaded with R3 at priority 0,
// R2 at 1 and R1 at 2.
// The LPM results give six combinations. Three are rules, and three are
// pseudorules that the rules do not list: (1*, 100*) -> R1,
// (101*, 00*) -> R2 and (101*, *) -> R1. The software model must emit
// exactly these six words per protocol class. The perfect hash must send
// each one to its rule. A source address outside 1* must match nothing.
// Headers for every combination go in on line 0, with random low bits, and
// the rule number, match bit and action of each result are compared with
// the expected rule written out by hand.
module tb_classifier_pseudorules;
  import fw_pkg::*;
  import tb_fw_sw_pkg::*;
  localparam int N = NLINES, RD_LAT = 2, PER_CASE = 24, NCASE = 7;
  logic clk = 0, rst_n = 0;
  hdr_fields_t fld [N];
  logic [N-1:0] fld_valid = '0, fld_ready;
  cls_result_t res [N];
  logic [N-1:0] res_valid, res_ready = '1;
  logic qdr_rd_en, qdr_wr_en;
  logic [G_AW-1:0] qdr_rd_addr, qdr_wr_addr;
  logic [RULE_W-1:0] qdr_rd_data, qdr_wr_data;
  logic cfg_we = 0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [CFG_DW-1:0] cfg_wdata = '0;
  int checks = 0, failures = 0, sent = 0, got = 0;
  int per_rule [4];
  ruleset rs;
  cfg_write_t q[$];
  hdr_fields_t hdrs[$];
  int exp_rule[$];             // 0..2 for R1..R3, -1 = no match
  action_t acts [3];

  classifier #(.RD_LAT(RD_LAT)) dut (.*);
  qdr_model #(.AW(G_AW), .DW(RULE_W), .RD_LAT(RD_LAT)) u_qdr (
    .clk, .rd_en(qdr_rd_en), .rd_addr(qdr_rd_addr), .rd_data(qdr_rd_data),
    .wr_en(qdr_wr_en), .wr_addr(qdr_wr_addr), .wr_data(qdr_wr_data));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // case c: top bits of source / destination address and the expected rule
  function automatic void case_bits(int c, output logic [2:0] s, output logic [2:0] d,
                                    output int r);
    case (c)
      0: begin s = 3'b100; d = 3'b010; r = 0; end   // R1 itself
      1: begin s = 3'b110; d = 3'b001; r = 1; end   // R2 itself
      2: begin s = 3'b101; d = 3'b100; r = 2; end   // R3 itself
      3: begin s = 3'b111; d = 3'b100; r = 0; end   // P1 (1*, 100*)  -> R1
      4: begin s = 3'b101; d = 3'b000; r = 1; end   // P2 (101*, 00*) -> R2
      5: begin s = 3'b101; d = 3'b110; r = 0; end   // P3 (101*, *)   -> R1
      default: begin s = 3'(2 * $urandom_range(0, 1)) & 3'b011; d = 3'($urandom()); r = -1; end
    endcase
  endfunction

  initial begin
    rs = new();
    for (int i = 0; i < 3; i++) begin
      acts[i] = '0;
      acts[i].out_mask = 3'(1 << i);
      acts[i].trim_len = TRIM_W'(64 * (i + 1));
    end
    rs.add(64'hA000_0000, 3, 64'h8000_0000, 3, 0, 0, 0, acts[2]);   // R3
    rs.add(64'h8000_0000, 1, 64'h0000_0000, 2, 0, 0, 0, acts[1]);   // R2
    rs.add(64'h8000_0000, 1, 64'h0000_0000, 0, 0, 0, 0, acts[0]);   // R1
    rs.def_act = '0;
    if (!rs.build(G_AW)) begin failures++; $display("perfect hash not found"); end
    // two source prefixes x three destination prefixes x three protocol classes
    checks++;
    if (rs.n_keys != 18) begin failures++; $display("expected 18 words, got %0d", rs.n_keys); end
    $display("%0d words (3 rules + 3 pseudorules per protocol class)", rs.n_keys);
    rs.writes(q);
    for (int n = 0; n < NCASE * PER_CASE; n++) begin
      hdr_fields_t f;
      logic [2:0] s, d;
      int r;
      f = rs.random_header(-1);
      case_bits(n % NCASE, s, d, r);
      f.sip[31:29] = s;
      f.dip[31:29] = d;
      hdrs.push_back(f);
      exp_rule.push_back(r);
    end
    for (int i = 0; i < N; i++) fld[i] = '0;
    for (int i = 0; i < 4; i++) per_rule[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (q[k]) begin
      @(negedge clk); cfg_we = 1; cfg_addr = q[k].addr; cfg_wdata = q[k].data;
    end
    @(negedge clk); cfg_we = 0;
  end

  always @(negedge clk) if (rst_n && !cfg_we) begin
    fld_valid[0] <= (sent < hdrs.size()) && ($urandom_range(0, 1) == 0);
    fld[0]       <= (sent < hdrs.size()) ? hdrs[sent] : '0;
  end

  always @(posedge clk) if (rst_n) begin
    if (fld_valid[0] && fld_ready[0]) sent++;
    if (res_valid[1] || res_valid[2]) begin failures++; $display("result on an idle line"); end
    if (res_valid[0]) begin
      int r;
      cls_result_t ref_r;
      r = exp_rule[got];
      ref_r = rs.classify(hdrs[got]);
      checks++;
      if (r < 0) begin
        per_rule[3]++;
        if (res[0].match || res[0].action != rs.def_act || ref_r.match) begin
          failures++; $display("header %0d: expected no match, got %h", got, res[0]);
        end
      end else begin
        per_rule[r]++;
        // R(r+1) sits at priority 2 - r
        if (!res[0].match || res[0].rule != RULE_W'(2 - r) || res[0].action != acts[r] ||
            ref_r.rule != RULE_W'(2 - r)) begin
          failures++; $display("header %0d: expected R%0d, got %h", got, r + 1, res[0]);
        end
      end
      got++;
      if (got == hdrs.size()) begin
        $display("R1 %0d, R2 %0d, R3 %0d, no match %0d", per_rule[0], per_rule[1],
                 per_rule[2], per_rule[3]);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule

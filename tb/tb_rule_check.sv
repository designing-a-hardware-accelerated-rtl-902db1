// Self-checking testbench of rule_check: random rules are written, then
// headers are presented with a rule number, half of them built to satisfy
// that rule, half random or with one field pushed outside it. The match
// flag, rule number and action (rule's or default) are compared with a
// reference comparison; latency 2.
module tb_rule_check;
  import fw_pkg::*;
  localparam int NR = 64, LAT = 2;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [5:0] in_rule = '0;
  hdr_fields_t in_fld = '0;
  logic [7:0] in_tag = '0, out_tag;
  cls_result_t out_res;
  logic cfg_we = 0;
  logic [15:0] cfg_addr = '0;
  logic [$bits(rule_t)-1:0] cfg_wdata = '0;
  rule_t rules [NR];
  action_t defact;
  int checks = 0, failures = 0, cyc = 0, nmatch = 0, nmiss = 0;
  cls_result_t exp_res[$];
  int exp_time[$], exp_tag[$];

  rule_check #(.N_RULES(NR), .TAG_W(8)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit fits(hdr_fields_t f, rule_t r);
    return ((f.smac ^ r.smac_val) & r.smac_mask) == 0 && ((f.dmac ^ r.dmac_val) & r.dmac_mask) == 0 &&
           ((f.sip ^ r.sip_val) & r.sip_mask) == 0 && ((f.dip ^ r.dip_val) & r.dip_mask) == 0 &&
           ((f.proto ^ r.proto_val) & r.proto_mask) == 0 && ((f.flags ^ r.flags_val) & r.flags_mask) == 0 &&
           ((f.iface ^ r.iface_val) & r.iface_mask) == 0 &&
           f.sport >= r.sport_lo && f.sport <= r.sport_hi && f.dport >= r.dport_lo && f.dport <= r.dport_hi;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    cls_result_t e;
    int t, g;
    checks++;
    e = exp_res.pop_front(); t = exp_time.pop_front(); g = exp_tag.pop_front();
    if (out_res !== e || cyc - t != LAT || out_tag !== 8'(g)) begin
      failures++; $display("mismatch: got %h exp %h latency %0d", out_res, e, cyc - t);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NR; i++) begin
      rule_t r;
      r = '0;
      r.smac_val = {$urandom(), $urandom()}; r.smac_mask = ($urandom_range(0, 3) == 0) ? '1 : '0;
      r.dmac_val = {$urandom(), $urandom()}; r.dmac_mask = ($urandom_range(0, 3) == 0) ? '1 : '0;
      r.sip_val = $urandom(); r.sip_mask = 32'hffffffff << $urandom_range(0, 32);
      r.dip_val = $urandom(); r.dip_mask = 32'hffffffff << $urandom_range(0, 32);
      r.proto_val = 8'($urandom()); r.proto_mask = ($urandom_range(0, 1) == 0) ? '1 : '0;
      r.sport_lo = 16'($urandom_range(0, 30000)); r.sport_hi = r.sport_lo + 16'($urandom_range(0, 30000));
      r.dport_lo = 16'($urandom_range(0, 30000)); r.dport_hi = r.dport_lo + 16'($urandom_range(0, 30000));
      r.flags_val = 8'($urandom()); r.flags_mask = 8'($urandom());
      r.iface_val = 2'($urandom()); r.iface_mask = 2'($urandom());
      r.action = action_t'($urandom());
      rules[i] = r;
      @(negedge clk); cfg_we = 1; cfg_addr = 16'(i); cfg_wdata = r;
    end
    defact = action_t'($urandom());
    @(negedge clk); cfg_addr = 16'h8000; cfg_wdata = '0; cfg_wdata[$bits(action_t)-1:0] = defact;
    @(negedge clk); cfg_we = 0;
    for (int n = 0; n < 2000; n++) begin
      hdr_fields_t f;
      rule_t r;
      int k;
      cls_result_t e;
      k = $urandom_range(0, NR - 1); r = rules[k];
      f = {$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
      if (n % 2 == 0) begin
        f.smac = (f.smac & ~r.smac_mask) | (r.smac_val & r.smac_mask);
        f.dmac = (f.dmac & ~r.dmac_mask) | (r.dmac_val & r.dmac_mask);
        f.sip = (f.sip & ~r.sip_mask) | (r.sip_val & r.sip_mask);
        f.dip = (f.dip & ~r.dip_mask) | (r.dip_val & r.dip_mask);
        f.proto = (f.proto & ~r.proto_mask) | (r.proto_val & r.proto_mask);
        f.flags = (f.flags & ~r.flags_mask) | (r.flags_val & r.flags_mask);
        f.iface = (f.iface & ~r.iface_mask) | (r.iface_val & r.iface_mask);
        f.sport = r.sport_lo + 16'($urandom_range(0, int'(r.sport_hi - r.sport_lo)));
        f.dport = (n % 8 == 2) ? r.dport_hi + 16'd1 : r.dport_lo;
      end
      e.rule = RULE_W'(k);
      e.match = fits(f, r);
      e.action = e.match ? r.action : defact;
      if (e.match) nmatch++; else nmiss++;
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0); in_rule = 6'(k); in_fld = f; in_tag = 8'(n);
      if (in_valid) begin exp_res.push_back(e); exp_time.push_back(cyc); exp_tag.push_back(n & 255); end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(posedge clk);
    if (exp_res.size() != 0 || nmatch == 0 || nmiss == 0) begin failures++; $display("missing outputs or cases"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

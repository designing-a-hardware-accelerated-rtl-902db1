// Rule table and final comparison of the classification.
//
// The perfect hash yields a rule number for every packet, also for packets
// that match no rule at all. This block reads that rule from the on-chip
// rule table and compares the full parsed header with it: MAC and IP
// addresses, protocol, TCP flags and input interface under value/mask, the
// two ports against inclusive ranges. If the header fits, the result is the
// rule number and the rule's action (match = 1); otherwise the result is
// "no match" with the default action register.
//
// Timing: one cycle table read, one cycle compare; out_valid follows
// in_valid by 2 cycles, one header per cycle. in_tag is carried along.
//
// From the design: the rule table, the compare step that removes false
// positives, rules and actions. Own choices: rule and action encoding,
// ranges for ports, the default action register (cfg_addr[15] = 1).
module rule_check
  import fw_pkg::*;
#(
  parameter int unsigned N_RULES = fw_pkg::NRULES,
  parameter int unsigned TAG_W  = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [$clog2(N_RULES)-1:0] in_rule,
  input  hdr_fields_t               in_fld,
  input  logic [TAG_W-1:0]          in_tag,
  output logic                      out_valid,
  output cls_result_t               out_res,
  output logic [TAG_W-1:0]          out_tag,
  input  logic                      cfg_we,
  input  logic [15:0]               cfg_addr,
  input  logic [$bits(rule_t)-1:0]  cfg_wdata
);
  localparam int unsigned RW = $clog2(N_RULES);

  rule_t       table_mem [N_RULES];
  rule_t       rule_q;
  hdr_fields_t fld_q;
  logic [RW-1:0]    num_q;
  logic [TAG_W-1:0] tag_q;
  logic        v_q;
  action_t     def_action;
  logic        hit;

  always_ff @(posedge clk) begin
    if (cfg_we && !cfg_addr[15]) table_mem[cfg_addr[RW-1:0]] <= rule_t'(cfg_wdata);
    rule_q <= table_mem[in_rule];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      def_action <= '0;                      // drop until configured
      v_q <= 1'b0; fld_q <= '0; num_q <= '0; tag_q <= '0;
    end else begin
      if (cfg_we && cfg_addr[15]) def_action <= action_t'(cfg_wdata[$bits(action_t)-1:0]);
      v_q <= in_valid; fld_q <= in_fld; num_q <= in_rule; tag_q <= in_tag;
    end
  end

  always_comb begin
    hit = (((fld_q.smac  ^ rule_q.smac_val)  & rule_q.smac_mask)  == '0) &&
          (((fld_q.dmac  ^ rule_q.dmac_val)  & rule_q.dmac_mask)  == '0) &&
          (((fld_q.sip   ^ rule_q.sip_val)   & rule_q.sip_mask)   == '0) &&
          (((fld_q.dip   ^ rule_q.dip_val)   & rule_q.dip_mask)   == '0) &&
          (((fld_q.proto ^ rule_q.proto_val) & rule_q.proto_mask) == '0) &&
          (((fld_q.flags ^ rule_q.flags_val) & rule_q.flags_mask) == '0) &&
          (((fld_q.iface ^ rule_q.iface_val) & rule_q.iface_mask) == '0) &&
          (fld_q.sport >= rule_q.sport_lo) && (fld_q.sport <= rule_q.sport_hi) &&
          (fld_q.dport >= rule_q.dport_lo) && (fld_q.dport <= rule_q.dport_hi);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_res   <= '0;
      out_tag   <= '0;
    end else begin
      out_valid     <= v_q;
      out_tag       <= tag_q;
      out_res.match <= hit;
      out_res.rule  <= RULE_W'(num_q);
      out_res.action <= hit ? rule_q.action : def_action;
    end
  end
endmodule

// Classification module shared by the three internal lines.
//
// It takes the parsed header fields of every line and returns, per line and
// in that line's packet order, the number of the first rule the packet
// matches and the rule's action. The algorithm is a decomposition:
//   1. every field is looked up on its own, in parallel: Tree Bitmap longest
//      prefix match for the two IPv4 addresses and the two ports, CAMs for
//      the two MAC addresses, tables for protocol, TCP flags and input
//      interface;
//   2. the nine codes are concatenated into the 67-bit word (cls_key_t) and a
//      perfect hash with two reads of the external QDR-II g table turns it
//      into a rule number;
//   3. rule_check compares the header with that rule and rejects false
//      positives.
// All pseudorules of one rule hash to that rule, so no pseudorule is stored.
//
// Scheduling: each line's headers wait in a small FIFO; a round-robin
// arbiter issues one header at most every second cycle (the two hash reads
// share one QDR-II read port), i.e. 62.5 million headers/s at 125 MHz,
// above the 3 x 14.9 million/s that three saturated 10 Gbps lines need.
// A line is only served while it has a free place in its result FIFO
// (credit counter), so results never overflow. Latency from issue to the
// result FIFO is 10 (lookups) + RD_LAT + 2 (hash) + 2 (compare) cycles.
//
// Configuration: cfg_addr = {target, index} as in fw_pkg::cfg_target_e; the
// g table writes are passed to the QDR-II write port.
//
// From the design: the three steps, the field modules, the 67-bit word, the
// two memory accesses and the external memory. Own choices: FIFOs, the
// round-robin arbiter, credits, all sizes not given and all latencies.
module classifier
  import fw_pkg::*;
#(
  parameter int unsigned RD_LAT    = 2,
  parameter int unsigned HDR_DEPTH = 8,
  parameter int unsigned RES_DEPTH = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  hdr_fields_t         fld      [NLINES],
  input  logic [NLINES-1:0]   fld_valid,
  output logic [NLINES-1:0]   fld_ready,
  output cls_result_t         res      [NLINES],
  output logic [NLINES-1:0]   res_valid,
  input  logic [NLINES-1:0]   res_ready,
  // QDR-II SRAM holding the g table
  output logic                qdr_rd_en,
  output logic [G_AW-1:0]     qdr_rd_addr,
  input  logic [RULE_W-1:0]   qdr_rd_data,
  output logic                qdr_wr_en,
  output logic [G_AW-1:0]     qdr_wr_addr,
  output logic [RULE_W-1:0]   qdr_wr_data,
  // configuration
  input  logic                cfg_we,
  input  logic [CFG_AW-1:0]   cfg_addr,
  input  logic [CFG_DW-1:0]   cfg_wdata
);
  localparam int unsigned FLW    = $bits(hdr_fields_t);
  localparam int unsigned LIDX_W = $clog2(NLINES);
  localparam int unsigned IP_LAT   = 32 / 4 + 2;   // treebitmap LEVELS + 1
  localparam int unsigned PORT_LAT = 16 / 4 + 2;
  localparam int unsigned CRW    = $clog2(RES_DEPTH) + 1;

  // ---------------------------------------------------------------- config
  logic [3:0]  ct;
  logic [15:0] ci;
  assign ct = cfg_addr[CFG_AW-1:16];
  assign ci = cfg_addr[15:0];

  function automatic logic we_for(input logic [3:0] t, input cfg_target_e e,
                                  input logic we);
    return we && (t == e);
  endfunction

  assign qdr_wr_en   = we_for(ct, CT_GTAB, cfg_we);
  assign qdr_wr_addr = cfg_wdata[32 +: G_AW];
  assign qdr_wr_data = cfg_wdata[RULE_W-1:0];

  // ------------------------------------------------- per-line header FIFOs
  hdr_fields_t           hf_head [NLINES];
  logic [NLINES-1:0]     hf_empty, hf_full, hf_pop;
  logic [NLINES-1:0]     rf_empty, rf_full, rf_push;
  logic [CRW-1:0]        credit [NLINES];
  cls_result_t           rc_res;
  logic [LIDX_W-1:0]     rc_line;
  logic                  rc_valid;

  for (genvar i = 0; i < NLINES; i++) begin : g_line
    logic [$clog2(HDR_DEPTH):0] hcnt;
    logic [$clog2(RES_DEPTH):0] rcnt;
    logic [FLW-1:0]             hf_q;
    logic [$bits(cls_result_t)-1:0] rf_q;
    sync_fifo #(.WIDTH(FLW), .DEPTH(HDR_DEPTH)) u_hfifo (
      .clk, .rst_n, .push(fld_valid[i] && !hf_full[i]), .wr_data(fld[i]),
      .pop(hf_pop[i]), .rd_data(hf_q), .full(hf_full[i]), .empty(hf_empty[i]),
      .count(hcnt));
    assign hf_head[i]   = hdr_fields_t'(hf_q);
    assign fld_ready[i] = !hf_full[i];

    assign rf_push[i] = rc_valid && (rc_line == LIDX_W'(i));
    sync_fifo #(.WIDTH($bits(cls_result_t)), .DEPTH(RES_DEPTH)) u_rfifo (
      .clk, .rst_n, .push(rf_push[i]), .wr_data(rc_res),
      .pop(res_ready[i] && !rf_empty[i]), .rd_data(rf_q), .full(rf_full[i]),
      .empty(rf_empty[i]), .count(rcnt));
    assign res[i]       = cls_result_t'(rf_q);
    assign res_valid[i] = !rf_empty[i];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) credit[i] <= CRW'(RES_DEPTH);
      else credit[i] <= credit[i] - CRW'(hf_pop[i]) + CRW'(res_ready[i] && !rf_empty[i]);
    end
  end

  // ------------------------------------------------------------- arbiter
  logic [LIDX_W-1:0] rr_ptr, is_line;
  logic              is_valid, issued_q;
  hdr_fields_t       is_fld;

  always_comb begin
    is_valid = 1'b0;
    is_line  = '0;
    for (int k = NLINES - 1; k >= 0; k--) begin
      int unsigned c;
      c = (int'(rr_ptr) + k) % NLINES;
      if (!issued_q && !hf_empty[c] && credit[c] != '0) begin
        is_valid = 1'b1;
        is_line  = LIDX_W'(c);
      end
    end
    hf_pop = '0;
    if (is_valid) hf_pop[is_line] = 1'b1;
    is_fld = hf_head[is_line];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_ptr   <= '0;
      issued_q <= 1'b0;
    end else begin
      issued_q <= is_valid;
      if (is_valid) rr_ptr <= (is_line == LIDX_W'(NLINES - 1)) ? '0 : is_line + 1'b1;
    end
  end

  // ------------------------------------------------------ field lookups
  cls_key_t key;
  logic [SMAC_CW-1:0]  smac_c;
  logic [DMAC_CW-1:0]  dmac_c;
  logic [PROTO_CW-1:0] proto_c;
  logic [FLAGS_CW-1:0] flags_c;
  logic [IFACE_CW-1:0] iface_c;
  logic [SPORT_CW-1:0] sport_c;
  logic [DPORT_CW-1:0] dport_c;
  logic [5:0] vbits;
  logic       lk_valid;

  treebitmap_lpm #(.KEY_W(32), .PTR_W(10), .CODE_W(SIP_CW)) u_sip (
    .clk, .rst_n, .in_valid(is_valid), .in_key(is_fld.sip),
    .out_valid(lk_valid), .out_code(key.sip),
    .cfg_we(we_for(ct, CT_SIP_LPM, cfg_we)), .cfg_addr(ci), .cfg_wdata(cfg_wdata[63:0]));
  treebitmap_lpm #(.KEY_W(32), .PTR_W(10), .CODE_W(DIP_CW)) u_dip (
    .clk, .rst_n, .in_valid(is_valid), .in_key(is_fld.dip),
    .out_valid(vbits[0]), .out_code(key.dip),
    .cfg_we(we_for(ct, CT_DIP_LPM, cfg_we)), .cfg_addr(ci), .cfg_wdata(cfg_wdata[63:0]));
  treebitmap_lpm #(.KEY_W(16), .PTR_W(10), .CODE_W(SPORT_CW)) u_sport (
    .clk, .rst_n, .in_valid(is_valid), .in_key(is_fld.sport),
    .out_valid(vbits[1]), .out_code(sport_c),
    .cfg_we(we_for(ct, CT_SPORT_LPM, cfg_we)), .cfg_addr(ci), .cfg_wdata(cfg_wdata[63:0]));
  treebitmap_lpm #(.KEY_W(16), .PTR_W(10), .CODE_W(DPORT_CW)) u_dport (
    .clk, .rst_n, .in_valid(is_valid), .in_key(is_fld.dport),
    .out_valid(vbits[2]), .out_code(dport_c),
    .cfg_we(we_for(ct, CT_DPORT_LPM, cfg_we)), .cfg_addr(ci), .cfg_wdata(cfg_wdata[63:0]));
  mac_cam #(.KEY_W(48), .CODE_W(SMAC_CW)) u_smac (
    .clk, .rst_n, .in_valid(is_valid), .in_key(is_fld.smac),
    .out_valid(vbits[3]), .out_code(smac_c),
    .cfg_we(we_for(ct, CT_SMAC_CAM, cfg_we)), .cfg_addr(ci), .cfg_wdata(cfg_wdata[96:0]));
  mac_cam #(.KEY_W(48), .CODE_W(DMAC_CW)) u_dmac (
    .clk, .rst_n, .in_valid(is_valid), .in_key(is_fld.dmac),
    .out_valid(vbits[4]), .out_code(dmac_c),
    .cfg_we(we_for(ct, CT_DMAC_CAM, cfg_we)), .cfg_addr(ci), .cfg_wdata(cfg_wdata[96:0]));
  lookup_table #(.IN_W(8), .OUT_W(PROTO_CW)) u_proto (
    .clk, .rst_n, .in_valid(is_valid), .in_key(is_fld.proto),
    .out_valid(vbits[5]), .out_code(proto_c),
    .cfg_we(we_for(ct, CT_PROTO_TAB, cfg_we)), .cfg_addr(ci), .cfg_wdata(cfg_wdata[PROTO_CW-1:0]));
  lookup_table #(.IN_W(8), .OUT_W(FLAGS_CW)) u_flags (
    .clk, .rst_n, .in_valid(is_valid), .in_key(is_fld.flags),
    .out_valid(), .out_code(flags_c),
    .cfg_we(we_for(ct, CT_FLAGS_TAB, cfg_we)), .cfg_addr(ci), .cfg_wdata(cfg_wdata[FLAGS_CW-1:0]));
  lookup_table #(.IN_W(2), .OUT_W(IFACE_CW)) u_iface (
    .clk, .rst_n, .in_valid(is_valid), .in_key(is_fld.iface),
    .out_valid(), .out_code(iface_c),
    .cfg_we(we_for(ct, CT_IFACE_TAB, cfg_we)), .cfg_addr(ci), .cfg_wdata(cfg_wdata[IFACE_CW-1:0]));

  // align the faster lookups with the IP lookups
  delay_line #(.WIDTH(SPORT_CW + DPORT_CW), .DELAY(IP_LAT - PORT_LAT)) u_dly_ports (
    .clk, .rst_n, .d({sport_c, dport_c}), .q({key.sport, key.dport}));
  delay_line #(.WIDTH(SMAC_CW + DMAC_CW + PROTO_CW + FLAGS_CW + IFACE_CW),
               .DELAY(IP_LAT - 1)) u_dly_small (
    .clk, .rst_n, .d({smac_c, dmac_c, proto_c, flags_c, iface_c}),
    .q({key.smac, key.dmac, key.proto, key.flags, key.iface}));

  logic [FLW+LIDX_W-1:0] lk_tag, ph_tag;
  delay_line #(.WIDTH(FLW + LIDX_W), .DELAY(IP_LAT)) u_dly_tag (
    .clk, .rst_n, .d({is_fld, is_line}), .q(lk_tag));

  // ------------------------------------------------------- perfect hash
  logic              ph_valid;
  logic [RULE_W-1:0] ph_rule;

  perfect_hash #(.KEY_W(KEY_W), .G_AW(G_AW), .RULE_W(RULE_W),
                 .TAG_W(FLW + LIDX_W), .RD_LAT(RD_LAT)) u_hash (
    .clk, .rst_n, .in_valid(lk_valid), .in_key(key), .in_tag(lk_tag),
    .out_valid(ph_valid), .out_rule(ph_rule), .out_tag(ph_tag),
    .qdr_rd_en, .qdr_rd_addr, .qdr_rd_data,
    .cfg_we(we_for(ct, CT_HASH, cfg_we)), .cfg_addr(ci), .cfg_wdata(cfg_wdata[31:0]));

  // ------------------------------------------------------- rule compare
  rule_check #(.N_RULES(NRULES), .TAG_W(LIDX_W)) u_rules (
    .clk, .rst_n, .in_valid(ph_valid), .in_rule(ph_rule),
    .in_fld(hdr_fields_t'(ph_tag[FLW+LIDX_W-1:LIDX_W])), .in_tag(ph_tag[LIDX_W-1:0]),
    .out_valid(rc_valid), .out_res(rc_res), .out_tag(rc_line),
    .cfg_we(we_for(ct, CT_RULE, cfg_we)), .cfg_addr(ci), .cfg_wdata(cfg_wdata[$bits(rule_t)-1:0]));

  a_no_result_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (rf_push & rf_full) == '0);
endmodule

// End-to-end testbench of firewall_top at its default parameters, with a
// behavioural QDR-II SRAM. A 12-rule set is compiled by the software model
// and loaded over the configuration port. Each of the three lines then
// sends 80 Ethernet frames (IPv4 TCP/UDP/ICMP and non-IPv4, 60 to 600
// bytes), most aimed at a chosen rule; outputs stall at random.
// Each output must deliver, per input line and in order, exactly the frames
// whose action names it, with the classification result in the FrameLink
// header (checked against a linear first-match search over the header
// fields) and, on the software output, the payload cut to the action's
// trim length. The run counts how often each mechanism happened: dropped
// frames, multicast, trimming, no-match default action, non-IPv4 frames,
// crossbar contention under DRR, output back-pressure and input stalls;
// one that never happened is a failure.
module tb_firewall_top;
  import fw_pkg::*;
  import tb_fl_pkg::*;
  import tb_fw_sw_pkg::*;
  localparam int N = NLINES, NF = 80, RD_LAT = 2;
  logic clk = 0, rst_n = 0;
  fl_word_t in_word [N], out_word [N];
  logic [N-1:0] in_src_rdy = '0, in_dst_rdy, out_src_rdy, out_dst_rdy = '0;
  logic qdr_rd_en, qdr_wr_en;
  logic [G_AW-1:0] qdr_rd_addr, qdr_wr_addr;
  logic [RULE_W-1:0] qdr_rd_data, qdr_wr_data;
  logic cfg_we = 0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [CFG_DW-1:0] cfg_wdata = '0;
  int checks = 0, failures = 0, expected = 0, delivered = 0;
  int n_drop = 0, n_mcast = 0, n_trim = 0, n_nomatch = 0, n_nonip = 0;
  int n_contend = 0, n_backpressure = 0, n_in_stall = 0;
  bit running = 0;
  ruleset rs;
  cfg_write_t q[$];
  fl_word_t words [N][$];
  int wi [N];
  fl_frame exp_q [N][N][$];      // [output][input]
  fl_collector col [N];

  firewall_top dut (.*);
  qdr_model #(.AW(G_AW), .DW(RULE_W), .RD_LAT(RD_LAT)) u_qdr (
    .clk, .rd_en(qdr_rd_en), .rd_addr(qdr_rd_addr), .rd_data(qdr_rd_data),
    .wr_en(qdr_wr_en), .wr_addr(qdr_wr_addr), .wr_data(qdr_wr_data));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fields as the header field extractor sees them
  function automatic hdr_fields_t seen(hdr_fields_t h, bit ip, int line);
    hdr_fields_t e;
    e = '0; e.dmac = h.dmac; e.smac = h.smac; e.iface = 2'(line);
    if (ip) begin
      e.proto = h.proto; e.sip = h.sip; e.dip = h.dip;
      if (h.proto == 6 || h.proto == 17) begin e.sport = h.sport; e.dport = h.dport; end
      if (h.proto == 6) e.flags = h.flags;
    end
    return e;
  endfunction

  initial begin
    rs = new();
    rs.example(12);
    rs.def_act = '0;
    rs.def_act.out_mask = 3'b100;      // unmatched traffic goes to software
    if (!rs.build(G_AW)) begin failures++; $display("perfect hash not found"); end
    rs.writes(q);
    for (int i = 0; i < N; i++) begin
      wi[i] = 0; col[i] = new(); in_word[i] = '0;
      for (int f = 0; f < NF; f++) begin
        fl_frame fr, ex;
        hdr_fields_t h, e;
        cls_result_t c;
        bit ip;
        int len, tl;
        ip  = (f % 9 != 8);
        h   = rs.random_header((f % 4 == 3) ? -1 : $urandom_range(0, 11));
        e   = seen(h, ip, i);
        c   = rs.classify(e);
        len = $urandom_range(60, 600);
        fr = new();
        fr.hdr = {$urandom(), $urandom(), 32'h0, 16'(i), 16'(f)};
        fr.pay = eth_frame(h, len, ip, 5);
        fr.to_words(words[i]);
        if (!ip) n_nonip++;
        if (!c.match) n_nomatch++;
        if (c.action.out_mask == 0) n_drop++;
        if ($countones(c.action.out_mask) > 1) n_mcast++;
        for (int o = 0; o < N; o++) if (c.action.out_mask[o]) begin
          ex = new(); ex.hdr = fr.hdr;
          ex.hdr[HDR_CLS_LSB +: HDR_CLS_W] = c;
          tl = int'(c.action.trim_len);
          for (int b = 0; b < len; b++)
            if (o != 2 || tl == 0 || b < tl) ex.pay.push_back(fr.pay[b]);
          if (o == 2 && tl != 0 && tl < len) n_trim++;
          exp_q[o][i].push_back(ex);
          expected++;
        end
      end
    end
    $display("%0d pseudorule words; %0d frames expected at the outputs", rs.n_keys, expected);
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (q[k]) begin
      @(negedge clk); cfg_we = 1; cfg_addr = q[k].addr; cfg_wdata = q[k].data;
    end
    @(negedge clk); cfg_we = 0;
    running = 1;
  end

  always @(negedge clk) if (running) begin
    for (int i = 0; i < N; i++) begin
      in_src_rdy[i]  <= (wi[i] < words[i].size()) && ($urandom_range(0, 9) != 0);
      in_word[i]     <= (wi[i] < words[i].size()) ? words[i][wi[i]] : '0;
      out_dst_rdy[i] <= ($urandom_range(0, 3) != 0);
    end
  end

  always @(posedge clk) if (running) begin
    if (dut.u_xbar.g_out[0].grant && $countones(dut.u_xbar.g_out[0].hv) > 1) n_contend++;
    if (dut.u_xbar.g_out[1].grant && $countones(dut.u_xbar.g_out[1].hv) > 1) n_contend++;
    if (dut.u_xbar.g_out[2].grant && $countones(dut.u_xbar.g_out[2].hv) > 1) n_contend++;
    for (int i = 0; i < N; i++) begin
      if (in_src_rdy[i] && in_dst_rdy[i]) wi[i]++;
      if (in_src_rdy[i] && !in_dst_rdy[i]) n_in_stall++;
    end
    for (int o = 0; o < N; o++) begin
      if (out_src_rdy[o] && !out_dst_rdy[o]) n_backpressure++;
      if (out_src_rdy[o] && out_dst_rdy[o]) begin
        fl_frame got, ex;
        if (col[o].add(out_word[o], got)) begin
          int src;
          cls_result_t gr, er;
          src = int'(got.hdr[31:16]);
          checks++; delivered++;
          if (src >= N || exp_q[o][src].size() == 0) begin
            failures++; $display("unexpected frame %h at output %0d", got.hdr[31:0], o);
          end else begin
            ex = exp_q[o][src].pop_front();
            gr = cls_result_t'(got.hdr[HDR_CLS_LSB +: HDR_CLS_W]);
            er = cls_result_t'(ex.hdr[HDR_CLS_LSB +: HDR_CLS_W]);
            if (!er.match) begin    // rule number of a non-match is not defined
              gr.rule = '0; er.rule = '0;
            end
            if (got.hdr[31:0] !== ex.hdr[31:0] || got.hdr[127:64] !== ex.hdr[127:64] ||
                gr !== er || got.pay != ex.pay) begin
              failures++;
              $display("output %0d frame %h: result %h/%h, %0d/%0d bytes", o, got.hdr[31:0],
                       gr, er, got.pay.size(), ex.pay.size());
            end
          end
        end
        if (col[o].err != "") begin failures++; $display("%s", col[o].err); end
      end
    end
    if (expected > 0 && delivered == expected) begin
      $display("drops %0d multicast %0d trims %0d no-match %0d non-IPv4 %0d", n_drop, n_mcast,
               n_trim, n_nomatch, n_nonip);
      $display("DRR contention %0d back-pressure cycles %0d input stall cycles %0d", n_contend,
               n_backpressure, n_in_stall);
      checks++;
      if (n_drop == 0 || n_mcast == 0 || n_trim == 0 || n_nomatch == 0 || n_nonip == 0 ||
          n_contend == 0 || n_backpressure == 0 || n_in_stall == 0) begin
        failures++; $display("a mechanism never happened");
      end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule

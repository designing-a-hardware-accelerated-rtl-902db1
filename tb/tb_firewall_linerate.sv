// Line-rate testbench of firewall_top at its default parameters. All three
// lines carry minimum-size Ethernet frames (64 bytes: one header word and
// four payload words) at the 10 Gbit/s packet rate. On the wire such a frame
// takes 84 bytes with preamble and inter-frame gap, which is 67.2 ns or 8.4
// cycles of 125 MHz. The three-rule set sends the frames of line i to
// output i, so the shared classifier is the only resource the lines share.
// Frame k of each line becomes available at cycle floor(k * 8.4). The test
// checks:
//   * the core takes every frame within MAX_LAG cycles of its arrival, so
//     the input backlog never grows (an input buffer of a few words is
//     enough and no frame is lost);
//   * every frame leaves its output, in order, with the right rule in its
//     header;
//   * each output sends its last frame no more than MAX_LAG cycles later,
//     relative to its first, than the wire delivered them, so it keeps up
//     with one frame per 8.4 cycles.
// Outputs are always ready.
module tb_firewall_linerate;
  import fw_pkg::*;
  import tb_fl_pkg::*;
  import tb_fw_sw_pkg::*;
  localparam int N = NLINES, NF = 300, RD_LAT = 2, MAX_LAG = 16;
  logic clk = 0, rst_n = 0;
  fl_word_t in_word [N], out_word [N];
  logic [N-1:0] in_src_rdy = '0, in_dst_rdy, out_src_rdy, out_dst_rdy = '1;
  logic qdr_rd_en, qdr_wr_en;
  logic [G_AW-1:0] qdr_rd_addr, qdr_wr_addr;
  logic [RULE_W-1:0] qdr_rd_data, qdr_wr_data;
  logic cfg_we = 0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [CFG_DW-1:0] cfg_wdata = '0;
  int checks = 0, failures = 0, cyc = 0, t0 = 0, max_lag = 0;
  bit running = 0;
  ruleset rs;
  cfg_write_t q[$];
  fl_word_t words [N][$];
  int wi [N], fi [N], got_n [N], first_t [N], last_t [N];
  fl_frame exp_q [N][$];
  fl_collector col [N];

  firewall_top dut (.*);
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

  // cycle at which frame k of a line reaches the core: k * 84 bytes at 10 bytes per cycle
  function automatic int arrival(int k);
    return (k * 84) / 10;
  endfunction

  initial begin
    action_t a;
    rs = new();
    for (int i = 0; i < N; i++) begin
      a = '0;
      a.out_mask = 3'(1 << i);
      rs.add({32'h0, 8'd10, 8'(i), 16'h0}, 16, 0, 0, 0, 0, 0, a);
    end
    rs.def_act = '0;
    if (!rs.build(G_AW)) begin failures++; $display("perfect hash not found"); end
    rs.writes(q);
    for (int i = 0; i < N; i++) begin
      wi[i] = 0; fi[i] = 0; got_n[i] = 0; first_t[i] = 0; last_t[i] = 0;
      col[i] = new(); in_word[i] = '0;
      for (int f = 0; f < NF; f++) begin
        fl_frame fr, ex;
        hdr_fields_t h;
        cls_result_t c;
        h = rs.random_header(i);
        fr = new();
        fr.hdr = {$urandom(), $urandom(), 32'h0, 16'(i), 16'(f)};
        fr.pay = eth_frame(h, 64, 1, 5);
        fr.to_words(words[i]);
        c = '0;
        c.rule = RULE_W'(i); c.match = 1'b1; c.action = rs.act[i];
        ex = new(); ex.hdr = fr.hdr; ex.pay = fr.pay;
        ex.hdr[HDR_CLS_LSB +: HDR_CLS_W] = c;
        exp_q[i].push_back(ex);
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (q[k]) begin
      @(negedge clk); cfg_we = 1; cfg_addr = q[k].addr; cfg_wdata = q[k].data;
    end
    @(negedge clk); cfg_we = 0;
    repeat (4) @(negedge clk);
    t0 = cyc;
    running = 1;
  end

  // a line offers its next word once the frame it belongs to has arrived
  always @(negedge clk) if (running) begin
    for (int i = 0; i < N; i++) begin
      in_src_rdy[i] <= (fi[i] < NF) && (cyc - t0 >= arrival(fi[i]));
      in_word[i]    <= (wi[i] < words[i].size()) ? words[i][wi[i]] : '0;
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (running) begin
      for (int i = 0; i < N; i++) if (in_src_rdy[i] && in_dst_rdy[i]) begin
        if (words[i][wi[i]].sof) begin
          int lag;
          lag = cyc - t0 - arrival(fi[i]);
          if (lag > max_lag) max_lag = lag;
        end
        if (words[i][wi[i]].eof) fi[i]++;
        wi[i]++;
      end
      for (int o = 0; o < N; o++) if (out_src_rdy[o] && out_dst_rdy[o]) begin
        fl_frame got, ex;
        if (col[o].add(out_word[o], got)) begin
          checks++;
          if (got_n[o] == 0) first_t[o] = cyc;
          last_t[o] = cyc;
          got_n[o]++;
          if (exp_q[o].size() == 0) begin
            failures++; $display("output %0d: unexpected frame %h", o, got.hdr[31:0]);
          end else begin
            ex = exp_q[o].pop_front();
            if (got.hdr !== ex.hdr || got.pay != ex.pay) begin
              failures++; $display("output %0d: frame %h differs", o, got.hdr[31:0]);
            end
          end
        end
        if (col[o].err != "") begin failures++; $display("%s", col[o].err); end
      end
      if (got_n[0] == NF && got_n[1] == NF && got_n[2] == NF) begin
        $display("largest lag behind the wire: %0d cycles (limit %0d)", max_lag, MAX_LAG);
        checks++;
        if (max_lag > MAX_LAG) begin failures++; $display("input backlog grew"); end
        for (int o = 0; o < N; o++) begin
          int span;
          span = last_t[o] - first_t[o];
          $display("output %0d: %0d frames in %0d cycles (line rate needs <= %0d)", o, NF - 1,
                   span, arrival(NF - 1) + MAX_LAG);
          checks++;
          if (span > arrival(NF - 1) + MAX_LAG) begin failures++; $display("output %0d below line rate", o); end
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule

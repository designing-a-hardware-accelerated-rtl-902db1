// Self-checking testbench of hfe: random Ethernet frames (IPv4 with TCP,
// UDP or ICMP and IHL 5..8, and non-IPv4 frames) pass with random stalls
// at the input, output and field sides. The frame words must pass
// unchanged and each field record must equal the fields the frame was
// built from, with the fields the frame does not carry set to zero.
module tb_hfe;
  import fw_pkg::*;
  import tb_fl_pkg::*;
  logic clk = 0, rst_n = 0;
  fl_word_t in_word = '0, out_word;
  logic in_src_rdy = 0, in_dst_rdy, out_src_rdy, out_dst_rdy = 0;
  hdr_fields_t fld;
  logic fld_valid, fld_ready = 0;
  int checks = 0, failures = 0, wi = 0, oi = 0;
  fl_word_t words[$];
  hdr_fields_t exp_f[$];

  hfe #(.IFACE(2'd1)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 300; f++) begin
      fl_frame fr;
      hdr_fields_t h, e;
      bit ip;
      int kind;
      h = {$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
      kind = $urandom_range(0, 3);
      ip = (kind != 3);
      h.proto = (kind == 0) ? 8'd6 : (kind == 1) ? 8'd17 : 8'd1;
      fr = new(); fr.hdr = {$urandom(), $urandom(), $urandom(), $urandom()};
      fr.pay = eth_frame(h, $urandom_range(100, 200), ip, $urandom_range(5, 8));
      fr.to_words(words);
      e = '0; e.dmac = h.dmac; e.smac = h.smac; e.iface = 2'd1;
      if (ip) begin
        e.proto = h.proto; e.sip = h.sip; e.dip = h.dip;
        if (kind <= 1) begin e.sport = h.sport; e.dport = h.dport; end
        if (kind == 0) e.flags = h.flags;
      end
      exp_f.push_back(e);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
  end

  always @(negedge clk) if (rst_n) begin
    in_src_rdy  <= (wi < words.size()) && ($urandom_range(0, 3) != 0);
    in_word     <= (wi < words.size()) ? words[wi] : '0;
    out_dst_rdy <= ($urandom_range(0, 3) != 0);
    fld_ready   <= ($urandom_range(0, 5) == 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (in_src_rdy && in_dst_rdy) wi++;
    if (out_src_rdy && out_dst_rdy) begin
      checks++;
      if (out_word !== words[oi]) begin failures++; $display("word %0d mismatch", oi); end
      oi++;
    end
    if (fld_valid && fld_ready) begin
      hdr_fields_t e;
      e = exp_f.pop_front();
      checks++;
      if (fld !== e) begin failures++; $display("fields mismatch: %h / %h", fld, e); end
    end
    if (oi == words.size() && exp_f.size() == 0 && words.size() > 0) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule

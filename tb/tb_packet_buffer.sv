// Self-checking testbench of packet_buffer: 200 random frames are written
// with random gaps while the reader stalls at random, and for a while not
// at all so that the buffer fills up. All words must come out in order and
// unchanged, the buffer must hold DEPTH words when full, and in_dst_rdy
// must drop exactly then.
module tb_packet_buffer;
  import fw_pkg::*;
  import tb_fl_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  fl_word_t in_word = '0, out_word;
  logic in_src_rdy = 0, in_dst_rdy, out_src_rdy, out_dst_rdy = 0;
  int checks = 0, failures = 0, wi = 0, oi = 0, cyc = 0, full_seen = 0;
  fl_word_t words[$];

  packet_buffer #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 200; f++) begin
      fl_frame fr;
      fr = new(); fr.hdr = {$urandom(), $urandom(), $urandom(), $urandom()};
      repeat ($urandom_range(60, 200)) fr.pay.push_back(8'($urandom()));
      fr.to_words(words);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
  end

  always @(negedge clk) if (rst_n) begin
    in_src_rdy  <= (wi < words.size()) && ($urandom_range(0, 3) != 0);
    in_word     <= (wi < words.size()) ? words[wi] : '0;
    out_dst_rdy <= (cyc > 200 && cyc < 400) ? 1'b0 : ($urandom_range(0, 2) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (!in_dst_rdy) begin
      full_seen++;
      checks++;
      if (wi - oi != DEPTH) begin failures++; $display("not ready at %0d words", wi - oi); end
    end
    if (in_src_rdy && in_dst_rdy) wi++;
    if (out_src_rdy && out_dst_rdy) begin
      checks++;
      if (out_word !== words[oi]) begin failures++; $display("word %0d mismatch", oi); end
      oi++;
    end
    if (oi == words.size() && words.size() > 0) begin
      if (full_seen == 0) begin failures++; $display("never full"); end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule

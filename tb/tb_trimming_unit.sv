// Self-checking testbench of trimming_unit: frames of random length (60 to
// 300 bytes) with random trim lengths (0 = keep, shorter or longer than the
// frame, on and off word boundaries) pass with random stalls on both sides.
// Every output frame must have its header unchanged and exactly the first
// min(len, trim) payload bytes (all bytes when trim = 0).
module tb_trimming_unit;
  import fw_pkg::*;
  import tb_fl_pkg::*;
  logic clk = 0, rst_n = 0;
  fl_word_t in_word = '0, out_word;
  logic in_src_rdy = 0, in_dst_rdy, out_src_rdy, out_dst_rdy = 0;
  int checks = 0, failures = 0, trimmed = 0;
  fl_word_t words[$];
  fl_frame  exp_q[$];
  fl_collector col;
  int wi = 0;

  trimming_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    col = new();
    for (int f = 0; f < 300; f++) begin
      fl_frame fr, ex;
      cls_result_t c;
      int len, tl;
      len = $urandom_range(60, 300);
      case (f % 4)
        0: tl = 0;
        1: tl = $urandom_range(1, len);
        2: tl = 16 * $urandom_range(1, len / 16);
        default: tl = $urandom_range(len, 2000);
      endcase
      fr = new(); c = cls_result_t'($urandom()); c.action.trim_len = TRIM_W'(tl);
      fr.hdr = {$urandom(), $urandom(), $urandom(), $urandom()};
      fr.hdr[HDR_CLS_LSB +: HDR_CLS_W] = c;
      for (int i = 0; i < len; i++) fr.pay.push_back(8'($urandom()));
      fr.to_words(words);
      ex = new(); ex.hdr = fr.hdr;
      for (int i = 0; i < ((tl == 0 || tl > len) ? len : tl); i++) ex.pay.push_back(fr.pay[i]);
      if (tl != 0 && tl < len) trimmed++;
      exp_q.push_back(ex);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
  end

  always @(negedge clk) if (rst_n) begin
    in_src_rdy  <= (wi < words.size()) && ($urandom_range(0, 3) != 0);
    in_word     <= (wi < words.size()) ? words[wi] : '0;
    out_dst_rdy <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    fl_frame got, ex;
    if (in_src_rdy && in_dst_rdy) wi++;
    if (out_src_rdy && out_dst_rdy) begin
      if (col.add(out_word, got)) begin
        ex = exp_q.pop_front();
        checks++;
        if (got.hdr !== ex.hdr || got.pay != ex.pay) begin
          failures++; $display("frame mismatch: %0d bytes, expected %0d", got.pay.size(), ex.pay.size());
        end
      end
      if (col.err != "") begin failures++; $display("%s", col.err); end
    end
    if (exp_q.size() == 0 && words.size() > 0) begin
      if (trimmed == 0) failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule

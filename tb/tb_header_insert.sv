// Self-checking testbench of header_insert: random frames and random
// results arrive independently, with random stalls on both sides and at the
// output. Each frame must leave with exactly the next result in its header
// bits and every other bit unchanged, and results must be consumed once.
module tb_header_insert;
  import fw_pkg::*;
  logic clk = 0;
  fl_word_t in_word, out_word;
  logic in_src_rdy = 0, in_dst_rdy, out_src_rdy, out_dst_rdy = 0;
  cls_result_t res;
  logic res_valid = 0, res_ready;
  int checks = 0, failures = 0, frames_out = 0;
  fl_word_t words[$];        // all input words in order
  cls_result_t results[$];
  int wi = 0, ri = 0, oi = 0, nres_out = 0;

  header_insert dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 300; f++) begin
      int n;
      fl_word_t w;
      n = $urandom_range(1, 6);
      w = '0; w.data = {$urandom(), $urandom(), $urandom(), $urandom()};
      w.sof = 1; w.sop = 1; w.eop = 1; words.push_back(w);
      for (int k = 0; k < n; k++) begin
        w = '0; w.data = {$urandom(), $urandom(), $urandom(), $urandom()};
        w.sop = (k == 0); w.eop = (k == n - 1); w.eof = (k == n - 1); w.rem = 4'($urandom());
        words.push_back(w);
      end
      results.push_back(cls_result_t'($urandom()));
    end
  end

  // drivers change only after the clock edge
  always @(negedge clk) begin
    in_src_rdy  <= (wi < words.size()) && ($urandom_range(0, 3) != 0);
    in_word     <= (wi < words.size()) ? words[wi] : '0;
    res_valid   <= (ri < results.size()) && ($urandom_range(0, 2) != 0);
    res         <= (ri < results.size()) ? results[ri] : '0;
    out_dst_rdy <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) begin
    if (in_src_rdy && in_dst_rdy) wi++;
    if (res_valid && res_ready) begin ri++; nres_out++; end
    if (out_src_rdy && out_dst_rdy) begin
      fl_word_t e;
      e = words[oi];
      if (e.sof) e.data[HDR_CLS_LSB +: HDR_CLS_W] = results[frames_out++];
      checks++;
      if (out_word !== e) begin failures++; $display("word %0d mismatch", oi); end
      oi++;
    end
    if (oi == words.size() && words.size() > 0) begin
      if (nres_out != results.size()) begin failures++; $display("results consumed %0d", nres_out); end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule

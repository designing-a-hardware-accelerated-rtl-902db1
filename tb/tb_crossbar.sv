// Self-checking testbench of crossbar: each of the three inputs sends 150
// frames (20 to 1400 bytes) whose headers carry a random output mask
// (0 = drop, several bits = copies) and a tag {input, sequence number}.
// Outputs stall at random. Every output must deliver, per input, exactly
// the frames whose mask names it, in their input order and unchanged.
// The run counts drops, multicasts and arbitration rounds with two or more
// inputs contending for one output, and fails if any never happened. If
// the watchdog fires, every frame not yet delivered counts as a failure.
module tb_crossbar;
  import fw_pkg::*;
  import tb_fl_pkg::*;
  localparam int N = 3, NF = 150;
  logic clk = 0, rst_n = 0;
  fl_word_t in_word [N], out_word [N];
  logic [N-1:0] in_src_rdy = '0, in_dst_rdy, out_src_rdy, out_dst_rdy = '0;
  int checks = 0, failures = 0, drops = 0, mcast = 0, contention = 0, delivered = 0, expected = 0;
  fl_word_t words [N][$];
  int wi [N];
  fl_frame exp_q [N][N][$];   // [output][input]
  fl_collector col [N];

  crossbar dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    // each frame still missing counts as a failed check
    checks += expected - delivered;
    failures += 1 + expected - delivered;
    $display("watchdog: %0d of %0d frames delivered", delivered, expected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      wi[i] = 0; col[i] = new(); in_word[i] = '0;
      for (int f = 0; f < NF; f++) begin
        fl_frame fr;
        cls_result_t c;
        c = cls_result_t'($urandom());
        fr = new(); fr.hdr = {$urandom(), $urandom(), $urandom(), $urandom()};
        fr.hdr[31:0] = {16'(i), 16'(f)};
        fr.hdr[HDR_CLS_LSB +: HDR_CLS_W] = c;
        repeat ($urandom_range(20, 1400)) fr.pay.push_back(8'($urandom()));
        fr.to_words(words[i]);
        if (c.action.out_mask == 0) drops++;
        if ($countones(c.action.out_mask) > 1) mcast++;
        for (int o = 0; o < N; o++)
          if (c.action.out_mask[o]) begin exp_q[o][i].push_back(fr); expected++; end
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
  end

  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      in_src_rdy[i] <= (wi[i] < words[i].size()) && ($urandom_range(0, 7) != 0);
      in_word[i]    <= (wi[i] < words[i].size()) ? words[i][wi[i]] : '0;
      out_dst_rdy[i] <= ($urandom_range(0, 4) != 0);
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.g_out[0].grant && $countones(dut.g_out[0].hv) > 1) contention++;
    if (dut.g_out[1].grant && $countones(dut.g_out[1].hv) > 1) contention++;
    if (dut.g_out[2].grant && $countones(dut.g_out[2].hv) > 1) contention++;
    for (int i = 0; i < N; i++) if (in_src_rdy[i] && in_dst_rdy[i]) wi[i]++;
    for (int o = 0; o < N; o++) if (out_src_rdy[o] && out_dst_rdy[o]) begin
      fl_frame got, ex;
      if (col[o].add(out_word[o], got)) begin
        int src;
        src = int'(got.hdr[31:16]);
        checks++; delivered++;
        if (src >= N || exp_q[o][src].size() == 0) begin failures++; $display("unexpected frame at %0d", o); end
        else begin
          ex = exp_q[o][src].pop_front();
          if (got.hdr !== ex.hdr || got.pay != ex.pay) begin
            failures++; $display("out %0d: frame %h mismatch", o, got.hdr[31:0]);
          end
        end
      end
      if (col[o].err != "") begin failures++; $display("%s", col[o].err); end
    end
    if (expected > 0 && delivered == expected) begin
      checks++;
      if (drops == 0 || mcast == 0 || contention == 0) begin
        failures++; $display("mechanism missing: drops %0d mcast %0d contention %0d", drops, mcast, contention);
      end
      $display("drops %0d multicasts %0d contended arbitrations %0d", drops, mcast, contention);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule

// Self-checking testbench of treebitmap_lpm: a random prefix set (lengths
// 0..32) is compiled into a Tree Bitmap by the software model, loaded, and
// random keys (mostly inside the prefixes) are looked up back to back. Each
// code is compared with a linear longest-prefix search, and the latency is
// checked to be LEVELS + 1 cycles.
module tb_treebitmap_lpm;
  import tb_fw_sw_pkg::*;
  localparam int KW = 32, S = 4, PW = 10, CW = 13, LAT = KW / S + 2;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [KW-1:0] in_key = '0;
  logic [CW-1:0] out_code;
  logic cfg_we = 0;
  logic [15:0] cfg_addr = '0;
  logic [63:0] cfg_wdata = '0;
  int checks = 0, failures = 0;
  tbm_builder tb;
  cfg_write_t q[$];
  int unsigned exp_code[$];
  int          exp_time[$];
  int          cyc = 0;

  treebitmap_lpm #(.KEY_W(KW), .STRIDE(S), .PTR_W(PW), .CODE_W(CW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_code.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      int unsigned e;
      int t;
      e = exp_code.pop_front();
      t = exp_time.pop_front();
      if (out_code !== CW'(e)) begin
        failures++; $display("code mismatch: got %0d exp %0d", out_code, e);
      end
      if (cyc - t != LAT) begin
        failures++; $display("latency %0d, expected %0d", cyc - t, LAT);
      end
    end
  end

  initial begin
    tb = new(KW, S, PW, CW);
    tb.add(0, 0);
    for (int i = 0; i < 120; i++) tb.add({$urandom()}, $urandom_range(1, 32));
    for (int i = 0; i < 20; i++) tb.add({8'd10, 24'($urandom())}, $urandom_range(8, 32));
    tb.build();
    tb.writes(4'd0, q);
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (q[i]) begin
      @(negedge clk); cfg_we = 1; cfg_addr = q[i].addr[15:0]; cfg_wdata = q[i].data[63:0];
    end
    @(negedge clk); cfg_we = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] k;
      int p, l;
      p = $urandom_range(0, tb.pval.size() - 1);
      k = $urandom();
      if (n % 4 != 0) begin                  // inside prefix p
        l = tb.plen[p];
        if (l > 0) k = (l == 32) ? 32'(tb.pval[p]) :
                       ((32'(tb.pval[p]) & ~(32'hffffffff >> l)) | (k & (32'hffffffff >> l)));
      end
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_key   = k;
      if (in_valid) begin
        exp_code.push_back(tb.ref_code(k));
        exp_time.push_back(cyc);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (20) @(posedge clk);
    if (exp_code.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of lookup_table: every word of an 8-bit table is
// written with a random code, then random fields are looked up one per
// cycle and compared with the written contents; latency 1.
module tb_lookup_table;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [7:0] in_key = '0;
  logic [3:0] out_code;
  logic cfg_we = 0;
  logic [15:0] cfg_addr = '0;
  logic [3:0] cfg_wdata = '0;
  logic [3:0] tabl [256];
  logic [3:0] exp_q;
  logic       expv_q = 0;
  int checks = 0, failures = 0;

  lookup_table #(.IN_W(8), .OUT_W(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      tabl[i] = 4'($urandom());
      @(negedge clk); cfg_we = 1; cfg_addr = 16'(i); cfg_wdata = tabl[i];
    end
    @(negedge clk); cfg_we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (expv_q) begin
        checks++;
        if (!out_valid || out_code !== exp_q) begin
          failures++; $display("mismatch: got %0d exp %0d", out_code, exp_q);
        end
      end
      in_valid = 1; in_key = 8'($urandom()); exp_q = tabl[in_key]; expv_q = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Ternary CAM for a MAC address field.
//
// 2^CODE_W - 1 entries, each {valid, mask, value}. A key matches an entry
// when it equals the value in every bit set in the mask. The lowest-numbered
// matching entry wins and its code is entry number + 1; code 0 means that no
// entry matched. All entries are compared in parallel in one cycle, as a CAM
// does, and the code is registered: latency 1 cycle, one key per cycle.
//
// The design uses CAMs for the MAC address fields; the ternary entries, the
// priority order and the code numbering are this implementation's choices.
module mac_cam #(
  parameter int unsigned KEY_W  = 48,
  parameter int unsigned CODE_W = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [KEY_W-1:0]  in_key,
  output logic              out_valid,
  output logic [CODE_W-1:0] out_code,
  input  logic              cfg_we,
  input  logic [15:0]       cfg_addr,    // entry number
  input  logic [2*KEY_W:0]  cfg_wdata    // {valid, mask, value}
);
  localparam int unsigned N = (1 << CODE_W) - 1;

  logic [KEY_W-1:0] val  [N];
  logic [KEY_W-1:0] mask [N];
  logic             vld  [N];
  logic [CODE_W-1:0] hit_code;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) vld[i] <= 1'b0;
    end else if (cfg_we && cfg_addr < 16'(N)) begin
      vld[cfg_addr[CODE_W-1:0]] <= cfg_wdata[2*KEY_W];
    end
  end

  always_ff @(posedge clk) begin
    if (cfg_we && cfg_addr < 16'(N)) begin
      val [cfg_addr[CODE_W-1:0]] <= cfg_wdata[KEY_W-1:0];
      mask[cfg_addr[CODE_W-1:0]] <= cfg_wdata[2*KEY_W-1:KEY_W];
    end
  end

  // priority encoder: scan downward so the lowest entry is kept
  always_comb begin
    hit_code = '0;
    for (int i = N - 1; i >= 0; i--)
      if (vld[i] && (((in_key ^ val[i]) & mask[i]) == '0))
        hit_code = CODE_W'(i + 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_code  <= '0;
    end else begin
      out_valid <= in_valid;
      out_code  <= hit_code;
    end
  end
endmodule

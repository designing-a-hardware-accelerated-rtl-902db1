// Direct-mapped translation table for a short header field.
//
// 2^IN_W words of OUT_W bits; the field value addresses the table and the
// word read is the field's code in the classification word. Registered read:
// latency 1 cycle, one lookup per cycle. Used for the protocol number, the
// TCP flags and the input interface number.
//
// The design processes the protocol and input interface with tables; using
// a table for the TCP flags too is this implementation's choice. The table
// is not reset: configuration software writes every word before use.
module lookup_table #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  in_key,
  output logic             out_valid,
  output logic [OUT_W-1:0] out_code,
  input  logic             cfg_we,
  input  logic [15:0]      cfg_addr,
  input  logic [OUT_W-1:0] cfg_wdata
);
  logic [OUT_W-1:0] mem [1 << IN_W];

  always_ff @(posedge clk) begin
    if (cfg_we) mem[cfg_addr[IN_W-1:0]] <= cfg_wdata;
    out_code <= mem[in_key];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule

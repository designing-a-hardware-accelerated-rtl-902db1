// Behavioural model of the external QDR-II SRAM holding the g table.
// Separate read and write ports; read data appears RD_LAT cycles after the
// read request, the latency the classifier is built for. Contents start at
// zero. Testbench only.
module qdr_model #(
  parameter int unsigned AW     = 19,
  parameter int unsigned DW     = 10,
  parameter int unsigned RD_LAT = 2
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data
);
  logic [DW-1:0] mem [1 << AW];
  logic [DW-1:0] pipe [RD_LAT];

  initial for (int i = 0; i < (1 << AW); i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    pipe[0] <= rd_en ? mem[rd_addr] : '0;
    for (int i = 1; i < RD_LAT; i++) pipe[i] <= pipe[i-1];
  end
  assign rd_data = pipe[RD_LAT-1];
endmodule

// Fixed delay of a WIDTH-bit signal by DELAY clock cycles (shift register,
// reset to zero). DELAY = 0 is a wire. Used to align the side data of the
// classification pipeline with the lookups.
module delay_line #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DELAY = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DELAY == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] sr [DELAY];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DELAY; i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < DELAY; i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[DELAY-1];
  end
endmodule

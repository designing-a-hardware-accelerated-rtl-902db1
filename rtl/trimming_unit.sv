// Trimming Unit on the line towards software.
//
// Shortens each frame to the length its action asks for, to save PCIe
// bandwidth: the FrameLink header word always passes, and of the Ethernet
// frame only the first trim_len bytes are kept (trim_len taken from the
// classification result in the header; 0 keeps the whole frame, as does a
// trim_len not shorter than the frame). The word holding the last kept
// byte becomes the frame's last word (eop = eof = 1, rem adjusted); the
// remaining words of the frame are consumed and discarded.
// Combinational datapath with a little state: one word per cycle, no added
// latency; discarded words take one cycle each.
//
// From the design: a trimming unit in the software-bound flow shortening
// packets according to the action. Own choice: the action carries the kept
// length in bytes.
module trimming_unit
  import fw_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  fl_word_t in_word,
  input  logic     in_src_rdy,
  output logic     in_dst_rdy,
  output fl_word_t out_word,
  output logic     out_src_rdy,
  input  logic     out_dst_rdy
);
  logic [TRIM_W-1:0] trim_q;
  logic [15:0]       bytes_q;      // payload bytes passed so far
  logic              cut_q;        // discarding the rest of a frame
  logic              hit;
  logic [15:0]       last_idx, keep_last;
  cls_result_t       cls;

  assign cls       = cls_result_t'(in_word.data[HDR_CLS_LSB +: HDR_CLS_W]);
  assign last_idx  = bytes_q + (in_word.eop ? 16'(in_word.rem) : 16'(DATA_W / 8 - 1));
  assign keep_last = 16'(trim_q) - 16'd1;
  assign hit       = !in_word.sof && !cut_q && trim_q != '0 &&
                     keep_last >= bytes_q && keep_last <= last_idx &&
                     (keep_last < last_idx || !in_word.eof);

  always_comb begin
    out_word = in_word;
    if (hit) begin
      out_word.eop = 1'b1;
      out_word.eof = 1'b1;
      out_word.rem = REM_W'(keep_last - bytes_q);
    end
  end

  assign out_src_rdy = in_src_rdy && !cut_q;
  assign in_dst_rdy  = out_dst_rdy || cut_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trim_q  <= '0;
      bytes_q <= '0;
      cut_q   <= 1'b0;
    end else if (in_src_rdy && in_dst_rdy) begin
      if (in_word.sof) begin
        trim_q  <= cls.action.trim_len;
        bytes_q <= '0;
        cut_q   <= 1'b0;
      end else begin
        bytes_q <= bytes_q + 16'(DATA_W / 8);
        if (in_word.eof)  cut_q <= 1'b0;
        else if (hit)     cut_q <= 1'b1;
      end
    end
  end
endmodule

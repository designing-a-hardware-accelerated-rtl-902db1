// Header Insert (HI) of one internal line.
//
// Joins each frame leaving the packet buffer with its classification
// result. Results come from the classifier in the line's packet order, so
// the first word of a frame (its FrameLink header, sof = 1) is held until
// the next result is available; the result (rule number, match flag,
// action) is then written into header bits [HDR_CLS_LSB +: HDR_CLS_W] and
// the result is consumed. All other words and header bits pass unchanged.
// Purely combinational: no added latency, one word per cycle.
//
// From the design: rule number and action are inserted into the FrameLink
// header. Own choice: their position and encoding in the header.
module header_insert
  import fw_pkg::*;
(
  input  logic        in_src_rdy,
  output logic        in_dst_rdy,
  input  fl_word_t    in_word,
  input  cls_result_t res,
  input  logic        res_valid,
  output logic        res_ready,
  output fl_word_t    out_word,
  output logic        out_src_rdy,
  input  logic        out_dst_rdy
);
  logic go;

  assign go          = !in_word.sof || res_valid;
  assign out_src_rdy = in_src_rdy && go;
  assign in_dst_rdy  = out_dst_rdy && go;
  assign res_ready   = in_src_rdy && out_dst_rdy && in_word.sof && res_valid;

  always_comb begin
    out_word = in_word;
    if (in_word.sof) out_word.data[HDR_CLS_LSB +: HDR_CLS_W] = res;
  end
endmodule

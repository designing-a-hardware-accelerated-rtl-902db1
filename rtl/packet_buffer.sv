// Packet buffer of one internal line.
//
// Holds the original FrameLink frames while their parsed headers travel
// through the classifier: a FIFO of DEPTH FrameLink words (on-chip block
// RAM in the FPGA), FrameLink handshake on both sides. in_dst_rdy is low
// only when the buffer is full; out_src_rdy is high whenever a word is
// stored. Words appear at the output the cycle after they were written.
//
// From the design: one on-chip FIFO per line between the HFE and the
// Header Insert. Own choice: DEPTH = 512 words (8 KiB, five maximum-size
// Ethernet frames).
module packet_buffer
  import fw_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic     clk,
  input  logic     rst_n,
  input  fl_word_t in_word,
  input  logic     in_src_rdy,
  output logic     in_dst_rdy,
  output fl_word_t out_word,
  output logic     out_src_rdy,
  input  logic     out_dst_rdy
);
  logic                   full, empty;
  logic [$clog2(DEPTH):0] count;
  logic [$bits(fl_word_t)-1:0] head;

  sync_fifo #(.WIDTH($bits(fl_word_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(in_src_rdy && !full), .wr_data(in_word),
    .pop(out_dst_rdy && !empty), .rd_data(head),
    .full, .empty, .count);

  assign in_dst_rdy  = !full;
  assign out_src_rdy = !empty;
  assign out_word    = fl_word_t'(head);
endmodule

// Stateless firewall core with two 10 Gbps network lines and one software
// line.
//
// Three FrameLink lines, 128 bits at 125 MHz each, enter the core: lines 0
// and 1 from the two 10G Ethernet input buffers, line 2 from the DMA
// transmit buffer (packets sent by host software). On every line a Header
// Field Extractor forks each frame: the original frame waits in the line's
// packet buffer, its nine parsed header fields go to the shared classifier.
// The Header Insert of the line writes the classification result (rule
// number, match flag, action) into the frame's FrameLink header, and the
// crossbar sends the frame to the outputs its action names, or drops it.
// Outputs 0 and 1 go to the two 10G Ethernet output buffers; output 2 goes
// through the Trimming Unit to the DMA receive buffer towards software.
//
// The perfect hash table of the classifier lives in an external QDR-II
// SRAM, reached through the qdr_* ports (read data RD_LAT cycles after the
// request). All tables are loaded by configuration software over the
// cfg_* write port, see fw_pkg for the address map.
//
// The block structure follows the design; the Ethernet/DMA buffers, the
// QDR-II memory and the card interfaces are outside this core.
module firewall_top
  import fw_pkg::*;
#(
  parameter int unsigned RD_LAT   = 2,
  parameter int unsigned PB_DEPTH = 512,
  parameter int unsigned XP_DEPTH = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  // FrameLink lines in: 0, 1 network, 2 software
  input  fl_word_t          in_word     [NLINES],
  input  logic [NLINES-1:0] in_src_rdy,
  output logic [NLINES-1:0] in_dst_rdy,
  // FrameLink lines out: 0, 1 network, 2 software
  output fl_word_t          out_word    [NLINES],
  output logic [NLINES-1:0] out_src_rdy,
  input  logic [NLINES-1:0] out_dst_rdy,
  // QDR-II SRAM
  output logic              qdr_rd_en,
  output logic [G_AW-1:0]   qdr_rd_addr,
  input  logic [RULE_W-1:0] qdr_rd_data,
  output logic              qdr_wr_en,
  output logic [G_AW-1:0]   qdr_wr_addr,
  output logic [RULE_W-1:0] qdr_wr_data,
  // configuration writes
  input  logic              cfg_we,
  input  logic [CFG_AW-1:0] cfg_addr,
  input  logic [CFG_DW-1:0] cfg_wdata
);
  fl_word_t          h_word [NLINES], p_word [NLINES], x_word [NLINES], o_word [NLINES];
  logic [NLINES-1:0] h_src, h_dst, p_src, p_dst, x_src, x_dst, o_src, o_dst;
  hdr_fields_t       fld [NLINES];
  logic [NLINES-1:0] fld_valid, fld_ready;
  cls_result_t       res [NLINES];
  logic [NLINES-1:0] res_valid, res_ready;

  for (genvar i = 0; i < NLINES; i++) begin : g_line
    hfe #(.IFACE(2'(i))) u_hfe (
      .clk, .rst_n,
      .in_word(in_word[i]), .in_src_rdy(in_src_rdy[i]), .in_dst_rdy(in_dst_rdy[i]),
      .out_word(h_word[i]), .out_src_rdy(h_src[i]), .out_dst_rdy(h_dst[i]),
      .fld(fld[i]), .fld_valid(fld_valid[i]), .fld_ready(fld_ready[i]));

    packet_buffer #(.DEPTH(PB_DEPTH)) u_pbuf (
      .clk, .rst_n,
      .in_word(h_word[i]), .in_src_rdy(h_src[i]), .in_dst_rdy(h_dst[i]),
      .out_word(p_word[i]), .out_src_rdy(p_src[i]), .out_dst_rdy(p_dst[i]));

    header_insert u_hi (
      .in_word(p_word[i]), .in_src_rdy(p_src[i]), .in_dst_rdy(p_dst[i]),
      .res(res[i]), .res_valid(res_valid[i]), .res_ready(res_ready[i]),
      .out_word(x_word[i]), .out_src_rdy(x_src[i]), .out_dst_rdy(x_dst[i]));
  end

  classifier #(.RD_LAT(RD_LAT)) u_cls (
    .clk, .rst_n,
    .fld, .fld_valid, .fld_ready,
    .res, .res_valid, .res_ready,
    .qdr_rd_en, .qdr_rd_addr, .qdr_rd_data,
    .qdr_wr_en, .qdr_wr_addr, .qdr_wr_data,
    .cfg_we, .cfg_addr, .cfg_wdata);

  crossbar #(.XP_DEPTH(XP_DEPTH)) u_xbar (
    .clk, .rst_n,
    .in_word(x_word), .in_src_rdy(x_src), .in_dst_rdy(x_dst),
    .out_word(o_word), .out_src_rdy(o_src), .out_dst_rdy(o_dst));

  // network outputs straight to the Ethernet output buffers
  for (genvar o = 0; o < 2; o++) begin : g_net_out
    assign out_word[o]    = o_word[o];
    assign out_src_rdy[o] = o_src[o];
    assign o_dst[o]       = out_dst_rdy[o];
  end

  // software output through the trimming unit
  trimming_unit u_tu (
    .clk, .rst_n,
    .in_word(o_word[2]), .in_src_rdy(o_src[2]), .in_dst_rdy(o_dst[2]),
    .out_word(out_word[2]), .out_src_rdy(out_src_rdy[2]), .out_dst_rdy(out_dst_rdy[2]));
endmodule

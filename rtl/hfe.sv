// Header Field Extractor (HFE) of one internal line.
//
// The FrameLink frame passes through unchanged towards the packet buffer,
// while the first PARSE_WORDS payload words (96 bytes: room for an Ethernet
// header and an IPv4 header with options followed by a TCP header) are
// captured. After the frame's last word the nine classified fields are
// extracted and offered on fld/fld_valid until fld_ready takes them:
//   destination and source MAC (bytes 0-5, 6-11), and for EtherType 0x0800
//   the IPv4 protocol and addresses, for TCP (6) and UDP (17) in a first
//   fragment the two ports, for TCP the flags byte; the input interface
//   number is the IFACE parameter. Fields a packet lacks are zero.
//
// Timing: one word per cycle; the cycle after a frame's last word is spent
// on the extraction (the input waits), and the input also waits while the
// previous record has not been taken. A 64-byte frame (header word + 4
// payload words) thus needs 6 cycles, within the 8.4 cycles a minimum frame
// takes on a 10 Gbps line at 125 MHz.
//
// From the design: the fork into the original frame and its parsed fields,
// the nine fields. Own choices: the fields leave as a record with a
// valid/ready handshake rather than as a second FrameLink stream, no VLAN
// tags or IPv6, the parse window and the timing.
module hfe
  import fw_pkg::*;
#(
  parameter logic [1:0] IFACE = 2'd0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  fl_word_t    in_word,
  input  logic        in_src_rdy,
  output logic        in_dst_rdy,
  output fl_word_t    out_word,
  output logic        out_src_rdy,
  input  logic        out_dst_rdy,
  output hdr_fields_t fld,
  output logic        fld_valid,
  input  logic        fld_ready
);
  localparam int unsigned PARSE_WORDS = 6;
  localparam int unsigned BYTES = PARSE_WORDS * DATA_W / 8;

  logic [8*BYTES-1:0] pbuf;
  logic [2:0]         wcnt;
  logic               in_payload, done, xfer;
  hdr_fields_t        parsed;

  assign out_word    = in_word;
  assign out_src_rdy = in_src_rdy && !done;
  assign in_dst_rdy  = out_dst_rdy && !done;
  assign xfer        = in_src_rdy && out_dst_rdy && !done;

  function automatic logic [7:0] pb(input int unsigned k);
    return (k < BYTES) ? pbuf[8*k +: 8] : 8'h00;
  endfunction

  always_comb begin
    int unsigned l4;
    logic        first_frag;
    logic [7:0]  vihl;
    parsed = '0;
    parsed.dmac  = {pb(0), pb(1), pb(2), pb(3), pb(4), pb(5)};
    parsed.smac  = {pb(6), pb(7), pb(8), pb(9), pb(10), pb(11)};
    parsed.iface = IFACE;
    vihl = pb(14);
    l4 = 14 + 4 * int'(vihl[3:0]);
    first_frag = ({pb(20) & 8'h1f, pb(21)} == 16'h0);
    if ({pb(12), pb(13)} == 16'h0800) begin
      parsed.proto = pb(23);
      parsed.sip   = {pb(26), pb(27), pb(28), pb(29)};
      parsed.dip   = {pb(30), pb(31), pb(32), pb(33)};
      if (first_frag && (pb(23) == 8'd6 || pb(23) == 8'd17)) begin
        parsed.sport = {pb(l4),     pb(l4 + 1)};
        parsed.dport = {pb(l4 + 2), pb(l4 + 3)};
      end
      if (first_frag && pb(23) == 8'd6) parsed.flags = pb(l4 + 13);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pbuf <= '0; wcnt <= '0; in_payload <= 1'b0; done <= 1'b0;
      fld <= '0; fld_valid <= 1'b0;
    end else begin
      if (fld_valid && fld_ready) fld_valid <= 1'b0;
      if (done && (!fld_valid || fld_ready)) begin
        fld       <= parsed;
        fld_valid <= 1'b1;
        done      <= 1'b0;
      end
      if (xfer) begin
        if (in_word.sof) begin
          pbuf       <= '0;
          wcnt       <= '0;
          in_payload <= in_word.eop && !in_word.eof;
        end else begin
          if (in_payload && wcnt < 3'(PARSE_WORDS)) begin
            pbuf[wcnt*DATA_W +: DATA_W] <= in_word.data;
            wcnt <= wcnt + 1'b1;
          end
          if (in_word.eop) in_payload <= 1'b0;
        end
        if (in_word.eof) done <= 1'b1;
      end
    end
  end
endmodule

// Shared types and constants of the two-port 10 Gbps firewall.
//
// FrameLink words, the parsed header record, the 67-bit classification
// word, rules, actions and the configuration address map live here so that
// every block and every testbench agrees on the same layout.
//
// From the design: 128-bit FrameLink lines with a 128-bit FrameLink header
// in front of each Ethernet frame, nine classified header fields, a 67-bit
// concatenated lookup word, up to 1000 rules, three internal lines.
// Own choices: the split of the 67 bits among the fields, the bit positions
// of the classification result inside the FrameLink header, the action
// encoding, the rule encoding and the configuration address map.
package fw_pkg;

  // ---------------------------------------------------------------- FrameLink
  localparam int unsigned DATA_W  = 128;            // line width
  localparam int unsigned REM_W   = $clog2(DATA_W / 8);
  localparam int unsigned NLINES  = 3;              // 2 network + 1 software

  // One FrameLink word. A frame is one header part (a single 128-bit word,
  // sof=sop=eop=1) followed by the payload part holding the Ethernet frame
  // (sop on the first word, eop=eof on the last). Byte k of a word is
  // data[8k+7:8k]; rem is the index of the last valid byte of an eop word.
  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic              sof;
    logic              eof;
    logic              sop;
    logic              eop;
    logic [REM_W-1:0]  rem;
  } fl_word_t;

  // ---------------------------------------------------------- header fields
  typedef struct packed {
    logic [47:0] smac;
    logic [47:0] dmac;
    logic [31:0] sip;
    logic [31:0] dip;
    logic [7:0]  proto;
    logic [15:0] sport;
    logic [15:0] dport;
    logic [7:0]  flags;
    logic [1:0]  iface;
  } hdr_fields_t;

  // --------------------------------------------- 67-bit classification word
  localparam int unsigned SIP_CW   = 13;
  localparam int unsigned DIP_CW   = 13;
  localparam int unsigned SPORT_CW = 10;
  localparam int unsigned DPORT_CW = 10;
  localparam int unsigned SMAC_CW  = 5;
  localparam int unsigned DMAC_CW  = 5;
  localparam int unsigned PROTO_CW = 4;
  localparam int unsigned FLAGS_CW = 5;
  localparam int unsigned IFACE_CW = 2;

  typedef struct packed {
    logic [SIP_CW-1:0]   sip;
    logic [DIP_CW-1:0]   dip;
    logic [SPORT_CW-1:0] sport;
    logic [DPORT_CW-1:0] dport;
    logic [SMAC_CW-1:0]  smac;
    logic [DMAC_CW-1:0]  dmac;
    logic [PROTO_CW-1:0] proto;
    logic [FLAGS_CW-1:0] flags;
    logic [IFACE_CW-1:0] iface;
  } cls_key_t;

  localparam int unsigned KEY_W = $bits(cls_key_t);   // 67

  // ------------------------------------------------------- rules and actions
  localparam int unsigned NRULES  = 1024;              // "up to 1000 rules"
  localparam int unsigned RULE_W  = $clog2(NRULES);    // 10
  localparam int unsigned TRIM_W  = 12;

  typedef struct packed {
    logic [TRIM_W-1:0] trim_len;   // bytes kept on the software line, 0 = all
    logic [2:0]        out_mask;   // bit i: send to output line i; 0 = drop
  } action_t;

  typedef struct packed {
    action_t           action;
    logic              match;      // 0: no rule matched, default action used
    logic [RULE_W-1:0] rule;
  } cls_result_t;

  // One rule of the rule table: value/mask per field, ranges for the ports.
  typedef struct packed {
    logic [47:0] smac_val, smac_mask;
    logic [47:0] dmac_val, dmac_mask;
    logic [31:0] sip_val,  sip_mask;
    logic [31:0] dip_val,  dip_mask;
    logic [7:0]  proto_val, proto_mask;
    logic [15:0] sport_lo, sport_hi;
    logic [15:0] dport_lo, dport_hi;
    logic [7:0]  flags_val, flags_mask;
    logic [1:0]  iface_val, iface_mask;
    action_t     action;
  } rule_t;

  // Classification result inside the FrameLink header word, bits [63:32].
  localparam int unsigned HDR_CLS_LSB = 32;
  localparam int unsigned HDR_CLS_W   = $bits(cls_result_t);   // 26

  // ------------------------------------------------- configuration address map
  // cfg_addr = {target[3:0], index[15:0]}; cfg_wdata is LSB-aligned.
  localparam int unsigned CFG_AW = 20;
  localparam int unsigned CFG_DW = 512;

  typedef enum logic [3:0] {
    CT_SIP_LPM   = 4'd0,   // index = {level[3:0], node[11:0]}
    CT_DIP_LPM   = 4'd1,
    CT_SPORT_LPM = 4'd2,
    CT_DPORT_LPM = 4'd3,
    CT_SMAC_CAM  = 4'd4,   // index = entry; data = {valid, mask, value}
    CT_DMAC_CAM  = 4'd5,
    CT_PROTO_TAB = 4'd6,   // index = protocol number
    CT_FLAGS_TAB = 4'd7,   // index = TCP flags byte
    CT_IFACE_TAB = 4'd8,   // index = input interface
    CT_RULE      = 4'd9,   // index = rule number; index[15] = default action
    CT_HASH      = 4'd10,  // index[8]=0: row {sel, bit}; 16'h100: modulus
    CT_GTAB      = 4'd11   // data = {address at [63:32], g value at [15:0]}
  } cfg_target_e;

  // Hash table in the external QDR-II memory.
  localparam int unsigned G_AW = 19;       // g table address width

endpackage

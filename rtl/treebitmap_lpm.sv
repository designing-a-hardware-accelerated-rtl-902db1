// Pipelined Tree Bitmap longest prefix match.
//
// The prefix set of one header field is stored as a multibit trie with
// STRIDE bits per level. Every trie node carries an internal bitmap (which
// of the 2^STRIDE-1 prefixes of length 0..STRIDE-1 inside the node exist),
// an external bitmap (which of the 2^STRIDE children exist), the address of
// its first child in the next level's node memory and the code of its first
// stored prefix. Children and prefix codes of a node are contiguous, so the
// child address is child_base + popcount(external bits below the chunk) and
// the prefix code is res_base + popcount(internal bits below the hit), the
// usual Tree Bitmap addressing. Prefix codes are therefore the node result
// array indices: no separate result memory is needed. Code 0 means that no
// prefix matched.
//
// There is one node memory per level and one pipeline stage per level, so a
// new key is accepted every cycle. LEVELS = KEY_W/STRIDE + 1: the last level
// holds only full-length prefixes (internal bitmap bit 0).
// Latency: LEVELS + 1 cycles from in_valid to out_valid.
//
// Node word layout: {res_base, child_base, ext_bitmap, int_bitmap}; the
// internal bitmap index of a prefix of local length j and local value v is
// 2^j - 1 + v. Node memories are written through the configuration port
// (cfg_addr = {level, node}); the root is node 0 of level 0.
//
// The design names the Tree Bitmap algorithm for the IP addresses and the
// ports; stride, memory sizes, code widths and the pipeline organisation
// are this implementation's choices.
module treebitmap_lpm #(
  parameter int unsigned KEY_W  = 32,
  parameter int unsigned STRIDE = 4,
  parameter int unsigned PTR_W  = 10,   // nodes per level = 2^PTR_W
  parameter int unsigned CODE_W = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [KEY_W-1:0]  in_key,
  output logic              out_valid,
  output logic [CODE_W-1:0] out_code,
  // configuration: write one node word
  input  logic              cfg_we,
  input  logic [15:0]       cfg_addr,    // {level[3:0], node[11:0]}
  input  logic [63:0]       cfg_wdata
);
  localparam int unsigned LEVELS = KEY_W / STRIDE + 1;
  localparam int unsigned IB_W   = (1 << STRIDE) - 1;
  localparam int unsigned EB_W   = (1 << STRIDE);
  localparam int unsigned NODE_W = IB_W + EB_W + PTR_W + CODE_W;

  typedef struct packed {
    logic [CODE_W-1:0] res_base;
    logic [PTR_W-1:0]  child_base;
    logic [EB_W-1:0]   eb;
    logic [IB_W-1:0]   ib;
  } node_t;

  // stage inputs (index l feeds level l)
  logic              sv   [LEVELS+1];
  logic [KEY_W-1:0]  skey [LEVELS+1];
  logic [PTR_W-1:0]  sptr [LEVELS+1];
  logic              sact [LEVELS+1];
  logic [CODE_W-1:0] sbest[LEVELS+1];

  assign sv[0]    = in_valid;
  assign skey[0]  = in_key;
  assign sptr[0]  = '0;
  assign sact[0]  = 1'b1;
  assign sbest[0] = '0;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    node_t             mem [1 << PTR_W];
    node_t             node_q;
    logic              v_q, act_q;
    logic [KEY_W-1:0]  key_q;
    logic [CODE_W-1:0] best_q;
    logic [STRIDE-1:0] chunk;

    always_ff @(posedge clk) begin
      if (cfg_we && cfg_addr[15:12] == l[3:0])
        mem[cfg_addr[PTR_W-1:0]] <= node_t'(cfg_wdata[NODE_W-1:0]);
      node_q <= mem[sptr[l]];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_q <= 1'b0; act_q <= 1'b0; key_q <= '0; best_q <= '0;
      end else begin
        v_q <= sv[l]; act_q <= sact[l]; key_q <= skey[l]; best_q <= sbest[l];
      end
    end

    if (l < LEVELS - 1) begin : g_chunk
      assign chunk = key_q[KEY_W-1-l*STRIDE -: STRIDE];
    end else begin : g_last
      assign chunk = '0;
    end

    always_comb begin
      logic [IB_W-1:0] below;
      int unsigned     idx;
      sbest[l+1] = best_q;
      // longest local prefix wins: scan lengths upward, last hit kept
      for (int j = 0; j < STRIDE; j++) begin
        idx   = (1 << j) - 1 + (int'(chunk) >> (STRIDE - j));
        below = IB_W'((1 << idx) - 1);
        if (act_q && node_q.ib[idx])
          sbest[l+1] = node_q.res_base + CODE_W'($countones(node_q.ib & below));
      end
      sact[l+1] = act_q && (l < LEVELS - 1) && node_q.eb[chunk];
      sptr[l+1] = node_q.child_base +
                  PTR_W'($countones(node_q.eb & EB_W'((1 << chunk) - 1)));
      sv[l+1]   = v_q;
      skey[l+1] = key_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_code  <= '0;
    end else begin
      out_valid <= sv[LEVELS];
      out_code  <= sbest[LEVELS];
    end
  end
endmodule

// 3x3 FrameLink crossbar with a buffer at every crosspoint.
//
// Each input frame is switched to the outputs named by the out_mask of the
// action in its FrameLink header (written by the Header Insert): to none
// (the frame is dropped), one or several (copies). Every input/output pair
// has its own crosspoint buffer (nine in all), so an input only waits when
// one of the buffers it writes is full. An input word is written into all
// selected buffers in the same cycle; when a frame's last word is written,
// its length in words goes into a small length queue beside that buffer.
//
// Several inputs may load one output; a Deficit Round Robin arbiter per
// output (drr_arbiter) then chooses, frame by frame, which crosspoint buffer
// is sent. Frames are forwarded store-and-forward: a frame becomes eligible
// when it is complete in its buffer, so its length is known to the DRR. A
// frame must therefore fit into one crosspoint buffer (XP_DEPTH words;
// assertion). Output words follow FrameLink handshake, one per cycle; an
// arbitration decision takes one cycle between frames.
//
// From the design: three lines, nine crosspoint buffers, zero or more
// outputs per frame, DRR fair queuing. Own choices: buffer sizes,
// store-and-forward, lengths in words.
module crossbar
  import fw_pkg::*;
#(
  parameter int unsigned XP_DEPTH  = 128,
  parameter int unsigned LEN_DEPTH = 8,
  parameter int unsigned QUANTUM   = 96
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fl_word_t          in_word     [NLINES],
  input  logic [NLINES-1:0] in_src_rdy,
  output logic [NLINES-1:0] in_dst_rdy,
  output fl_word_t          out_word    [NLINES],
  output logic [NLINES-1:0] out_src_rdy,
  input  logic [NLINES-1:0] out_dst_rdy
);
  localparam int unsigned N     = NLINES;
  localparam int unsigned IW    = $clog2(N);
  localparam int unsigned LEN_W = $clog2(XP_DEPTH) + 1;
  localparam int unsigned FW    = $bits(fl_word_t);

  // crosspoint state, [input][output]
  logic [FW-1:0]    xp_head  [N][N];
  logic [LEN_W-1:0] len_head [N][N];
  logic             xp_full  [N][N];
  logic             xp_empty [N][N];
  logic             len_full [N][N];
  logic             len_empty[N][N];
  logic             xp_push  [N][N];
  logic             xp_pop   [N][N];
  logic             len_push [N][N];
  logic [LEN_W-1:0] frame_len[N];

  // ------------------------------------------------------------- inputs
  for (genvar i = 0; i < N; i++) begin : g_in
    logic [N-1:0]     mask_q, cur_mask;
    logic [LEN_W-1:0] wcnt_q;
    logic             xfer;
    logic [N-1:0]     space;
    cls_result_t      cls;

    assign cls      = cls_result_t'(in_word[i].data[HDR_CLS_LSB +: HDR_CLS_W]);
    assign cur_mask = in_word[i].sof ? cls.action.out_mask : mask_q;

    always_comb begin
      for (int o = 0; o < N; o++) space[o] = !xp_full[i][o] && !len_full[i][o];
    end
    assign in_dst_rdy[i] = ((~cur_mask | space) == '1);
    assign xfer          = in_src_rdy[i] && in_dst_rdy[i];
    assign frame_len[i]  = in_word[i].sof ? LEN_W'(1) : wcnt_q + 1'b1;

    for (genvar o = 0; o < N; o++) begin : g_sel
      assign xp_push[i][o]  = xfer && cur_mask[o];
      assign len_push[i][o] = xfer && cur_mask[o] && in_word[i].eof;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        mask_q <= '0;
        wcnt_q <= '0;
      end else if (xfer) begin
        mask_q <= cur_mask;
        wcnt_q <= frame_len[i];
      end
    end

    a_frame_fits: assert property (@(posedge clk) disable iff (!rst_n)
      xfer |-> (frame_len[i] <= LEN_W'(XP_DEPTH)));
  end

  // --------------------------------------------------------- crosspoints
  for (genvar i = 0; i < N; i++) begin : g_xi
    for (genvar o = 0; o < N; o++) begin : g_xo
      logic [$clog2(XP_DEPTH):0]  c1;
      logic [$clog2(LEN_DEPTH):0] c2;
      fl_word_t                   hw;
      assign hw = fl_word_t'(xp_head[i][o]);
      sync_fifo #(.WIDTH(FW), .DEPTH(XP_DEPTH)) u_buf (
        .clk, .rst_n, .push(xp_push[i][o]), .wr_data(in_word[i]),
        .pop(xp_pop[i][o]), .rd_data(xp_head[i][o]),
        .full(xp_full[i][o]), .empty(xp_empty[i][o]), .count(c1));
      sync_fifo #(.WIDTH(LEN_W), .DEPTH(LEN_DEPTH)) u_len (
        .clk, .rst_n, .push(len_push[i][o]), .wr_data(frame_len[i]),
        .pop(xp_pop[i][o] && hw.eof), .rd_data(len_head[i][o]),
        .full(len_full[i][o]), .empty(len_empty[i][o]), .count(c2));
    end
  end

  // ------------------------------------------------------------ outputs
  for (genvar o = 0; o < N; o++) begin : g_out
    logic [N-1:0]     hv;
    logic [LEN_W-1:0] hl [N];
    logic             busy_q, grant;
    logic [IW-1:0]    gidx, sel_q;
    fl_word_t         head;

    always_comb begin
      for (int i = 0; i < N; i++) begin
        hv[i] = !len_empty[i][o];
        hl[i] = len_head[i][o];
      end
    end

    drr_arbiter #(.N(N), .LEN_W(LEN_W), .QUANTUM(QUANTUM)) u_drr (
      .clk, .rst_n, .head_valid(hv), .head_len(hl), .busy(busy_q),
      .grant, .grant_idx(gidx));

    assign head           = fl_word_t'(xp_head[sel_q][o]);
    assign out_word[o]    = head;
    assign out_src_rdy[o] = busy_q && !xp_empty[sel_q][o];

    always_comb begin
      for (int i = 0; i < N; i++)
        xp_pop[i][o] = busy_q && (sel_q == IW'(i)) && !xp_empty[i][o] && out_dst_rdy[o];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        busy_q <= 1'b0;
        sel_q  <= '0;
      end else if (grant) begin
        busy_q <= 1'b1;
        sel_q  <= gidx;
      end else if (out_src_rdy[o] && out_dst_rdy[o] && head.eof) begin
        busy_q <= 1'b0;
      end
    end
  end
endmodule

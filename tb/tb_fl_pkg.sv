// Testbench helpers for FrameLink frames: a frame is kept as its header
// word plus a byte queue of the Ethernet frame, and converted to and from
// FrameLink words (byte k of a word in data[8k+7:8k]).
package tb_fl_pkg;
  import fw_pkg::*;

  typedef byte unsigned bytes_t[$];

  class fl_frame;
    logic [127:0] hdr;
    bytes_t       pay;

    function void to_words(ref fl_word_t q[$]);
      fl_word_t w;
      int n;
      w = '0; w.data = hdr; w.sof = 1; w.sop = 1; w.eop = 1; q.push_back(w);
      n = (pay.size() + 15) / 16;
      for (int k = 0; k < n; k++) begin
        w = '0;
        for (int b = 0; b < 16; b++)
          if (16 * k + b < pay.size()) w.data[8*b +: 8] = pay[16*k + b];
        w.sop = (k == 0); w.eop = (k == n - 1); w.eof = (k == n - 1);
        w.rem = 4'((pay.size() - 1) % 16);
        q.push_back(w);
      end
    endfunction
  endclass

  // Collects words into frames; returns 1 when w completes a frame.
  class fl_collector;
    fl_frame cur;
    string   err;
    function bit add(fl_word_t w, output fl_frame f);
      int nb;
      err = "";
      if (w.sof) begin
        cur = new(); cur.hdr = w.data;
        if (!(w.sop && w.eop) || w.eof) err = "bad header word";
        return 0;
      end
      if (cur == null) begin err = "word outside a frame"; return 0; end
      nb = w.eop ? int'(w.rem) + 1 : 16;
      for (int b = 0; b < nb; b++) cur.pay.push_back(w.data[8*b +: 8]);
      if (w.eof) begin f = cur; cur = null; return 1; end
      return 0;
    endfunction
  endclass

  // Ethernet/IPv4/L4 frame with the given fields, len bytes long (>= 60).
  function automatic bytes_t eth_frame(hdr_fields_t f, int len, bit ipv4 = 1, int ihl = 5);
    bytes_t p;
    for (int i = 0; i < len; i++) p.push_back(8'($urandom()));
    for (int i = 0; i < 6; i++) begin p[i] = f.dmac[47 - 8*i -: 8]; p[6 + i] = f.smac[47 - 8*i -: 8]; end
    p[12] = ipv4 ? 8'h08 : 8'h86; p[13] = ipv4 ? 8'h00 : 8'hdd;
    if (ipv4) begin
      int l4;
      l4 = 14 + 4 * ihl;
      p[14] = 8'h40 | 8'(ihl); p[20] = 8'h40; p[21] = 8'h00; p[23] = f.proto;
      for (int i = 0; i < 4; i++) begin p[26 + i] = f.sip[31 - 8*i -: 8]; p[30 + i] = f.dip[31 - 8*i -: 8]; end
      p[l4] = f.sport[15:8]; p[l4 + 1] = f.sport[7:0];
      p[l4 + 2] = f.dport[15:8]; p[l4 + 3] = f.dport[7:0];
      p[l4 + 13] = f.flags;
    end
    return p;
  endfunction
endpackage

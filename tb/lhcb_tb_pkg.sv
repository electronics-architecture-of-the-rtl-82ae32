// lhcb_tb_pkg: testbench helpers shared by the link-level tests: random FE
// packets, and an independent bit-serial model of the FE packet stream on the
// GBT link (header bit 0 first, then the data bits, frames filled from bit 0).
package lhcb_tb_pkg;
  import lhcb_pkg::*;

  function automatic fe_packet_t rnd_pkt(logic [3:0] bcnt, int maxlen);
    fe_packet_t p = '0;
    int l = $urandom_range(0, maxlen);
    p.hdr.len  = LEN_W'(l);
    p.hdr.bcnt = bcnt;
    p.hdr.trunc = ($urandom_range(0, 15) == 0);
    for (int i = 0; i < l; i++) p.data[i] = 1'($urandom);
    return p;
  endfunction

  // append a packet's bits to a serial stream
  function automatic void push_pkt(ref bit s[$], input fe_packet_t p);
    for (int i = 0; i < HDR_M; i++) s.push_back(p.hdr[i]);
    for (int i = 0; i < int'(p.hdr.len); i++) s.push_back(p.data[i]);
  endfunction

  // take one 80-bit frame from the stream (caller checks the size)
  function automatic logic [GBT_D_W-1:0] pop_frame(ref bit s[$]);
    logic [GBT_D_W-1:0] f;
    for (int i = 0; i < GBT_D_W; i++) f[i] = s.pop_front();
    return f;
  endfunction

  function automatic void push_frame(ref bit s[$], input logic [GBT_D_W-1:0] f);
    for (int i = 0; i < GBT_D_W; i++) s.push_back(f[i]);
  endfunction

  // parse one packet from the stream if it is complete
  function automatic bit pop_pkt(ref bit s[$], output fe_packet_t p);
    fe_header_t h;
    p = '0;
    if (s.size() < HDR_M) return 0;
    for (int i = 0; i < HDR_M; i++) h[i] = s[i];
    if (s.size() < HDR_M + int'(h.len)) return 0;
    p.hdr = h;
    for (int i = 0; i < HDR_M; i++) void'(s.pop_front());
    for (int i = 0; i < int'(h.len); i++) p.data[i] = s.pop_front();
    return 1;
  endfunction
endpackage

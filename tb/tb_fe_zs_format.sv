// tb_fe_zs_format: self-checking test of zero suppression and header
// formatting. Random hit patterns with random occupancy (including crossings
// with more than 12 hits), random channel masks and random veto, data-force
// and NZS bits. An independent model builds the expected packet: the header
// fields, the address list, the truncation bit and the NZS hit map. Counts
// of each case are required to be non-zero.
module tb_fe_zs_format;
  import lhcb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_trunc = 0, n_veto = 0, n_force = 0, n_nzs = 0, n_zs = 0;

  logic bx_en, enable, nzs, veto, force_data, pkt_valid;
  logic [31:0] hits, chan_mask;
  logic [11:0] bcnt;
  fe_packet_t pkt, exp;

  fe_zs_format #(.NCH(32)) dut (.clk, .rst_n, .bx_en, .enable, .hits, .chan_mask, .bcnt, .nzs,
    .veto, .force_data, .pkt_valid, .pkt);

  function automatic fe_packet_t model(logic [31:0] h, logic [31:0] m, logic [11:0] b,
                                       logic n, logic v, logic f);
    fe_packet_t p = '0;
    int k = 0;
    p.hdr.bcnt = b[3:0];
    if (v && !f) return p;
    if (n) begin p.hdr.len = 6'd32; p.data = 63'(h); return p; end
    for (int c = 0; c < 32; c++) if (h[c] && !m[c]) begin
      if (k < 12) begin p.data[k*5 +: 5] = 5'(c); k++; end
      else p.hdr.trunc = 1'b1;
    end
    p.hdr.len = 6'(k * 5);
    return p;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bx_en = 0; enable = 1; nzs = 0; veto = 0; force_data = 0; hits = 0; chan_mask = 0; bcnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int occ;
      @(negedge clk);
      occ = $urandom_range(0, 3) == 0 ? 60 : $urandom_range(0, 30);
      hits = '0;
      for (int c = 0; c < 32; c++) hits[c] = ($urandom_range(0, 99) < occ);
      chan_mask  = ($urandom_range(0, 3) == 0) ? $urandom & $urandom : '0;
      bcnt       = 12'($urandom_range(0, 3563));
      veto       = ($urandom_range(0, 4) == 0);
      force_data = ($urandom_range(0, 4) == 0);
      nzs        = ($urandom_range(0, 9) == 0);
      bx_en      = 1;
      exp = model(hits, chan_mask, bcnt, nzs, veto, force_data);
      @(negedge clk);
      bx_en = 0;
      checks++;
      if (!pkt_valid || pkt !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL v=%b got %h expected %h", pkt_valid, pkt, exp);
      end
      if (exp.hdr.trunc) n_trunc++;
      if (veto && !force_data) n_veto++;
      else if (veto) n_force++;
      else if (nzs) n_nzs++;
      else n_zs++;
      @(negedge clk);
      checks++;
      if (pkt_valid) begin failures++; $display("FAIL valid without bx_en"); end
    end
    checks++;
    if (n_trunc == 0 || n_veto == 0 || n_force == 0 || n_nzs == 0 || n_zs == 0) begin
      failures++; $display("FAIL a case never happened");
    end
    $display("trunc=%0d veto=%0d force=%0d nzs=%0d zs=%0d", n_trunc, n_veto, n_force, n_nzs, n_zs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

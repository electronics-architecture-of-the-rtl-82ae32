// fe_buffer: derandomising buffer between zero suppression and the GBT
// packer of an FE chip, with the truncation control the architecture asks for.
//
// Packets are kept in a DEPTH-entry FIFO. The controller tracks the occupancy
// in bits (header plus data of every stored packet), which is what the GBT
// bandwidth drains. When the occupancy reaches hi_thr, truncation switches on:
// each new packet is stored as its header only, with length 0 and the
// truncation bit set, so headers keep flowing while the buffer recovers. It
// switches off once the occupancy has fallen to lo_thr (the two thresholds are
// this design's reading of "limit" and "sufficiently empty"). A packet that
// meets a full FIFO is lost and 'lost' pulses.
//
// The read and write pointers are triple-redundant registers (tmr_reg), as
// the architecture recommends for buffer pointers; tmr_err reports a
// disagreement between copies. fe_reset empties the buffer.
// Interface: write with wr_valid (no back-pressure). The read side shows the
// two oldest packets combinationally (rd_avail says how many exist) and the
// reader takes 0, 1 or 2 of them per clock with rd_take, so that a backlog
// can drain faster than one packet per crossing.
//
// Constant outputs: tmr_err is 0 after synthesis because the pointer
// registers' upset-injection inputs are tied off here; only a real upset,
// which logic synthesis does not model, makes the copies disagree.
module fe_buffer
  import lhcb_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       fe_reset,
  input  logic       wr_valid,
  input  fe_packet_t wr_pkt,
  output logic [1:0] rd_avail,
  input  logic [1:0] rd_take,
  output fe_packet_t rd_pkt [2],
  input  logic [15:0] hi_thr,
  input  logic [15:0] lo_thr,
  output logic [15:0] occ_bits,
  output logic       truncating,
  output logic       trunc_evt,
  output logic       lost,
  output logic       tmr_err
);
  localparam int AW = $clog2(DEPTH);

  fe_packet_t mem [DEPTH];
  logic [AW:0] wptr, rptr, wptr_d, rptr_d;
  logic        werr, rerr;
  logic        full, empty, do_wr;
  logic [AW:0] count;
  logic [1:0]  n_rd;
  logic [15:0] rd_bits;
  fe_packet_t  wr_store;

  // read side: depends on the pointers only, so the packer's rd_take (which
  // depends on these outputs) does not loop back through this logic
  assign count     = wptr - rptr;
  assign empty     = (count == 0);
  assign full      = (count == (AW+1)'(DEPTH));
  assign rd_avail  = (count >= 2) ? 2'd2 : 2'(count);
  assign rd_pkt[0] = mem[rptr[AW-1:0]];
  assign rd_pkt[1] = mem[AW'(rptr[AW-1:0] + 1'b1)];

  always_comb begin
    n_rd     = fe_reset ? 2'd0 : ((rd_take > rd_avail) ? rd_avail : rd_take);
    rd_bits  = ((n_rd >= 2'd1) ? 16'(pkt_bits(rd_pkt[0].hdr)) : 16'd0)
             + ((n_rd == 2'd2) ? 16'(pkt_bits(rd_pkt[1].hdr)) : 16'd0);
    do_wr    = wr_valid && !full && !fe_reset;
    wr_store = wr_pkt;
    if (truncating) begin
      wr_store.data      = '0;
      wr_store.hdr.len   = '0;
      wr_store.hdr.trunc = 1'b1;
    end
    wptr_d   = fe_reset ? '0 : wptr + (AW+1)'(do_wr);
    rptr_d   = fe_reset ? '0 : rptr + (AW+1)'(n_rd);
    tmr_err  = werr || rerr;
  end

  tmr_reg #(.W(AW+1)) u_wptr (.clk, .rst_n, .en(1'b1), .d(wptr_d), .seu_inj('0), .q(wptr), .mismatch(werr));
  tmr_reg #(.W(AW+1)) u_rptr (.clk, .rst_n, .en(1'b1), .d(rptr_d), .seu_inj('0), .q(rptr), .mismatch(rerr));

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_store;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      occ_bits   <= '0;
      truncating <= 1'b0;
      trunc_evt  <= 1'b0;
      lost       <= 1'b0;
    end else if (fe_reset) begin
      occ_bits   <= '0;
      truncating <= 1'b0;
      trunc_evt  <= 1'b0;
      lost       <= 1'b0;
    end else begin
      occ_bits <= occ_bits
                  + (do_wr ? 16'(pkt_bits(wr_store.hdr)) : 16'd0)
                  - rd_bits;
      if (!truncating && occ_bits >= hi_thr)     truncating <= 1'b1;
      else if (truncating && occ_bits <= lo_thr) truncating <= 1'b0;
      trunc_evt <= do_wr && truncating;
      lost      <= wr_valid && full;
    end
  end
endmodule

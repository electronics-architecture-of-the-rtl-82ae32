// be_input_buffer: input buffer of one link on a BE board. It holds packets
// while the interaction-trigger decisions for them are on their way.
//
// A DEPTH-entry FIFO whose controller watches its occupancy. When it reaches
// HI entries, truncation switches on: arriving packets are stored as their
// header only, with length 0 and the truncation bit set, so that every
// crossing keeps its header. Truncation switches off when the occupancy falls
// to LO entries. The architecture asks for exactly this behaviour; the two
// thresholds are this design's numbers. 'alarm' is raised while truncating and
// feeds the throttle. A packet that meets a full FIFO is lost ('lost' pulses).
// Interface: write strobe without back-pressure; read side valid/ready with
// the head packet shown combinationally. be_reset empties the buffer.
module be_input_buffer
  import lhcb_pkg::*;
#(
  parameter int DEPTH = 32,
  parameter int HI    = 24,
  parameter int LO    = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       be_reset,
  input  logic       wr_valid,
  input  fe_packet_t wr_pkt,
  output logic       rd_valid,
  input  logic       rd_ready,
  output fe_packet_t rd_pkt,
  output logic       truncating,
  output logic       trunc_evt,
  output logic       alarm,
  output logic       lost
);
  localparam int AW = $clog2(DEPTH);

  fe_packet_t  mem [DEPTH];
  logic [AW:0] wp, rp, count;
  logic        full, empty, do_wr, do_rd;
  fe_packet_t  store;

  always_comb begin
    count    = wp - rp;
    empty    = (count == 0);
    full     = (count == (AW+1)'(DEPTH));
    do_wr    = wr_valid && !full;
    do_rd    = rd_ready && !empty;
    rd_valid = !empty;
    rd_pkt   = mem[rp[AW-1:0]];
    store    = wr_pkt;
    if (truncating) begin
      store.data      = '0;
      store.hdr.len   = '0;
      store.hdr.trunc = 1'b1;
    end
    alarm = truncating;
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= store;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; truncating <= 1'b0; trunc_evt <= 1'b0; lost <= 1'b0;
    end else if (be_reset) begin
      wp <= '0; rp <= '0; truncating <= 1'b0; trunc_evt <= 1'b0; lost <= 1'b0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      if (!truncating && count >= (AW+1)'(HI))     truncating <= 1'b1;
      else if (truncating && count <= (AW+1)'(LO)) truncating <= 1'b0;
      trunc_evt <= do_wr && truncating;
      lost      <= wr_valid && full;
    end
  end
endmodule

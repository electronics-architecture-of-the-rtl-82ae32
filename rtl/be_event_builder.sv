// be_event_builder: the multiplexer that merges the links of a BE board into
// whole events.
//
// Every link delivers one fragment per accepted crossing, in Event-ID order.
// The builder waits until all NLINK links have a fragment ready, then sends
// the fragments of that event one per clock in link order, marking the last
// one with out_last. If the Event-IDs of the links differ, eid_err pulses
// (the fragments are still sent). Data are merged in event order; the
// link order and the one-fragment-per-clock rate are this design's choices.
// Interface: valid/ready on every side; out_* is combinational from the
// selected input.
//
// Constant outputs: out_link is 4 bits wide; with NLINK = 3 its two upper
// bits are always 0.
module be_event_builder
  import lhcb_pkg::*;
#(
  parameter int NLINK = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  be_reset,
  input  logic [NLINK-1:0]      in_valid,
  input  fragment_t             in_frag [NLINK],
  output logic [NLINK-1:0]      in_ready,
  output logic                  out_valid,
  output fragment_t             out_frag,
  output logic [3:0]            out_link,
  output logic                  out_last,
  input  logic                  out_ready,
  output logic                  eid_err
);
  localparam int LW = (NLINK > 1) ? $clog2(NLINK) : 1;

  logic          busy;
  logic [LW-1:0] idx;
  logic          all_valid, ids_equal;

  always_comb begin
    all_valid = &in_valid;
    ids_equal = 1'b1;
    for (int l = 1; l < NLINK; l++)
      if (in_frag[l].eid != in_frag[0].eid) ids_equal = 1'b0;
    out_valid = busy && in_valid[idx];
    out_frag  = in_frag[idx];
    out_link  = 4'(idx);
    out_last  = (idx == LW'(NLINK - 1));
    in_ready  = '0;
    in_ready[idx] = busy && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; idx <= '0; eid_err <= 1'b0;
    end else if (be_reset) begin
      busy <= 1'b0; idx <= '0; eid_err <= 1'b0;
    end else begin
      eid_err <= 1'b0;
      if (!busy) begin
        if (all_valid) begin
          busy    <= 1'b1;
          idx     <= '0;
          eid_err <= !ids_equal;
        end
      end else if (out_valid && out_ready) begin
        if (out_last) busy <= 1'b0;
        else          idx  <= idx + 1'b1;
      end
    end
  end
endmodule

// fe_pattern_gen: digital test pattern of an FE chip, used to check the links
// and the BE receivers independently of the detector signals.
//
// Following the architecture's suggestion, each frame carries the 12-bit
// bunch counter in bits [11:0] so that bunch-counter synchronisation and link
// latencies can be checked; the rest of the 80 bits is this design's choice:
// a 32-bit frame counter in [43:12] and, in [79:44], the complement of
// {frame counter[23:0], bcnt} as a simple bit-error check. The frame is
// registered on each crossing strobe; fe_reset restarts the frame counter.
module fe_pattern_gen #(
  parameter int FRAME_W = 80
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               bx_en,
  input  logic               fe_reset,
  input  logic [11:0]        bcnt,
  output logic [FRAME_W-1:0] frame
);
  initial assert (FRAME_W == 80) else $error("fe_pattern_gen: layout is for 80-bit frames");

  logic [31:0] fcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fcnt  <= '0;
      frame <= '0;
    end else if (bx_en) begin
      fcnt  <= fe_reset ? 32'd0 : fcnt + 1'b1;
      frame <= {~{fcnt[23:0], bcnt}, fcnt, bcnt};
    end
  end
endmodule

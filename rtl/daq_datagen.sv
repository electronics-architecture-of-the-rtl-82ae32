// daq_datagen: test-data generator on the DAQ output of a BE board.
//
// While enabled it sends MEP-shaped packets back to back at one 64-bit word
// per clock, the full rate of the output, without any input from the front
// end, as the architecture requires for debugging the DAQ links. Each packet
// is a header word {8'hDA, 24'b0, sequence number[31:0]} followed by
// MEP_WORDS-1 words holding {sequence number, word index}. The content is this
// design's choice; it makes every word predictable by the receiver.
// Interface: valid/ready with sop/eop; the generator stops at a packet
// boundary when enable falls.
module daq_datagen #(
  parameter int MEP_WORDS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        daq_ready,
  output logic        daq_valid,
  output logic [63:0] daq_data,
  output logic        daq_sop,
  output logic        daq_eop
);
  localparam int IW = $clog2(MEP_WORDS);

  logic [31:0]   seq;
  logic [IW-1:0] idx;
  logic          active;

  always_comb begin
    daq_valid = active || enable;
    daq_sop   = (idx == '0);
    daq_eop   = (idx == IW'(MEP_WORDS - 1));
    daq_data  = daq_sop ? {8'hDA, 24'b0, seq} : {seq, 32'(idx)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq <= '0; idx <= '0; active <= 1'b0;
    end else if (daq_valid && daq_ready) begin
      if (daq_eop) begin
        idx    <= '0;
        seq    <= seq + 1'b1;
        active <= 1'b0;
      end else begin
        idx    <= idx + 1'b1;
        active <= 1'b1;
      end
    end
  end
endmodule

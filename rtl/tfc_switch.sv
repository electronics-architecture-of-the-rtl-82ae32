// tfc_switch: the partitioning switch of the readout supervisor. It connects
// each TFC link (one per sub-system, towards a TFC Interface) to one of
// NMASTER independent TFC Masters, and routes each link's throttle back to
// the master that drives it.
//
// The architecture asks for a set of independent TFC Masters, any of which
// can run one sub-system alone or the whole experiment, joined to the links
// through a configurable switch; the block diagram shows eight master
// instances behind a programmable switch layer. How the switch is built is
// not given: here it is a registered multiplexer per link, selected by a
// configuration register sel[link], plus an OR per master of the throttles
// of the links assigned to it. Links whose selection is out of range get an
// idle word (all zeros) and throttle nobody.
// Interface: all words advance on the crossing strobe bx_en; link words are
// registered, so the switch adds one crossing of latency to every link
// equally; the throttle path is combinational.
module tfc_switch
  import lhcb_pkg::*;
#(
  parameter int NMASTER = 8,
  parameter int NLINK   = 4,
  localparam int SW     = (NMASTER > 1) ? $clog2(NMASTER) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bx_en,
  input  tfc_info_t         master_info [NMASTER],
  output logic [NMASTER-1:0] master_throttle,
  input  logic [SW-1:0]     sel [NLINK],
  output tfc_info_t         link_info [NLINK],
  input  logic [NLINK-1:0]  link_throttle
);
  always_comb begin
    master_throttle = '0;
    for (int l = 0; l < NLINK; l++)
      if (32'(sel[l]) < NMASTER && link_throttle[l]) master_throttle[sel[l]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < NLINK; l++) link_info[l] <= '0;
    end else if (bx_en) begin
      for (int l = 0; l < NLINK; l++)
        link_info[l] <= (32'(sel[l]) < NMASTER) ? master_info[sel[l]] : '0;
    end
  end
endmodule

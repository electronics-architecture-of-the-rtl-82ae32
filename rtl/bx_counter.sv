// bx_counter: bunch-crossing counter of an FE chip (or any board that
// tracks the crossing number).
//
// It advances by one on every crossing strobe and wraps from ORBIT_BX-1 to 0,
// so it follows the LHC orbit of 3564 crossings. A Bcnt reset loads a
// programmable offset instead of zero; the offset compensates for different
// arrival times of signals and of the reset itself, as the architecture asks.
// The offset load takes effect at the crossing after the one carrying the
// reset. Offsets beyond the orbit are taken modulo the orbit (own choice).
//
// Interface: bx_en is high for one clock per crossing; bcnt_reset is sampled
// with bx_en. Output bcnt is registered.
module bx_counter #(
  parameter int ORBIT_BX = 3564,
  parameter int W        = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bx_en,
  input  logic         bcnt_reset,
  input  logic [W-1:0] offset,
  output logic [W-1:0] bcnt
);
  localparam logic [W-1:0] LAST = W'(ORBIT_BX - 1);
  logic [W-1:0] off_mod;

  always_comb off_mod = (offset > LAST) ? W'(offset - W'(ORBIT_BX)) : offset;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               bcnt <= '0;
    else if (bx_en) begin
      if (bcnt_reset)         bcnt <= off_mod;
      else if (bcnt == LAST)  bcnt <= '0;
      else                    bcnt <= bcnt + 1'b1;
    end
  end
endmodule

// counter_snapshot: data-flow counters of a BE board with a coherent
// snapshot for the ECS.
//
// N free-running master counters count their inc inputs. A latch pulse
// copies all of them into shadow registers in the same clock, so the ECS
// reads a consistent set while the masters keep counting, as the
// architecture requires. Every register is readable: rd_shadow selects the
// shadow or the live value of counter rd_addr (combinational). clear zeroes
// the masters. An increment in the latch clock is counted by the master but
// not seen in the shadow.
module counter_snapshot #(
  parameter int N = 8,
  parameter int W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         inc,
  input  logic                 latch,
  input  logic                 clear,
  input  logic [$clog2(N)-1:0] rd_addr,
  input  logic                 rd_shadow,
  output logic [W-1:0]         rd_data
);
  logic [W-1:0] master [N];
  logic [W-1:0] shadow [N];

  always_comb rd_data = rd_shadow ? shadow[rd_addr] : master[rd_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin master[i] <= '0; shadow[i] <= '0; end
    end else begin
      for (int i = 0; i < N; i++) begin
        if (clear)       master[i] <= '0;
        else if (inc[i]) master[i] <= master[i] + 1'b1;
        if (latch)       shadow[i] <= master[i];
      end
    end
  end
endmodule

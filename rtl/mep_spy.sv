// mep_spy: MEP snapshot memory of a BE board.
//
// The architecture asks that a number of MEPs can be latched into a memory
// the ECS can read. When armed, the spy watches the DAQ output (words that
// are valid and accepted), starts storing at the next start of packet and
// stops after NMEP end-of-packet words or when the DEPTH-word memory is full.
// done then stays high and nwords gives how many words were stored until the
// next arm. The ECS reads word rd_addr combinationally.
module mep_spy #(
  parameter int DEPTH = 128,
  parameter int NMEP  = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     arm,
  input  logic                     mon_valid,
  input  logic                     mon_ready,
  input  logic [63:0]              mon_data,
  input  logic                     mon_sop,
  input  logic                     mon_eop,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [63:0]              rd_data,
  output logic                     done,
  output logic [$clog2(DEPTH):0]   nwords
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_CAP, S_DONE} spy_state_t;
  spy_state_t st;
  logic [63:0] mem [DEPTH];
  logic [$clog2(NMEP+1)-1:0] neop;
  logic fire, store;

  always_comb begin
    fire    = mon_valid && mon_ready;
    store   = fire && ((st == S_CAP) || (st == S_WAIT && mon_sop));
    rd_data = mem[rd_addr];
    done    = (st == S_DONE);
  end

  always_ff @(posedge clk) begin
    if (store) mem[nwords[$clog2(DEPTH)-1:0]] <= mon_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; nwords <= '0; neop <= '0;
    end else if (arm) begin
      st <= S_WAIT; nwords <= '0; neop <= '0;
    end else begin
      if (store) begin
        nwords <= nwords + 1'b1;
        if (st == S_WAIT) st <= S_CAP;
        if (mon_eop && (32'(neop) + 1 == NMEP)) st <= S_DONE;
        else if (32'(nwords) + 1 == DEPTH)      st <= S_DONE;
        if (mon_eop) neop <= neop + 1'b1;
      end
    end
  end
endmodule

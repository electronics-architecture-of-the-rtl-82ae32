// tmr_reg: triple-redundant register for state that must survive single-event
// upsets, such as the FE buffer pointers (the architecture asks for triple
// redundancy there).
//
// Three copies hold the value; the output is the bitwise majority of the
// three. Every clock each copy is rewritten, with d when en is high and with
// the voted value otherwise, so an upset in one copy is corrected at the next
// clock (scrubbing, own choice). seu_inj XORs a mask into each copy at that
// clock; it is an error-injection port for testing and is tied to zero in use.
// mismatch is high while the copies disagree.
module tmr_reg #(
  parameter int          W     = 8,
  parameter logic [W-1:0] RESET = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [W-1:0]     d,
  input  logic [2:0][W-1:0] seu_inj,
  output logic [W-1:0]     q,
  output logic             mismatch
);
  logic [2:0][W-1:0] copy;
  logic [W-1:0] next;

  always_comb begin
    q        = (copy[0] & copy[1]) | (copy[0] & copy[2]) | (copy[1] & copy[2]);
    mismatch = (copy[0] != copy[1]) || (copy[0] != copy[2]);
    next     = en ? d : q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) copy <= {3{RESET}};
    else for (int i = 0; i < 3; i++) copy[i] <= next ^ seu_inj[i];
  end
endmodule

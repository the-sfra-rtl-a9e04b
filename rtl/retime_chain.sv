// retime_chain: programmable-delay shift register placed on every logic-block
// input of the fabric.
//
// Every CLB input passes through one of these chains so that the retiming
// tool can balance unequal interconnect delays without spending logic.  The
// chain is DEPTH registers long; the configured tap selects how many of them
// the signal passes through: delay = tap + 1 clock cycles (at least one
// register, so the path from the interconnect always ends in a register).
// That every input has a retiming chain follows the architecture; the depth
// and the tap encoding are this design's choices.
//
// Interface: d is the signal from the input C-box, tap the configuration,
// q the delayed signal.  Reset clears the chain.
module retime_chain #(
  parameter int DEPTH = sfra_pkg::RETIME_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     d,
  input  logic [$clog2(DEPTH)-1:0] tap,
  output logic                     q
);

  logic [DEPTH-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else        sr <= {sr[DEPTH-2:0], d};
  end

  assign q = sr[tap];

endmodule

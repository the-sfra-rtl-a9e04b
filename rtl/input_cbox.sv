// input_cbox: input connection box of one tile.
//
// The C-boxes are full crossbars: every CLB input can take any wire of both
// the horizontal and the vertical channel next to the tile, and any number
// of inputs may take the same wire (unlimited fanout).  Select value v picks
// horizontal wire v for v < CHAN_W, vertical wire v - CHAN_W for
// v < 2*CHAN_W, and a constant 0 above (input unused).
//
// In silicon the selection is a hierarchy of rebuffered local wires, tristate
// selectors and a final multiplexer driven directly by configuration bits;
// here it is the equivalent logical multiplexer with a binary select.
// Purely combinational.
module input_cbox
  import sfra_pkg::*;
#(
  parameter int N_IN = CLB_IN
) (
  input  logic [CHAN_W-1:0]            h_wire,
  input  logic [CHAN_W-1:0]            v_wire,
  input  logic [N_IN-1:0][ISEL_W-1:0]  sel,
  output logic [N_IN-1:0]              in
);

  logic [2*CHAN_W-1:0] both;
  assign both = {v_wire, h_wire};

  always_comb begin
    for (int k = 0; k < N_IN; k++) begin
      in[k] = (int'(sel[k]) < 2*CHAN_W) ? both[sel[k]] : 1'b0;
    end
  end

endmodule

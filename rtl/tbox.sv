// tbox: the two dedicated corner turns of one tile.
//
// The corner-turn interconnect keeps full any-to-any connectivity at each
// switch point but limits how many signals may change direction there.
// Each turn carries one signal from the horizontal channel to the vertical
// channel and a separate one from vertical to horizontal, so a turn costs
// exactly two registers.  The turn's input may take any wire of its source
// channel; its registered output is one more driver for the output C-box of
// the destination channel.  (The other four turns of a tile are the BX->XB
// and BY->YB paths of the two slices.)
//
// Timing: one clock from the source wire to the output.  Reset clears the
// turn registers.  Input selection encoding is this design's choice.
module tbox
  import sfra_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [CHAN_W-1:0]            h_wire,
  input  logic [CHAN_W-1:0]            v_wire,
  input  logic [TURNS-1:0][TSEL_W-1:0] hsel,   // H wire for each H-to-V turn
  input  logic [TURNS-1:0][TSEL_W-1:0] vsel,   // V wire for each V-to-H turn
  output logic [TURNS-1:0]             to_v,   // registered, onto the V channel
  output logic [TURNS-1:0]             to_h    // registered, onto the H channel
);

  logic [TURNS-1:0] hv_d, vh_d;

  always_comb begin
    for (int t = 0; t < TURNS; t++) begin
      hv_d[t] = (int'(hsel[t]) < CHAN_W) ? h_wire[hsel[t]] : 1'b0;
      vh_d[t] = (int'(vsel[t]) < CHAN_W) ? v_wire[vsel[t]] : 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      to_v <= '0;
      to_h <= '0;
    end else begin
      to_v <= hv_d;
      to_h <= vh_d;
    end
  end

endmodule

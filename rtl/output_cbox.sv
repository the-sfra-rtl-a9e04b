// output_cbox: output connection box of one tile for one channel.
//
// Each driver (the 8 registered CLB outputs and the 2 turn outputs entering
// this channel) feeds a column of 40 tristates; the tristate in row r drives
// intermediate output wire r, shared by all drivers.  Each intermediate wire
// in turn drives, through three tristates, channel wires 3r, 3r+1 and 3r+2.
// A driver may enable several rows (fanout onto several wires), and one
// output may be sent onto both channels (each channel has its own box).  Two
// drivers from the same tile can therefore not use the same group of three
// wires.
//
// Two-state model of the tristate network: an undriven wire reads 0, and a
// wire driven by several enabled tristates is the OR of them, flagged on
// `contention` (a configuration error).  Purely combinational.
module output_cbox
  import sfra_pkg::*;
(
  input  ocbox_cfg_t        cfg,
  input  logic [OSRC-1:0]   src,
  output logic [CHAN_W-1:0] drive,      // value put on each channel wire (0 if undriven)
  output logic              contention  // an intermediate wire has two drivers
);

  logic [OROWS-1:0] row_val, row_act;
  logic [OROWS-1:0] row_multi;

  always_comb begin
    row_val   = '0;
    row_act   = '0;
    row_multi = '0;
    for (int r = 0; r < OROWS; r++) begin
      for (int s = 0; s < OSRC; s++) begin
        if (cfg.src_en[s][r]) begin
          row_multi[r] = row_multi[r] | row_act[r];
          row_act[r]   = 1'b1;
          row_val[r]   = row_val[r] | src[s];
        end
      end
    end
    for (int r = 0; r < OROWS; r++) begin
      for (int k = 0; k < OFAN; k++) begin
        drive [OFAN*r + k] = row_val[r] & cfg.wire_en[r][k];
      end
    end
    contention = |row_multi;
  end

endmodule

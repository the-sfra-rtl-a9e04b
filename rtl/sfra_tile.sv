// sfra_tile: one tile of the SFRA array.
//
// A tile holds a CLB, its T-box of two dedicated turns, the full-crossbar
// input C-box, one output C-box per channel, its length of the horizontal
// channel (running below the CLB, towards +X) and of the vertical channel
// (running to its left, towards +Y), and the configuration bits of all of
// them.  Every CLB input may take any wire of either channel; every CLB
// output may be driven onto wires of either or both channels.  Signals
// change channel only through a turn: the T-box's two H-to-V and two V-to-H
// registers, or the BX->XB / BY->YB paths of the two slices (six turns per
// tile in all).
//
// Pipelining: CLB outputs and turns are registered, each CLB input ends in a
// retiming chain, and channel wires carry a register every nine CLBs, so no
// combinational path crosses more than nine tiles of wire plus one input and
// one output C-box.  The carry chains (cin/cout, one per slice) are the only
// combinational path between tiles besides the channel wires.
//
// Channel ports follow chan_seg: *_fwd_in comes from the low-side neighbour
// (west / south) before this tile's breaks, *_bwd_in from the high-side
// neighbour after its breaks.  cfg_err reports a configuration that drives
// an intermediate output wire twice or enables a break in both directions.
module sfra_tile
  import sfra_pkg::*;
#(
  parameter int X = 0,
  parameter int Y = 0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cfg_we,
  input  logic [COORD_W-1:0]     cfg_x,
  input  logic [COORD_W-1:0]     cfg_y,
  input  logic [CFG_WADDR_W-1:0] cfg_word,
  input  logic [CFG_WORD_W-1:0]  cfg_data,
  input  logic [CHAN_W-1:0]      h_fwd_in,
  input  logic [CHAN_W-1:0]      h_bwd_in,
  output logic [CHAN_W-1:0]      h_fwd_out,
  output logic [CHAN_W-1:0]      h_bwd_out,
  input  logic [CHAN_W-1:0]      v_fwd_in,
  input  logic [CHAN_W-1:0]      v_bwd_in,
  output logic [CHAN_W-1:0]      v_fwd_out,
  output logic [CHAN_W-1:0]      v_bwd_out,
  input  logic [1:0]             cin,
  output logic [1:0]             cout,
  output logic                   cfg_err
);

  tile_cfg_t cfg;
  logic [TILE_CFG_BITS-1:0] cfg_bits;

  tile_config #(.X(X), .Y(Y), .BITS(TILE_CFG_BITS)) u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_x, .cfg_y, .cfg_word, .cfg_data, .bits(cfg_bits)
  );
  assign cfg = tile_cfg_t'(cfg_bits);

  logic [CHAN_W-1:0] h_val, v_val, h_drive, v_drive;
  logic h_dir_err, v_dir_err, h_cont, v_cont;

  chan_seg #(.POS(X)) u_hchan (
    .clk, .rst_n, .brk(cfg.brk_h), .drive(h_drive),
    .fwd_in(h_fwd_in), .bwd_in(h_bwd_in), .fwd_out(h_fwd_out), .bwd_out(h_bwd_out),
    .val(h_val), .dir_err(h_dir_err)
  );

  chan_seg #(.POS(Y)) u_vchan (
    .clk, .rst_n, .brk(cfg.brk_v), .drive(v_drive),
    .fwd_in(v_fwd_in), .bwd_in(v_bwd_in), .fwd_out(v_fwd_out), .bwd_out(v_bwd_out),
    .val(v_val), .dir_err(v_dir_err)
  );

  logic [CLB_IN-1:0]  clb_in;
  logic [CLB_OUT-1:0] clb_out;
  logic [TURNS-1:0]   to_h, to_v;

  input_cbox #(.N_IN(CLB_IN)) u_ibox (
    .h_wire(h_val), .v_wire(v_val), .sel(cfg.in_sel), .in(clb_in)
  );

  sfra_clb u_clb (
    .clk, .rst_n, .cfg(cfg.slice), .in(clb_in), .cin, .cout, .out(clb_out)
  );

  tbox u_tbox (
    .clk, .rst_n, .h_wire(h_val), .v_wire(v_val),
    .hsel(cfg.turn_hsel), .vsel(cfg.turn_vsel), .to_v, .to_h
  );

  output_cbox u_obox_h (
    .cfg(cfg.ob_h), .src({to_h, clb_out}), .drive(h_drive),
    .contention(h_cont)
  );

  output_cbox u_obox_v (
    .cfg(cfg.ob_v), .src({to_v, clb_out}), .drive(v_drive),
    .contention(v_cont)
  );

  assign cfg_err = h_dir_err | v_dir_err | h_cont | v_cont;

endmodule

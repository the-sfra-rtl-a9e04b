// sfra_array: the SFRA, a fixed-frequency FPGA built on a corner-turn
// interconnect.
//
// ROWS x COLS tiles form a Manhattan array.  Each row of tiles shares one
// 120-wire horizontal channel and each column one 120-wire vertical
// channel.  The switch points where the channels cross are not crossbars:
// a signal changes direction only through one of the six registered turns
// of a tile, so routes prefer straight lines and each turn is a scarce,
// pipelined resource.  Channels are rebuffered every 3 tiles and registered
// every 9 tiles, CLB outputs and turns are registered, CLB inputs end in
// retiming chains, and the two carry chains of each column are registered
// after every 4th tile (after rows 3, 7, 11, ...).  Every path is therefore
// pipelined and the array runs at one fixed clock whatever design is loaded;
// user designs are C-slowed or repipelined to match.
//
// Interface
//   cfg_*     configuration write port: one 32-bit word per clock into word
//             cfg_word of tile (cfg_x, cfg_y).  Reset clears all configuration.
//   h_west_in[y] / h_east_in[y]   drive the ends of horizontal channel y
//             (ORed onto the wire ends, 0 when unused); h_west_out / h_east_out
//             read them.  Likewise v_south_* / v_north_* for vertical channel x.
//   carry_in[x] / carry_out[x]    the two carry chains of column x at the
//             bottom and top of the array.
//   cfg_err   some tile holds a contradictory configuration.
// The array size is not fixed by the architecture; ROWS = COLS = 12 is this
// design's default.  The edge ports stand in for I/O blocks, which the
// architecture leaves unspecified.
module sfra_array
  import sfra_pkg::*;
#(
  parameter int ROWS = 12,
  parameter int COLS = 12
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        cfg_we,
  input  logic [COORD_W-1:0]          cfg_x,
  input  logic [COORD_W-1:0]          cfg_y,
  input  logic [CFG_WADDR_W-1:0]      cfg_word,
  input  logic [CFG_WORD_W-1:0]       cfg_data,
  input  logic [ROWS-1:0][CHAN_W-1:0] h_west_in,
  output logic [ROWS-1:0][CHAN_W-1:0] h_west_out,
  input  logic [ROWS-1:0][CHAN_W-1:0] h_east_in,
  output logic [ROWS-1:0][CHAN_W-1:0] h_east_out,
  input  logic [COLS-1:0][CHAN_W-1:0] v_south_in,
  output logic [COLS-1:0][CHAN_W-1:0] v_south_out,
  input  logic [COLS-1:0][CHAN_W-1:0] v_north_in,
  output logic [COLS-1:0][CHAN_W-1:0] v_north_out,
  input  logic [COLS-1:0][1:0]        carry_in,
  output logic [COLS-1:0][1:0]        carry_out,
  output logic                        cfg_err
);

  logic [ROWS*COLS-1:0] err;

  // Each tile's outgoing channel and carry nets live in its own generate
  // scope and neighbours reach them by hierarchical name, so that every net
  // is a separate signal (no false loops through a shared array).
  for (genvar y = 0; y < ROWS; y++) begin : g_row
    for (genvar x = 0; x < COLS; x++) begin : g_col
      logic [CHAN_W-1:0] hf_o, hb_o, vf_o, vb_o;   // outgoing channel values
      logic [CHAN_W-1:0] hf_i, hb_i, vf_i, vb_i;   // incoming channel values
      logic [1:0]        co, cq, ci;               // carry out, after register, in

      if (x == 0) begin : g_w_edge
        assign hf_i = h_west_in[y];
      end else begin : g_w_nb
        assign hf_i = g_row[y].g_col[x-1].hf_o;
      end
      if (x == COLS-1) begin : g_e_edge
        assign hb_i = h_east_in[y];
      end else begin : g_e_nb
        assign hb_i = g_row[y].g_col[x+1].hb_o;
      end
      if (y == 0) begin : g_s_edge
        assign vf_i = v_south_in[x];
        assign ci   = carry_in[x];
      end else begin : g_s_nb
        assign vf_i = g_row[y-1].g_col[x].vf_o;
        assign ci   = g_row[y-1].g_col[x].cq;
      end
      if (y == ROWS-1) begin : g_n_edge
        assign vb_i = v_north_in[x];
      end else begin : g_n_nb
        assign vb_i = g_row[y+1].g_col[x].vb_o;
      end

      sfra_tile #(.X(x), .Y(y)) u_tile (
        .clk, .rst_n, .cfg_we, .cfg_x, .cfg_y, .cfg_word, .cfg_data,
        .h_fwd_in(hf_i), .h_bwd_in(hb_i), .h_fwd_out(hf_o), .h_bwd_out(hb_o),
        .v_fwd_in(vf_i), .v_bwd_in(vb_i), .v_fwd_out(vf_o), .v_bwd_out(vb_o),
        .cin(ci), .cout(co), .cfg_err(err[y*COLS + x])
      );

      // carry chain pipeline register after every CARRY_REG_SPACING-th row
      if ((y % CARRY_REG_SPACING) == CARRY_REG_SPACING - 1) begin : g_creg
        logic [1:0] cr;
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) cr <= '0;
          else        cr <= co;
        end
        assign cq = cr;
      end else begin : g_cwire
        assign cq = co;
      end
    end
  end

  for (genvar y = 0; y < ROWS; y++) begin : g_hedge
    assign h_west_out[y] = g_row[y].g_col[0].hb_o;
    assign h_east_out[y] = g_row[y].g_col[COLS-1].hf_o;
  end
  for (genvar x = 0; x < COLS; x++) begin : g_vedge
    assign v_south_out[x] = g_row[0].g_col[x].vb_o;
    assign v_north_out[x] = g_row[ROWS-1].g_col[x].vf_o;
    assign carry_out[x]   = g_row[ROWS-1].g_col[x].cq;
  end

  assign cfg_err = |err;

endmodule

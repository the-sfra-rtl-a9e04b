// tile_config: configuration storage of one tile.
//
// Every switch, multiplexer and LUT of the tile is controlled by a
// configuration bit held next to it; the bits of all tiles are loaded in
// parallel over bit-lines with row/column addressing.  This model stores the
// tile's BITS configuration bits as 32-bit words and loads one word per
// clock: when cfg_we is high and (cfg_x, cfg_y) equals the tile's (X, Y),
// word cfg_word is replaced by cfg_data.  The tile coordinate acts as the
// row/column address.  Reset clears every bit, leaving the tile with all
// switches open and all LUTs at 0.  The word width, the write protocol and
// the reset are this design's choices.
module tile_config
  import sfra_pkg::*;
#(
  parameter int X    = 0,
  parameter int Y    = 0,
  parameter int BITS = TILE_CFG_BITS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cfg_we,
  input  logic [COORD_W-1:0]     cfg_x,
  input  logic [COORD_W-1:0]     cfg_y,
  input  logic [CFG_WADDR_W-1:0] cfg_word,
  input  logic [CFG_WORD_W-1:0]  cfg_data,
  output logic [BITS-1:0]        bits
);

  localparam int WORDS = (BITS + CFG_WORD_W - 1) / CFG_WORD_W;

  logic [WORDS-1:0][CFG_WORD_W-1:0] mem;
  logic [WORDS*CFG_WORD_W-1:0]      flat;
  logic sel;

  assign sel = cfg_we && (int'(cfg_x) == X) && (int'(cfg_y) == Y);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem <= '0;
    end else if (sel && int'(cfg_word) < WORDS) begin
      mem[cfg_word] <= cfg_data;
    end
  end

  assign flat = mem;
  assign bits = flat[BITS-1:0];

endmodule

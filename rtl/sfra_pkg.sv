// sfra_pkg: constants and configuration record types shared by the SFRA
// fabric (a fixed-frequency FPGA with a pipelined "corner-turn" interconnect).
//
// Sizes that follow the architecture description: 120 wires per horizontal
// and vertical channel, 40 intermediate output wires per output C-box each
// feeding a group of 3 channel wires, channel breaks (bidirectional buffers)
// every 3 CLBs and bidirectional registers every 9 CLBs, the carry chain
// registered every 4 CLBs, 20 CLB inputs, 8 CLB outputs and 2 extra turns
// per CLB.  The retiming-chain depth and every field encoding below are this
// design's own choices.
package sfra_pkg;

  // ---- channel ------------------------------------------------------------
  localparam int CHAN_W        = 120;  // wires per channel
  localparam int OROWS         = 40;   // intermediate output wires per output C-box
  localparam int OFAN          = 3;    // channel wires reachable from one intermediate wire
  localparam int BUF_SPACING   = 3;    // CLBs between bidirectional buffer breaks
  localparam int REG_SPACING   = 9;    // CLBs between bidirectional register breaks
  localparam int NBRK          = CHAN_W / BUF_SPACING;  // wires broken at one boundary

  // ---- logic block --------------------------------------------------------
  localparam int SLICE_IN      = 10;   // F1-F4, G1-G4, BX, BY
  localparam int SLICE_OUT     = 4;    // X, Y, XB, YB
  localparam int CLB_IN        = 2 * SLICE_IN;   // 20
  localparam int CLB_OUT       = 2 * SLICE_OUT;  // 8
  localparam int TURNS         = 2;    // T-box turns per CLB
  localparam int CARRY_REG_SPACING = 4;  // carry chain registered every 4 CLBs

  localparam int RETIME_DEPTH  = 8;    // stages per input retiming chain
  localparam int RT_W          = $clog2(RETIME_DEPTH);

  localparam int ISEL_W        = $clog2(2 * CHAN_W);  // CLB input: any H or V wire
  localparam int TSEL_W        = $clog2(CHAN_W);      // turn input: any wire of one channel
  localparam int OSRC          = CLB_OUT + TURNS;     // drivers of one output C-box

  // slice input order (index into the 10 slice inputs)
  localparam int IN_F1 = 0, IN_F2 = 1, IN_F3 = 2, IN_F4 = 3;
  localparam int IN_G1 = 4, IN_G2 = 5, IN_G3 = 6, IN_G4 = 7;
  localparam int IN_BX = 8, IN_BY = 9;
  // slice output order
  localparam int OUT_X = 0, OUT_Y = 1, OUT_XB = 2, OUT_YB = 3;

  // carry-mux "0" data input of one LUT half
  typedef enum logic [1:0] {
    DI_ZERO = 2'd0,   // constant 0
    DI_ONE  = 2'd1,   // constant 1
    DI_OPA  = 2'd2,   // first LUT input (optionally inverted)
    DI_PROD = 2'd3    // product of first and second LUT inputs (multiplier AND)
  } di_sel_e;

  // registered X / Y output source
  typedef enum logic [1:0] {
    OSEL_LUT  = 2'd0, // LUT output
    OSEL_SUM  = 2'd1, // carry XOR (sum)
    OSEL_WIDE = 2'd2, // F5 mux for X, F6 mux for Y
    OSEL_ZERO = 2'd3  // unused
  } out_sel_e;

  typedef struct packed {
    logic [15:0] lut;        // truth table, bit i = output for inputs {in4,in3,in2,in1} = i
    di_sel_e     di_sel;
    logic        inv_a;      // invert first LUT input on its way to the carry logic
    logic        inv_b;      // invert second LUT input on its way to the product term
    logic        force_prop; // carry mux always selects carry-in
    out_sel_e    out_sel;
    logic        b_turn;     // XB/YB: 1 = BX/BY turn, 0 = carry-chain tap
  } half_cfg_t;

  typedef struct packed {
    half_cfg_t                     f;
    half_cfg_t                     g;
    logic                          bx_inv;
    logic                          by_inv;
    logic                          cin_bx;    // carry chain starts from BX instead of CIN
    logic [SLICE_IN-1:0][RT_W-1:0] rt_delay;  // retiming chain tap (delay = value + 1)
  } slice_cfg_t;

  typedef struct packed {
    logic [OSRC-1:0][OROWS-1:0]  src_en;   // tristate: source s drives intermediate wire r
    logic [OROWS-1:0][OFAN-1:0]  wire_en;  // intermediate wire r drives channel wire 3r+k
  } ocbox_cfg_t;

  // direction of one bidirectional break: fwd = towards higher coordinate
  typedef struct packed {
    logic fwd;
    logic bwd;
  } brk_cfg_t;

  typedef struct packed {
    slice_cfg_t [1:0]              slice;
    logic [CLB_IN-1:0][ISEL_W-1:0] in_sel;     // 0..119 H wire, 120..239 V wire, else 0
    logic [TURNS-1:0][TSEL_W-1:0]  turn_hsel;  // H wire taken by the H-to-V turn
    logic [TURNS-1:0][TSEL_W-1:0]  turn_vsel;  // V wire taken by the V-to-H turn
    ocbox_cfg_t                    ob_h;
    ocbox_cfg_t                    ob_v;
    brk_cfg_t [NBRK-1:0]           brk_h;      // breaks at the tile's west boundary
    brk_cfg_t [NBRK-1:0]           brk_v;      // breaks at the tile's south boundary
  } tile_cfg_t;

  localparam int TILE_CFG_BITS = $bits(tile_cfg_t);
  localparam int CFG_WORD_W    = 32;
  localparam int CFG_WORDS     = (TILE_CFG_BITS + CFG_WORD_W - 1) / CFG_WORD_W;
  localparam int CFG_WADDR_W   = $clog2(CFG_WORDS);
  localparam int COORD_W       = 8;

  // Channel wire w breaks at the near boundary of position p when
  // (p + w) mod 3 = 0; the break is a register when (p + w) mod 9 = 0.
  function automatic logic brk_here(int p, int w);
    return ((p + w) % BUF_SPACING) == 0;
  endfunction
  function automatic logic reg_here(int p, int w);
    return ((p + w) % REG_SPACING) == 0;
  endfunction

endpackage

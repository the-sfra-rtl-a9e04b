// chan_seg: one tile's length of a 120-wire routing channel.
//
// Channel wires are cut into segments.  Every wire is broken every three
// CLBs by a bidirectional buffer, and every nine CLBs the break is a
// bidirectional register instead; the breaks are staggered across the wires
// (braided), so at any tile boundary one third of the wires are broken and
// one ninth are registered.  Wire w breaks at the near (low-coordinate)
// boundary of position POS when (POS + w) mod 3 = 0 and is registered there
// when (POS + w) mod 9 = 0.  Each break has its own direction bits: fwd
// passes the segment below to the segment above (towards higher POS), bwd
// the other way; with neither set the two segments are isolated.
//
// To keep the bidirectional wire free of combinational loops it is carried
// as two directed values.  fwd_in is the value of the wire just before this
// tile's boundary, as driven from the low side; bwd_in the value arriving
// from the high side, already past the next tile's break.  The tile's own
// C-box drivers are ORed onto the wire (two-state tristate model: undriven
// reads 0).  `val` is what the tile's input C-boxes see.
//
// Timing: a buffer break is combinational; a register break adds one clock.
// The break spacing and stagger follow the architecture; the two-value
// representation, the direction-bit encoding and the reset of the break
// registers are this design's choices.
module chan_seg
  import sfra_pkg::*;
#(
  parameter int POS = 0   // tile coordinate along the channel
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  brk_cfg_t [NBRK-1:0]  brk,      // indexed by wire / 3
  input  logic [CHAN_W-1:0]    drive,    // this tile's output C-box
  input  logic [CHAN_W-1:0]    fwd_in,   // from the low-side neighbour, before the break
  input  logic [CHAN_W-1:0]    bwd_in,   // from the high-side neighbour, after its break
  output logic [CHAN_W-1:0]    fwd_out,  // to the high-side neighbour, before its break
  output logic [CHAN_W-1:0]    bwd_out,  // to the low-side neighbour, after this break
  output logic [CHAN_W-1:0]    val,      // wire value at this tile
  output logic                 dir_err   // a break is enabled in both directions
);

  logic [NBRK-1:0] both_dir;

  for (genvar w = 0; w < CHAN_W; w++) begin : g_w
    localparam bit BRK = brk_here(POS, w);
    localparam bit REG = reg_here(POS, w);
    logic from_low, bwd_seg;
    assign bwd_seg = drive[w] | bwd_in[w];

    if (!BRK) begin : g_through
      assign from_low   = fwd_in[w];
      assign bwd_out[w] = bwd_seg;
    end else if (!REG) begin : g_buf
      assign from_low   = brk[w / BUF_SPACING].fwd & fwd_in[w];
      assign bwd_out[w] = brk[w / BUF_SPACING].bwd & bwd_seg;
    end else begin : g_reg
      logic fwd_q, bwd_q;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          fwd_q <= 1'b0;
          bwd_q <= 1'b0;
        end else begin
          fwd_q <= fwd_in[w];
          bwd_q <= bwd_seg;
        end
      end
      assign from_low   = brk[w / BUF_SPACING].fwd & fwd_q;
      assign bwd_out[w] = brk[w / BUF_SPACING].bwd & bwd_q;
    end

    assign fwd_out[w] = drive[w] | from_low;
    assign val[w]     = drive[w] | from_low | bwd_in[w];
  end

  for (genvar j = 0; j < NBRK; j++) begin : g_err
    assign both_dir[j] = brk[j].fwd & brk[j].bwd;
  end
  assign dir_err = |both_dir;

endmodule

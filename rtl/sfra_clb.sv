// sfra_clb: the SFRA configurable logic block, two slices.
//
// The two slices are cross-linked through their F5/F6 multiplexers (each
// slice's F6 sees the other's F5), so a CLB can build any function of up to
// six inputs on Y of either slice.  Each slice carries its own carry chain:
// cin[s]/cout[s] connect slice s to slice s of the CLBs below and above.
//
// Interface: in[9:0] are slice 0's F1-F4, G1-G4, BX, BY and in[19:10] the
// same for slice 1; out[3:0] are slice 0's registered X, Y, XB, YB and
// out[7:4] slice 1's.  20 inputs and 8 outputs match the per-CLB wire
// counts of the tile figure.  Timing is that of sfra_slice.
module sfra_clb
  import sfra_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  slice_cfg_t [1:0]   cfg,
  input  logic [CLB_IN-1:0]  in,
  input  logic [1:0]         cin,
  output logic [1:0]         cout,
  output logic [CLB_OUT-1:0] out
);

  logic [1:0] f5;

  for (genvar s = 0; s < 2; s++) begin : g_slice
    sfra_slice u_slice (
      .clk, .rst_n,
      .cfg      (cfg[s]),
      .in       (in[s*SLICE_IN +: SLICE_IN]),
      .cin      (cin[s]),
      .f5_other (f5[1-s]),
      .cout     (cout[s]),
      .f5       (f5[s]),
      .out_q    (out[s*SLICE_OUT +: SLICE_OUT])
    );
  end

endmodule

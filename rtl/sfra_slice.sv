// sfra_slice: one slice of the SFRA logic block.
//
// The slice keeps the Virtex slice's logic but drops what C-slow retiming
// makes meaningless: there is no LUT RAM, no clock enable, no set/reset, and
// no XQ/YQ outputs.  What remains:
//   * ten inputs (F1-F4, G1-G4, BX, BY), each behind a retiming chain;
//   * two 4-LUTs (F and G);
//   * the carry logic: for each half a carry multiplexer selected by the LUT
//     output (or forced to propagate), whose other input is a constant, the
//     first LUT input, or the product of the first two LUT inputs; a carry
//     XOR gives the sum.  The chain runs CIN -> F half -> G half -> COUT, and
//     may start from BX instead of CIN;
//   * F5 (selected by BX) combining the two LUTs, and F6 (selected by BY)
//     combining this slice's F5 with the other slice's F5;
//   * four registered outputs: X (F LUT, F sum or F5), Y (G LUT, G sum or F6),
//     XB (carry tap after the F half, or BX) and YB (COUT, or BY).
//     Routing BX to XB and BY to YB lets the router use them as corner turns.
//
// Timing: an input reaches a registered output tap+2 cycles after it was on
// the wire (retiming chain of tap+1 registers, then the output register).
// COUT and F5 are combinational.  The set of parts and their wiring follows
// the slice figure of the architecture; which input of F5/F6 is selected by
// 0 or 1, which LUT inputs feed the carry logic, and the field encodings are
// this design's choices.
module sfra_slice
  import sfra_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  slice_cfg_t           cfg,
  input  logic [SLICE_IN-1:0]  in,        // from the input C-boxes
  input  logic                 cin,       // carry in from the slice below
  input  logic                 f5_other,  // F5 of the other slice of the CLB
  output logic                 cout,      // carry out to the slice above
  output logic                 f5,        // to F6 of the other slice
  output logic [SLICE_OUT-1:0] out_q      // registered X, Y, XB, YB
);

  logic [SLICE_IN-1:0] rin;  // retimed inputs

  for (genvar k = 0; k < SLICE_IN; k++) begin : g_rt
    retime_chain #(.DEPTH(RETIME_DEPTH)) u_rt (
      .clk, .rst_n, .d(in[k]), .tap(cfg.rt_delay[k]), .q(rin[k])
    );
  end

  logic f_lut, g_lut;
  lut4 u_flut (.table_bits(cfg.f.lut), .i(rin[IN_F4:IN_F1]), .o(f_lut));
  lut4 u_glut (.table_bits(cfg.g.lut), .i(rin[IN_G4:IN_G1]), .o(g_lut));

  logic bx, by;
  assign bx = rin[IN_BX] ^ cfg.bx_inv;
  assign by = rin[IN_BY] ^ cfg.by_inv;

  // carry-mux data input of one half
  function automatic logic carry_di(half_cfg_t h, logic a, logic b);
    unique case (h.di_sel)
      DI_ZERO: return 1'b0;
      DI_ONE:  return 1'b1;
      DI_OPA:  return a ^ h.inv_a;
      default: return (a ^ h.inv_a) & (b ^ h.inv_b);
    endcase
  endfunction

  logic c0, c1, f_sum, g_sum, f_sel, g_sel, f6;
  always_comb begin
    c0    = cfg.cin_bx ? bx : cin;
    f_sel = cfg.f.force_prop | f_lut;
    c1    = f_sel ? c0 : carry_di(cfg.f, rin[IN_F1], rin[IN_F2]);
    f_sum = f_lut ^ c0;
    g_sel = cfg.g.force_prop | g_lut;
    cout  = g_sel ? c1 : carry_di(cfg.g, rin[IN_G1], rin[IN_G2]);
    g_sum = g_lut ^ c1;
    f5    = bx ? f_lut : g_lut;
    f6    = by ? f5 : f5_other;
  end

  function automatic logic out_mux(out_sel_e s, logic lut, logic sum, logic wide);
    unique case (s)
      OSEL_LUT:  return lut;
      OSEL_SUM:  return sum;
      OSEL_WIDE: return wide;
      default:   return 1'b0;
    endcase
  endfunction

  logic [SLICE_OUT-1:0] out_d;
  always_comb begin
    out_d[OUT_X]  = out_mux(cfg.f.out_sel, f_lut, f_sum, f5);
    out_d[OUT_Y]  = out_mux(cfg.g.out_sel, g_lut, g_sum, f6);
    out_d[OUT_XB] = cfg.f.b_turn ? bx : c1;
    out_d[OUT_YB] = cfg.g.b_turn ? by : cout;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_q <= '0;
    else        out_q <= out_d;
  end

endmodule

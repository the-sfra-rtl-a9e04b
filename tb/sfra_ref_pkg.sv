// sfra_ref_pkg: reference model of the slice logic used by the testbenches.
// It is written from the slice description (truth-table LUTs, carry
// multiplexers, sum XORs, F5/F6 and the XB/YB taps) as plain arithmetic on
// the retimed input values, independently of the RTL structure.
package sfra_ref_pkg;
  import sfra_pkg::*;

  typedef struct packed {
    logic       cout;
    logic       f5;
    logic [3:0] out;   // X, Y, XB, YB before the output register
  } slice_res_t;

  // f5_other: the other slice's F5
  function automatic slice_res_t slice_model(slice_cfg_t c, logic [9:0] in, logic cin,
                                             logic f5_other);
    slice_res_t r;
    logic fl, gl, bx, by, c0, c1, c2, dif, dig, f5, f6;
    int fi, gi;
    fi = int'(in[3:0]);
    gi = int'(in[7:4]);
    fl = c.f.lut[fi];
    gl = c.g.lut[gi];
    bx = in[8] != c.bx_inv;
    by = in[9] != c.by_inv;
    c0 = c.cin_bx ? bx : cin;
    case (c.f.di_sel)
      DI_ZERO: dif = 0;
      DI_ONE:  dif = 1;
      DI_OPA:  dif = in[0] != c.f.inv_a;
      default: dif = (in[0] != c.f.inv_a) && (in[1] != c.f.inv_b);
    endcase
    case (c.g.di_sel)
      DI_ZERO: dig = 0;
      DI_ONE:  dig = 1;
      DI_OPA:  dig = in[4] != c.g.inv_a;
      default: dig = (in[4] != c.g.inv_a) && (in[5] != c.g.inv_b);
    endcase
    // carry mux: propagate when the LUT output (or force) is 1, else generate/kill with DI
    c1 = (c.f.force_prop || fl) ? c0 : dif;
    c2 = (c.g.force_prop || gl) ? c1 : dig;
    if (bx) f5 = fl; else f5 = gl;
    if (by) f6 = f5; else f6 = f5_other;
    r.cout = c2;
    r.f5   = f5;
    case (c.f.out_sel)
      OSEL_LUT:  r.out[0] = fl;
      OSEL_SUM:  r.out[0] = fl != c0;
      OSEL_WIDE: r.out[0] = f5;
      default:   r.out[0] = 0;
    endcase
    case (c.g.out_sel)
      OSEL_LUT:  r.out[1] = gl;
      OSEL_SUM:  r.out[1] = gl != c1;
      OSEL_WIDE: r.out[1] = f6;
      default:   r.out[1] = 0;
    endcase
    r.out[2] = c.f.b_turn ? bx : c1;
    r.out[3] = c.g.b_turn ? by : c2;
    return r;
  endfunction

  function automatic slice_cfg_t random_slice_cfg(int tap);
    slice_cfg_t c;
    c = slice_cfg_t'({$urandom, $urandom, $urandom, $urandom});
    for (int k = 0; k < SLICE_IN; k++) c.rt_delay[k] = RT_W'(tap);
    return c;
  endfunction
endpackage

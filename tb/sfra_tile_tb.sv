// sfra_tile_tb: one tile at (4, 2), configured over its configuration port.
// Random bit streams run through four configured paths at once, each
// checked with its exact latency:
//   A  H wire 1 AND V wire 2 (F LUT of slice 0) -> X -> H wire 3*5+1
//      (latency 2: retiming chain, output register)
//   B  H wire 7 -> T-box H-to-V turn 0 -> V wire 3*9+2 (latency 1)
//   C  V wire 10 -> BX of slice 1 -> XB turn -> H wire 3*12+2 crossing the
//      tile's west break (bwd direction enabled) (latency 2)
//   D  carry in -> both halves forced to propagate -> carry out (comb.)
// Finally a contradictory configuration must raise cfg_err.
module sfra_tile_tb;
  import sfra_pkg::*;
  localparam int X = 4, Y = 2;
  logic clk = 1'b0, rst_n = 1'b0, cfg_we = 1'b0;
  logic [COORD_W-1:0] cfg_x = '0, cfg_y = '0;
  logic [CFG_WADDR_W-1:0] cfg_word = '0;
  logic [CFG_WORD_W-1:0] cfg_data = '0;
  logic [CHAN_W-1:0] h_fwd_in = '0, h_bwd_in = '0, v_fwd_in = '0, v_bwd_in = '0;
  logic [CHAN_W-1:0] h_fwd_out, h_bwd_out, v_fwd_out, v_bwd_out;
  logic [1:0] cin = '0, cout;
  logic cfg_err;
  int checks = 0, failures = 0;

  sfra_tile #(.X(X), .Y(Y)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(tile_cfg_t c);
    logic [CFG_WORDS*CFG_WORD_W-1:0] flat;
    flat = '0;
    flat[TILE_CFG_BITS-1:0] = c;
    for (int i = 0; i < CFG_WORDS; i++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_x = COORD_W'(X); cfg_y = COORD_W'(Y);
      cfg_word = CFG_WADDR_W'(i); cfg_data = flat[i*CFG_WORD_W +: CFG_WORD_W];
    end
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("%s: got %b expected %b", what, got, exp);
    end
  endtask

  localparam int WA = 1, WB = 2, WO_A = 3*5 + 1;
  localparam int WT = 7, WO_B = 3*9 + 2;
  localparam int WC = 10, WO_C = 3*12 + 2;

  initial begin
    tile_cfg_t c;
    logic [7:0] ha, hb, ht, hc;   // input histories, bit k = value k cycles ago
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // break positions used below must hold: wires 1, 2, 7 and 10 unbroken
    // at position 4/2, wire 38 broken (buffer) at position 4.
    c = '0;
    // path A
    c.in_sel[IN_F1] = ISEL_W'(WA);
    c.in_sel[IN_F2] = ISEL_W'(CHAN_W + WB);
    c.slice[0].f.lut = 16'h8888;            // in1 AND in2
    c.slice[0].f.out_sel = OSEL_LUT;
    c.ob_h.src_en[OUT_X][5] = 1'b1;
    c.ob_h.wire_en[5] = 3'b010;
    // path B
    c.turn_hsel[0] = TSEL_W'(WT);
    c.ob_v.src_en[CLB_OUT + 0][9] = 1'b1;
    c.ob_v.wire_en[9] = 3'b100;
    // path C
    c.in_sel[SLICE_IN + IN_BX] = ISEL_W'(CHAN_W + WC);
    c.slice[1].f.b_turn = 1'b1;
    c.ob_h.src_en[SLICE_OUT + OUT_XB][12] = 1'b1;
    c.ob_h.wire_en[12] = 3'b100;
    c.brk_h[WO_C / 3].bwd = 1'b1;
    // path D
    c.slice[0].f.force_prop = 1'b1;
    c.slice[0].g.force_prop = 1'b1;
    c.in_sel[IN_G1] = ISEL_W'(255);         // unused inputs read 0
    load(c);
    checks++;
    if (cfg_err !== 1'b0) begin failures++; $display("cfg_err on a legal configuration"); end

    ha = '0; hb = '0; ht = '0; hc = '0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      if (t > 4) begin
        check("path A", h_fwd_out[WO_A], ha[1] & hb[1]);
        check("path B", v_fwd_out[WO_B], ht[0]);
        check("path C", h_bwd_out[WO_C], hc[1]);
      end
      h_fwd_in = '0; v_fwd_in = '0; v_bwd_in = '0; h_bwd_in = '0;
      h_fwd_in[WA] = $urandom_range(1);
      v_fwd_in[WB] = $urandom_range(1);
      h_fwd_in[WT] = $urandom_range(1);
      v_bwd_in[WC] = $urandom_range(1);
      cin[0] = $urandom_range(1);
      #1;
      check("path D", cout[0], cin[0]);
      @(posedge clk);
      ha = {ha[6:0], h_fwd_in[WA]};
      hb = {hb[6:0], v_fwd_in[WB]};
      ht = {ht[6:0], h_fwd_in[WT]};
      hc = {hc[6:0], v_bwd_in[WC]};
    end

    // contradictory configuration: two drivers on one intermediate wire
    c.ob_h.src_en[OUT_Y][5] = 1'b1;
    load(c);
    checks++;
    if (cfg_err !== 1'b1) begin failures++; $display("contention not reported"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

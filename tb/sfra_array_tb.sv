// sfra_array_tb: end-to-end test of the SFRA array at 5 x 5 tiles (the
// full 12 x 12 default takes too long to compile for simulation), configured
// entirely through its configuration port.  Three user circuits run at once
// on random data:
//   P1  west edge, row 1, wire 6 -> H channel east to tile (3,1) through a
//       buffer break and a register break -> F1 with a 4-cycle retiming
//       chain -> LUT -> registered X -> V channel north, wire 31 -> tile
//       (3,4) T-box V-to-H turn -> H channel east, wire 62 -> east edge.
//   P2  south edge, column 4, wire 6 -> north to tile (4,3) -> BX ->
//       registered XB (a slice turn) -> H channel row 3, wire 95, westward
//       (bwd breaks, one of them a register) -> west edge.
//   P3  carry chain of column 2, slice 0, all rows set to propagate: carry
//       in at the bottom must reach the top after the carry register after
//       row 3; then one half is switched to generate and the top must read 1.
// The expected latency of each path is computed here from the break rule
// (register where (position + wire) mod 9 = 0) and compared cycle-exactly.
// Each mechanism (buffer break, register break, T-box turn, slice turn,
// retiming delay, carry register, carry generate, contention flag) is
// counted and must occur at least once.
module sfra_array_tb;
  import sfra_pkg::*;
  localparam int ROWS = 5, COLS = 5;
  logic clk = 1'b0, rst_n = 1'b0, cfg_we = 1'b0;
  logic [COORD_W-1:0] cfg_x = '0, cfg_y = '0;
  logic [CFG_WADDR_W-1:0] cfg_word = '0;
  logic [CFG_WORD_W-1:0] cfg_data = '0;
  logic [ROWS-1:0][CHAN_W-1:0] h_west_in = '0, h_east_in = '0, h_west_out, h_east_out;
  logic [COLS-1:0][CHAN_W-1:0] v_south_in = '0, v_north_in = '0, v_south_out, v_north_out;
  logic [COLS-1:0][1:0] carry_in = '0, carry_out;
  logic cfg_err;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_bufbrk = 0, n_regbrk = 0, n_tturn = 0, n_sturn = 0, n_retime = 0;
  int n_creg = 0, n_cgen = 0, n_cont = 0;

  sfra_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tile_cfg_t cfgs [ROWS][COLS];
  bit        dirty[ROWS][COLS];

  task automatic load_dirty();
    logic [CFG_WORDS*CFG_WORD_W-1:0] flat;
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++)
        if (dirty[y][x]) begin
          flat = '0;
          flat[TILE_CFG_BITS-1:0] = cfgs[y][x];
          for (int i = 0; i < CFG_WORDS; i++) begin
            @(negedge clk);
            cfg_we = 1'b1; cfg_x = COORD_W'(x); cfg_y = COORD_W'(y);
            cfg_word = CFG_WADDR_W'(i); cfg_data = flat[i*CFG_WORD_W +: CFG_WORD_W];
          end
          dirty[y][x] = 0;
        end
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // enable breaks of wire w at boundaries p = p0..p1 (either order);
  // returns the number of register breaks crossed
  function automatic int route(bit horiz, bit fwd, int line, int w, int p0, int p1);
    int regs = 0, lo, hi;
    lo = (p0 < p1) ? p0 : p1;
    hi = (p0 < p1) ? p1 : p0;
    for (int p = lo; p <= hi; p++) begin
      if ((p + w) % 3 == 0) begin
        int yy, xx;
        yy = horiz ? line : p;
        xx = horiz ? p : line;
        if (horiz) begin
          if (fwd) cfgs[yy][xx].brk_h[w/3].fwd = 1'b1; else cfgs[yy][xx].brk_h[w/3].bwd = 1'b1;
        end else begin
          if (fwd) cfgs[yy][xx].brk_v[w/3].fwd = 1'b1; else cfgs[yy][xx].brk_v[w/3].bwd = 1'b1;
        end
        dirty[yy][xx] = 1;
        if ((p + w) % 9 == 0) begin regs++; n_regbrk++; end
        else n_bufbrk++;
      end
    end
    return regs;
  endfunction

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("%s: got %b expected %b", what, got, exp);
    end
  endtask

  localparam int WA = 6, TAP_A = 3, RB = 10, KB = 1, RC = 20, KC = 2;
  localparam int WB = 3*RB + KB, WC = 3*RC + KC;
  localparam int WD = 6, RE = 31, KE = 2, WE = 3*RE + KE;

  initial begin
    int l1, l2, r;
    logic [63:0] h1, h2, hc;   // input histories, bit k = value k+1 edges ago
    bit seen1_0, seen1_1, seen2_1;
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++) begin cfgs[y][x] = '0; dirty[y][x] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // ---- P1 ----
    l1 = route(1, 1, 1, WA, 0, 3);
    cfgs[1][3].slice[0].f.lut = 16'hAAAA;                  // X = F1
    cfgs[1][3].in_sel[IN_F1] = ISEL_W'(WA);
    cfgs[1][3].slice[0].rt_delay[IN_F1] = RT_W'(TAP_A);
    cfgs[1][3].ob_v.src_en[OUT_X][RB] = 1'b1;
    cfgs[1][3].ob_v.wire_en[RB][KB] = 1'b1;
    dirty[1][3] = 1; n_retime++;
    l1 += TAP_A + 1 + 1;
    l1 += route(0, 1, 3, WB, 2, 4);
    cfgs[4][3].turn_vsel[0] = TSEL_W'(WB);
    cfgs[4][3].ob_h.src_en[CLB_OUT + 0][RC] = 1'b1;
    cfgs[4][3].ob_h.wire_en[RC][KC] = 1'b1;
    dirty[4][3] = 1; n_tturn++;
    l1 += 1;
    l1 += route(1, 1, 4, WC, 4, COLS-1);

    // ---- P2 ----
    l2 = route(0, 1, 4, WD, 0, 3);
    cfgs[3][4].in_sel[IN_BX] = ISEL_W'(CHAN_W + WD);
    cfgs[3][4].slice[0].f.b_turn = 1'b1;
    cfgs[3][4].ob_h.src_en[OUT_XB][RE] = 1'b1;
    cfgs[3][4].ob_h.wire_en[RE][KE] = 1'b1;
    dirty[3][4] = 1; n_sturn++;
    l2 += 1 + 1;
    l2 += route(1, 0, 3, WE, 4, 0);

    // ---- P3 ----
    for (int y = 0; y < ROWS; y++) begin
      cfgs[y][2].slice[0].f.force_prop = 1'b1;
      cfgs[y][2].slice[0].g.force_prop = 1'b1;
      dirty[y][2] = 1;
    end

    load_dirty();
    $display("path latencies: P1 %0d cycles, P2 %0d cycles, P3 %0d cycles", l1, l2, ROWS / 4);
    checks++;
    if (cfg_err !== 1'b0) begin failures++; $display("cfg_err on a legal configuration"); end

    h1 = '0; h2 = '0; hc = '0;
    seen1_0 = 0; seen1_1 = 0; seen2_1 = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if (t > 40) begin
        check("P1", h_east_out[4][WC], h1[l1-1]);
        check("P2", h_west_out[3][WE], h2[l2-1]);
        if (h1[l1-1]) seen1_1 = 1; else seen1_0 = 1;
        if (h2[l2-1]) seen2_1 = 1;
      end
      h_west_in[1][WA]  = $urandom_range(1);
      v_south_in[4][WD] = $urandom_range(1);
      carry_in[2][0]    = $urandom_range(1);
      #1;
      // the carry path is combinational apart from its registers, so the
      // output is checked after the new carry-in has been applied
      if (t > 40) check("P3", carry_out[2][0], (ROWS / 4 == 0) ? carry_in[2][0] : hc[ROWS/4 - 1]);
      @(posedge clk);
      h1 = {h1[62:0], h_west_in[1][WA]};
      h2 = {h2[62:0], v_south_in[4][WD]};
      hc = {hc[62:0], carry_in[2][0]};
    end
    if (seen1_0 && seen1_1 && seen2_1) n_creg += ROWS / 4;

    // ---- P3, generate: tile (2,1) F half kills propagation and generates 1 ----
    cfgs[1][2].slice[0].f.force_prop = 1'b0;
    cfgs[1][2].slice[0].f.lut = 16'h0000;
    cfgs[1][2].slice[0].f.di_sel = DI_ONE;
    dirty[1][2] = 1;
    load_dirty();
    r = 0;
    for (int t = 0; t < 50; t++) begin
      @(negedge clk);
      carry_in[2][0] = $urandom_range(1);
      if (t > 5) begin
        check("P3 generate", carry_out[2][0], 1'b1);
        r++;
      end
    end
    if (r > 0) n_cgen++;

    // ---- contradictory configuration must be flagged ----
    cfgs[3][4].ob_h.src_en[OUT_X][RE] = 1'b1;
    dirty[3][4] = 1;
    load_dirty();
    checks++;
    if (cfg_err !== 1'b1) begin failures++; $display("contention not reported"); end
    else n_cont++;

    $display("mechanisms: buffer breaks %0d, register breaks %0d, T-box turns %0d, slice turns %0d,",
             n_bufbrk, n_regbrk, n_tturn, n_sturn);
    $display("            retiming delays %0d, carry registers %0d, carry generates %0d, contention %0d",
             n_retime, n_creg, n_cgen, n_cont);
    if (n_bufbrk == 0 || n_regbrk == 0 || n_tturn == 0 || n_sturn == 0 || n_retime == 0 ||
        n_creg == 0 || n_cgen == 0 || n_cont == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// sfra_clb_tb: self-checking test of the two-slice CLB.  Random
// configurations and inputs for both slices are compared with the slice
// reference model, with each slice's F6 fed by the other slice's F5 and
// each slice on its own carry chain.  A directed check builds a 4:1
// multiplexer from F5/F6 across both slices.
module sfra_clb_tb;
  import sfra_pkg::*;
  import sfra_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  slice_cfg_t [1:0] cfg;
  logic [CLB_IN-1:0] in;
  logic [1:0] cin, cout;
  logic [CLB_OUT-1:0] out;
  int checks = 0, failures = 0;

  sfra_clb dut (.clk, .rst_n, .cfg, .in, .cin, .cout, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  // both slices, two passes so each sees the other's F5
  function automatic logic [11:0] clb_model(slice_cfg_t [1:0] c, logic [19:0] i, logic [1:0] ci);
    slice_res_t p0, p1, r0, r1;
    p0 = slice_model(c[0], i[9:0], ci[0], 1'b0);
    p1 = slice_model(c[1], i[19:10], ci[1], 1'b0);
    r0 = slice_model(c[0], i[9:0], ci[0], p1.f5);
    r1 = slice_model(c[1], i[19:10], ci[1], p0.f5);
    return {r1.cout, r0.cout, 2'b00, r1.out, r0.out};
  endfunction

  initial begin
    logic [11:0] e;
    cfg = '0; in = '0; cin = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      cfg[0] = random_slice_cfg(0);
      cfg[1] = random_slice_cfg(0);
      in = CLB_IN'($urandom);
      cin = 2'($urandom);
      @(negedge clk);
      e = clb_model(cfg, in, cin);
      check("cout", 32'(cout), 32'(e[11:10]));
      @(negedge clk);
      check("out", 32'(out), 32'(e[7:0]));
    end
    // 4:1 mux: d0..d3 on F1 of s0, G1 of s0, F1 of s1, G1 of s1;
    // select bits: BX of both slices (F5), BY of slice 0 (F6) -> slice 0 Y
    @(negedge clk);
    cfg = '0;
    for (int s = 0; s < 2; s++) begin
      cfg[s].f.lut = 16'hAAAA;   // = in1
      cfg[s].g.lut = 16'hAAAA;
    end
    cfg[0].g.out_sel = OSEL_WIDE;
    for (int t = 0; t < 64; t++) begin
      logic [3:0] d;
      logic [1:0] sel;
      logic exp_y;
      d = 4'($urandom); sel = 2'($urandom);
      in = '0;
      in[IN_F1] = d[0]; in[IN_G1] = d[1];
      in[SLICE_IN + IN_F1] = d[2]; in[SLICE_IN + IN_G1] = d[3];
      in[IN_BX] = sel[0]; in[SLICE_IN + IN_BX] = sel[0];
      in[IN_BY] = sel[1];
      // F5 = BX ? F : G ; F6 = BY ? own F5 : other F5
      exp_y = sel[1] ? (sel[0] ? d[0] : d[1]) : (sel[0] ? d[2] : d[3]);
      repeat (2) @(negedge clk);
      check("F6 mux", 32'(out[OUT_Y]), 32'(exp_y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

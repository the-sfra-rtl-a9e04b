// sfra_slice_tb: self-checking test of one slice.
//  1. Random configurations and inputs against the reference model.  For
//     each configuration vector A is held, then vector B applied; the
//     registered outputs must still show A's result tap+1 clocks later and
//     B's result exactly tap+2 clocks later (retiming chain plus output
//     register).  COUT and F5 must follow B after tap+1 clocks.
//  2. A directed 2-bit ripple-carry adder (LUT = XOR, carry DI = first
//     operand, X/Y = sum, YB = carry out) checked against integer addition.
module sfra_slice_tb;
  import sfra_pkg::*;
  import sfra_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  slice_cfg_t cfg;
  logic [SLICE_IN-1:0] in;
  logic cin, f5_other, cout, f5;
  logic [SLICE_OUT-1:0] out_q;
  int checks = 0, failures = 0;

  sfra_slice dut (.clk, .rst_n, .cfg, .in, .cin, .f5_other, .cout, .f5, .out_q);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  initial begin
    slice_res_t ra, rb;
    logic [SLICE_IN-1:0] va, vb;
    int tap;
    cfg = '0; in = '0; cin = 0; f5_other = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // ---- 1. random configurations ----
    for (int t = 0; t < 300; t++) begin
      tap = $urandom_range(RETIME_DEPTH-1);
      @(negedge clk);
      cfg = random_slice_cfg(tap);
      cin = $urandom_range(1); f5_other = $urandom_range(1);
      va = SLICE_IN'($urandom); vb = SLICE_IN'($urandom);
      in = va;
      repeat (tap + 3) @(negedge clk);
      ra = slice_model(cfg, va, cin, f5_other);
      check("steady out", 32'(out_q), 32'(ra.out));
      in = vb;
      rb = slice_model(cfg, vb, cin, f5_other);
      for (int k = 1; k <= tap + 2; k++) begin
        @(negedge clk);
        if (k <= tap + 1) check("out before latency", 32'(out_q), 32'(ra.out));
        if (k == tap + 1) begin
          check("cout", 32'(cout), 32'(rb.cout));
          check("f5", 32'(f5), 32'(rb.f5));
        end
        if (k == tap + 2) check("out at latency", 32'(out_q), 32'(rb.out));
      end
    end

    // ---- 2. directed 2-bit adder ----
    @(negedge clk);
    cfg = '0;
    cfg.f.lut = 16'h6666; cfg.g.lut = 16'h6666;      // in1 XOR in2
    cfg.f.di_sel = DI_OPA; cfg.g.di_sel = DI_OPA;
    cfg.f.out_sel = OSEL_SUM; cfg.g.out_sel = OSEL_SUM;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        for (int c = 0; c < 2; c++) begin
          int s;
          in = '0;
          in[IN_F1] = a[0]; in[IN_F2] = b[0];
          in[IN_G1] = a[1]; in[IN_G2] = b[1];
          cin = c[0];
          repeat (3) @(negedge clk);
          s = a + b + c;
          check("adder sum/carry", {29'd0, out_q[OUT_YB], out_q[OUT_Y], out_q[OUT_X]}, 32'(s));
        end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

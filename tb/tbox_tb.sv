// tbox_tb: random channel values and random turn selections; each turn
// output must show, one clock later, the selected wire of its source
// channel (horizontal for the turns into the vertical channel and vice
// versa).  Out-of-range selections read 0.
module tbox_tb;
  import sfra_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [CHAN_W-1:0] h_wire, v_wire;
  logic [TURNS-1:0][TSEL_W-1:0] hsel, vsel;
  logic [TURNS-1:0] to_v, to_h, exp_v, exp_h;
  int checks = 0, failures = 0;

  tbox dut (.clk, .rst_n, .h_wire, .v_wire, .hsel, .vsel, .to_v, .to_h);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic pick(logic [CHAN_W-1:0] w, int s);
    return (s < CHAN_W) ? w[s] : 1'b0;
  endfunction

  initial begin
    h_wire = '0; v_wire = '0; hsel = '0; vsel = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      h_wire = {$urandom, $urandom, $urandom, $urandom};
      v_wire = {$urandom, $urandom, $urandom, $urandom};
      for (int k = 0; k < TURNS; k++) begin
        hsel[k] = TSEL_W'($urandom_range(127));
        vsel[k] = TSEL_W'($urandom_range(127));
        exp_v[k] = pick(h_wire, int'(hsel[k]));
        exp_h[k] = pick(v_wire, int'(vsel[k]));
      end
      @(negedge clk);
      checks++;
      if (to_v !== exp_v || to_h !== exp_h) begin
        failures++;
        if (failures < 10) $display("t=%0d to_v=%b exp %b to_h=%b exp %b", t, to_v, exp_v, to_h, exp_h);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// input_cbox_tb: random channel values and random selections for all 20
// inputs; selection v < 120 must read horizontal wire v, 120 <= v < 240
// vertical wire v-120, larger values 0.
module input_cbox_tb;
  import sfra_pkg::*;
  logic [CHAN_W-1:0] h_wire, v_wire;
  logic [CLB_IN-1:0][ISEL_W-1:0] sel;
  logic [CLB_IN-1:0] in;
  int checks = 0, failures = 0;

  input_cbox #(.N_IN(CLB_IN)) dut (.h_wire, .v_wire, .sel, .in);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      h_wire = {$urandom, $urandom, $urandom, $urandom};
      v_wire = {$urandom, $urandom, $urandom, $urandom};
      for (int k = 0; k < CLB_IN; k++) sel[k] = ISEL_W'($urandom_range(255));
      #1;
      for (int k = 0; k < CLB_IN; k++) begin
        int s;
        logic e;
        s = int'(sel[k]);
        if (s < 120)      e = h_wire[s];
        else if (s < 240) e = v_wire[s - 120];
        else              e = 1'b0;
        checks++;
        if (in[k] !== e) begin
          failures++;
          if (failures < 10) $display("input %0d sel %0d: %b expected %b", k, s, in[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

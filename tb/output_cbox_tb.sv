// output_cbox_tb: random sparse configurations of the two-level output
// network.  The expected channel value is built wire by wire: wire w belongs
// to intermediate row w/3 and is driven when that row's tristate k = w mod 3
// is on; the row carries the OR of the sources enabled onto it.  contention
// must be set exactly when some row has two enabled sources.
module output_cbox_tb;
  import sfra_pkg::*;
  ocbox_cfg_t cfg;
  logic [OSRC-1:0] src;
  logic [CHAN_W-1:0] drive, exp_drive;
  logic contention, exp_cont;
  int checks = 0, failures = 0;
  int n_cont = 0;

  output_cbox dut (.cfg, .src, .drive, .contention);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      cfg = '0;
      // each source enables a few random rows
      for (int s = 0; s < OSRC; s++)
        for (int n = 0; n < 3; n++)
          if ($urandom_range(3) == 0) cfg.src_en[s][$urandom_range(OROWS-1)] = 1'b1;
      for (int r = 0; r < OROWS; r++) cfg.wire_en[r] = 3'($urandom);
      src = OSRC'($urandom);
      #1;
      exp_cont = 1'b0;
      for (int w = 0; w < CHAN_W; w++) begin
        int r, k, cnt;
        logic v;
        r = w / 3; k = w % 3; cnt = 0; v = 1'b0;
        for (int s = 0; s < OSRC; s++)
          if (cfg.src_en[s][r]) begin cnt++; v = v | src[s]; end
        exp_drive[w] = v & cfg.wire_en[r][k];
        if (cnt > 1) exp_cont = 1'b1;
      end
      if (exp_cont) n_cont++;
      checks++;
      if (drive !== exp_drive || contention !== exp_cont) begin
        failures++;
        if (failures < 10) $display("t=%0d drive mismatch %h vs %h cont %b/%b", t, drive, exp_drive, contention, exp_cont);
      end
    end
    if (n_cont == 0) begin failures++; $display("contention never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

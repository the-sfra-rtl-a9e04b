// chan_seg_tb: one channel segment at position 4 with random local drive,
// random neighbour values and random break directions every cycle.  The
// expected values are computed wire by wire from the break rule: wire w is
// broken at this boundary when (4 + w) mod 3 = 0 and registered when
// (4 + w) mod 9 = 0; registered breaks must show last cycle's value.  The
// test counts how often each break kind actually passed a 1.
module chan_seg_tb;
  import sfra_pkg::*;
  localparam int POS = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  brk_cfg_t [NBRK-1:0] brk;
  logic [CHAN_W-1:0] drive, fwd_in, bwd_in, fwd_out, bwd_out, val;
  logic dir_err;
  logic [CHAN_W-1:0] fwd_prev, bwdseg_prev;
  int checks = 0, failures = 0;
  int n_buf = 0, n_reg = 0, n_thru = 0;

  chan_seg #(.POS(POS)) dut (.clk, .rst_n, .brk, .drive, .fwd_in, .bwd_in,
    .fwd_out, .bwd_out, .val, .dir_err);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    brk = '0; drive = '0; fwd_in = '0; bwd_in = '0;
    fwd_prev = '0; bwdseg_prev = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      logic exp_err;
      @(negedge clk);
      // sparse local drive, dense neighbour traffic
      drive  = {$urandom, $urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom, $urandom};
      fwd_in = {$urandom, $urandom, $urandom, $urandom};
      bwd_in = {$urandom, $urandom, $urandom, $urandom};
      exp_err = 1'b0;
      for (int j = 0; j < NBRK; j++) begin
        brk[j] = 2'($urandom);
        if (t % 50 != 7 && brk[j] == 2'b11) brk[j] = 2'b10;
        if (brk[j] == 2'b11) exp_err = 1'b1;
      end
      #1;
      for (int w = 0; w < CHAN_W; w++) begin
        logic b, r, lo, bo, bseg;
        b = ((POS + w) % 3) == 0;
        r = ((POS + w) % 9) == 0;
        bseg = drive[w] | bwd_in[w];
        if (!b) begin
          lo = fwd_in[w]; bo = bseg;
          if (fwd_in[w]) n_thru++;
        end else if (!r) begin
          lo = brk[w/3].fwd & fwd_in[w]; bo = brk[w/3].bwd & bseg;
          if (lo || bo) n_buf++;
        end else begin
          lo = brk[w/3].fwd & fwd_prev[w]; bo = brk[w/3].bwd & bwdseg_prev[w];
          if (lo || bo) n_reg++;
        end
        checks++;
        if (fwd_out[w] !== (drive[w] | lo) || bwd_out[w] !== bo ||
            val[w] !== (drive[w] | lo | bwd_in[w])) begin
          failures++;
          if (failures < 10) $display("t=%0d wire %0d: fwd %b bwd %b val %b", t, w, fwd_out[w], bwd_out[w], val[w]);
        end
      end
      checks++;
      if (dir_err !== exp_err) begin failures++; $display("t=%0d dir_err %b", t, dir_err); end
      @(posedge clk);
      fwd_prev    = fwd_in;
      bwdseg_prev = drive | bwd_in;
    end
    if (n_buf == 0 || n_reg == 0 || n_thru == 0) begin
      failures++;
      $display("a break kind was never exercised: buf %0d reg %0d through %0d", n_buf, n_reg, n_thru);
    end
    $display("breaks exercised: buffer %0d register %0d unbroken %0d", n_buf, n_reg, n_thru);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

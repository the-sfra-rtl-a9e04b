// tile_config_tb: writes random words to the tile's own address and to
// neighbouring addresses; only writes addressed to (X, Y) may change the
// stored bits, which are checked against a shadow copy after every write.
module tile_config_tb;
  import sfra_pkg::*;
  localparam int X = 3, Y = 5;
  localparam int BITS = TILE_CFG_BITS;
  logic clk = 1'b0, rst_n = 1'b0, cfg_we = 1'b0;
  logic [COORD_W-1:0] cfg_x = '0, cfg_y = '0;
  logic [CFG_WADDR_W-1:0] cfg_word = '0;
  logic [CFG_WORD_W-1:0] cfg_data = '0;
  logic [BITS-1:0] bits;
  logic [CFG_WORDS*CFG_WORD_W-1:0] shadow = '0;
  int checks = 0, failures = 0;

  tile_config #(.X(X), .Y(Y), .BITS(BITS)) dut (.clk, .rst_n, .cfg_we, .cfg_x, .cfg_y,
    .cfg_word, .cfg_data, .bits);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (bits !== '0) begin failures++; $display("not cleared by reset"); end
    for (int t = 0; t < 600; t++) begin
      int wx, wy, ww;
      wx = X + $urandom_range(2) - 1;
      wy = Y + $urandom_range(2) - 1;
      ww = $urandom_range(CFG_WORDS - 1);
      cfg_we   = ($urandom_range(7) != 0);
      cfg_x    = COORD_W'(wx);
      cfg_y    = COORD_W'(wy);
      cfg_word = CFG_WADDR_W'(ww);
      cfg_data = $urandom;
      if (cfg_we && wx == X && wy == Y) shadow[ww*CFG_WORD_W +: CFG_WORD_W] = cfg_data;
      @(negedge clk);
      checks++;
      if (bits !== shadow[BITS-1:0]) begin
        failures++;
        if (failures < 10) $display("t=%0d mismatch after write (%0d,%0d) word %0d", t, wx, wy, ww);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

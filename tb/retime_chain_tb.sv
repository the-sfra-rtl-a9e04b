// retime_chain_tb: self-checking test of the programmable-delay input chain.
// A random bit stream is applied while the tap changes every 40 cycles; the
// output must equal the input of tap+1 cycles earlier (the first DEPTH
// cycles after a reset are skipped, since the chain then holds zeros).
module retime_chain_tb;
  localparam int DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0, q;
  logic [$clog2(DEPTH)-1:0] tap = '0;
  logic [63:0] hist = '0;   // hist[k] = d sampled k+1 edges ago
  int checks = 0, failures = 0;

  retime_chain #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .d, .tap, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 800; cyc++) begin
      @(negedge clk);
      if (cyc >= DEPTH) begin
        checks++;
        if (q !== hist[tap]) begin
          failures++;
          if (failures < 10) $display("cycle %0d tap %0d: q=%b expected %b", cyc, tap, q, hist[tap]);
        end
      end
      if (cyc % 40 == 39) tap = $urandom_range(DEPTH-1);
      d = $urandom_range(1);
      @(posedge clk);
      hist = {hist[62:0], d};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

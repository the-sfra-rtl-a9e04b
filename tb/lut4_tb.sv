// lut4_tb: random truth tables, every input combination, compared with the
// table bit addressed by the inputs (computed here from the inputs' weights).
module lut4_tb;
  logic [15:0] table_bits;
  logic [3:0]  i;
  logic        o;
  int checks = 0, failures = 0;

  lut4 dut (.table_bits, .i, .o);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 64; t++) begin
      table_bits = 16'($urandom);
      for (int v = 0; v < 16; v++) begin
        int idx;
        i = 4'(v);
        #1;
        idx = 1 * i[0] + 2 * i[1] + 4 * i[2] + 8 * i[3];
        checks++;
        if (o !== table_bits[idx]) begin
          failures++;
          $display("table %h inputs %b: o=%b", table_bits, i, o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// lut4: 4-input look-up table, the logic element of each half slice.
//
// The 16 configuration bits are the truth table: the output is bit
// {i4,i3,i2,i1} of the table.  Purely combinational.
module lut4 (
  input  logic [15:0] table_bits,
  input  logic [3:0]  i,       // i[0] = input 1 ... i[3] = input 4
  output logic        o
);

  assign o = table_bits[i];

endmodule

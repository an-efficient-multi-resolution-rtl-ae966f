// bw_mult: Baugh-Wooley signed array multiplier, p = a * b (two's complement).
//
// Every partial-product bit a[i]&b[j] sits in column i+j. The bits that pair
// exactly one sign bit with a non-sign bit are inverted, the sign-by-sign bit
// is kept, a constant 1 is added in column WA-1 and in column WB-1 (for the
// 8x8 default these merge into the single 1 of column 8), and the top bit of
// the sum is inverted. All rows are then added without any sign extension.
// This is the 8x8 matrix of the source design's Baugh-Wooley figure, taken
// as a whole 8x8 array; the sub-array split it also shades is not built.
//
// Purely combinational; widths are parameters (default 8x8, 16-bit product).
module bw_mult #(
  parameter int WA = 8,
  parameter int WB = 8
) (
  input  logic [WA-1:0]     a,
  input  logic [WB-1:0]     b,
  output logic [WA+WB-1:0]  p
);

  localparam int PW = WA + WB;

  logic [WB-1:0][PW-1:0] rows;
  logic [PW-1:0]         sum;

  always_comb begin
    for (int j = 0; j < WB; j++) begin
      rows[j] = '0;
      for (int i = 0; i < WA; i++)
        rows[j][i+j] = (a[i] & b[j]) ^ ((i == WA - 1) != (j == WB - 1));
    end
    sum = (PW'(1) << (WA - 1)) + (PW'(1) << (WB - 1));
    for (int j = 0; j < WB; j++) sum = sum + rows[j];
    p = {~sum[PW-1], sum[PW-2:0]};
  end

endmodule

// abp_mul4x4_masked: 4x4 combinational array multiplier modified for
// arbitrary bit packing.
//
// Every bit product a[i]*b[j] is formed by a 3-input AND whose third input
// is the mask array element m[i][j]; a product whose two bits belong to
// different sub-datatypes is thereby killed before it enters the adder
// array. The adder array is the usual carry-save arrangement of twelve full
// adders: three rows of three that fold in one b-bit each (sum passed down
// the same column, carry passed to the next column of the next row), then a
// three-adder ripple row that resolves the remaining carries. Outputs p[0]
// to p[7] have weights 2^0 to 2^7.
//
// The 3-input AND gates with their M_ij inputs, the twelve full adders, the
// constant-zero carry inputs of the first row and of the ripple row and the
// output weights follow the published circuit of the modified multiplier;
// the adder cell itself is an ordinary full adder.
//
// Interface: a, b are the 4-bit pieces, m[i][j] enables a[i]*b[j].
// Timing: combinational, no clock.
module abp_mul4x4_masked (
  input  logic [3:0]      a,
  input  logic [3:0]      b,
  input  logic [3:0][3:0] m,   // m[i][j]: bit product a[i]*b[j] is valid
  output logic [7:0]      p
);

  // Masked bit products: pp[i][j] = a_i & b_j & M_ij.
  logic [3:0][3:0] pp;
  always_comb begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        pp[i][j] = a[i] & b[j] & m[i][j];
  end

  // Carry-save rows. Row r (r = 1..3) adds in b[r]; its adders sit in
  // columns r .. r+2. s_r[k] / c_r[k] are sum and carry of the adder in
  // column r+k.
  logic [2:0] s1, c1, s2, c2, s3, c3;
  logic [2:0] sf, cf;

  // Row 1: a[k+1]b0 + a[k]b1 + 0
  for (genvar k = 0; k < 3; k++) begin : g_row1
    abp_full_adder u_fa (.a(pp[k+1][0]), .b(pp[k][1]), .ci(1'b0),
                         .s(s1[k]), .co(c1[k]));
  end

  // Row 2: column k+2. Upper input is the row-1 sum of the same column,
  // or a3b1 in the top column; the carry comes from row 1, one column right.
  for (genvar k = 0; k < 3; k++) begin : g_row2
    logic upper;
    if (k < 2) begin : g_mid
      assign upper = s1[k+1];
    end else begin : g_top
      assign upper = pp[3][1];
    end
    abp_full_adder u_fa (.a(upper), .b(pp[k][2]), .ci(c1[k]),
                         .s(s2[k]), .co(c2[k]));
  end

  // Row 3: column k+3, upper input from row 2 or a3b2 in the top column.
  for (genvar k = 0; k < 3; k++) begin : g_row3
    logic upper;
    if (k < 2) begin : g_mid
      assign upper = s2[k+1];
    end else begin : g_top
      assign upper = pp[3][2];
    end
    abp_full_adder u_fa (.a(upper), .b(pp[k][3]), .ci(c2[k]),
                         .s(s3[k]), .co(c3[k]));
  end

  // Final ripple row: columns 4, 5, 6.
  abp_full_adder u_fa_f0 (.a(s3[1]),    .b(c3[0]), .ci(1'b0),  .s(sf[0]), .co(cf[0]));
  abp_full_adder u_fa_f1 (.a(s3[2]),    .b(c3[1]), .ci(cf[0]), .s(sf[1]), .co(cf[1]));
  abp_full_adder u_fa_f2 (.a(pp[3][3]), .b(c3[2]), .ci(cf[1]), .s(sf[2]), .co(cf[2]));

  assign p = {cf[2], sf[2], sf[1], sf[0], s3[0], s2[0], s1[0], pp[0][0]};

endmodule

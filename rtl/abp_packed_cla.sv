// abp_packed_cla: N-bit arbitrary boundary packed carry-lookahead adder.
//
// Per bit: P_i = A_i ^ B_i, G_i = A_i & B_i. The carry into bit i is C_(i-1)
// inside a sub-datatype and C'_i (the carry kept from the previous
// addition of that sub-datatype) at a sub-datatype's lowest bit, where
// M_i = 1:
//     S_i = A_i ^ B_i ^ (C_(i-1) & ~M_i | C'_i & M_i)
//     C_i = G_i | P_i & (C_(i-1) & ~M_i | C'_i & M_i)
// Folding the boundary into the generate/propagate pair, G*_i = G_i | P_i &
// M_i & C'_i and P*_i = P_i & ~M_i (the masked propagate), gives the plain
// recurrence C_i = G*_i | P*_i & C_(i-1) with C_(-1) = 0, which is solved
// for all bits at once by a Kogge-Stone parallel prefix: a carry lookahead
// with log2(N) levels. A boundary bit has P* = 0, so no carry crosses a
// sub-datatype boundary.
//
// The sum equation, the masked propagate and the use of C' as the
// sub-datatype carry-in follow the published scheme; the Kogge-Stone form
// of the lookahead is this design's choice. Bit 0 is always a boundary.
//
// Interface: a, b operands; mask M; cin_vec is C' (only bits with M_i = 1
// are used); s the packed sum; c the carry vector C_i (C at the top bit of
// a sub-datatype is its carry-out).
// Timing: combinational.
module abp_packed_cla #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] mask,
  input  logic [N-1:0] cin_vec,
  output logic [N-1:0] s,
  output logic [N-1:0] c
);

  localparam int unsigned LV = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] m_eff, p, g, ps, gs;
  logic [N-1:0] cin;   // carry into each bit

  always_comb begin
    m_eff    = mask;
    m_eff[0] = 1'b1;
    p  = a ^ b;
    g  = a & b;
    gs = g | (p & m_eff & cin_vec);
    ps = p & ~m_eff;
  end

  // Parallel prefix: after level l, (gg, pp) of bit i cover bits
  // i-2^l+1 .. i.
  logic [N-1:0] gg [LV+1];
  logic [N-1:0] pp [LV+1];
  assign gg[0] = gs;
  assign pp[0] = ps;
  for (genvar l = 0; l < LV; l++) begin : g_lvl
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (i >= (1 << l)) begin : g_comb
        assign gg[l+1][i] = gg[l][i] | (pp[l][i] & gg[l][i-(1<<l)]);
        assign pp[l+1][i] = pp[l][i] & pp[l][i-(1<<l)];
      end else begin : g_pass
        assign gg[l+1][i] = gg[l][i];
        assign pp[l+1][i] = pp[l][i];
      end
    end
  end

  // C_i is the group generate of bits 0..i (C_(-1) = 0).
  assign c = gg[LV];

  always_comb begin
    cin[0] = 1'b0;
    for (int i = 1; i < N; i++) cin[i] = c[i-1];
    s = p ^ ((cin & ~m_eff) | (cin_vec & m_eff));
  end

endmodule

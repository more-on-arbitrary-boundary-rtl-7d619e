// abp_carry_bubble: sub-datatype carry register C'.
//
// After every addition the carry out of each sub-datatype (the carry C_j of
// its top bit j) is moved down to all bits of that sub-datatype, in
// particular to its lowest bit, where the next addition reads it as the
// sub-datatype's carry-in. The recursive definition
//     C'_i = C_i & M_(i+1) | C'_(i+1) & ~M_(i+1)     (M_N = 1)
// would need a chain of N gates; it is evaluated in its unrolled form
//     C'_i = OR over j >= i of ( C_j & T_ij )
// where T_ij = M_(j+1) & ~M_(i+1) & ... & ~M_j are the product terms that
// depend on the mask only and are precomputed when the mask is loaded
// (input cterm). This gives one AND level and one OR level per bit.
//
// The recursion, its unrolled form, the precomputed product terms and the
// register that is cleared to zero initially follow the published scheme.
// The update/clear controls are this design's choice.
//
// Interface: c the carry vector of the current addition; cterm[i][j] = T_ij;
// update loads the bubbled carries; clear zeroes the register (has
// priority); cprime is the register C'.
// Timing: C' changes on the clock edge after update or clear.
module abp_carry_bubble #(
  parameter int unsigned N = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        c,
  input  logic [N-1:0][N-1:0] cterm,
  input  logic                update,
  input  logic                clear,
  output logic [N-1:0]        cprime
);

  logic [N-1:0] cprime_next;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      cprime_next[i] = 1'b0;
      for (int j = i; j < N; j++)
        cprime_next[i] = cprime_next[i] | (c[j] & cterm[i][j]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cprime <= '0;
    else if (clear)  cprime <= '0;
    else if (update) cprime <= cprime_next;
  end

endmodule

// abp_full_adder: one-bit full adder, the FA cell of the 4x4 array
// multiplier. Purely combinational: sum = a ^ b ^ ci, co = majority(a, b, ci).
module abp_full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule

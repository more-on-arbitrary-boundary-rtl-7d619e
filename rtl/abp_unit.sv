// abp_unit: arbitrary boundary packed arithmetic unit.
//
// An N-bit datapath whose operands are divided into sub-datatypes of any
// widths (9, 12, 3 bits, ... in any mix), set by a mask register instead of
// the fixed 8/16/32-bit lanes of conventional media instruction sets. It
// contains
//   * abp_mask_unit    the mask register M; after each load it spends N
//                      clocks filling the multiplier's mask array and the
//                      carry-bubble product terms,
//   * abp_packed_cla   a carry-lookahead adder whose carry chain is cut at
//                      every sub-datatype boundary,
//   * abp_carry_bubble the register C' that keeps each sub-datatype's
//                      carry-out, moved down to its lowest bit, as the
//                      carry-in of the next add-with-carry,
//   * abp_packed_mul   a Wallace-tree multiplier built from masked 4x4
//                      multipliers; each sub-datatype's product occupies
//                      the double-width field bits 2*lo .. 2*hi+1.
//
// The blocks and their equations follow the published scheme. The
// instruction interface (op codes, valid/ready, one registered output
// stage), clearing C' when a new mask is loaded, and the separate clear
// input are this design's choices.
//
// Interface:
//   mask_load/mask_in  load M (taken when mask_busy is low); mask_busy is
//                      then high for N clocks, during which no operation
//                      is accepted (in_ready low).
//   in_valid/in_ready  an operation {op, a, b} is accepted when both high.
//   carry_clr          zero C' (an accepted addition in the same cycle is
//                      still carried out, but C' ends up zero).
//   out_valid, result  one clock after acceptance: the packed sum
//                      (zero-extended) for OP_ADD/OP_ADC, the 2N-bit packed
//                      product for OP_MUL; out_op echoes the op code.
//   cprime             the register C'; bit lo of each sub-datatype is its
//                      carry-out from the latest addition.
// Timing: one operation per clock, latency one clock.
module abp_unit
  import abp_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  // mask register
  input  logic             mask_load,
  input  logic [N-1:0]     mask_in,
  output logic             mask_busy,
  output logic [N-1:0]     mask,
  // operations
  input  logic             in_valid,
  output logic             in_ready,
  input  abp_op_e          op,
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  input  logic             carry_clr,
  output logic             out_valid,
  output abp_op_e          out_op,
  output logic [2*N-1:0]   result,
  output logic [N-1:0]     cprime
);

  logic [N-1:0][N-1:0] marr, cterm;
  logic [N-1:0]        sum, carries, cin_vec;
  logic [2*N-1:0]      prod;
  logic                accept, is_add;

  abp_mask_unit #(.N(N)) u_mask (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (mask_load),
    .mask_in (mask_in),
    .busy    (mask_busy),
    .mask    (mask),
    .marr    (marr),
    .cterm   (cterm)
  );

  assign in_ready = !mask_busy;
  assign accept   = in_valid && in_ready;
  assign is_add   = (op == OP_ADD) || (op == OP_ADC);
  assign cin_vec  = (op == OP_ADC) ? cprime : '0;

  abp_packed_cla #(.N(N)) u_cla (
    .a       (a),
    .b       (b),
    .mask    (mask),
    .cin_vec (cin_vec),
    .s       (sum),
    .c       (carries)
  );

  abp_carry_bubble #(.N(N)) u_cbub (
    .clk         (clk),
    .rst_n       (rst_n),
    .c           (carries),
    .cterm       (cterm),
    .update      (accept && is_add),
    .clear       (carry_clr || (mask_load && !mask_busy)),
    .cprime      (cprime)
  );

  abp_packed_mul #(.N(N)) u_mul (
    .a    (a),
    .b    (b),
    .marr (marr),
    .p    (prod)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_op    <= OP_ADD;
      result    <= '0;
    end else begin
      out_valid <= accept;
      if (accept) begin
        out_op <= op;
        result <= (op == OP_MUL) ? prod : {{N{1'b0}}, sum};
      end
    end
  end

  // An operation must never be accepted while the mask tables are filling.
  a_no_op_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    mask_busy |-> !accept);

endmodule

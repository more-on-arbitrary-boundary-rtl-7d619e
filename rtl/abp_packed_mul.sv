// abp_packed_mul: N x N arbitrary boundary packed multiplier.
//
// Both operands are cut into NP = ceil(N/4) pieces of 4 bits (the top piece
// padded with zeros). Every pair of pieces (pa, pb) is multiplied by a
// masked 4x4 combinational multiplier that receives the matching 4x4 window
// of the N x N mask array, so only bit products a_i*b_j with i and j in the
// same sub-datatype survive. The NP*NP partial products are added with
// their bit weights 2^(4*pa + 4*pb) by a Wallace tree of 3:2 carry-save
// levels and one final carry-propagate addition.
//
// Because the surviving bit products of a sub-datatype occupying bits
// lo..hi all have weights 2^(2*lo) .. 2^(2*hi), and its product fits in
// 2*(hi-lo+1) bits, the product of that sub-datatype appears exactly in
// bits 2*lo .. 2*hi+1 of the 2N-bit result, and no carry crosses into the
// neighbouring field. With the mask array all ones the unit is an ordinary
// N x N multiplier.
//
// The 4-bit pieces, the masked 4x4 multipliers and the weighted addition of
// partial products follow the published scheme; the exact shape of the
// Wallace tree (greedy 3:2 levels, then one adder) is this design's choice.
//
// Interface: a, b operands; marr[i][j] the mask array (1 when bits i and j
// share a sub-datatype); p the 2N-bit result.
// Timing: combinational.
module abp_packed_mul
  import abp_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]          a,
  input  logic [N-1:0]          b,
  input  logic [N-1:0][N-1:0]   marr,
  output logic [2*N-1:0]        p
);

  localparam int unsigned NP   = (N + PIECE - 1) / PIECE;  // pieces per operand
  localparam int unsigned NW   = NP * PIECE;               // padded width
  localparam int unsigned NPP  = NP * NP;                  // partial products
  localparam int unsigned W    = 2 * NW;                   // accumulation width
  localparam int unsigned NLVL = csa_levels(NPP);

  logic [NW-1:0] a_pad, b_pad;
  logic [NW-1:0][NW-1:0] m_pad;

  always_comb begin
    a_pad = '0;
    b_pad = '0;
    m_pad = '0;
    a_pad[N-1:0] = a;
    b_pad[N-1:0] = b;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        m_pad[i][j] = marr[i][j];
  end

  // Level 0 of the tree: weighted partial products.
  logic [W-1:0] pp0 [NPP];

  for (genvar pa = 0; pa < NP; pa++) begin : g_pa
    for (genvar pb = 0; pb < NP; pb++) begin : g_pb
      logic [3:0][3:0] mwin;
      logic [7:0]      prod;
      for (genvar i = 0; i < 4; i++) begin : g_mi
        for (genvar j = 0; j < 4; j++) begin : g_mj
          assign mwin[i][j] = m_pad[pa*4+i][pb*4+j];
        end
      end
      abp_mul4x4_masked u_mul (
        .a (a_pad[pa*4 +: 4]),
        .b (b_pad[pb*4 +: 4]),
        .m (mwin),
        .p (prod)
      );
      assign pp0[pa*NP+pb] = W'(prod) << (4 * (pa + pb));
    end
  end

  // Wallace tree: each level turns every group of three operands into a
  // sum word and a shifted carry word; leftovers pass straight through.
  for (genvar l = 0; l < NLVL; l++) begin : g_lvl
    localparam int unsigned CIN  = csa_count(NPP, l);
    localparam int unsigned NG   = CIN / 3;
    localparam int unsigned NR   = CIN % 3;
    localparam int unsigned COUT = csa_count(NPP, l + 1);
    logic [W-1:0] cur [CIN];
    logic [W-1:0] nxt [COUT];
    for (genvar k = 0; k < CIN; k++) begin : g_in
      if (l == 0) begin : g_first
        assign cur[k] = pp0[k];
      end else begin : g_next
        assign cur[k] = g_lvl[l-1].nxt[k];
      end
    end
    for (genvar g = 0; g < NG; g++) begin : g_csa
      assign nxt[2*g]   = cur[3*g] ^ cur[3*g+1] ^ cur[3*g+2];
      assign nxt[2*g+1] = ((cur[3*g] & cur[3*g+1]) | (cur[3*g] & cur[3*g+2])
                          | (cur[3*g+1] & cur[3*g+2])) << 1;
    end
    for (genvar r = 0; r < NR; r++) begin : g_pass
      assign nxt[2*NG+r] = cur[3*NG+r];
    end
  end

  logic [W-1:0] total;
  if (NLVL == 0) begin : g_final0
    if (NPP >= 2) begin : g_two
      assign total = pp0[0] + pp0[1];
    end else begin : g_one
      assign total = pp0[0];
    end
  end else begin : g_final
    assign total = g_lvl[NLVL-1].nxt[0] + g_lvl[NLVL-1].nxt[1];
  end

  assign p = total[2*N-1:0];

endmodule

// abp_mask_unit: mask register M and the two tables derived from it.
//
// M[i] = 1 marks bit i as the least significant bit of a sub-datatype (bit 0
// always starts one). When a new mask is loaded the unit walks the word one
// bit per clock, from bit 0 upwards, collecting the bits of the current
// sub-datatype in a vector `seg`. When the walk reaches the top bit of a
// sub-datatype (the next bit is marked, or it is bit N-1) it writes, for
// every bit k of that sub-datatype,
//   * row k of the mask array:       marr[k][l] = 1 for every l in the same
//                                    sub-datatype (the multiplier's M_kl),
//   * row k of the carry-term table: cterm[k][j] = 1 only for j = top bit of
//                                    the sub-datatype.
// cterm[k][j] is the product term M_(j+1) * NOT M_(k+1) * ... * NOT M_j of
// the unrolled carry-bubble equation (with M_N taken as 1); it is a function
// of M only, so it is computed once here instead of on every addition. Only
// entries with j >= k can be 1.
//
// The sequential fill taking N clocks, the mask array definition and the
// precomputation of the product terms when M is set follow the published
// scheme. Filling both tables in the same walk, the load handshake and the
// reset value (one sub-datatype spanning the whole word) are this design's
// choices.
//
// Interface: load/mask_in start a fill (accepted only when !busy); busy is
// high from the clock after the load for exactly N clocks; the tables are
// valid whenever busy is low. mask holds the register M as loaded.
// Timing: load in cycle t, walk in cycles t+1 .. t+N, busy low from t+N+1.
module abp_mask_unit #(
  parameter int unsigned N = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [N-1:0]         mask_in,
  output logic                 busy,
  output logic [N-1:0]         mask,
  output logic [N-1:0][N-1:0]  marr,
  output logic [N-1:0][N-1:0]  cterm
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] idx;
  logic [N-1:0]  seg;
  logic [N-1:0]  m_eff;      // mask with bit 0 forced to start a sub-datatype
  logic [N-1:0]  seg_next;
  logic          seg_end;

  always_comb begin
    m_eff    = mask;
    m_eff[0] = 1'b1;
    seg_next = m_eff[idx] ? (N'(1) << idx) : (seg | (N'(1) << idx));
    seg_end  = (32'(idx) == N - 1) || m_eff[(32'(idx) + 1) % N];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      idx   <= '0;
      seg   <= '0;
      mask  <= N'(1);
      // Reset state: one sub-datatype of N bits.
      for (int k = 0; k < N; k++) begin
        marr[k]  <= '1;
        cterm[k] <= N'(1) << (N - 1);
      end
    end else if (!busy) begin
      if (load) begin
        mask <= mask_in;
        busy <= 1'b1;
        idx  <= '0;
        seg  <= '0;
      end
    end else begin
      seg <= seg_next;
      if (seg_end) begin
        for (int k = 0; k < N; k++) begin
          if (seg_next[k]) begin
            marr[k]  <= seg_next;
            cterm[k] <= N'(1) << idx;
          end
        end
      end
      if (32'(idx) == N - 1) begin
        busy <= 1'b0;
        idx  <= '0;
      end else begin
        idx <= idx + 1'b1;
      end
    end
  end

endmodule

// tb_abp_unit: end-to-end test of the packed arithmetic unit at its
// default size (N = 32, no parameter overrides).
//
// A cycle-by-cycle model tracks the mask, the busy window after a mask
// load and the C' register, and computes every result with field-by-field
// integer arithmetic. Random traffic mixes packed adds, adds with carry and
// multiplies under several packings (one 32-bit word, 4 x 8 bits,
// 9/4/4/3/12 bits, 32 x 1 bit and random packings), with occasional mask
// loads and C' clears. Checked each cycle: in_ready, mask_busy, out_valid
// one clock after acceptance, out_op, result and C'. Each mechanism of the
// design is counted and must occur at least once: mask-table fill, an
// operation refused during the fill, a sub-datatype carry-out, a carry
// reaching the next add through C', a C' clear, C' cleared by a mask load,
// and a multiply with more than one sub-datatype.
module tb_abp_unit;
  import abp_pkg::*;
  import abp_ref_pkg::*;

  localparam int unsigned N = 32;

  logic            clk = 1'b0, rst_n = 1'b0;
  logic            mask_load;
  logic [N-1:0]    mask_in, mask;
  logic            mask_busy;
  logic            in_valid, in_ready;
  abp_op_e         op, out_op;
  logic [N-1:0]    a, b;
  logic            carry_clr;
  logic            out_valid;
  logic [2*N-1:0]  result;
  logic [N-1:0]    cprime;

  abp_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_fill = 0, n_refused = 0, n_overflow = 0, n_carry_used = 0;
  int n_clear = 0, n_load_clear = 0, n_multi_mul = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Operand with some fields forced to all ones to provoke carries.
  function automatic logic [N-1:0] operand(vec_t m);
    logic [N-1:0] v;
    v = $urandom;
    if ($urandom % 3 == 0) begin
      for (int k = 0; k < N; k++)
        if ($urandom % 2 == 0 && seg_lo(m, N, k) == k)
          for (int j = k; j <= seg_hi(m, N, k); j++) v[j] = 1'b1;
    end
    return v;
  endfunction

  // Model state.
  vec_t         m_mask = 64'h1;
  logic [N-1:0] m_cp = '0;
  int           m_busy = 0;      // clocks of fill remaining

  task automatic run(int cycles, vec_t packing, int load_pct);
    bit           exp_valid;
    abp_op_e      exp_op;
    vec_t         exp_res, cout, nsegs;
    logic [N-1:0] next_cp;
    bit           acc, loading;
    for (int cyc = 0; cyc < cycles; cyc++) begin
      // Drive inputs for this cycle.
      loading   = (m_busy == 0) && (($urandom % 100) < load_pct);
      mask_load = ($urandom % 100) < load_pct || loading;
      mask_in   = ($urandom % 2) ? packing[N-1:0] : rand_mask(N, 12);
      in_valid  = ($urandom % 8) != 0;
      op        = abp_op_e'($urandom % 3);
      if ($urandom % 3 != 0) op = OP_ADC;
      a         = operand(m_mask);
      b         = operand(m_mask);
      carry_clr = ($urandom % 40) == 0;
      #1;
      loading = mask_load && (m_busy == 0);
      expect_true(in_ready == (m_busy == 0), "in_ready");
      expect_true(mask_busy == (m_busy != 0), "mask_busy");
      acc = in_valid && (m_busy == 0);
      if (in_valid && !acc) n_refused++;
      exp_valid = acc;
      exp_op    = op;
      next_cp   = m_cp;
      exp_res   = '0;
      if (acc) begin
        if (op == OP_MUL) begin
          exp_res = mul(vec_t'(a), vec_t'(b), m_mask, N);
          nsegs = 0;
          for (int k = 0; k < N; k++) if (seg_lo(m_mask, N, k) == k) nsegs++;
          if (nsegs > 1) n_multi_mul++;
        end else begin
          exp_res = add(vec_t'(a), vec_t'(b), m_mask,
                        (op == OP_ADC) ? vec_t'(m_cp) : vec_t'(0), N, cout);
          next_cp = cout[N-1:0];
          if (cout != 0) n_overflow++;
          if (op == OP_ADC) begin
            for (int k = 0; k < N; k++)
              if (seg_lo(m_mask, N, k) == k && m_cp[k]) begin
                n_carry_used++;
                break;
              end
          end
        end
      end
      if (carry_clr && m_cp != 0) n_clear++;
      if (loading && m_cp != 0 && !carry_clr) n_load_clear++;
      if (carry_clr || loading) next_cp = '0;
      @(posedge clk);
      #1;
      // Outputs of the cycle just clocked.
      expect_true(out_valid == exp_valid, "out_valid one clock after acceptance");
      if (exp_valid) begin
        expect_true(out_op == exp_op, "out_op");
        expect_true(result == exp_res[2*N-1:0], $sformatf(
          "result op=%s mask=%h a=%h b=%h got %h expected %h",
          exp_op.name(), m_mask[N-1:0], a, b, result, exp_res[2*N-1:0]));
      end
      expect_true(cprime == next_cp, $sformatf("C' got %h expected %h", cprime, next_cp));
      m_cp = next_cp;
      // Mask register and fill timing.
      if (loading) begin
        m_mask = vec_t'(mask_in);
        m_busy = N;
        n_fill++;
      end else if (m_busy > 0) begin
        m_busy--;
      end
      mask_load = 1'b0;
      expect_true(mask == m_mask[N-1:0], "mask register");
    end
  endtask

  initial begin
    mask_load = 1'b0; mask_in = '0; in_valid = 1'b0; op = OP_ADD;
    a = '0; b = '0; carry_clr = 1'b0;
    #12 rst_n = 1'b1;
    @(posedge clk); #1;
    expect_true(cprime == '0 && !mask_busy && in_ready, "reset state");
    run(300,  64'h0000_0001, 0);     // plain 32-bit word
    run(400,  64'h0012_2201, 2);     // 9, 4, 4, 3, 12 bits
    run(400,  64'h0101_0101, 2);     // 4 x 8 bits
    run(300,  64'hffff_ffff, 2);     // 32 x 1 bit
    run(1500, 64'h0000_0201, 3);     // random packings mixed in
    $display("mechanisms: fill=%0d refused=%0d overflow=%0d carry_used=%0d clear=%0d load_clear=%0d multi_mul=%0d",
             n_fill, n_refused, n_overflow, n_carry_used, n_clear, n_load_clear, n_multi_mul);
    expect_true(n_fill > 0, "mask fill happened");
    expect_true(n_refused > 0, "operation refused during fill happened");
    expect_true(n_overflow > 0, "sub-datatype carry-out happened");
    expect_true(n_carry_used > 0, "carry through C' into next add happened");
    expect_true(n_clear > 0, "C' clear happened");
    expect_true(n_load_clear > 0, "C' cleared by mask load happened");
    expect_true(n_multi_mul > 0, "packed multiply happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_abp_packed_cla: checks the packed carry-lookahead adder at N = 32 and
// N = 9. For fixed and random packings, random operands and random
// sub-datatype carry-ins, the sum is compared with field-by-field integer
// addition, and the carry vector at the top bit of every sub-datatype with
// that field's carry-out. Operands of all ones plus a carry-in exercise
// carries that must stop at every boundary.
module tb_abp_packed_cla;
  import abp_ref_pkg::*;

  logic [31:0] a0, b0, m0, ci0, s0, c0;
  logic [8:0]  a1, b1, m1, ci1, s1, c1;
  int checks = 0, failures = 0;

  abp_packed_cla dut32 (.a(a0), .b(b0), .mask(m0), .cin_vec(ci0), .s(s0), .c(c0));
  abp_packed_cla #(.N(9)) dut9 (.a(a1), .b(b1), .mask(m1), .cin_vec(ci1), .s(s1), .c(c1));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(vec_t mask, vec_t a, vec_t b, vec_t ci);
    vec_t es, ec;
    m0 = mask[31:0]; a0 = a[31:0]; b0 = b[31:0]; ci0 = ci[31:0];
    #1;
    es = add(a, b, mask, ci, 32, ec);
    checks++;
    if (s0 !== es[31:0]) begin
      failures++;
      if (failures < 10) $display("FAIL sum m=%h a=%h b=%h ci=%h s=%h expected %h", m0, a0, b0, ci0, s0, es);
    end
    for (int k = 0; k < 32; k++) begin
      if (seg_hi(mask, 32, k) == k) begin
        checks++;
        if (c0[k] !== ec[k]) begin
          failures++;
          if (failures < 10) $display("FAIL carry-out bit %0d m=%h a=%h b=%h", k, m0, a0, b0);
        end
      end
    end
  endtask

  task automatic check9(vec_t mask, vec_t a, vec_t b, vec_t ci);
    vec_t es, ec;
    m1 = mask[8:0]; a1 = a[8:0]; b1 = b[8:0]; ci1 = ci[8:0];
    #1;
    es = add(a, b, mask, ci, 9, ec);
    checks++;
    if (s1 !== es[8:0]) begin
      failures++;
      if (failures < 10) $display("FAIL N=9 sum m=%h a=%h b=%h ci=%h s=%h expected %h", m1, a1, b1, ci1, s1, es);
    end
  endtask

  initial begin
    vec_t fixed [5];
    fixed[0] = 64'h0000_0001;
    fixed[1] = 64'h0101_0101;
    fixed[2] = 64'h0012_2201;
    fixed[3] = 64'hffff_ffff;
    fixed[4] = 64'h0001_0001;
    // The 4-bit example: 0001 1100 + 1101 1100 as two nibbles, no carry-in.
    check32(64'h11, 64'h1c, 64'hdc, 64'h0);
    for (int f = 0; f < 5; f++) begin
      check32(fixed[f], 64'hffff_ffff, 64'h0, 64'hffff_ffff);
      check32(fixed[f], 64'hffff_ffff, 64'hffff_ffff, 64'h0);
      for (int r = 0; r < 300; r++)
        check32(fixed[f], vec_t'($urandom), vec_t'($urandom), vec_t'($urandom));
    end
    for (int t = 0; t < 300; t++)
      check32(rand_mask(32, 12), vec_t'($urandom), vec_t'($urandom), vec_t'($urandom));
    for (int t = 0; t < 3000; t++)
      check9(rand_mask(9, 5), vec_t'($urandom), vec_t'($urandom), vec_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_abp_packed_mul: checks the packed Wallace-tree multiplier at the
// default N = 32 and at N = 9 (three 3-bit sub-datatypes, the small worked
// example of the scheme). The mask array is built by the reference model;
// each result is compared with the field-by-field products placed in their
// double-width fields. Packings checked: one 32-bit word (plain multiply),
// 4 x 8 bits, 9/4/4/3/12 bits, 32 x 1 bit and random packings.
module tb_abp_packed_mul;
  import abp_ref_pkg::*;

  localparam int unsigned N0 = 32;
  localparam int unsigned N1 = 9;

  logic [N0-1:0]          a0, b0;
  logic [N0-1:0][N0-1:0]  m0;
  logic [2*N0-1:0]        p0;
  logic [N1-1:0]          a1, b1;
  logic [N1-1:0][N1-1:0]  m1;
  logic [2*N1-1:0]        p1;
  int checks = 0, failures = 0;

  abp_packed_mul dut32 (.a(a0), .b(b0), .marr(m0), .p(p0));
  abp_packed_mul #(.N(N1)) dut9 (.a(a1), .b(b1), .marr(m1), .p(p1));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run32(vec_t mask, int reps);
    vec_t e;
    for (int k = 0; k < N0; k++)
      for (int l = 0; l < N0; l++) m0[k][l] = marr(mask, N0, k, l);
    for (int r = 0; r < reps; r++) begin
      a0 = $urandom;
      b0 = $urandom;
      if (r == 0) begin a0 = '1; b0 = '1; end
      #1;
      e = mul(vec_t'(a0), vec_t'(b0), mask, N0);
      checks++;
      if (p0 !== e[2*N0-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL N=32 mask=%h a=%h b=%h p=%h expected %h", mask, a0, b0, p0, e);
      end
    end
  endtask

  task automatic run9(vec_t mask);
    vec_t e;
    for (int k = 0; k < N1; k++)
      for (int l = 0; l < N1; l++) m1[k][l] = marr(mask, N1, k, l);
    for (int x = 0; x < 512; x += 7) begin
      for (int y = 0; y < 512; y += 5) begin
        a1 = 9'(x);
        b1 = 9'(y);
        #1;
        e = mul(vec_t'(a1), vec_t'(b1), mask, N1);
        checks++;
        if (p1 !== e[2*N1-1:0]) begin
          failures++;
          if (failures < 10) $display("FAIL N=9 mask=%h a=%h b=%h p=%h expected %h", mask, a1, b1, p1, e);
        end
      end
    end
  endtask

  initial begin
    run9(64'b001_001_001);
    run9(64'b1);
    run9(64'b010_010_101);
    run32(64'h0000_0001, 200);
    run32(64'h0101_0101, 200);
    run32(64'h0012_2201, 200);
    run32(64'hffff_ffff, 50);
    for (int t = 0; t < 40; t++) run32(rand_mask(N0, 13), 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

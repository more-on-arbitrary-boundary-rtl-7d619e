// tb_abp_mul4x4_masked: exhaustive check of the masked 4x4 array
// multiplier. For every pair of 4-bit operands and a set of mask windows
// (all ones, all zeros, the block-diagonal windows of 1/2/3/4-bit
// sub-datatypes and random windows) the output is compared with the sum of
// the enabled bit products a_i*b_j*2^(i+j).
module tb_abp_mul4x4_masked;
  logic [3:0]      a, b;
  logic [3:0][3:0] m;
  logic [7:0]      p;
  int checks = 0, failures = 0;

  abp_mul4x4_masked dut (.a(a), .b(b), .m(m), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] expect_p(logic [3:0] x, logic [3:0] y, logic [3:0][3:0] mm);
    int s;
    s = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        if (x[i] && y[j] && mm[i][j]) s += 1 << (i + j);
    return 8'(s);
  endfunction

  initial begin
    logic [3:0][3:0] masks [8];
    masks[0] = '1;
    masks[1] = '0;
    masks[2] = {4'b1000, 4'b0100, 4'b0010, 4'b0001};   // four 1-bit fields
    masks[3] = {4'b1100, 4'b1100, 4'b0011, 4'b0011};   // two 2-bit fields
    masks[4] = {4'b1000, 4'b0111, 4'b0111, 4'b0111};   // 3 + 1 bits
    for (int r = 5; r < 8; r++) masks[r] = 16'($urandom);
    for (int mi = 0; mi < 8; mi++) begin
      for (int x = 0; x < 16; x++) begin
        for (int y = 0; y < 16; y++) begin
          a = 4'(x);
          b = 4'(y);
          m = masks[mi];
          #1;
          checks++;
          if (p !== expect_p(a, b, m)) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%h b=%h m=%h p=%h expected %h", a, b, m, p, expect_p(a, b, m));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_abp_examples: the worked examples of the packing scheme, run through
// the full unit at its default size (N = 32). Expected values are written
// out by hand.
//  1. Packing 9, 4, 4, 3, 12 bits (mask 32'h0012_2201): the 9-bit field
//     overflows, its carry must appear in C' bits 0..8 (and so at bit 0),
//     and the next add-with-carry must add it into that field only.
//  2. Packing 4 x 8 bits (mask 32'h0101_0101): four 8-bit adds and four
//     8 x 8 products, each product in its own 16-bit field.
//  3. Three 3-bit fields at the bottom of the word (mask 32'h0000_0249),
//     the 9-bit example machine: three 3 x 3 products in 6-bit fields.
//  4. Two 4-bit fields (mask 32'h0000_0011): 1100 + 1100 in the low
//     nibble must not carry into the high one.
// The mask fill time (N clocks) and the one-clock result latency are
// checked each time.
module tb_abp_examples;
  import abp_pkg::*;

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

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [2*N-1:0] got, logic [2*N-1:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, want);
    end
  endtask

  task automatic load(logic [N-1:0] m);
    int cycles;
    mask_load = 1'b1;
    mask_in = m;
    @(posedge clk); #1;
    mask_load = 1'b0;
    cycles = 0;
    while (mask_busy) begin
      @(posedge clk); #1;
      cycles++;
    end
    expect_eq(64'(cycles), 64'(N), "mask fill clocks");
    expect_eq(64'(cprime), 64'h0, "C' cleared by mask load");
  endtask

  task automatic issue(abp_op_e o, logic [N-1:0] x, logic [N-1:0] y, logic [2*N-1:0] want, string what);
    in_valid = 1'b1;
    op = o;
    a = x;
    b = y;
    @(posedge clk); #1;
    in_valid = 1'b0;
    expect_eq(64'(out_valid), 64'h1, {what, " valid after one clock"});
    expect_eq(result, want, what);
  endtask

  initial begin
    mask_load = 1'b0; mask_in = '0; in_valid = 1'b0; op = OP_ADD;
    a = '0; b = '0; carry_clr = 1'b0;
    #12 rst_n = 1'b1;
    @(posedge clk); #1;

    // 1. 9/4/4/3/12 packing and the carry out of the 9-bit field.
    load(32'h0012_2201);
    // fields (lsb first): 9-bit, 4-bit, 4-bit, 3-bit, 12-bit
    //   0x1ff + 0x001 = 0x000 carry 1;  0xf + 0x0 = 0xf;  0x3 + 0x1 = 0x4;
    //   0x7 + 0x0 = 0x7;  0xfff + 0x001 = 0x000 carry 1
    issue(OP_ADD, {12'hfff, 3'h7, 4'h3, 4'hf, 9'h1ff},
          {12'h001, 3'h0, 4'h1, 4'h0, 9'h001},
          64'({12'h000, 3'h7, 4'h4, 4'hf, 9'h000}), "9/4/4/3/12 packed add");
    expect_eq(64'(cprime), 64'(32'hfff0_01ff), "C' holds carries of the 9-bit and 12-bit fields");
    issue(OP_ADC, 32'h0, 32'h0, 64'(32'h0010_0001), "add with carry uses C' at bits 0 and 20");
    expect_eq(64'(cprime), 64'h0, "no new carries");

    // 2. 4 x 8 bits.
    load(32'h0101_0101);
    issue(OP_ADD, 32'hff_80_11_fe, 32'h01_80_22_01, 64'(32'h00_00_33_ff), "4 x 8 add");
    expect_eq(64'(cprime), 64'(32'hffff_0000), "carries of the two upper bytes");
    issue(OP_MUL, 32'hff_03_c8_11, 32'hff_05_02_10,
          {16'hfe01, 16'd15, 16'd400, 16'h0110}, "4 x 8 multiply");
    expect_eq(64'(cprime), 64'(32'hffff_0000), "multiply leaves C' alone");
    carry_clr = 1'b1;
    @(posedge clk); #1;
    carry_clr = 1'b0;
    expect_eq(64'(cprime), 64'h0, "carry_clr");

    // 3. Three 3-bit fields: 7*7, 5*3, 6*2 (upper 23-bit field zero).
    load(32'h0000_0249);
    issue(OP_MUL, {23'd0, 3'd7, 3'd5, 3'd6}, {23'd0, 3'd7, 3'd3, 3'd2},
          {46'd0, 6'd49, 6'd15, 6'd12}, "3 x 3-bit multiply");

    // 4. Two nibbles: 0001_1100 + 1101_1100.
    load(32'h0000_0011);
    issue(OP_ADD, 32'h1c, 32'hdc, 64'(32'h0000_00e8), "two-nibble add, no carry across");
    expect_eq(64'(cprime[7:0]), 64'h0f, "carry of the low nibble kept, high field none");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

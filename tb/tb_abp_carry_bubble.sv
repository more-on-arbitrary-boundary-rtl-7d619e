// tb_abp_carry_bubble: checks the C' register. For fixed and random
// packings and random carry vectors, after an update every bit of a
// sub-datatype must hold the carry of that sub-datatype's top bit; the
// register must hold its value without update and go to zero on clear,
// clear winning over a simultaneous update. The product terms are built by
// the reference model.
module tb_abp_carry_bubble;
  import abp_ref_pkg::*;

  localparam int unsigned N = 32;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]        c;
  logic [N-1:0][N-1:0] cterm_q;
  logic                update, clear;
  logic [N-1:0]        cprime;
  int checks = 0, failures = 0;

  abp_carry_bubble dut (.clk(clk), .rst_n(rst_n), .c(c), .cterm(cterm_q),
                        .update(update), .clear(clear), .cprime(cprime));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [N-1:0] got, logic [N-1:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: C'=%h expected %h", what, got, want);
    end
  endtask

  task automatic try_mask(vec_t mask, int reps);
    logic [N-1:0] want, held;
    for (int k = 0; k < N; k++)
      for (int j = 0; j < N; j++) cterm_q[k][j] = cterm(mask, N, k, j);
    for (int r = 0; r < reps; r++) begin
      c = $urandom;
      update = 1'b1;
      @(posedge clk); #1;
      for (int k = 0; k < N; k++) want[k] = c[seg_hi(mask, N, k)];
      expect_eq(cprime, want, "update");
      held = cprime;
      update = 1'b0;
      c = $urandom;
      @(posedge clk); #1;
      expect_eq(cprime, held, "hold");
    end
    c = '1;
    update = 1'b1;
    clear = 1'b1;
    @(posedge clk); #1;
    expect_eq(cprime, '0, "clear over update");
    clear = 1'b0;
    update = 1'b0;
  endtask

  initial begin
    update = 1'b0;
    clear = 1'b0;
    c = '0;
    cterm_q = '0;
    #12 rst_n = 1'b1;
    @(posedge clk); #1;
    expect_eq(cprime, '0, "reset");
    // Carry out of the lowest 9-bit field of the 9/4/4/3/12 packing must
    // reach bit 0.
    for (int k = 0; k < N; k++)
      for (int j = 0; j < N; j++) cterm_q[k][j] = cterm(64'h0012_2201, N, k, j);
    c = 32'h0000_0100;
    update = 1'b1;
    @(posedge clk); #1;
    expect_eq(cprime, 32'h0000_01ff, "9-bit field carry");
    update = 1'b0;
    try_mask(64'h0000_0001, 20);
    try_mask(64'h0101_0101, 20);
    try_mask(64'h0012_2201, 20);
    try_mask(64'hffff_ffff, 20);
    for (int t = 0; t < 50; t++) try_mask(rand_mask(N, 10), 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

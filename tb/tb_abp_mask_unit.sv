// tb_abp_mask_unit: checks the mask register and its table fill at
// N = 32. After reset the tables must describe one 32-bit sub-datatype.
// For each loaded mask, busy must be high for exactly N clocks, a load
// while busy must be ignored, and afterwards the mask array and the
// carry-bubble product terms must match the reference model bit for bit.
module tb_abp_mask_unit;
  import abp_ref_pkg::*;

  localparam int unsigned N = 32;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic                load;
  logic [N-1:0]        mask_in, mask;
  logic                busy;
  logic [N-1:0][N-1:0] marr_q, cterm_q;
  int checks = 0, failures = 0;
  int busy_cycles;

  abp_mask_unit dut (.clk(clk), .rst_n(rst_n), .load(load), .mask_in(mask_in),
                     .busy(busy), .mask(mask), .marr(marr_q), .cterm(cterm_q));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_tables(vec_t m);
    int bad;
    bad = 0;
    for (int k = 0; k < N; k++)
      for (int l = 0; l < N; l++) begin
        if (marr_q[k][l] !== marr(m, N, k, l)) bad++;
        if (cterm_q[k][l] !== cterm(m, N, k, l)) bad++;
      end
    checks++;
    if (bad != 0) begin
      failures++;
      if (failures < 10) $display("FAIL tables for mask %h: %0d wrong bits", m, bad);
    end
  endtask

  task automatic load_mask(vec_t m, bit second_load);
    load = 1'b1;
    mask_in = m[N-1:0];
    @(posedge clk); #1;
    load = second_load;       // must be ignored while busy
    mask_in = ~m[N-1:0];
    busy_cycles = 0;
    while (busy) begin
      @(posedge clk); #1;
      busy_cycles++;
      load = 1'b0;
    end
    checks++;
    if (busy_cycles != N) begin
      failures++;
      $display("FAIL busy for %0d cycles, expected %0d", busy_cycles, N);
    end
    checks++;
    if (mask !== m[N-1:0]) begin
      failures++;
      $display("FAIL mask register %h expected %h", mask, m[N-1:0]);
    end
    check_tables(m);
  endtask

  initial begin
    load = 1'b0;
    mask_in = '0;
    #12 rst_n = 1'b1;
    @(posedge clk); #1;
    check_tables(64'h1);
    load_mask(64'h0101_0101, 1'b0);   // 4 x 8 bits
    load_mask(64'h0012_2201, 1'b1);   // 9, 4, 4, 3, 12 bits
    load_mask(64'hffff_ffff, 1'b0);
    load_mask(64'h0000_0001, 1'b0);
    load_mask(64'h8000_0000, 1'b0);   // bit 0 still starts a sub-datatype
    for (int t = 0; t < 60; t++) load_mask(rand_mask(N, 14), t[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

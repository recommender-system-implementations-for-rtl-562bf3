// tb_fp_mul: self-checking testbench of fp_mul.
//
// Drives one operand pair per clock (random normal numbers over a wide and
// a narrow exponent range, plus zeros, infinities, NaN, overflow and
// underflow cases, and products that fall exactly halfway between two
// representable values) and compares every result, one cycle later, with the
// double-precision reference of fp_ref_pkg.  It also checks that
// out_valid follows in_valid with a latency of exactly one cycle.
module tb_fp_mul;
  import ppc_pkg::*;
  import fp_ref_pkg::*;

  localparam int N_RANDOM = 20000;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid;
  fp32_t a, b, y;
  logic  out_valid;
  int    checks = 0, failures = 0;

  fp_mul dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (2 * N_RANDOM + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [31:0] x, logic [31:0] z);
    logic [31:0] expect_y;
    expect_y = to_fp32(to_real(x) * to_real(z));
    @(negedge clk);
    a = x; b = z; in_valid = 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (!out_valid || !same(y, expect_y)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h * %h: got %h (valid %b), expected %h", x, z, y, out_valid, expect_y);
    end
    @(negedge clk);
    in_valid = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL out_valid high without in_valid");
    end
  endtask

  initial begin
    in_valid = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Directed cases.
    apply(32'h3F800000, 32'h40000000);   // 1, 2
    apply(32'h3FC00000, 32'hBFC00000);   // 1.5, -1.5
    apply(32'h00000000, 32'h40490FDB);   // 0, pi
    apply(32'h80000000, 32'h00000000);   // -0, +0
    apply(32'h7F800000, 32'h3F800000);   // inf, 1
    apply(32'h7F800000, 32'hFF800000);   // inf, -inf
    apply(32'h7FC00000, 32'h3F800000);   // NaN, 1
    apply(32'h7F000000, 32'h7F000000);   // overflow
    apply(32'h00800000, 32'h80800000);   // tiny values
    apply(32'h3F800001, 32'hBF800000);   // cancellation
    apply(32'h4B800000, 32'h3F800000);   // 2^24 and 1: tie
    apply(32'h4B800001, 32'h3F800000);
    // Products exactly halfway between two values with an even lower one:
    // ties must round to even (down here).
    apply(32'h3F83EA5F, 32'h3FC00000); apply(32'h3FE1C0F4, 32'h3F900000);
    apply(32'h3FC6C41A, 32'h3FA00000); apply(32'h3FF60A46, 32'h3FC00000);
    apply(32'h3FF7DD48, 32'h3F900000); apply(32'h3FF0FD5C, 32'h3FE00000);
    for (int i = 0; i < N_RANDOM / 2; i++) apply(rand_fp(1, 254), rand_fp(1, 254));
    for (int i = 0; i < N_RANDOM / 2; i++) apply(rand_fp(120, 134), rand_fp(120, 134));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

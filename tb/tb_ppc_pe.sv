// tb_ppc_pe: self-checking testbench of the prediction element.
//
// Runs three elements side by side: the default K = 2, which must accept a
// new pair every cycle and answer after two cycles, and K = 4 and K = 6,
// which reuse their K/2 adders over several cycles and must answer after
// 1 + ceil(log2 K) cycles.  Each is checked by a pe_check instance.
module tb_ppc_pe;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   c2, f2, c4, f4, c6, f6;
  logic d2, d4, d6;
  int   checks, failures;

  always #5 clk = ~clk;

  pe_check #(.K(2), .N(3000)) u_k2 (.clk, .rst_n, .checks(c2), .failures(f2), .done(d2));
  pe_check #(.K(4), .N(1000)) u_k4 (.clk, .rst_n, .checks(c4), .failures(f4), .done(d4));
  pe_check #(.K(6), .N(1000)) u_k6 (.clk, .rst_n, .checks(c6), .failures(f6), .done(d6));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c4 + c6, f2 + f4 + f6 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d2 && d4 && d6);
    checks   = c2 + c4 + c6;
    failures = f2 + f4 + f6;
    if (c2 != 3000 || c4 != 1000 || c6 != 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

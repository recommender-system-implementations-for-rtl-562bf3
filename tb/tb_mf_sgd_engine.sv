// tb_mf_sgd_engine: self-checking testbench of the training engine.
//
// Uses a small model (K = 2, 8 users, 6 items, up to 40 ratings).  Loads
// random initial factors and a random rating list sorted by user and item,
// trains for three iterations and reads back every factor of P and Q.  The
// reference replays Algorithm 1 in the same operation order, rounding each
// multiplication, addition and subtraction to single precision.  It also
// checks the run time (done one cycle after 22 cycles per rating per
// iteration have passed), that a run with
// zero iterations finishes at once and leaves the model unchanged, and
// that a second run continues from the trained model.
module tb_mf_sgd_engine;
  import ppc_pkg::*;
  import fp_ref_pkg::*;

  localparam int K = 2, NU = 8, NI = 6, MR = 40, NR = 30;
  localparam int UW = $clog2(NU), IW = $clog2(NI), RW = $clog2(MR), KW = $clog2(K);
  localparam int AW = (RW > UW) ? ((RW > IW) ? RW : IW) : ((UW > IW) ? UW : IW);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          host_we, host_re;
  logic [1:0]    host_sel;
  logic [AW-1:0] host_addr;
  logic [KW-1:0] host_col;
  logic [31:0]   host_wdata;
  fp32_t         host_rdata;
  logic [RW:0]   cfg_num_ratings;
  logic [15:0]   cfg_iters;
  fp32_t         cfg_gamma, cfg_lambda;
  logic          start, busy, done;

  mf_sgd_engine #(.K(K), .NUM_USERS(NU), .NUM_ITEMS(NI), .MAX_RATINGS(MR)) dut (.*);

  always #5 clk = ~clk;

  logic [31:0] pm [NU][K];
  logic [31:0] qm [NI][K];
  int ru [NR], ri [NR], rr [NR];
  int checks = 0, failures = 0, cycle = 0;

  always_ff @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    return to_fp32(to_real(a) * to_real(b));
  endfunction
  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    return to_fp32(to_real(a) + to_real(b));
  endfunction
  function automatic logic [31:0] fsub(logic [31:0] a, logic [31:0] b);
    return to_fp32(to_real(a) - to_real(b));
  endfunction

  task automatic ref_train(int iters, logic [31:0] g, logic [31:0] l);
    logic [31:0] dot, e, x, y;
    for (int it = 0; it < iters; it++)
      for (int pass = 0; pass < 2; pass++)
        for (int n = 0; n < NR; n++) begin
          dot = fadd(fmul(pm[ru[n]][0], qm[ri[n]][0]), fmul(pm[ru[n]][1], qm[ri[n]][1]));
          e   = fsub(to_fp32(real'(rr[n])), dot);
          for (int k = 0; k < K; k++) begin
            x = (pass != 0) ? pm[ru[n]][k] : qm[ri[n]][k];
            y = (pass != 0) ? qm[ri[n]][k] : pm[ru[n]][k];
            y = fadd(y, fmul(g, fsub(fmul(e, x), fmul(l, y))));
            if (pass != 0) qm[ri[n]][k] = y; else pm[ru[n]][k] = y;
          end
        end
  endtask

  task automatic host_write(logic [1:0] sel, int addr, int col, logic [31:0] d);
    @(negedge clk);
    host_we = 1'b1; host_sel = sel; host_addr = AW'(addr); host_col = KW'(col); host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic check_model(string what);
    for (int s = 0; s < 2; s++)
      for (int r = 0; r < ((s != 0) ? NI : NU); r++)
        for (int k = 0; k < K; k++) begin
          @(negedge clk);
          host_re = 1'b1; host_sel = 2'(s); host_addr = AW'(r); host_col = KW'(k);
          @(negedge clk);
          host_re = 1'b0;
          checks++;
          if (!same(host_rdata, (s != 0) ? qm[r][k] : pm[r][k])) begin
            failures++;
            if (failures < 10)
              $display("FAIL %s %s[%0d][%0d]: got %h expected %h", what, (s != 0) ? "Q" : "P", r, k,
                       host_rdata, (s != 0) ? qm[r][k] : pm[r][k]);
          end
        end
  endtask

  task automatic run(int iters, int expect_cycles);
    int t0;
    @(negedge clk);
    cfg_iters = 16'(iters);
    start = 1'b1;
    @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (cycle - t0 != expect_cycles) begin
      failures++;
      $display("FAIL: run of %0d iterations took %0d cycles, expected %0d", iters, cycle - t0, expect_cycles);
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL: busy after done"); end
  endtask

  initial begin
    int u, i;
    host_we = 0; host_re = 0; host_sel = 0; host_addr = 0; host_col = 0; host_wdata = 0;
    start = 0; cfg_num_ratings = (RW + 1)'(NR); cfg_iters = 0;
    cfg_gamma  = 32'h3C23D70A;   // 0.01
    cfg_lambda = 32'h3DCCCCCD;   // 0.1
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Random initial model, values in [0.125, 1).
    for (int r = 0; r < NU; r++) for (int k = 0; k < K; k++) begin
      pm[r][k] = rand_fp(124, 126) & 32'h7FFFFFFF;
      host_write(2'd0, r, k, pm[r][k]);
    end
    for (int r = 0; r < NI; r++) for (int k = 0; k < K; k++) begin
      qm[r][k] = rand_fp(124, 126) & 32'h7FFFFFFF;
      host_write(2'd1, r, k, qm[r][k]);
    end
    // Ratings sorted by user then item, each user rating a few items.
    u = 0; i = 0;
    for (int n = 0; n < NR; n++) begin
      i = i + 1 + int'($urandom % 2);
      if (i >= NI) begin u = (u + 1) % NU; i = int'($urandom % 2); end
      ru[n] = u; ri[n] = i; rr[n] = 1 + int'($urandom % 5);
      host_write(2'd2, n, 0, 32'({UW'(ru[n]), IW'(ri[n]), 3'(rr[n])}));
    end
    check_model("initial");

    run(0, 1);
    check_model("after zero iterations");

    run(3, 3 * NR * 22 + 1);
    ref_train(3, cfg_gamma, cfg_lambda);
    check_model("after 3 iterations");

    cfg_gamma = 32'h3D4CCCCD;    // 0.05
    run(2, 2 * NR * 22 + 1);
    ref_train(2, cfg_gamma, cfg_lambda);
    check_model("after 2 more iterations");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ppc_top: end-to-end testbench of the prediction parallel circuit at
// its default size (100 prediction elements, K = 2, 20 users x 5 items).
//
// 1. Loads a random model into P and Q through the load ports.
// 2. Asks for all 100 user/item pairs of the 20 x 5 matrix in one batch
//    and checks every prediction against the reference dot product, and
//    that the batch answers exactly two cycles after it was accepted with
//    all elements reporting together.
// 3. Streams batches of random pairs on consecutive cycles (pipelined
//    operation), with random idle cycles, and rewrites model entries at the
//    same edges as batches to check that a batch sees the model as it was
//    before that edge.
// Each mechanism (model load, full-matrix batch, back-to-back batches,
// model rewrite between batches) is counted and must occur at least once.
module tb_ppc_top;
  import ppc_pkg::*;
  import fp_ref_pkg::*;

  localparam int NPE = DEF_NPE, K = DEF_K, NU = DEF_NUM_USERS, NI = DEF_NUM_ITEMS;
  localparam int UW = $clog2(NU), IW = $clog2(NI), KW = $clog2(K);
  localparam int LAT = 1 + $clog2(K);
  localparam int NBATCH = 300;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          p_wr_en, q_wr_en;
  logic [UW-1:0] p_wr_row;
  logic [IW-1:0] q_wr_row;
  logic [KW-1:0] p_wr_col, q_wr_col;
  fp32_t         p_wr_data, q_wr_data;
  logic          req_valid, req_ready, resp_valid;
  logic [UW-1:0] req_user [NPE];
  logic [IW-1:0] req_item [NPE];
  fp32_t         resp_pred [NPE];

  ppc_top dut (.*);

  always #5 clk = ~clk;

  logic [31:0] pm [NU][K];
  logic [31:0] qm [NI][K];
  int checks = 0, failures = 0, cycle = 0;
  int n_load = 0, n_full = 0, n_b2b = 0, n_rewrite = 0, n_batches = 0;

  // Expected results, one entry per accepted batch.
  typedef logic [31:0] pred_vec_t [NPE];
  pred_vec_t exp_q [$];
  int        due_q [$];

  always_ff @(posedge clk) cycle <= cycle + 1;

  function automatic logic [31:0] ref_pred(int u, int i);
    logic [31:0] acc [];
    logic [31:0] nxt [];
    int n;
    acc = new[K];
    for (int k = 0; k < K; k++) acc[k] = to_fp32(to_real(pm[u][k]) * to_real(qm[i][k]));
    n = K;
    while (n > 1) begin
      nxt = new[(n + 1) / 2];
      for (int j = 0; j < (n + 1) / 2; j++)
        nxt[j] = to_fp32(to_real(acc[2*j]) + ((2*j + 1 < n) ? to_real(acc[2*j+1]) : 0.0));
      acc = nxt;
      n = (n + 1) / 2;
    end
    return acc[0];
  endfunction

  // Ratings-like factors: magnitudes around 0.1 .. 2, either sign.
  function automatic logic [31:0] rand_factor();
    return rand_fp(123, 127);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (resp_valid) begin
      if (exp_q.size() == 0) begin
        checks++; failures++;
        $display("FAIL: response without a request");
      end else begin
        checks++;
        if (due_q[0] != cycle) begin
          failures++;
          $display("FAIL: batch answered at cycle %0d, expected %0d", cycle, due_q[0]);
        end
        for (int n = 0; n < NPE; n++) begin
          checks++;
          if (!same(resp_pred[n], exp_q[0][n])) begin
            failures++;
            if (failures < 10)
              $display("FAIL element %0d: got %h expected %h", n, resp_pred[n], exp_q[0][n]);
          end
        end
        void'(exp_q.pop_front());
        void'(due_q.pop_front());
      end
    end
  end

  // Issue a batch at the next edge; the expected values use the model as
  // it stands before that edge.
  task automatic issue(logic [UW-1:0] us [NPE], logic [IW-1:0] is [NPE]);
    pred_vec_t e;
    for (int n = 0; n < NPE; n++) begin
      req_user[n] = us[n];
      req_item[n] = is[n];
      e[n] = ref_pred(int'(us[n]), int'(is[n]));
    end
    req_valid = 1'b1;
    exp_q.push_back(e);
    due_q.push_back(cycle + LAT);
    n_batches++;
  endtask

  initial begin
    logic [UW-1:0] us [NPE];
    logic [IW-1:0] is [NPE];
    logic          last_was_batch;
    p_wr_en = 1'b0; q_wr_en = 1'b0; p_wr_row = '0; q_wr_row = '0;
    p_wr_col = '0; q_wr_col = '0; p_wr_data = '0; q_wr_data = '0;
    req_valid = 1'b0;
    for (int n = 0; n < NPE; n++) begin req_user[n] = '0; req_item[n] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. Load the model, one P factor and one Q factor per cycle.
    for (int r = 0; r < NU; r++)
      for (int k = 0; k < K; k++) begin
        @(negedge clk);
        p_wr_en = 1'b1; p_wr_row = UW'(r); p_wr_col = KW'(k);
        p_wr_data = rand_factor(); pm[r][k] = p_wr_data;
        if (r < NI) begin
          q_wr_en = 1'b1; q_wr_row = IW'(r); q_wr_col = KW'(k);
          q_wr_data = rand_factor(); qm[r][k] = q_wr_data;
        end else begin
          q_wr_en = 1'b0;
        end
        n_load++;
      end
    @(negedge clk);
    p_wr_en = 1'b0; q_wr_en = 1'b0;

    // 2. The whole 20 x 5 rating matrix in one batch.
    if (!req_ready) begin failures++; $display("FAIL: not ready after load"); end
    for (int n = 0; n < NPE; n++) begin
      us[n] = UW'((n / NI) % NU);
      is[n] = IW'(n % NI);
    end
    issue(us, is);
    n_full++;
    @(negedge clk);
    req_valid = 1'b0;
    repeat (4) @(negedge clk);

    // 3. Random batches, mostly back to back, with model rewrites.
    last_was_batch = 1'b0;
    for (int b = 0; b < NBATCH; b++) begin
      @(negedge clk);
      p_wr_en = 1'b0; q_wr_en = 1'b0;
      if ($urandom % 5 == 0) begin
        req_valid = 1'b0;
        last_was_batch = 1'b0;
        continue;
      end
      for (int n = 0; n < NPE; n++) begin
        us[n] = UW'($urandom % NU);
        is[n] = IW'($urandom % NI);
      end
      issue(us, is);
      if (last_was_batch) n_b2b++;
      last_was_batch = 1'b1;
      // Rewrite one factor of P or Q at the same edge: only later batches
      // see it, so the reference model is updated after the expectation.
      if ($urandom % 3 == 0) begin
        if ($urandom % 2 == 0) begin
          p_wr_en = 1'b1; p_wr_row = UW'($urandom % NU); p_wr_col = KW'($urandom % K);
          p_wr_data = rand_factor(); pm[p_wr_row][p_wr_col] = p_wr_data;
        end else begin
          q_wr_en = 1'b1; q_wr_row = IW'($urandom % NI); q_wr_col = KW'($urandom % K);
          q_wr_data = rand_factor(); qm[q_wr_row][q_wr_col] = q_wr_data;
        end
        n_rewrite++;
      end
    end
    @(negedge clk);
    req_valid = 1'b0; p_wr_en = 1'b0; q_wr_en = 1'b0;
    repeat (LAT + 3) @(negedge clk);

    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d batches unanswered", exp_q.size()); end
    $display("mechanisms: model loads=%0d full-matrix batches=%0d back-to-back batches=%0d model rewrites=%0d batches=%0d",
             n_load, n_full, n_b2b, n_rewrite, n_batches);
    if (n_load == 0)    begin failures++; $display("FAIL: no model load"); end
    if (n_full == 0)    begin failures++; $display("FAIL: no full-matrix batch"); end
    if (n_b2b == 0)     begin failures++; $display("FAIL: no back-to-back batches"); end
    if (n_rewrite == 0) begin failures++; $display("FAIL: no model rewrite"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

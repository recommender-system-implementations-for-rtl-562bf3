// tb_recsys_top: end-to-end testbench of the whole design at its default
// sizes (no parameter is overridden).
//
// Prediction circuit (100 elements, K = 2, 20 x 5 model): loads a random
// model, predicts all 100 user/item pairs in one batch, then streams
// random batches on consecutive cycles while rewriting model entries at
// the same edges.  Every prediction and its two-cycle latency is checked
// against the reference dot product.
//
// Training engine (K = 2, MovieLens-100K sizes: 943 users, 1682 items,
// 100,000 ratings): loads a random initial model and a synthetic rating
// list of that shape (every user rates 106 or 107 items, sorted by user and
// item, ratings 1..5), trains for one full iteration (a user pass and an
// item pass), checks that it takes 22 cycles per rating, and reads back
// all 5,250 factors to compare them with a single-precision replay of
// Algorithm 1.
//
// Mechanisms counted, each required at least once: model load, full-matrix
// batch, back-to-back batches and model rewrite in the prediction circuit;
// rating load, training run and model read-back in the training engine.
module tb_recsys_top;
  import ppc_pkg::*;
  import fp_ref_pkg::*;

  // Prediction circuit sizes (defaults of recsys_top).
  localparam int NPE = DEF_NPE, PK = DEF_K, PU = DEF_NUM_USERS, PI = DEF_NUM_ITEMS;
  localparam int PUW = $clog2(PU), PIW = $clog2(PI), PKW = $clog2(PK);
  localparam int LAT = 1 + $clog2(PK);
  // Training engine sizes (defaults of recsys_top).
  localparam int TK = DEF_K, TU = 943, TI = 1682, TR = 100000;
  localparam int TUW = $clog2(TU), TIW = $clog2(TI), TRW = $clog2(TR), TKW = $clog2(TK);
  localparam int TAW = TRW;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           ppc_p_wr_en, ppc_q_wr_en;
  logic [PUW-1:0] ppc_p_wr_row;
  logic [PIW-1:0] ppc_q_wr_row;
  logic [PKW-1:0] ppc_p_wr_col, ppc_q_wr_col;
  fp32_t          ppc_p_wr_data, ppc_q_wr_data;
  logic           ppc_req_valid, ppc_req_ready, ppc_resp_valid;
  logic [PUW-1:0] ppc_req_user [NPE];
  logic [PIW-1:0] ppc_req_item [NPE];
  fp32_t          ppc_resp_pred [NPE];
  logic           trn_host_we, trn_host_re;
  logic [1:0]     trn_host_sel;
  logic [TAW-1:0] trn_host_addr;
  logic [TKW-1:0] trn_host_col;
  logic [31:0]    trn_host_wdata;
  fp32_t          trn_host_rdata;
  logic [TRW:0]   trn_cfg_num_ratings;
  logic [15:0]    trn_cfg_iters;
  fp32_t          trn_cfg_gamma, trn_cfg_lambda;
  logic           trn_start, trn_busy, trn_done;

  recsys_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int n_load = 0, n_full = 0, n_b2b = 0, n_rewrite = 0;
  int n_rload = 0, n_train = 0, n_readback = 0;

  always_ff @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (3_000_000) @(posedge clk);
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

  // ===================== prediction circuit =====================
  logic [31:0] pm [PU][PK];
  logic [31:0] qm [PI][PK];
  typedef logic [31:0] pred_vec_t [NPE];
  pred_vec_t exp_q [$];
  int        due_q [$];

  function automatic logic [31:0] ppc_ref(int u, int i);
    return fadd(fmul(pm[u][0], qm[i][0]), fmul(pm[u][1], qm[i][1]));
  endfunction

  always @(posedge clk) begin
    #1;
    if (ppc_resp_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: prediction without a request");
      end else begin
        if (due_q[0] != cycle) begin
          failures++;
          $display("FAIL: batch answered at cycle %0d, expected %0d", cycle, due_q[0]);
        end
        for (int n = 0; n < NPE; n++) begin
          checks++;
          if (!same(ppc_resp_pred[n], exp_q[0][n])) begin
            failures++;
            if (failures < 10)
              $display("FAIL element %0d: got %h expected %h", n, ppc_resp_pred[n], exp_q[0][n]);
          end
        end
        void'(exp_q.pop_front());
        void'(due_q.pop_front());
      end
    end
  end

  task automatic ppc_issue(bit full);
    pred_vec_t e;
    for (int n = 0; n < NPE; n++) begin
      ppc_req_user[n] = full ? PUW'(n / PI) : PUW'($urandom % PU);
      ppc_req_item[n] = full ? PIW'(n % PI) : PIW'($urandom % PI);
      e[n] = ppc_ref(int'(ppc_req_user[n]), int'(ppc_req_item[n]));
    end
    ppc_req_valid = 1'b1;
    exp_q.push_back(e);
    due_q.push_back(cycle + LAT);
  endtask

  task automatic ppc_test();
    bit last;
    for (int r = 0; r < PU; r++)
      for (int k = 0; k < PK; k++) begin
        @(negedge clk);
        ppc_p_wr_en = 1'b1; ppc_p_wr_row = PUW'(r); ppc_p_wr_col = PKW'(k);
        ppc_p_wr_data = rand_fp(123, 127); pm[r][k] = ppc_p_wr_data;
        ppc_q_wr_en = (r < PI);
        if (r < PI) begin
          ppc_q_wr_row = PIW'(r); ppc_q_wr_col = PKW'(k);
          ppc_q_wr_data = rand_fp(123, 127); qm[r][k] = ppc_q_wr_data;
        end
        n_load++;
      end
    @(negedge clk);
    ppc_p_wr_en = 1'b0; ppc_q_wr_en = 1'b0;
    ppc_issue(1'b1);
    n_full++;
    @(negedge clk);
    ppc_req_valid = 1'b0;
    last = 1'b0;
    for (int b = 0; b < 60; b++) begin
      @(negedge clk);
      ppc_req_valid = 1'b0; ppc_p_wr_en = 1'b0; ppc_q_wr_en = 1'b0;
      if ($urandom % 5 == 0) begin last = 1'b0; continue; end
      ppc_issue(1'b0);
      if (last) n_b2b++;
      last = 1'b1;
      if ($urandom % 3 == 0) begin
        ppc_p_wr_en = 1'b1; ppc_p_wr_row = PUW'($urandom % PU); ppc_p_wr_col = PKW'($urandom % PK);
        ppc_p_wr_data = rand_fp(123, 127); pm[ppc_p_wr_row][ppc_p_wr_col] = ppc_p_wr_data;
        n_rewrite++;
      end
    end
    @(negedge clk);
    ppc_req_valid = 1'b0; ppc_p_wr_en = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: batches unanswered"); end
  endtask

  // ===================== training engine =====================
  logic [31:0] tp [TU][TK];
  logic [31:0] tq [TI][TK];
  int          ru [TR], ri [TR], rr [TR];

  task automatic trn_write(logic [1:0] sel, int addr, int col, logic [31:0] d);
    @(negedge clk);
    trn_host_we = 1'b1; trn_host_sel = sel; trn_host_addr = TAW'(addr);
    trn_host_col = TKW'(col); trn_host_wdata = d;
  endtask

  task automatic ref_train(logic [31:0] g, logic [31:0] l);
    logic [31:0] dot, e, x, y;
    for (int pass = 0; pass < 2; pass++)
      for (int n = 0; n < TR; n++) begin
        dot = fadd(fmul(tp[ru[n]][0], tq[ri[n]][0]), fmul(tp[ru[n]][1], tq[ri[n]][1]));
        e   = to_fp32(to_real(to_fp32(real'(rr[n]))) - to_real(dot));
        for (int k = 0; k < TK; k++) begin
          x = (pass != 0) ? tp[ru[n]][k] : tq[ri[n]][k];
          y = (pass != 0) ? tq[ri[n]][k] : tp[ru[n]][k];
          y = fadd(y, fmul(g, to_fp32(to_real(fmul(e, x)) - to_real(fmul(l, y)))));
          if (pass != 0) tq[ri[n]][k] = y; else tp[ru[n]][k] = y;
        end
      end
  endtask

  task automatic trn_test();
    int n, t0, item;
    // initial model
    for (int r = 0; r < TU; r++) for (int k = 0; k < TK; k++) begin
      tp[r][k] = rand_fp(124, 126) & 32'h7FFFFFFF;
      trn_write(2'd0, r, k, tp[r][k]);
    end
    for (int r = 0; r < TI; r++) for (int k = 0; k < TK; k++) begin
      tq[r][k] = rand_fp(124, 126) & 32'h7FFFFFFF;
      trn_write(2'd1, r, k, tq[r][k]);
    end
    // ratings: user u owns entries [u*TR/TU, (u+1)*TR/TU)
    n = 0;
    for (int u = 0; u < TU; u++) begin
      int cnt;
      cnt  = ((u + 1) * TR) / TU - (u * TR) / TU;
      item = int'($urandom % 10);
      for (int c = 0; c < cnt; c++) begin
        ru[n] = u; ri[n] = item; rr[n] = 1 + int'($urandom % 5);
        trn_write(2'd2, n, 0, 32'({TUW'(ru[n]), TIW'(ri[n]), 3'(rr[n])}));
        item = item + 1 + int'($urandom % 14);
        n++;
        n_rload++;
      end
    end
    @(negedge clk);
    trn_host_we = 1'b0;
    checks++;
    if (n != TR) begin failures++; $display("FAIL: generated %0d ratings", n); end

    // one iteration
    trn_cfg_num_ratings = (TRW + 1)'(TR);
    trn_cfg_iters  = 16'd1;
    trn_cfg_gamma  = 32'h3C23D70A;   // 0.01
    trn_cfg_lambda = 32'h3DCCCCCD;   // 0.1
    @(negedge clk);
    trn_start = 1'b1;
    @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    trn_start = 1'b0;
    ref_train(trn_cfg_gamma, trn_cfg_lambda);
    while (!trn_done) @(negedge clk);
    n_train++;
    checks++;
    if (cycle - t0 != 22 * TR + 1) begin
      failures++;
      $display("FAIL: training took %0d cycles, expected %0d", cycle - t0, 22 * TR + 1);
    end
    $display("training iteration: %0d cycles for %0d ratings", cycle - t0, TR);

    // read back
    for (int s = 0; s < 2; s++)
      for (int r = 0; r < ((s != 0) ? TI : TU); r++)
        for (int k = 0; k < TK; k++) begin
          @(negedge clk);
          trn_host_re = 1'b1; trn_host_sel = 2'(s); trn_host_addr = TAW'(r); trn_host_col = TKW'(k);
          @(negedge clk);
          trn_host_re = 1'b0;
          checks++;
          n_readback++;
          if (!same(trn_host_rdata, (s != 0) ? tq[r][k] : tp[r][k])) begin
            failures++;
            if (failures < 10)
              $display("FAIL trained %s[%0d][%0d]: got %h expected %h", (s != 0) ? "Q" : "P", r, k,
                       trn_host_rdata, (s != 0) ? tq[r][k] : tp[r][k]);
          end
        end
  endtask

  initial begin
    ppc_p_wr_en = 0; ppc_q_wr_en = 0; ppc_p_wr_row = 0; ppc_q_wr_row = 0;
    ppc_p_wr_col = 0; ppc_q_wr_col = 0; ppc_p_wr_data = 0; ppc_q_wr_data = 0;
    ppc_req_valid = 0;
    for (int n = 0; n < NPE; n++) begin ppc_req_user[n] = 0; ppc_req_item[n] = 0; end
    trn_host_we = 0; trn_host_re = 0; trn_host_sel = 0; trn_host_addr = 0; trn_host_col = 0;
    trn_host_wdata = 0; trn_cfg_num_ratings = 0; trn_cfg_iters = 0;
    trn_cfg_gamma = 0; trn_cfg_lambda = 0; trn_start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    ppc_test();
    trn_test();

    $display("mechanisms: ppc model loads=%0d full-matrix batches=%0d back-to-back batches=%0d model rewrites=%0d",
             n_load, n_full, n_b2b, n_rewrite);
    $display("mechanisms: training rating loads=%0d training runs=%0d factors read back=%0d",
             n_rload, n_train, n_readback);
    if (n_load == 0)     begin failures++; $display("FAIL: no model load"); end
    if (n_full == 0)     begin failures++; $display("FAIL: no full-matrix batch"); end
    if (n_b2b == 0)      begin failures++; $display("FAIL: no back-to-back batches"); end
    if (n_rewrite == 0)  begin failures++; $display("FAIL: no model rewrite"); end
    if (n_rload == 0)    begin failures++; $display("FAIL: no rating load"); end
    if (n_train == 0)    begin failures++; $display("FAIL: no training run"); end
    if (n_readback == 0) begin failures++; $display("FAIL: no read-back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

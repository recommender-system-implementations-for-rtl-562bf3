// mf_sgd_engine: matrix-factorization training engine of the recommender
// system.
//
// Learns the latent-factor matrices P (users x K) and Q (items x K) from a
// list of known ratings by stochastic gradient descent in the alternating
// form of Algorithm 1: each iteration makes a user pass, in which every
// rating (u, i, r) updates only P[u] with Q fixed, and then an item pass,
// in which every rating updates only Q[i] with P fixed:
//   e       = r - P[u] . Q[i]
//   P[u][k] = P[u][k] + gamma * (e * Q[i][k] - lambda * P[u][k])  (user pass)
//   Q[i][k] = Q[i][k] + gamma * (e * P[u][k] - lambda * Q[i][k])  (item pass)
// The rating list is stored sorted by user and then by item.  Because the
// user pass leaves Q fixed and the item pass leaves P fixed, walking that
// one list in order gives each row exactly the sequence of updates that
// Algorithm 1's per-user and per-item loops give it.  All K factors of a
// rating are processed at once (the factor loop is unrolled): one ppc_pe
// forms the dot product, and 3K multipliers and 2K adders form the update.
// Arithmetic is IEEE-754 single precision, as in fp_mul and fp_add.
//
// Interface: while idle the host writes the initial P and Q (one factor
// per write, host_sel = SEL_P or SEL_Q, row host_addr, column host_col) and
// the ratings (host_sel = SEL_R, entry host_addr, host_wdata holding
// {user, item, rating} in its low bits, the rating an integer 0..7).  It
// sets cfg_* and pulses start.  busy stays high during training and done
// pulses for one cycle at the end.  host_re returns a factor of P or Q on
// host_rdata one cycle later.  Timing: 11 cycles per rating and pass, so
// one iteration takes 22 cycles per rating.
//
// The update rule, the alternating passes, the iteration count as a run
// time setting and single-precision arithmetic follow the document; the
// sequential walk over ratings, the host ports, the sorted-list storage and
// the defaults K = 2 and the MovieLens-100K sizes are this design's own
// choices.  The update uses the gradient of the regularised squared error
// (error times the other factor vector, minus lambda times the vector being
// updated).
module mf_sgd_engine
  import ppc_pkg::*;
#(
  parameter int unsigned K           = DEF_K,
  parameter int unsigned NUM_USERS   = 943,
  parameter int unsigned NUM_ITEMS   = 1682,
  parameter int unsigned MAX_RATINGS = 100000,
  localparam int unsigned UW = (NUM_USERS > 1) ? $clog2(NUM_USERS) : 1,
  localparam int unsigned IW = (NUM_ITEMS > 1) ? $clog2(NUM_ITEMS) : 1,
  localparam int unsigned RW = (MAX_RATINGS > 1) ? $clog2(MAX_RATINGS) : 1,
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned AW = (RW > UW) ? ((RW > IW) ? RW : IW) : ((UW > IW) ? UW : IW)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host access, only while idle
  input  logic          host_we,
  input  logic          host_re,
  input  logic [1:0]    host_sel,
  input  logic [AW-1:0] host_addr,
  input  logic [KW-1:0] host_col,
  input  logic [31:0]   host_wdata,
  output fp32_t         host_rdata,
  // run control
  input  logic [RW:0]   cfg_num_ratings,
  input  logic [15:0]   cfg_iters,
  input  fp32_t         cfg_gamma,
  input  fp32_t         cfg_lambda,
  input  logic          start,
  output logic          busy,
  output logic          done
);

  localparam logic [1:0] SEL_P = 2'd0, SEL_Q = 2'd1, SEL_R = 2'd2;

  typedef struct packed {
    logic [UW-1:0] user;
    logic [IW-1:0] item;
    logic [2:0]    rating;
  } rating_t;

  typedef enum logic [3:0] {
    S_IDLE, S_FETCH, S_ROWS, S_DOT, S_DOTW, S_ERR, S_MUL, S_SUB, S_SCALE, S_UPD, S_WB
  } state_t;

  // Small unsigned integer to single precision.
  function automatic fp32_t u3_to_fp32(logic [2:0] v);
    fp32_t f;
    f = FP32_ZERO;
    if (v[2])      f = '{sign: 1'b0, exp: 8'd129, frac: {v[1:0], 21'd0}};
    else if (v[1]) f = '{sign: 1'b0, exp: 8'd128, frac: {v[0], 22'd0}};
    else if (v[0]) f = '{sign: 1'b0, exp: 8'd127, frac: 23'd0};
    return f;
  endfunction

  fp32_t   pmem [NUM_USERS][K];
  fp32_t   qmem [NUM_ITEMS][K];
  rating_t rmem [MAX_RATINGS];

  state_t      state;
  logic        item_pass;           // 0: user pass updates P, 1: item pass updates Q
  logic [RW:0] idx;
  logic [15:0] iter;
  rating_t     cur;
  fp32_t       p_reg [K], q_reg [K];
  fp32_t       x_vec [K], y_vec [K];  // x: the fixed vector, y: the one updated

  // ---- datapath units -----------------------------------------------------
  logic  dot_ready, dot_valid;
  fp32_t dot;
  logic  err_valid;
  fp32_t err;
  fp32_t ex [K], ly [K], diff [K], step [K], y_new [K];
  logic  unused_v [5][K];
  logic  unused_err_valid, unused_dot_ready;

  always_comb begin
    for (int k = 0; k < int'(K); k++) begin
      x_vec[k] = item_pass ? p_reg[k] : q_reg[k];
      y_vec[k] = item_pass ? q_reg[k] : p_reg[k];
    end
  end

  ppc_pe #(.K(K)) u_dot (
    .clk, .rst_n, .in_valid(state == S_DOT), .in_ready(dot_ready),
    .p_row(p_reg), .q_row(q_reg), .out_valid(dot_valid), .pred(dot)
  );

  fp_add u_err (
    .clk, .rst_n, .in_valid(state == S_ERR),
    .a(u3_to_fp32(cur.rating)), .b('{sign: ~dot.sign, exp: dot.exp, frac: dot.frac}),
    .out_valid(err_valid), .y(err)
  );

  for (genvar k = 0; k < K; k++) begin : g_lane
    fp_mul u_ex (.clk, .rst_n, .in_valid(state == S_MUL), .a(err), .b(x_vec[k]),
                 .out_valid(unused_v[0][k]), .y(ex[k]));
    fp_mul u_ly (.clk, .rst_n, .in_valid(state == S_MUL), .a(cfg_lambda), .b(y_vec[k]),
                 .out_valid(unused_v[1][k]), .y(ly[k]));
    fp_add u_diff (.clk, .rst_n, .in_valid(state == S_SUB), .a(ex[k]),
                   .b('{sign: ~ly[k].sign, exp: ly[k].exp, frac: ly[k].frac}),
                   .out_valid(unused_v[2][k]), .y(diff[k]));
    fp_mul u_step (.clk, .rst_n, .in_valid(state == S_SCALE), .a(cfg_gamma), .b(diff[k]),
                   .out_valid(unused_v[3][k]), .y(step[k]));
    fp_add u_upd (.clk, .rst_n, .in_valid(state == S_UPD), .a(y_vec[k]), .b(step[k]),
                  .out_valid(unused_v[4][k]), .y(y_new[k]));
  end
  assign unused_err_valid = err_valid;
  assign unused_dot_ready = dot_ready;

  // ---- memories -----------------------------------------------------------
  logic host_ok;
  assign host_ok = host_we && (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (host_ok && host_sel == SEL_P && int'(host_addr) < int'(NUM_USERS))
      pmem[UW'(host_addr)][host_col] <= host_wdata;
    else if (state == S_WB && !item_pass)
      for (int k = 0; k < int'(K); k++) pmem[cur.user][k] <= y_new[k];
  end

  always_ff @(posedge clk) begin
    if (host_ok && host_sel == SEL_Q && int'(host_addr) < int'(NUM_ITEMS))
      qmem[IW'(host_addr)][host_col] <= host_wdata;
    else if (state == S_WB && item_pass)
      for (int k = 0; k < int'(K); k++) qmem[cur.item][k] <= y_new[k];
  end

  always_ff @(posedge clk) begin
    if (host_ok && host_sel == SEL_R && int'(host_addr) < int'(MAX_RATINGS))
      rmem[RW'(host_addr)] <= rating_t'(host_wdata[$bits(rating_t)-1:0]);
  end

  always_ff @(posedge clk) begin
    if (state == S_FETCH) cur <= rmem[RW'(idx)];
    if (state == S_ROWS)
      for (int k = 0; k < int'(K); k++) begin
        p_reg[k] <= pmem[cur.user][k];
        q_reg[k] <= qmem[cur.item][k];
      end
    if (host_re)
      host_rdata <= (host_sel == SEL_P) ? pmem[UW'(host_addr)][host_col]
                                        : qmem[IW'(host_addr)][host_col];
  end

  // ---- control --------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      item_pass <= 1'b0;
      idx       <= '0;
      iter      <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          item_pass <= 1'b0;
          idx       <= '0;
          iter      <= '0;
          if (cfg_num_ratings == '0 || cfg_iters == '0) done  <= 1'b1;
          else                                          state <= S_FETCH;
        end
        S_FETCH: state <= S_ROWS;
        S_ROWS:  state <= S_DOT;
        S_DOT:   state <= S_DOTW;
        S_DOTW:  if (dot_valid) state <= S_ERR;
        S_ERR:   state <= S_MUL;
        S_MUL:   state <= S_SUB;
        S_SUB:   state <= S_SCALE;
        S_SCALE: state <= S_UPD;
        S_UPD:   state <= S_WB;
        S_WB: begin
          state <= S_FETCH;
          if (idx == cfg_num_ratings - 1'b1) begin
            idx <= '0;
            if (item_pass) begin
              item_pass <= 1'b0;
              if (iter == cfg_iters - 16'd1) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end
              iter <= iter + 16'd1;
            end else begin
              item_pass <= 1'b1;
            end
          end else begin
            idx <= idx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // The configured rating count must fit the rating memory.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_IDLE && start) |-> (int'(cfg_num_ratings) <= int'(MAX_RATINGS)))
    else $error("mf_sgd_engine: cfg_num_ratings exceeds MAX_RATINGS");

endmodule

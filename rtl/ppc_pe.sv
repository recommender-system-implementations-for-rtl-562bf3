// ppc_pe: one prediction element of the prediction parallel circuit.
//
// Computes the predicted rating r^(u,i) = sum_k P[u][k] * Q[i][k] (the dot
// product of Eq. 6) from a user row and an item row of K single-precision
// factors.  Stage one multiplies all K pairs at once with K fp_mul units.
// Stage two adds the products pairwise with K/2 fp_add units.  When K > 2
// the K/2 partial sums are then folded by the same adders, one tree level
// per cycle (pairs of partial sums, an odd one left over being added to
// zero), so that only K/2 adders exist, as in the document's operator
// count, and the adder stage mixes parallel and sequential steps.
//
// Timing: the result appears on pred with out_valid 1 + ceil(log2 K)
// cycles after in_valid (two cycles for the default K = 2).  With K = 2 the
// element is fully pipelined and in_ready stays high; with K > 2 in_ready is
// low while an operation is in flight and in_valid must then stay low.
// The multiplier and adder counts follow the document; the tree order and
// the handshake are this design's own choices.
module ppc_pe
  import ppc_pkg::*;
#(
  parameter int unsigned K = DEF_K
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  fp32_t p_row [K],
  input  fp32_t q_row [K],
  output logic  out_valid,
  output fp32_t pred
);

  localparam int unsigned NA = (K + 1) / 2;    // number of adders
  localparam int unsigned CW = $clog2(K + 1);

  fp32_t prod [K];
  logic  prod_valid [K];
  fp32_t add_a [NA], add_b [NA], add_y [NA];
  logic  add_valid_in;
  logic  add_valid_out [NA];

  // Number of partial sums the adders produce in the cycle now in flight,
  // and whether a reduction pass is pending.
  logic [CW-1:0] n_out_q, n_out_d;
  logic          busy_q;

  for (genvar k = 0; k < K; k++) begin : g_mul
    fp_mul u_mul (
      .clk, .rst_n, .in_valid(in_valid),
      .a(p_row[k]), .b(q_row[k]),
      .out_valid(prod_valid[k]), .y(prod[k])
    );
  end

  // Adder input selection: products in the first pass, fed-back partial
  // sums in later passes.
  logic reduce;
  assign reduce = add_valid_out[0] && (n_out_q > CW'(1));

  always_comb begin
    add_valid_in = 1'b0;
    n_out_d      = n_out_q;
    for (int j = 0; j < int'(NA); j++) begin
      add_a[j] = FP32_ZERO;
      add_b[j] = FP32_ZERO;
    end
    if (prod_valid[0]) begin
      add_valid_in = 1'b1;
      n_out_d      = CW'(NA);
      for (int j = 0; j < int'(NA); j++) begin
        add_a[j] = prod[2*j];
        add_b[j] = (2*j + 1 < int'(K)) ? prod[2*j+1] : FP32_ZERO;
      end
    end else if (reduce) begin
      add_valid_in = 1'b1;
      n_out_d      = CW'((int'(n_out_q) + 1) / 2);
      for (int j = 0; j < int'(NA); j++) begin
        if (2*j < int'(n_out_q))     add_a[j] = add_y[2*j];
        if (2*j + 1 < int'(n_out_q)) add_b[j] = add_y[2*j+1];
      end
    end
  end

  for (genvar j = 0; j < NA; j++) begin : g_add
    fp_add u_add (
      .clk, .rst_n, .in_valid(add_valid_in),
      .a(add_a[j]), .b(add_b[j]),
      .out_valid(add_valid_out[j]), .y(add_y[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_out_q <= '0;
      busy_q  <= 1'b0;
    end else begin
      if (add_valid_in) n_out_q <= n_out_d;
      if (in_valid)                                   busy_q <= 1'b1;
      else if (add_valid_out[0] && n_out_q == CW'(1)) busy_q <= 1'b0;
    end
  end

  assign in_ready  = (K <= 2) ? 1'b1 : !busy_q;
  assign out_valid = add_valid_out[0] && (n_out_q == CW'(1));
  assign pred      = add_y[0];

  // A new operation may only start when the element is ready.
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> in_ready)
    else $error("ppc_pe: in_valid while not ready");

endmodule

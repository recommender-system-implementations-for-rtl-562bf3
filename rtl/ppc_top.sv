// ppc_top: prediction parallel circuit (PPC).
//
// Once a matrix-factorization model (P: one row of K factors per user,
// Q: one row per item) has been trained, the predicted rating of user u
// for item i is the dot product of P[u] and Q[i].  This circuit computes
// NPE such predictions at the same time.  It has two levels of
// parallelism: inside each prediction element (ppc_pe) the K factor
// products are formed by K parallel multipliers and summed by K/2 adders;
// across the circuit NPE elements run side by side, so the whole circuit
// holds NPE*K multipliers and NPE*K/2 adders.  The model lives in two
// factor_mem register files whose NPE read ports feed the elements
// directly.
//
// Interface: the host loads the model one factor per clock through the
// p_wr_* and q_wr_* ports.  A batch of NPE requests (user index and item
// index per element) is accepted at a rising edge where req_valid and
// req_ready are both high; the NPE predictions appear together on
// resp_pred with a one-cycle resp_valid pulse 1 + ceil(log2 K) cycles later
// (two cycles with K = 2), and with K = 2 a new batch can be accepted on
// every cycle.  The model may be rewritten between batches; a write at the
// same edge as a batch is seen by the next batch.
//
// The two-level structure, the operator counts and the default sizes (the
// 20 x 5 test dataset, K = 2) follow the document; the load and request
// ports, the batch handshake and NPE = 100 (every pair of that dataset at
// once) are this design's own choices.
module ppc_top
  import ppc_pkg::*;
#(
  parameter int unsigned NPE       = DEF_NPE,
  parameter int unsigned K         = DEF_K,
  parameter int unsigned NUM_USERS = DEF_NUM_USERS,
  parameter int unsigned NUM_ITEMS = DEF_NUM_ITEMS,
  localparam int unsigned UW = (NUM_USERS > 1) ? $clog2(NUM_USERS) : 1,
  localparam int unsigned IW = (NUM_ITEMS > 1) ? $clog2(NUM_ITEMS) : 1,
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // model load
  input  logic          p_wr_en,
  input  logic [UW-1:0] p_wr_row,
  input  logic [KW-1:0] p_wr_col,
  input  fp32_t         p_wr_data,
  input  logic          q_wr_en,
  input  logic [IW-1:0] q_wr_row,
  input  logic [KW-1:0] q_wr_col,
  input  fp32_t         q_wr_data,
  // prediction requests, one user/item pair per element
  input  logic          req_valid,
  output logic          req_ready,
  input  logic [UW-1:0] req_user [NPE],
  input  logic [IW-1:0] req_item [NPE],
  // predictions
  output logic          resp_valid,
  output fp32_t         resp_pred [NPE]
);

  fp32_t p_rows [NPE][K];
  fp32_t q_rows [NPE][K];
  logic  pe_ready [NPE];
  logic  pe_valid [NPE];

  factor_mem #(.ROWS(NUM_USERS), .K(K), .NRD(NPE)) u_pmem (
    .clk, .rst_n,
    .wr_en(p_wr_en), .wr_row(p_wr_row), .wr_col(p_wr_col), .wr_data(p_wr_data),
    .rd_row(req_user), .rd_data(p_rows)
  );

  factor_mem #(.ROWS(NUM_ITEMS), .K(K), .NRD(NPE)) u_qmem (
    .clk, .rst_n,
    .wr_en(q_wr_en), .wr_row(q_wr_row), .wr_col(q_wr_col), .wr_data(q_wr_data),
    .rd_row(req_item), .rd_data(q_rows)
  );

  logic start;
  assign start = req_valid && req_ready;

  for (genvar n = 0; n < NPE; n++) begin : g_pe
    ppc_pe #(.K(K)) u_pe (
      .clk, .rst_n,
      .in_valid(start), .in_ready(pe_ready[n]),
      .p_row(p_rows[n]), .q_row(q_rows[n]),
      .out_valid(pe_valid[n]), .pred(resp_pred[n])
    );
  end

  // All elements run in lock step, so element 0 speaks for all of them.
  assign req_ready  = pe_ready[0];
  assign resp_valid = pe_valid[0];

  for (genvar n = 1; n < NPE; n++) begin : g_lockstep
    assert property (@(posedge clk) disable iff (!rst_n)
                     (pe_valid[n] == pe_valid[0]) && (pe_ready[n] == pe_ready[0]))
      else $error("ppc_top: prediction elements out of step");
  end

endmodule

// recsys_top: the two recommender-system circuits side by side.
//
// The training engine (mf_sgd_engine) learns a matrix-factorization model
// P, Q from known ratings by alternating stochastic gradient descent; the
// prediction parallel circuit (ppc_top) answers many rating predictions at
// once from a model loaded into it.  They are separate designs, each sized
// for its own dataset (the training engine for MovieLens-100K, the
// prediction circuit for the 20 x 5 test dataset), so each keeps its own
// ports here, prefixed trn_ and ppc_; a host moves a model from one to
// the other if it wishes.  Timing is that of the two blocks.
module recsys_top
  import ppc_pkg::*;
#(
  // prediction circuit
  parameter int unsigned NPE         = DEF_NPE,
  parameter int unsigned PPC_K       = DEF_K,
  parameter int unsigned PPC_USERS   = DEF_NUM_USERS,
  parameter int unsigned PPC_ITEMS   = DEF_NUM_ITEMS,
  // training engine
  parameter int unsigned TRN_K       = DEF_K,
  parameter int unsigned TRN_USERS   = 943,
  parameter int unsigned TRN_ITEMS   = 1682,
  parameter int unsigned TRN_RATINGS = 100000,
  localparam int unsigned PUW = (PPC_USERS > 1) ? $clog2(PPC_USERS) : 1,
  localparam int unsigned PIW = (PPC_ITEMS > 1) ? $clog2(PPC_ITEMS) : 1,
  localparam int unsigned PKW = (PPC_K > 1) ? $clog2(PPC_K) : 1,
  localparam int unsigned TUW = (TRN_USERS > 1) ? $clog2(TRN_USERS) : 1,
  localparam int unsigned TIW = (TRN_ITEMS > 1) ? $clog2(TRN_ITEMS) : 1,
  localparam int unsigned TRW = (TRN_RATINGS > 1) ? $clog2(TRN_RATINGS) : 1,
  localparam int unsigned TKW = (TRN_K > 1) ? $clog2(TRN_K) : 1,
  localparam int unsigned TAW = (TRW > TUW) ? ((TRW > TIW) ? TRW : TIW) : ((TUW > TIW) ? TUW : TIW)
) (
  input  logic           clk,
  input  logic           rst_n,
  // ---- prediction parallel circuit
  input  logic           ppc_p_wr_en,
  input  logic [PUW-1:0] ppc_p_wr_row,
  input  logic [PKW-1:0] ppc_p_wr_col,
  input  fp32_t          ppc_p_wr_data,
  input  logic           ppc_q_wr_en,
  input  logic [PIW-1:0] ppc_q_wr_row,
  input  logic [PKW-1:0] ppc_q_wr_col,
  input  fp32_t          ppc_q_wr_data,
  input  logic           ppc_req_valid,
  output logic           ppc_req_ready,
  input  logic [PUW-1:0] ppc_req_user [NPE],
  input  logic [PIW-1:0] ppc_req_item [NPE],
  output logic           ppc_resp_valid,
  output fp32_t          ppc_resp_pred [NPE],
  // ---- training engine
  input  logic           trn_host_we,
  input  logic           trn_host_re,
  input  logic [1:0]     trn_host_sel,
  input  logic [TAW-1:0] trn_host_addr,
  input  logic [TKW-1:0] trn_host_col,
  input  logic [31:0]    trn_host_wdata,
  output fp32_t          trn_host_rdata,
  input  logic [TRW:0]   trn_cfg_num_ratings,
  input  logic [15:0]    trn_cfg_iters,
  input  fp32_t          trn_cfg_gamma,
  input  fp32_t          trn_cfg_lambda,
  input  logic           trn_start,
  output logic           trn_busy,
  output logic           trn_done
);

  ppc_top #(.NPE(NPE), .K(PPC_K), .NUM_USERS(PPC_USERS), .NUM_ITEMS(PPC_ITEMS)) u_ppc (
    .clk, .rst_n,
    .p_wr_en(ppc_p_wr_en), .p_wr_row(ppc_p_wr_row), .p_wr_col(ppc_p_wr_col), .p_wr_data(ppc_p_wr_data),
    .q_wr_en(ppc_q_wr_en), .q_wr_row(ppc_q_wr_row), .q_wr_col(ppc_q_wr_col), .q_wr_data(ppc_q_wr_data),
    .req_valid(ppc_req_valid), .req_ready(ppc_req_ready),
    .req_user(ppc_req_user), .req_item(ppc_req_item),
    .resp_valid(ppc_resp_valid), .resp_pred(ppc_resp_pred)
  );

  mf_sgd_engine #(.K(TRN_K), .NUM_USERS(TRN_USERS), .NUM_ITEMS(TRN_ITEMS),
                  .MAX_RATINGS(TRN_RATINGS)) u_trn (
    .clk, .rst_n,
    .host_we(trn_host_we), .host_re(trn_host_re), .host_sel(trn_host_sel),
    .host_addr(trn_host_addr), .host_col(trn_host_col), .host_wdata(trn_host_wdata),
    .host_rdata(trn_host_rdata),
    .cfg_num_ratings(trn_cfg_num_ratings), .cfg_iters(trn_cfg_iters),
    .cfg_gamma(trn_cfg_gamma), .cfg_lambda(trn_cfg_lambda),
    .start(trn_start), .busy(trn_busy), .done(trn_done)
  );

endmodule

// factor_mem: storage for one latent-factor matrix of the model, P (one
// row of K factors per user) or Q (one row per item).
//
// The matrix is held in registers so that every prediction element can
// read a whole row at the same time: NRD independent read ports each take
// a row index and return that row's K factors combinationally, in the same
// cycle.  A single write port loads one factor per clock (row wr_row,
// column wr_col) and the new value is visible to reads from the next
// cycle.  Reset clears the matrix to +0.  A read of a row index outside
// the matrix returns zeros.  The document feeds the multipliers straight
// from P and Q; the register organisation, the one-factor-per-cycle load
// port and the reset value are this design's own choices.
module factor_mem
  import ppc_pkg::*;
#(
  parameter int unsigned ROWS = DEF_NUM_USERS,
  parameter int unsigned K    = DEF_K,
  parameter int unsigned NRD  = DEF_NPE,
  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned KW  = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // write port
  input  logic          wr_en,
  input  logic [RW-1:0] wr_row,
  input  logic [KW-1:0] wr_col,
  input  fp32_t         wr_data,
  // read ports
  input  logic [RW-1:0] rd_row  [NRD],
  output fp32_t         rd_data [NRD][K]
);

  fp32_t mem [ROWS][K];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(ROWS); r++)
        for (int k = 0; k < int'(K); k++)
          mem[r][k] <= FP32_ZERO;
    end else if (wr_en && (int'(wr_row) < int'(ROWS)) && (int'(wr_col) < int'(K))) begin
      mem[wr_row][wr_col] <= wr_data;
    end
  end

  always_comb begin
    for (int n = 0; n < int'(NRD); n++)
      for (int k = 0; k < int'(K); k++)
        rd_data[n][k] = (int'(rd_row[n]) < int'(ROWS)) ? mem[rd_row[n]][k] : FP32_ZERO;
  end

endmodule

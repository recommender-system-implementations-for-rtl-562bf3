// tb_factor_mem: self-checking testbench of factor_mem.
//
// Uses a 20 x 2 matrix with 8 read ports.  Checks that reset leaves every
// factor at zero, then interleaves random single-factor writes (some to
// rows or columns outside the matrix, which must be ignored) with reads of
// random rows on all ports, comparing each read against a shadow copy.  A
// value written at one edge must be readable right after that edge.
module tb_factor_mem;
  import ppc_pkg::*;

  localparam int ROWS = 20, K = 2, NRD = 8;
  localparam int RW = $clog2(ROWS), KW = $clog2(K);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          wr_en;
  logic [RW-1:0] wr_row;
  logic [KW-1:0] wr_col;
  fp32_t         wr_data;
  logic [RW-1:0] rd_row [NRD];
  fp32_t         rd_data [NRD][K];
  logic [31:0]   shadow [ROWS][K];
  int            checks = 0, failures = 0;

  factor_mem #(.ROWS(ROWS), .K(K), .NRD(NRD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    logic [31:0] e;
    for (int n = 0; n < NRD; n++) rd_row[n] = RW'($urandom % 32);
    #1;
    for (int n = 0; n < NRD; n++)
      for (int k = 0; k < K; k++) begin
        e = (int'(rd_row[n]) < ROWS) ? shadow[rd_row[n]][k] : 32'h0;
        checks++;
        if (rd_data[n][k] != e) begin
          failures++;
          if (failures < 10)
            $display("FAIL row %0d col %0d port %0d: got %h expected %h", rd_row[n], k, n, rd_data[n][k], e);
        end
      end
  endtask

  initial begin
    wr_en = 1'b0; wr_row = '0; wr_col = '0; wr_data = '0;
    for (int r = 0; r < ROWS; r++) for (int k = 0; k < K; k++) shadow[r][k] = 32'h0;
    for (int n = 0; n < NRD; n++) rd_row[n] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 5; i++) check_reads();
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wr_en   = ($urandom % 3) != 0;
      wr_row  = RW'($urandom % 24);
      wr_col  = KW'($urandom % 2);
      wr_data = $urandom;
      @(posedge clk);
      if (wr_en && int'(wr_row) < ROWS) shadow[wr_row][wr_col] = wr_data;
      #1;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

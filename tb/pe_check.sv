// pe_check: drives one ppc_pe with K factors and checks it.
//
// Sends N random user/item rows, back to back when the element is ready,
// and compares every prediction with the reference dot product: products
// rounded to single precision, then summed as a pairwise tree (an odd
// leftover added to zero), each sum rounded, which is the order the element
// is specified to use.  It also checks that each result arrives exactly
// 1 + ceil(log2 K) cycles after its operands and that the results come out
// in order.  done rises when all N results have been checked.
module pe_check
  import ppc_pkg::*;
  import fp_ref_pkg::*;
#(
  parameter int unsigned K = 2,
  parameter int unsigned N = 2000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int LAT = 1 + $clog2(K);

  logic  in_valid, in_ready, out_valid;
  fp32_t p_row [K], q_row [K];
  fp32_t pred;

  ppc_pe #(.K(K)) dut (.clk, .rst_n, .in_valid, .in_ready, .p_row, .q_row, .out_valid, .pred);

  function automatic logic [31:0] tree_sum(logic [31:0] v [], int n);
    logic [31:0] nxt [];
    if (n == 1) return v[0];
    nxt = new[(n + 1) / 2];
    for (int j = 0; j < (n + 1) / 2; j++)
      nxt[j] = to_fp32(to_real(v[2*j]) + ((2*j + 1 < n) ? to_real(v[2*j+1]) : 0.0));
    return tree_sum(nxt, (n + 1) / 2);
  endfunction

  logic [31:0] exp_q [$];
  int          due_q [$];
  int          cycle = 0;
  int          sent;

  always_ff @(posedge clk) cycle <= cycle + 1;

  initial begin
    logic [31:0] m [];
    logic [31:0] e;
    checks = 0; failures = 0; done = 1'b0; sent = 0;
    in_valid = 1'b0;
    for (int k = 0; k < int'(K); k++) begin p_row[k] = '0; q_row[k] = '0; end
    m = new[K];
    @(posedge rst_n);
    while (sent < int'(N)) begin
      @(negedge clk);
      if (in_ready && ($urandom % 4 != 0)) begin
        for (int k = 0; k < int'(K); k++) begin
          p_row[k] = rand_fp(110, 135);
          q_row[k] = rand_fp(110, 135);
          m[k] = to_fp32(to_real(p_row[k]) * to_real(q_row[k]));
        end
        e = tree_sum(m, K);
        exp_q.push_back(e);
        due_q.push_back(cycle + LAT);
        in_valid = 1'b1;
        sent++;
      end else begin
        in_valid = 1'b0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    wait (exp_q.size() == 0);
    done = 1'b1;
  end

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL K=%0d: unexpected result %h", K, pred);
      end else begin
        if (!same(pred, exp_q[0]) || due_q[0] != cycle) begin
          failures++;
          if (failures < 10)
            $display("FAIL K=%0d: got %h at cycle %0d, expected %h at cycle %0d",
                     K, pred, cycle, exp_q[0], due_q[0]);
        end
        void'(exp_q.pop_front());
        void'(due_q.pop_front());
      end
    end
  end

endmodule

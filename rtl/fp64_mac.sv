// Double-precision multiply-accumulate lane (acc += x * y).
//
// This is the arithmetic element of every dot product in the design, the
// role the source gives to the FPGA's DSP slices ("A += X*Y").  It is a
// two-stage pipeline: stage 1 registers the product x*y together with the
// first/last flags, stage 2 adds the product into the accumulator (or loads
// it when the term is the first of a new sum).  One term can be accepted
// every cycle, back to back; the sum of a run that ends with in_last appears
// on out_sum with out_valid two cycles after that last term.
// Flags: in_first marks the first term of a sum, in_last its final term; a
// single-term sum sets both.  Reset clears the valid flags only.
module fp64_mac
  import knn_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  logic  in_last,
  input  fp64_t x,
  input  fp64_t y,
  output logic  out_valid,
  output fp64_t out_sum
);

  fp64_t prod_c, prod_q, acc_q, sum_c;
  logic  v_q, first_q, last_q;

  fp64_mul u_mul (.a(x), .b(y), .y(prod_c));
  fp64_add u_add (.a(acc_q), .b(prod_q), .y(sum_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      first_q   <= 1'b0;
      last_q    <= 1'b0;
      prod_q    <= FP64_ZERO;
      acc_q     <= FP64_ZERO;
      out_valid <= 1'b0;
      out_sum   <= FP64_ZERO;
    end else begin
      v_q       <= in_valid;
      first_q   <= in_first;
      last_q    <= in_last;
      prod_q    <= prod_c;
      out_valid <= 1'b0;
      if (v_q) begin
        acc_q <= first_q ? prod_q : sum_c;
        if (last_q) begin
          out_valid <= 1'b1;
          out_sum   <= first_q ? prod_q : sum_c;
        end
      end
    end
  end

endmodule

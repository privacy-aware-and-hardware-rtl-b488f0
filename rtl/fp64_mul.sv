// Combinational IEEE-754 double-precision multiplier (y = a * b).
//
// The 53x53-bit significand product is normalised by at most one place and
// rounded to nearest, ties to even.  As in fp64_add, subnormal inputs count as
// zero, results below the normal range flush to +0 and overflow gives
// infinity; NaN/infinity inputs are not treated specially (this design's
// choice, the values of the kNN datapath stay well inside the normal range).
// It is the multiplier half of the DSP-style multiply-accumulate lane.
module fp64_mul
  import knn_pkg::*;
(
  input  fp64_t a,
  input  fp64_t b,
  output fp64_t y
);

  always_comb begin
    logic [105:0] prod;
    logic [52:0]  mant;
    logic         g, r;
    logic [53:0]  rnd;
    logic [12:0]  e;
    logic         s;

    s    = a[63] ^ b[63];
    prod = {1'b1, a[51:0]} * {1'b1, b[51:0]};
    e    = {2'b00, a[62:52]} + {2'b00, b[62:52]} - 13'd1023;
    if (prod[105]) begin
      mant = prod[105:53];
      g    = prod[52];
      r    = |prod[51:0];
      e    = e + 13'd1;
    end else begin
      mant = prod[104:52];
      g    = prod[51];
      r    = |prod[50:0];
    end
    rnd = {1'b0, mant} + {53'd0, g & (r | mant[0])};
    if (rnd[53]) begin
      rnd = rnd >> 1;
      e   = e + 13'd1;
    end
    if (a[62:52] == 11'd0 || b[62:52] == 11'd0 || $signed(e) <= 0) begin
      y = FP64_ZERO;
    end else if ($signed(e) >= 13'sd2047) begin
      y = {s, 11'h7FF, 52'd0};
    end else begin
      y = {s, e[10:0], rnd[51:0]};
    end
  end

endmodule

// Combinational IEEE-754 double-precision adder (y = a + b).
//
// Used wherever the kNN datapath adds or subtracts doubles (subtract by
// flipping the sign bit of b).  The smaller operand is aligned to the larger
// one with three extra bits (guard, round, sticky), the magnitudes are added
// or subtracted, the result is renormalised and rounded to nearest, ties to
// even.  Subnormal inputs are read as zero and results below the normal range
// flush to +0; an exponent overflow gives infinity.  NaN and infinity inputs
// are not given special meaning: the values this design handles (keys and
// IDs of order 0.01..N) never come near them.  These limits are this
// design's choice; the source only says the datapath works on doubles.
module fp64_add
  import knn_pkg::*;
(
  input  fp64_t a,
  input  fp64_t b,
  output fp64_t y
);

  always_comb begin
    logic        sa, sb, sl, ss;
    logic [10:0] ea, eb, el, es;
    logic [52:0] ma, mb, ml, msm;
    logic [11:0] d;
    logic [5:0]  dcap;
    logic [111:0] wide;
    logic [55:0] xl, xs;
    logic [56:0] sum;
    logic [55:0] m;
    logic [12:0] e;            // signed working exponent
    logic [5:0]  lz;
    logic        found;
    logic [53:0] rnd;
    logic        rs;

    sa = a[63]; ea = a[62:52]; ma = {1'b1, a[51:0]};
    sb = b[63]; eb = b[62:52]; mb = {1'b1, b[51:0]};
    y  = FP64_ZERO;
    m  = '0; e = '0; rs = 1'b0; lz = '0; found = 1'b0;
    sum = '0; rnd = '0; wide = '0; xl = '0; xs = '0; d = '0; dcap = '0;
    sl = sa; ss = sb; el = ea; es = eb; ml = ma; msm = mb;

    if (ea == 11'd0 && eb == 11'd0) begin
      y = FP64_ZERO;
    end else if (ea == 11'd0) begin
      y = b;
    end else if (eb == 11'd0) begin
      y = a;
    end else begin
      // order by magnitude
      if ({eb, b[51:0]} > {ea, a[51:0]}) begin
        sl = sb; el = eb; ml = mb;
        ss = sa; es = ea; msm = ma;
      end
      d    = {1'b0, el} - {1'b0, es};
      dcap = (d > 12'd63) ? 6'd63 : d[5:0];
      wide = {msm, 3'b000, 56'd0} >> dcap;
      xs   = wide[111:56];
      xs[0] = xs[0] | (|wide[55:0]);
      xl   = {ml, 3'b000};
      e    = {2'b00, el};
      if (sl == ss) begin
        sum = {1'b0, xl} + {1'b0, xs};
        if (sum[56]) begin
          m    = sum[56:1];
          m[0] = m[0] | sum[0];
          e    = e + 13'd1;
        end else begin
          m = sum[55:0];
        end
        rs = sl;
      end else begin
        m  = xl - xs;
        rs = sl;
        // leading-zero count
        for (int i = 55; i >= 0; i--) begin
          if (!found && m[i]) begin
            found = 1'b1;
            lz    = 6'(55 - i);
          end
        end
        m = m << lz;
        e = e - {7'd0, lz};
      end

      if (m == 56'd0) begin
        y = FP64_ZERO;
      end else begin
        // round to nearest, ties to even: m[55:3] kept, m[2] guard, m[1:0] rest
        rnd = {1'b0, m[55:3]} +
              {53'd0, (m[2] & ((|m[1:0]) | m[3]))};
        if (rnd[53]) begin
          rnd = rnd >> 1;
          e   = e + 13'd1;
        end
        if ($signed(e) <= 0) begin
          y = FP64_ZERO;
        end else if ($signed(e) >= 13'sd2047) begin
          y = {rs, 11'h7FF, 52'd0};
        end else begin
          y = {rs, e[10:0], rnd[51:0]};
        end
      end
    end
  end

endmodule

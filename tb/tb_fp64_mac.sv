// Self-checking testbench for fp64_mac and, through it, fp64_mul/fp64_add.
//
// Runs many dot products of random doubles (mixed signs, exponents spread
// over +-40 binades, and runs built to cancel) through the MAC lane, one term
// per cycle back to back, and compares each sum bit-exactly with the same
// sum computed in the simulator's own double arithmetic in the same order.
// Also checks the two-cycle latency from the last term to out_valid.
module tb_fp64_mac;
  import knn_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  fp64_t x = '0, y = '0;
  logic out_valid;
  fp64_t out_sum;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp64_mac dut (.*);

  function automatic fp64_t rand_fp(int spread);
    logic [10:0] e;
    e = 11'(1023 + ($urandom % (2*spread+1)) - spread);
    return {1'($urandom), e, 20'($urandom), 32'($urandom)};
  endfunction

  fp64_t expq[$];
  int    last_cycle[$];
  int    cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      fp64_t e; int lc;
      checks++;
      e  = expq.pop_front();
      lc = last_cycle.pop_front();
      if (out_sum !== e) begin
        failures++;
        $display("MISMATCH got %h exp %h (%g vs %g)", out_sum, e,
                 $bitstoreal(out_sum), $bitstoreal(e));
      end
      checks++;
      if (cycle - lc != 2) begin
        failures++;
        $display("LATENCY %0d", cycle - lc);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real acc;
    int  len, spread;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < 3000; t++) begin
      len    = 1 + ($urandom % 12);
      spread = (t % 3 == 0) ? 0 : 40;
      acc = 0.0;
      for (int k = 0; k < len; k++) begin
        fp64_t a, b;
        a = rand_fp(spread);
        b = rand_fp(spread);
        // every 5th run: make the second term cancel the first closely
        if (t % 5 == 1 && k == 1) begin
          a = {~x[63], x[62:0]} ^ 64'(($urandom % 4));
          b = y;
        end
        if (k == 0) acc = $bitstoreal(a) * $bitstoreal(b);
        else        acc = acc + $bitstoreal(a) * $bitstoreal(b);
        x <= a; y <= b;
        in_valid <= 1; in_first <= (k == 0); in_last <= (k == len - 1);
        @(posedge clk);
        if (k == len - 1) begin
          expq.push_back($realtobits(acc));
          last_cycle.push_back(cycle);
        end
      end
    end
    in_valid <= 0; in_first <= 0; in_last <= 0;
    repeat (5) @(posedge clk);
    if (expq.size() != 0) begin failures++; $display("missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for mt19937.
//
// Checks the first outputs for the reference seed 5489 against the published
// MT19937 values, then compares 2000 words (more than three full state
// regenerations) for two seeds against a block-twist software model, with
// random gaps between the next pulses.  Also checks that seeding takes 624
// cycles before ready.
module tb_mt19937;
  logic clk = 0, rst_n = 0;
  logic [31:0] seed = 0;
  logic seed_load = 0, next = 0;
  logic ready;
  logic [31:0] word;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mt19937 dut (.*);

  // software reference: classic whole-array twist
  logic [31:0] st [624];
  int sidx;
  function automatic void sw_seed(logic [31:0] s);
    st[0] = s;
    for (int i = 1; i < 624; i++)
      st[i] = 32'd1812433253 * (st[i-1] ^ (st[i-1] >> 30)) + 32'(i);
    sidx = 624;
  endfunction
  function automatic logic [31:0] sw_next();
    logic [31:0] y;
    if (sidx >= 624) begin
      for (int k = 0; k < 624; k++) begin
        y = (st[k] & 32'h8000_0000) | (st[(k+1)%624] & 32'h7FFF_FFFF);
        st[k] = st[(k+397)%624] ^ (y >> 1) ^ (y[0] ? 32'h9908_B0DF : 0);
      end
      sidx = 0;
    end
    y = st[sidx++];
    y ^= (y >> 11);
    y ^= (y << 7) & 32'h9D2C_5680;
    y ^= (y << 15) & 32'hEFC6_0000;
    y ^= (y >> 18);
    return y;
  endfunction

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic do_seed(logic [31:0] s);
    int n;
    @(negedge clk);
    seed = s; seed_load = 1;
    @(negedge clk);
    seed_load = 0;
    n = 0;
    while (!ready) begin @(negedge clk); n++; end
    checks++;
    if (n < 624 || n > 630) begin failures++; $display("FAIL seed cycles %0d", n); end
  endtask

  task automatic take(output logic [31:0] w);
    @(negedge clk);
    while (!ready) @(negedge clk);
    w = word;
    next = 1;
    @(negedge clk);
    next = 0;
    repeat ($urandom % 3) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [31:0] w;
    automatic logic [31:0] known [5] = '{32'd3499211612, 32'd581869302, 32'd3890346734,
                               32'd3586334585, 32'd545404204};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    do_seed(32'd5489);
    sw_seed(32'd5489);
    for (int i = 0; i < 2000; i++) begin
      take(w);
      if (i < 5) check(w, known[i], "reference");
      check(w, sw_next(), "model");
    end
    do_seed(32'hC0FFEE01);
    sw_seed(32'hC0FFEE01);
    for (int i = 0; i < 1300; i++) begin
      take(w);
      check(w, sw_next(), "model2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for knn_split, both variants.
//
// An RA-mode and a drone-mode instance split random ID vectors under random
// secret vectors S, fed from a random-word source in the testbench that is
// ready only on some cycles.  Every element is compared bit-exactly with the
// split worked out in the simulator's double arithmetic: the copied positions
// (S=1 for RA, S=0 for drone) must hold the ID bit twice, the others the
// random value r = (1.w - 1)*0.99 + 0.01 and id - r.  Also checks that the
// random values lie in 0.01..1, that one word is taken per element and that
// done comes after exactly N_ID words.
module tb_knn_split;
  import knn_pkg::*;
  localparam int N = 16;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [N-1:0] id = 0, s_key = 0;
  logic rnd_ready = 0;
  logic [31:0] rnd_word = 0;
  logic rnd_next_a, rnd_next_b, busy_a, busy_b, done_a, done_b;
  fp64_t v1a [N], v2a [N], v1b [N], v2b [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  knn_split #(.N_ID(N), .MODE(MODE_RA)) u_ra (
    .clk, .rst_n, .start, .id, .s_key, .rnd_ready, .rnd_word,
    .rnd_next(rnd_next_a), .busy(busy_a), .done(done_a), .v1(v1a), .v2(v2a));
  knn_split #(.N_ID(N), .MODE(MODE_DRONE)) u_dr (
    .clk, .rst_n, .start, .id, .s_key, .rnd_ready, .rnd_word,
    .rnd_next(rnd_next_b), .busy(busy_b), .done(done_b), .v1(v1b), .v2(v2b));

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] words [N];
    int taken;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      for (int k = 0; k < N; k++) words[k] = $urandom;
      if (t == 0) words[0] = 32'd0;              // r = 0.01 exactly
      if (t == 0) words[1] = 32'hFFFF_FFFF;      // r just below 1
      @(negedge clk);
      id = N'({$urandom, $urandom}); s_key = N'({$urandom, $urandom});
      start = 1;
      @(negedge clk);
      start = 0;
      taken = 0;
      while (busy_a) begin
        rnd_ready = ($urandom % 3) != 0;
        rnd_word  = words[taken % N];
        @(posedge clk);
        if (rnd_next_a !== (rnd_ready && busy_a)) chk(0, "rnd_next");
        if (rnd_next_a) taken++;
        @(negedge clk);
      end
      rnd_ready = 0;
      chk(taken == N, "words taken");
      for (int k = 0; k < N; k++) begin
        real r, idr;
        fp64_t er, ed, ei;
        r   = ($bitstoreal({1'b0, 11'd1023, words[k], 20'd0}) - 1.0) * 0.99 + 0.01;
        idr = id[k] ? 1.0 : 0.0;
        er  = $realtobits(r);
        ed  = $realtobits(idr - r);
        ei  = $realtobits(idr);
        chk(r >= 0.01 && r <= 1.0, "range");
        if (s_key[k]) begin
          chk(v1a[k] === ei && v2a[k] === ei, "RA copy");
          chk(v1b[k] === er && v2b[k] === ed, "drone split");
        end else begin
          chk(v1a[k] === er && v2a[k] === ed, "RA split");
          chk(v1b[k] === ei && v2b[k] === ei, "drone copy");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

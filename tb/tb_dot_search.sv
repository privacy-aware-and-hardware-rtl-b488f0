// Self-checking testbench for dot_search (with an index_store behind it).
//
// Fills an index store (8-element sub-indices, 10 slots) with random
// doubles and a random query.  The score of every slot is worked out in the
// simulator's double arithmetic in the order the hardware adds: each
// sub-index sum over o = 0..N-1, then (S1 + S2) + (S3 + S4).  Searches then
// target the exact score of a chosen slot with zero tolerance (must accept
// that slot with that score, first match wins), a value between scores
// with a tolerance that reaches it (accept), and a value no slot reaches
// (reject after all slots), plus a search over an empty store.  Cycle
// counts are checked: (slot+1)*N + 6 cycles from start to done
// (one cycle for an empty store).
module tb_dot_search;
  import knn_pkg::*;
  localparam int N = 8, D = 10;
  localparam int KW = 3, SW = 4, CW = 4;

  logic clk = 0, rst_n = 0;
  logic q_we = 0; logic [KW-1:0] q_idx = 0; fp64_t q_data [NUM_SUB];
  logic start = 0; logic [CW-1:0] count; fp64_t target = 0, tol = 0;
  logic busy, done, accept; logic [SW-1:0] match_slot; fp64_t score;
  logic [SW-1:0] rslot; logic [KW-1:0] ridx; fp64_t rdata [NUM_SUB];
  logic st_clear = 0, st_we = 0; logic [SW-1:0] wslot = 0; logic [KW-1:0] widx = 0;
  fp64_t wdata [NUM_SUB];
  real   I [D][NUM_SUB][N], T [NUM_SUB][N], sc [D];
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  index_store #(.N_ID(N), .NUM_DRONES(D)) u_st (.clk, .rst_n, .clear(st_clear), .we(st_we),
    .wslot, .widx, .wdata, .rslot, .ridx, .rdata, .count);
  dot_search #(.N_ID(N), .NUM_DRONES(D)) dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic search(real tgt, real tl, logic exp_acc, int exp_slot, int nslots);
    int t0, dt;
    @(negedge clk);
    target = $realtobits(tgt); tol = $realtobits(tl);
    start = 1; t0 = cycle;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    dt = cycle - t0;
    chk(accept === exp_acc, $sformatf("accept %0d exp %0d", accept, exp_acc));
    if (exp_acc) begin
      chk(match_slot == SW'(exp_slot), $sformatf("slot %0d exp %0d", match_slot, exp_slot));
      chk(score === $realtobits(sc[exp_slot]), "score bits");
    end
    chk(dt == ((nslots == 0) ? 1 : nslots * N + 6),
        $sformatf("cycles %0d exp %0d", dt, nslots * N + 6));
    while (busy) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real part [NUM_SUB];
    for (int j = 0; j < NUM_SUB; j++) begin q_data[j] = '0; wdata[j] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // empty store: reject at once
    search(1.0, 0.5, 1'b0, 0, 0);
    for (int j = 0; j < NUM_SUB; j++)
      for (int o = 0; o < N; o++) T[j][o] = ($urandom % 20000) / 10000.0 - 1.0;
    for (int o = 0; o < N; o++) begin
      q_we = 1; q_idx = KW'(o);
      for (int j = 0; j < NUM_SUB; j++) q_data[j] = $realtobits(T[j][o]);
      @(negedge clk);
    end
    q_we = 0;
    for (int s = 0; s < D; s++) begin
      for (int o = 0; o < N; o++) begin
        st_we = 1; wslot = SW'(s); widx = KW'(o);
        for (int j = 0; j < NUM_SUB; j++) begin
          I[s][j][o] = ($urandom % 20000) / 10000.0 - 1.0;
          wdata[j] = $realtobits(I[s][j][o]);
        end
        @(negedge clk);
      end
      for (int j = 0; j < NUM_SUB; j++)
        for (int o = 0; o < N; o++)
          part[j] = (o == 0) ? I[s][j][o] * T[j][o] : part[j] + I[s][j][o] * T[j][o];
      sc[s] = (part[0] + part[1]) + (part[2] + part[3]);
    end
    st_we = 0;
    chk(count == CW'(D), "count");
    for (int s = 0; s < D; s++) search(sc[s], 0.0, 1'b1, s, s + 1);
    // tolerance window around slot 6's score
    search(sc[6] + 1.0e-6, 2.0e-6, 1'b1, 6, 7);
    // a target no slot reaches
    search(1000.0, 0.5, 1'b0, 0, D);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for knn_encrypt: the scheme's algebra end to end.
//
// An RA-mode and a drone-mode unit (8-element IDs) are loaded with keys
// derived from one system secret (knn_keygen_pkg).  Random binary IDs p and
// q are encrypted; the testbench collects E(p) = [I1..I4] and E(q) =
// [T1..T4] from the output streams and checks that their dot product equals
// the plain dot product p.q (to 1e-6), for equal and unequal IDs.  It also
// checks that two encryptions of the same ID differ (fresh random split)
// while both still give the right dot product, that requests issued during
// seeding wait for it, and the run time: 624 seeding cycles, two cycles per
// split element, N*N matrix-vector cycles and a short pipeline.
module tb_knn_encrypt;
  import knn_pkg::*;
  import knn_keygen_pkg::*;
  localparam int N = 8;
  localparam int AW = $clog2(N * N), KW = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic [31:0] seed = 0; logic seed_load = 0;
  logic ra_we = 0, dr_we = 0; logic [1:0] key_mat = 0; logic [AW-1:0] key_addr = 0;
  fp64_t key_data = 0;
  logic [N-1:0] s_key = 0;
  logic ra_start = 0, dr_start = 0;
  logic [N-1:0] ra_id = 0, dr_id = 0;
  logic ra_busy, ra_ov, ra_done, dr_busy, dr_ov, dr_done;
  logic [KW-1:0] ra_idx, dr_idx;
  fp64_t ra_out [NUM_SUB], dr_out [NUM_SUB];
  real Ep [NUM_SUB][N], Eq [NUM_SUB][N], Ep_prev [NUM_SUB][N];
  int checks = 0, failures = 0, cycle = 0, t_ra = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  knn_encrypt #(.N_ID(N), .MODE(MODE_RA)) u_ra (.clk, .rst_n, .seed, .seed_load,
    .key_we(ra_we), .key_mat, .key_addr, .key_data, .s_key, .start(ra_start), .id(ra_id),
    .busy(ra_busy), .out_valid(ra_ov), .out_idx(ra_idx), .out_data(ra_out), .done(ra_done));
  knn_encrypt #(.N_ID(N), .MODE(MODE_DRONE)) u_dr (.clk, .rst_n, .seed(seed ^ 32'h5A5A_0001), .seed_load,
    .key_we(dr_we), .key_mat, .key_addr, .key_data, .s_key, .start(dr_start), .id(dr_id),
    .busy(dr_busy), .out_valid(dr_ov), .out_idx(dr_idx), .out_data(dr_out), .done(dr_done));

  always @(posedge clk) begin
    if (rst_n && ra_ov) for (int j = 0; j < NUM_SUB; j++) Ep[j][ra_idx] = $bitstoreal(ra_out[j]);
    if (rst_n && dr_ov) for (int j = 0; j < NUM_SUB; j++) Eq[j][dr_idx] = $bitstoreal(dr_out[j]);
    if (rst_n && ra_done) t_ra = cycle;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real dotE();
    real acc = 0.0;
    for (int j = 0; j < NUM_SUB; j++)
      for (int o = 0; o < N; o++) acc += Ep[j][o] * Eq[j][o];
    return acc;
  endfunction

  task automatic run_both(logic [N-1:0] p, logic [N-1:0] q);
    @(negedge clk);
    ra_id = p; dr_id = q; ra_start = 1; dr_start = 1;
    @(negedge clk);
    ra_start = 0; dr_start = 0;
    while (ra_busy || dr_busy) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    knn_secret sec;
    rmat_t dk [4];
    int t0;
    logic [N-1:0] p, q;
    real d, e;
    sec = new(N);
    sec.drone_key(dk);
    repeat (2) @(negedge clk);
    rst_n = 1;
    s_key = N'($urandom);
    for (int j = 0; j < 4; j++)
      for (int a = 0; a < N * N; a++) begin
        ra_we = 1; dr_we = 1; key_mat = 2'(j); key_addr = AW'(a);
        key_data = $realtobits(sec.ra[j][a]);
        @(negedge clk);
        ra_we = 0;
        key_data = $realtobits(dk[j][a]);
        @(negedge clk);
        dr_we = 0;
      end
    // seed, and request at once: the request must wait for seeding
    seed = 32'd2024; seed_load = 1;
    @(negedge clk);
    seed_load = 0;
    t0 = cycle;
    ra_id = N'($urandom); ra_start = 1; dr_id = ra_id; dr_start = 1;
    @(negedge clk);
    ra_start = 0; dr_start = 0;
    chk(ra_busy && dr_busy, "busy while waiting for seed");
    while (ra_busy || dr_busy) @(negedge clk);
    e = 0.0; for (int k = 0; k < N; k++) e += ra_id[k];
    d = dotE();
    chk(d - e < 1e-6 && e - d < 1e-6, $sformatf("dot after seed %f exp %f", d, e));
    $display("run time from seeding to RA done: %0d cycles", t_ra - t0);
    chk(t_ra - t0 >= 624 + 2 * N + N * N && t_ra - t0 <= 624 + 2 * N + N * N + 10,
        $sformatf("cycles %0d", t_ra - t0));
    for (int t = 0; t < 30; t++) begin
      p = N'($urandom);
      q = (t % 3 == 0) ? p : N'($urandom);
      t0 = cycle;
      run_both(p, q);
      chk(t_ra - t0 >= 2 * N + N * N && t_ra - t0 <= 2 * N + N * N + 10,
          $sformatf("cycles %0d", t_ra - t0));
      e = 0.0; for (int k = 0; k < N; k++) e += (p[k] & q[k]);
      d = dotE();
      chk(d - e < 1e-6 && e - d < 1e-6, $sformatf("dot %f exp %f", d, e));
      // same ID again: a different index, the same dot product
      Ep_prev = Ep;
      run_both(p, q);
      chk(Ep_prev != Ep, "re-encryption differs");
      d = dotE();
      chk(d - e < 1e-6 && e - d < 1e-6, $sformatf("dot2 %f exp %f", d, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

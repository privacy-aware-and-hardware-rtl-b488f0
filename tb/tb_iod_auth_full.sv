// End-to-end testbench of iod_auth_top at its default size.
//
// Runs the whole authentication scheme on iod_auth_top with its default parameters (128-element IDs, 200 stored drones).
// A system secret and per-drone keys are generated in the testbench
// (knn_keygen_pkg, standing in for the registration authority's software).
// IDs are distinct binary vectors of Hamming weight W = N/2, so with target W
// and tolerance 0.25 only a drone's own entry can match.  The test:
//   * registers DEF_NUM_DRONES drones through the RA encryption unit (upload into
//     the index store), checking the registered count;
//   * authenticates registered drones, each with its own freshly split key:
//     accept, matched slot, score within 1e-6 of W, and the search time from
//     the end of the request stream to the decision, (slot+1)*N + 6 cycles;
//     a match before the last slot ends the search early;
//   * an unregistered ID and a drone with a key from another secret must be
//     rejected after all slots (N*slots + 6 cycles);
//   * one drone asks twice: the two request indices E(q) must differ
//     (unlinkability) and both must be accepted;
//   * a request made right after re-seeding waits for the generator;
//   * after the server store is cleared a request is rejected at once.
// Every mechanism is counted and one that never happened counts a failure.
module tb_iod_auth_full;
  import knn_pkg::*;
  import knn_keygen_pkg::*;
  localparam int N  = DEF_N_ID;
  localparam int D  = DEF_NUM_DRONES;
  localparam int AW = $clog2(N * N);
  localparam int KW = (N > 1) ? $clog2(N) : 1;
  localparam int SW = (D > 1) ? $clog2(D) : 1;
  localparam int CW = $clog2(D + 1);
  localparam int W  = N / 2;
  localparam int NREG = DEF_NUM_DRONES;

  logic clk = 0, rst_n = 0;
  logic [31:0] ra_seed = 0, dr_seed = 0;
  logic ra_seed_load = 0, dr_seed_load = 0;
  logic ra_key_we = 0, dr_key_we = 0;
  logic [1:0] ra_key_mat = 0, dr_key_mat = 0;
  logic [AW-1:0] ra_key_addr = 0, dr_key_addr = 0;
  fp64_t ra_key_data = 0, dr_key_data = 0;
  logic [N-1:0] ra_s_key = 0, dr_s_key = 0, ra_id = 0, dr_id = 0;
  logic ra_start = 0, dr_start = 0, srv_clear = 0;
  logic [SW-1:0] ra_slot = 0;
  logic ra_busy, ra_done, ep_valid, dr_busy, eq_valid;
  logic [KW-1:0] ep_idx, eq_idx;
  fp64_t ep_data [NUM_SUB], eq_data [NUM_SUB];
  fp64_t match_target = 0, match_tol = 0;
  logic [CW-1:0] registered;
  logic auth_busy, auth_done, auth_accept;
  logic [SW-1:0] auth_slot;
  fp64_t auth_score;

  int checks = 0, failures = 0;
  int n_register = 0, n_accept = 0, n_early = 0, n_reject = 0, n_forged = 0,
      n_unlink = 0, n_seedwait = 0, n_empty = 0;
  int cyc = 0, t_req_end = 0, t_done = 0;
  fp64_t eq_cap [NUM_SUB][N];
  logic [N-1:0] ids [D];

  always #5 clk = ~clk;

  iod_auth_top dut (.*);

  always @(posedge clk) begin
    if (rst_n && eq_valid) begin
      for (int j = 0; j < NUM_SUB; j++) eq_cap[j][eq_idx] = eq_data[j];
      if (eq_idx == KW'(N - 1)) t_req_end = cyc;
    end
    if (rst_n && auth_done) t_done = cyc;
    cyc++;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // random ID of weight W, distinct from the first n entries of ids
  function automatic logic [N-1:0] new_id(int n);
    logic [N-1:0] v;
    logic dup;
    do begin
      int k = 0;
      v = '0;
      while (k < W) begin
        int b = $urandom % N;
        if (!v[b]) begin v[b] = 1'b1; k++; end
      end
      dup = 1'b0;
      for (int i = 0; i < n; i++) if (ids[i] == v) dup = 1'b1;
    end while (dup);
    return v;
  endfunction

  task automatic load_ra_key(rmat_t k [4]);
    for (int j = 0; j < 4; j++)
      for (int a = 0; a < N * N; a++) begin
        ra_key_we = 1; ra_key_mat = 2'(j); ra_key_addr = AW'(a);
        ra_key_data = $realtobits(k[j][a]);
        @(negedge clk);
      end
    ra_key_we = 0;
  endtask

  task automatic load_dr_key(rmat_t k [4]);
    for (int j = 0; j < 4; j++)
      for (int a = 0; a < N * N; a++) begin
        dr_key_we = 1; dr_key_mat = 2'(j); dr_key_addr = AW'(a);
        dr_key_data = $realtobits(k[j][a]);
        @(negedge clk);
      end
    dr_key_we = 0;
  endtask

  task automatic register(int slot, logic [N-1:0] id);
    ra_id = id; ra_slot = SW'(slot); ra_start = 1;
    @(negedge clk);
    ra_start = 0;
    while (ra_busy) @(negedge clk);
    n_register++;
  endtask

  // one authentication request; returns after the decision
  task automatic request(logic [N-1:0] id, output logic acc, output int slot, output int dt);
    while (auth_busy || dr_busy) @(negedge clk);
    dr_id = id; dr_start = 1;
    @(negedge clk);
    dr_start = 0;
    while (!auth_done) @(negedge clk);
    acc  = auth_accept;
    slot = int'(auth_slot);
    @(negedge clk);   // the monitor records auth_done on the next edge
    dt   = t_done - t_req_end;
    while (auth_busy) @(negedge clk);
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    knn_secret sec, other;
    rmat_t dk [4];
    logic acc;
    int slot, dt;
    real sc;
    logic [N-1:0] s;
    logic [N-1:0] stranger;
    int who [3];
    fp64_t first_eq [NUM_SUB][N];

    sec = new(N);
    s = N'({$urandom, $urandom, $urandom, $urandom});
    repeat (2) @(negedge clk);
    rst_n = 1;
    ra_s_key = s; dr_s_key = s;
    match_target = $realtobits(real'(W));
    match_tol    = $realtobits(0.25);
    ra_seed = 32'd5489; dr_seed = 32'd777;
    ra_seed_load = 1; dr_seed_load = 1;
    @(negedge clk);
    ra_seed_load = 0; dr_seed_load = 0;
    load_ra_key(sec.ra);

    // registration of NREG drones
    for (int i = 0; i < NREG; i++) begin
      ids[i] = new_id(i);
      register(i, ids[i]);
    end
    chk(registered == CW'(NREG), $sformatf("registered %0d", registered));

    // authentication of registered drones: first, last and some in between
    for (int r = 0; r < 3; r++)
      who[r] = (r == 0) ? NREG - 1 : (r == 1) ? 0 : ($urandom % NREG);
    for (int r = 0; r < 3; r++) begin
      sec.drone_key(dk);
      load_dr_key(dk);
      request(ids[who[r]], acc, slot, dt);
      sc = $bitstoreal(auth_score);
      chk(acc, $sformatf("drone %0d not accepted", who[r]));
      chk(slot == who[r], $sformatf("slot %0d exp %0d", slot, who[r]));
      chk(sc - W < 1e-6 && W - sc < 1e-6, $sformatf("score %f", sc));
      chk(dt == (who[r] + 1) * N + 6, $sformatf("search cycles %0d exp %0d", dt, (who[r] + 1) * N + 6));
      if (acc) n_accept++;
      if (acc && who[r] < NREG - 1) n_early++;
      if (r == 0) begin
        // same drone, same key, again: a different E(q), still accepted
        first_eq = eq_cap;
        request(ids[who[r]], acc, slot, dt);
        chk(acc && slot == who[r], "second request accepted");
        chk(first_eq != eq_cap, "second request index differs");
        if (first_eq != eq_cap) n_unlink++;
      end
    end

    // an unregistered drone with a valid key
    stranger = new_id(NREG);
    sec.drone_key(dk);
    load_dr_key(dk);
    request(stranger, acc, slot, dt);
    chk(!acc, "stranger accepted");
    chk(dt == NREG * N + 6, $sformatf("reject cycles %0d", dt));
    if (!acc) n_reject++;

    // a registered ID with a key from another secret
    other = new(N);
    other.drone_key(dk);
    load_dr_key(dk);
    request(ids[0], acc, slot, dt);
    chk(!acc, "forged key accepted");
    if (!acc) n_forged++;

    // re-seed the drone's generator and ask at once: the request waits
    sec.drone_key(dk);
    load_dr_key(dk);
    dr_seed = 32'hABCD_0123; dr_seed_load = 1;
    @(negedge clk);
    dr_seed_load = 0;
    begin
      int t0 = cyc;
      request(ids[1 % NREG], acc, slot, dt);
      chk(acc && slot == 1 % NREG, "request after re-seed");
      chk(t_req_end - t0 > 624, "request waited for seeding");
      if (acc && t_req_end - t0 > 624) n_seedwait++;
    end

    // empty server store
    @(negedge clk);
    srv_clear = 1;
    @(negedge clk);
    srv_clear = 0;
    chk(registered == 0, "store cleared");
    request(ids[0], acc, slot, dt);
    chk(!acc, "accepted with empty store");
    if (!acc) n_empty++;

    $display("mechanisms: register=%0d accept=%0d early_stop=%0d reject=%0d forged_key=%0d unlinkable=%0d seed_wait=%0d empty_store=%0d",
             n_register, n_accept, n_early, n_reject, n_forged, n_unlink, n_seedwait, n_empty);
    chk(n_register > 0, "no registration");
    chk(n_accept > 0, "no accept");
    chk(n_early > 0, "no early stop");
    chk(n_reject > 0, "no reject");
    chk(n_forged > 0, "no forged-key reject");
    chk(n_unlink > 0, "no unlinkable pair");
    chk(n_seedwait > 0, "no seed wait");
    chk(n_empty > 0, "no empty-store reject");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for knn_matvec in both addressing modes.
//
// Two engines (RA: row vector x matrix, drone: matrix x column vector) share
// one key store loaded with random key matrices; random split vectors are
// applied and every output element of the four sub-indices is compared
// bit-exactly with the same sums formed in the simulator's double arithmetic
// (terms added in the order k = 0..N-1).  The number of cycles from start to
// done is checked against N*N plus the four-cycle pipeline.
module tb_knn_matvec;
  import knn_pkg::*;
  localparam int N  = 8;
  localparam int AW = $clog2(N * N);
  localparam int KW = $clog2(N);

  logic clk = 0, rst_n = 0, start = 0;
  fp64_t v1 [N], v2 [N];
  logic  key_we = 0; logic [1:0] key_mat = 0; logic [AW-1:0] key_addr = 0; fp64_t key_data = 0;
  logic [AW-1:0] ra_a [NUM_SUB], dr_a [NUM_SUB], rd_a [NUM_SUB];
  fp64_t ra_d [NUM_SUB], dr_d [NUM_SUB];
  logic ra_busy, ra_ov, ra_done, dr_busy, dr_ov, dr_done;
  logic [KW-1:0] ra_idx, dr_idx;
  fp64_t ra_out [NUM_SUB], dr_out [NUM_SUB];
  real K [NUM_SUB][N][N];
  int checks = 0, failures = 0;
  int cycle = 0, t_start = 0, t_ra_done = 0, t_dr_done = 0, n_ra = 0, n_dr = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  key_store #(.N_ID(N)) u_k1 (.clk, .we(key_we), .wmat(key_mat), .waddr(key_addr),
                              .wdata(key_data), .raddr(ra_a), .rdata(ra_d));
  key_store #(.N_ID(N)) u_k2 (.clk, .we(key_we), .wmat(key_mat), .waddr(key_addr),
                              .wdata(key_data), .raddr(dr_a), .rdata(dr_d));
  knn_matvec #(.N_ID(N), .MODE(MODE_RA)) u_ra (.clk, .rst_n, .start, .v1, .v2,
    .key_raddr(ra_a), .key_rdata(ra_d), .busy(ra_busy), .out_valid(ra_ov),
    .out_idx(ra_idx), .out_data(ra_out), .done(ra_done));
  knn_matvec #(.N_ID(N), .MODE(MODE_DRONE)) u_dr (.clk, .rst_n, .start, .v1, .v2,
    .key_raddr(dr_a), .key_rdata(dr_d), .busy(dr_busy), .out_valid(dr_ov),
    .out_idx(dr_idx), .out_data(dr_out), .done(dr_done));

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real rnd();
    return (($urandom % 100000) / 100000.0) * 2.0 - 1.0;
  endfunction

  always @(posedge clk) begin
    if (rst_n && ra_ov) begin
      for (int j = 0; j < NUM_SUB; j++) begin
        real acc;
        for (int k = 0; k < N; k++) begin
          real p;
          p = K[j][k][ra_idx] * $bitstoreal(j < 2 ? v1[k] : v2[k]);
          acc = (k == 0) ? p : acc + p;
        end
        chk(ra_out[j] === $realtobits(acc), $sformatf("RA lane %0d idx %0d", j, ra_idx));
      end
      chk(ra_idx == KW'(n_ra % N), "RA order");
      n_ra++;
    end
    if (rst_n && dr_ov) begin
      for (int j = 0; j < NUM_SUB; j++) begin
        real acc;
        for (int k = 0; k < N; k++) begin
          real p;
          p = K[j][dr_idx][k] * $bitstoreal(j < 2 ? v1[k] : v2[k]);
          acc = (k == 0) ? p : acc + p;
        end
        chk(dr_out[j] === $realtobits(acc), $sformatf("drone lane %0d idx %0d", j, dr_idx));
      end
      chk(dr_idx == KW'(n_dr % N), "drone order");
      n_dr++;
    end
    if (ra_done) t_ra_done = cycle;
    if (dr_done) t_dr_done = cycle;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < NUM_SUB; j++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          K[j][r][c] = rnd();
          key_we = 1; key_mat = 2'(j); key_addr = AW'(r * N + c);
          key_data = $realtobits(K[j][r][c]);
          @(negedge clk);
        end
    key_we = 0;
    for (int t = 0; t < 5; t++) begin
      for (int k = 0; k < N; k++) begin
        v1[k] = $realtobits(rnd());
        v2[k] = $realtobits(rnd());
      end
      start = 1;
      t_start = cycle;
      @(negedge clk);
      start = 0;
      while (ra_busy || dr_busy) @(negedge clk);
      chk(t_ra_done - t_start == N * N + 4, $sformatf("RA cycles %0d", t_ra_done - t_start));
      chk(t_dr_done - t_start == N * N + 4, $sformatf("drone cycles %0d", t_dr_done - t_start));
      @(negedge clk);
    end
    chk(n_ra == 5 * N && n_dr == 5 * N, "element count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// kNN encryption unit: registration-authority or drone variant.
//
// Encrypts a binary ID vector into an encrypted index of 4*N_ID doubles,
// E = [I1, I2, I3, I4] (RA, MODE_RA) or E = [T1, T2, T3, T4] (drone,
// MODE_DRONE).  The unit chains:
//   mt19937    random words for the split (re-seeded through seed/seed_load;
//              ready must be high before a start is accepted),
//   knn_split  ID -> (v', v'') under the secret vector S,
//   key_store  the four key matrices, loaded through key_we/key_mat/...,
//   knn_matvec four MAC lanes, v' against K1/K2 and v'' against K3/K4.
// With the RA key (m1n1, m1n2, m2n3, m2n4) and a drone key made from the
// inverses (n1^-1 m', n2^-1 m'', n3^-1 m''', n4^-1 m'''' with m'+m'' = m1^-1 and
// m'''+m'''' = m2^-1), the dot product of an RA index with a drone index equals
// the dot product of the two plain ID vectors, while the random split values
// make every encryption of the same ID different.
// Timing: a start is taken when idle and held until the generator is ready
// (seeding takes 624 cycles); the split
// needs two cycles per element (one random word each), then the
// matrix-vector pass N_ID*N_ID cycles plus a short pipeline.  Output is a
// stream: out_valid with out_idx = o carries element o of all four
// sub-indices (index positions o, N_ID+o, 2*N_ID+o, 3*N_ID+o); done pulses
// with the last one.  No backpressure.
module knn_encrypt
  import knn_pkg::*;
#(
  parameter int unsigned N_ID = DEF_N_ID,
  parameter split_mode_e MODE = MODE_RA,
  localparam int unsigned AW  = $clog2(N_ID * N_ID),
  localparam int unsigned KW  = (N_ID > 1) ? $clog2(N_ID) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // random generator seeding
  input  logic [31:0]     seed,
  input  logic            seed_load,
  // key loading
  input  logic            key_we,
  input  logic [1:0]      key_mat,
  input  logic [AW-1:0]   key_addr,
  input  fp64_t           key_data,
  input  logic [N_ID-1:0] s_key,
  // encryption request
  input  logic            start,
  input  logic [N_ID-1:0] id,
  output logic            busy,
  output logic            out_valid,
  output logic [KW-1:0]   out_idx,
  output fp64_t           out_data [NUM_SUB],
  output logic            done
);

  logic        rng_ready, rng_next;
  logic [31:0] rng_word;
  logic        sp_busy, sp_done, mv_busy;
  logic        sp_start;
  fp64_t       v1 [N_ID];
  fp64_t       v2 [N_ID];
  logic [AW-1:0] kr_addr [NUM_SUB];
  fp64_t       kr_data [NUM_SUB];

  // a request waits until the generator has finished seeding
  logic want;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  want <= 1'b0;
    else if (start && !busy)     want <= 1'b1;
    else if (want && rng_ready)  want <= 1'b0;
  end
  assign sp_start = want && rng_ready;

  mt19937 u_rng (
    .clk, .rst_n, .seed, .seed_load,
    .next (rng_next), .ready(rng_ready), .word(rng_word)
  );

  knn_split #(.N_ID(N_ID), .MODE(MODE)) u_split (
    .clk, .rst_n, .start(sp_start), .id, .s_key,
    .rnd_ready(rng_ready), .rnd_word(rng_word), .rnd_next(rng_next),
    .busy(sp_busy), .done(sp_done), .v1, .v2
  );

  key_store #(.N_ID(N_ID)) u_keys (
    .clk, .we(key_we), .wmat(key_mat), .waddr(key_addr), .wdata(key_data),
    .raddr(kr_addr), .rdata(kr_data)
  );

  knn_matvec #(.N_ID(N_ID), .MODE(MODE)) u_mv (
    .clk, .rst_n, .start(sp_done), .v1, .v2,
    .key_raddr(kr_addr), .key_rdata(kr_data),
    .busy(mv_busy), .out_valid, .out_idx, .out_data, .done
  );

  // busy from an accepted start until the last output element
  logic pend;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        pend <= 1'b0;
    else if (sp_start) pend <= 1'b1;
    else if (done)     pend <= 1'b0;
  end
  assign busy = want || pend || sp_busy || mv_busy;

endmodule

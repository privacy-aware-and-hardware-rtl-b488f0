// Hardware-accelerated, privacy-preserving drone authentication: top level.
//
// Three accelerators of the scheme side by side, as they are split between
// the parties of an Internet-of-Drones network:
//   RA encryption   (knn_encrypt, MODE_RA)    registration authority: turns a
//                   drone's binary ID p_i into E(p_i) = [I1..I4] with the
//                   system key (S, m1n1, m1n2, m2n3, m2n4) and uploads it into
//                   slot ra_slot of the server's index store;
//   drone encryption (knn_encrypt, MODE_DRONE) a drone's accelerator: turns
//                   its ID q into E(q) = [T1..T4] with its own key
//                   (S, n1^-1 m', n2^-1 m'', n3^-1 m''', n4^-1 m'''');
//   server search   (index_store + dot_search) compares E(q) with every
//                   stored E(p_i) by dot product, first match wins, and
//                   reports accept/reject.
// The two encrypted-index streams that would cross the network are brought
// out as ports (ep_* upload, eq_* request); the network itself, and key
// generation (random matrices, inverses and products, done by RA software),
// are outside this design: keys arrive through the key write ports.
// Flow: an authentication request (dr_start) encrypts q; the index streams
// straight into the search unit's query buffer and the search starts by
// itself when the encryption is done.  auth_done pulses with the decision.
// Default sizes: 128-element IDs (512-element encrypted indices) and 200
// stored drones, the configuration the source compares with other schemes.
module iod_auth_top
  import knn_pkg::*;
#(
  parameter int unsigned N_ID       = DEF_N_ID,
  parameter int unsigned NUM_DRONES = DEF_NUM_DRONES,
  localparam int unsigned AW = $clog2(N_ID * N_ID),
  localparam int unsigned KW = (N_ID > 1) ? $clog2(N_ID) : 1,
  localparam int unsigned SW = (NUM_DRONES > 1) ? $clog2(NUM_DRONES) : 1,
  localparam int unsigned CW = $clog2(NUM_DRONES + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // registration authority
  input  logic [31:0]     ra_seed,
  input  logic            ra_seed_load,
  input  logic            ra_key_we,
  input  logic [1:0]      ra_key_mat,
  input  logic [AW-1:0]   ra_key_addr,
  input  fp64_t           ra_key_data,
  input  logic [N_ID-1:0] ra_s_key,
  input  logic            ra_start,
  input  logic [N_ID-1:0] ra_id,
  input  logic [SW-1:0]   ra_slot,
  output logic            ra_busy,
  output logic            ra_done,
  output logic            ep_valid,
  output logic [KW-1:0]   ep_idx,
  output fp64_t           ep_data [NUM_SUB],
  // drone
  input  logic [31:0]     dr_seed,
  input  logic            dr_seed_load,
  input  logic            dr_key_we,
  input  logic [1:0]      dr_key_mat,
  input  logic [AW-1:0]   dr_key_addr,
  input  fp64_t           dr_key_data,
  input  logic [N_ID-1:0] dr_s_key,
  input  logic            dr_start,
  input  logic [N_ID-1:0] dr_id,
  output logic            dr_busy,
  output logic            eq_valid,
  output logic [KW-1:0]   eq_idx,
  output fp64_t           eq_data [NUM_SUB],
  // authentication server
  input  logic            srv_clear,
  input  fp64_t           match_target,
  input  fp64_t           match_tol,
  output logic [CW-1:0]   registered,
  output logic            auth_busy,
  output logic            auth_done,
  output logic            auth_accept,
  output logic [SW-1:0]   auth_slot,
  output fp64_t           auth_score
);

  logic          ra_out_valid, dr_done;
  logic [SW-1:0] slot_q;
  logic [SW-1:0] st_rslot;
  logic [KW-1:0] st_ridx;
  fp64_t         st_rdata [NUM_SUB];

  knn_encrypt #(.N_ID(N_ID), .MODE(MODE_RA)) u_ra_enc (
    .clk, .rst_n, .seed(ra_seed), .seed_load(ra_seed_load),
    .key_we(ra_key_we), .key_mat(ra_key_mat), .key_addr(ra_key_addr), .key_data(ra_key_data),
    .s_key(ra_s_key), .start(ra_start), .id(ra_id),
    .busy(ra_busy), .out_valid(ra_out_valid), .out_idx(ep_idx), .out_data(ep_data),
    .done(ra_done)
  );
  assign ep_valid = ra_out_valid;

  // slot of the drone being registered, taken with its request
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    slot_q <= '0;
    else if (ra_start && !ra_busy) slot_q <= ra_slot;
  end

  knn_encrypt #(.N_ID(N_ID), .MODE(MODE_DRONE)) u_dr_enc (
    .clk, .rst_n, .seed(dr_seed), .seed_load(dr_seed_load),
    .key_we(dr_key_we), .key_mat(dr_key_mat), .key_addr(dr_key_addr), .key_data(dr_key_data),
    .s_key(dr_s_key), .start(dr_start && !auth_busy), .id(dr_id),
    .busy(dr_busy), .out_valid(eq_valid), .out_idx(eq_idx), .out_data(eq_data),
    .done(dr_done)
  );

  index_store #(.N_ID(N_ID), .NUM_DRONES(NUM_DRONES)) u_store (
    .clk, .rst_n, .clear(srv_clear),
    .we(ra_out_valid), .wslot(slot_q), .widx(ep_idx), .wdata(ep_data),
    .rslot(st_rslot), .ridx(st_ridx), .rdata(st_rdata),
    .count(registered)
  );

  dot_search #(.N_ID(N_ID), .NUM_DRONES(NUM_DRONES)) u_search (
    .clk, .rst_n,
    .q_we(eq_valid), .q_idx(eq_idx), .q_data(eq_data),
    .start(dr_done), .count(registered), .target(match_target), .tol(match_tol),
    .busy(auth_busy), .done(auth_done), .accept(auth_accept),
    .match_slot(auth_slot), .score(auth_score),
    .rslot(st_rslot), .ridx(st_ridx), .rdata(st_rdata)
  );

endmodule

// Split function of the kNN encryption.
//
// Turns a binary ID vector into two double vectors v' and v'' under the
// secret bit vector S.  At positions where S[k] equals the copy value the ID
// bit is copied into both (v'[k] = v''[k] = id[k]); elsewhere v'[k] is a fresh
// random number in 0.01..1 and v''[k] = id[k] - v'[k], so v'[k] + v''[k] is the
// ID bit.  The copy value is the one difference between the two users: the
// registration authority (MODE_RA) copies where S[k] = 1, the drone
// (MODE_DRONE) where S[k] = 0, as the source specifies.
// The random number is made from a 32-bit word: u = 1.w (a double in [1,2)
// with w as the top of its fraction), r = (u - 1) * 0.99 + 0.01; this mapping
// is this design's choice (the source only gives the range).
// Timing: start (one cycle) latches id and S; then one element is split per
// random word taken (rnd_next pulses when rnd_ready is seen), a word is taken
// for every element whatever S holds so the run time does not depend on the
// key; done pulses one cycle after the last element.  v1/v2 hold their
// values until the next start.
module knn_split
  import knn_pkg::*;
#(
  parameter int unsigned N_ID = DEF_N_ID,
  parameter split_mode_e MODE = MODE_RA
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N_ID-1:0]   id,
  input  logic [N_ID-1:0]   s_key,
  input  logic              rnd_ready,
  input  logic [31:0]       rnd_word,
  output logic              rnd_next,
  output logic              busy,
  output logic              done,
  output fp64_t             v1 [N_ID],
  output fp64_t             v2 [N_ID]
);

  localparam int unsigned KW = (N_ID > 1) ? $clog2(N_ID) : 1;
  localparam logic COPY_BIT = (MODE == MODE_RA) ? 1'b1 : 1'b0;

  logic [N_ID-1:0] id_q, s_q;
  logic [KW-1:0]   k;
  fp64_t u, t, t99, r, idv, diff;

  fp64_add u_sub1 (.a(u),   .b(FP64_NEG_ONE),    .y(t));
  fp64_mul u_mul  (.a(t),   .b(FP64_0P99),       .y(t99));
  fp64_add u_add  (.a(t99), .b(FP64_0P01),       .y(r));
  fp64_add u_sub2 (.a(idv), .b({~r[63], r[62:0]}), .y(diff));

  always_comb begin
    u        = {1'b0, 11'd1023, rnd_word, 20'd0};
    idv      = id_q[k] ? FP64_ONE : FP64_ZERO;
    rnd_next = busy && rnd_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      k    <= '0;
      id_q <= '0;
      s_q  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        k    <= '0;
        id_q <= id;
        s_q  <= s_key;
      end else if (busy && rnd_ready) begin
        if (k == KW'(N_ID - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        k <= k + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (busy && rnd_ready) begin
      if (s_q[k] == COPY_BIT) begin
        v1[k] <= idv;
        v2[k] <= idv;
      end else begin
        v1[k] <= r;
        v2[k] <= diff;
      end
    end
  end

endmodule

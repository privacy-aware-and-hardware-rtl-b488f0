// Dot-product index search of the authentication server.
//
// Holds the encrypted index E(q) = [T1..T4] of an authentication request in a
// query buffer and compares it with the stored indices E(p_i), slot 0 first,
// until one matches.  For each slot it forms the dot product
//   score_i = sum_o sum_j I_j[o] * T_j[o]
// with four MAC lanes (one per sub-index, N_ID terms each), adds the four
// partial sums, and accepts the slot when |score_i - target| <= tol.  With
// matching keys score_i is the dot product of the two plain binary IDs, so
// with IDs of a common Hamming weight W and target = W only the requesting
// drone's own entry matches.  The acceptance rule (target and tolerance) is
// this design's choice: the source says only that the server accepts when
// the dot product finds a match.
// Timing: slots are issued back to back, one element per cycle, so the search
// over c slots costs c*N_ID + 6 cycles from start to done; on a match the
// remaining slots are skipped.  After done the unit stays busy for 8 more
// cycles while the MAC pipelines drain.  start is taken when not busy; done
// pulses once,
// with accept, match_slot and score valid from then until the next start.
// Query buffer writes (q_we/q_idx/q_data, the stream of the drone's
// encryption unit) must not overlap a search.  The store is read through
// rslot/ridx with one cycle of latency (index_store).
module dot_search
  import knn_pkg::*;
#(
  parameter int unsigned N_ID       = DEF_N_ID,
  parameter int unsigned NUM_DRONES = DEF_NUM_DRONES,
  localparam int unsigned KW = (N_ID > 1) ? $clog2(N_ID) : 1,
  localparam int unsigned SW = (NUM_DRONES > 1) ? $clog2(NUM_DRONES) : 1,
  localparam int unsigned CW = $clog2(NUM_DRONES + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // query buffer load
  input  logic          q_we,
  input  logic [KW-1:0] q_idx,
  input  fp64_t         q_data [NUM_SUB],
  // search control
  input  logic          start,
  input  logic [CW-1:0] count,
  input  fp64_t         target,
  input  fp64_t         tol,
  output logic          busy,
  output logic          done,
  output logic          accept,
  output logic [SW-1:0] match_slot,
  output fp64_t         score,
  // stored-index read port
  output logic [SW-1:0] rslot,
  output logic [KW-1:0] ridx,
  input  fp64_t         rdata [NUM_SUB]
);

  // query buffer, one bank per sub-index, registered read
  fp64_t qmem [NUM_SUB][N_ID];
  fp64_t qrd  [NUM_SUB];
  always_ff @(posedge clk) begin
    for (int j = 0; j < NUM_SUB; j++) begin
      if (q_we) qmem[j][q_idx] <= q_data[j];
      qrd[j] <= qmem[j][ridx];
    end
  end

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DRAIN, S_FLUSH} state_e;
  state_e st;

  logic [SW-1:0] islot;          // slot being issued
  logic [KW-1:0] iidx;           // element being issued
  logic [CW-1:0] cnt_q;
  logic [SW-1:0] res_slot;       // slot of the next result
  logic          s1_v, s1_first, s1_last;
  logic [NUM_SUB-1:0] lane_ov;
  fp64_t         part [NUM_SUB];
  fp64_t         s01_c, s23_c, s01, s23, tot_c, tot, diff_c;
  logic          a_v, b_v;
  logic          hit, last_res;
  logic [2:0]    flush_cnt;

  assign rslot = islot;
  assign ridx  = iidx;

  for (genvar j = 0; j < NUM_SUB; j++) begin : g_lane
    fp64_mac u_mac (
      .clk, .rst_n,
      .in_valid (s1_v), .in_first(s1_first), .in_last(s1_last),
      .x(rdata[j]), .y(qrd[j]),
      .out_valid(lane_ov[j]), .out_sum(part[j])
    );
  end

  fp64_add u_a01 (.a(part[0]), .b(part[1]), .y(s01_c));
  fp64_add u_a23 (.a(part[2]), .b(part[3]), .y(s23_c));
  fp64_add u_tot (.a(s01),     .b(s23),     .y(tot_c));
  fp64_add u_dif (.a(tot),     .b({~target[63], target[62:0]}), .y(diff_c));

  assign hit      = b_v && (diff_c[62:0] <= tol[62:0]);
  assign last_res = b_v && (CW'(res_slot) == cnt_q - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      islot      <= '0;
      iidx       <= '0;
      cnt_q      <= '0;
      res_slot   <= '0;
      s1_v       <= 1'b0;
      s1_first   <= 1'b0;
      s1_last    <= 1'b0;
      a_v        <= 1'b0;
      b_v        <= 1'b0;
      s01        <= FP64_ZERO;
      s23        <= FP64_ZERO;
      tot        <= FP64_ZERO;
      done       <= 1'b0;
      accept     <= 1'b0;
      match_slot <= '0;
      score      <= FP64_ZERO;
      flush_cnt  <= '0;
    end else begin
      done     <= 1'b0;
      s1_v     <= (st == S_ISSUE);
      s1_first <= (iidx == '0);
      s1_last  <= (iidx == KW'(N_ID - 1));
      a_v      <= lane_ov[0] && (st == S_ISSUE || st == S_DRAIN);
      s01      <= s01_c;
      s23      <= s23_c;
      b_v      <= a_v && (st == S_ISSUE || st == S_DRAIN);
      tot      <= tot_c;
      unique case (st)
        S_IDLE: begin
          if (start) begin
            cnt_q    <= count;
            islot    <= '0;
            iidx     <= '0;
            res_slot <= '0;
            accept   <= 1'b0;
            if (count == '0) begin
              done <= 1'b1;
            end else begin
              st <= S_ISSUE;
            end
          end
        end
        S_ISSUE: begin
          if (iidx == KW'(N_ID - 1)) begin
            iidx <= '0;
            if (CW'(islot) == cnt_q - 1'b1) st <= S_DRAIN;
            else                             islot <= islot + 1'b1;
          end else begin
            iidx <= iidx + 1'b1;
          end
        end
        S_DRAIN: ;
        S_FLUSH: begin
          // let terms still in the MAC pipelines drain before a new start
          flush_cnt <= flush_cnt + 1'b1;
          if (flush_cnt == 3'd7) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
      if ((st == S_ISSUE || st == S_DRAIN) && b_v) begin
        res_slot <= res_slot + 1'b1;
        if (hit || last_res) begin
          // first match ends the search; otherwise the last slot ends it
          st         <= S_FLUSH;
          flush_cnt  <= '0;
          done       <= 1'b1;
          accept     <= hit;
          match_slot <= res_slot;
          score      <= tot;
          s1_v       <= 1'b0;
          a_v        <= 1'b0;
          b_v        <= 1'b0;
        end
      end
    end
  end

  assign busy = (st != S_IDLE);

endmodule

// Matrix-vector engine of the kNN encryption: the four sub-indices in
// parallel.
//
// Four multiply-accumulate lanes, one per key matrix K1..K4, run in lock
// step.  Lanes 1 and 2 multiply by the first split vector v', lanes 3 and 4 by
// the second one v''.  In MODE_RA the vector is a row vector on the left,
// I_j[o] = sum_k v[k] * K_j[k][o]; in MODE_DRONE it is a column vector on the
// right, T_j[o] = sum_k K_j[o][k] * v[k].  Only the key addressing differs.
// For every output element o (0..N_ID-1) the engine walks k = 0..N_ID-1, one
// term per cycle, so one encryption takes N_ID*N_ID issue cycles plus a
// four-cycle pipeline (key read, vector register, product, accumulate).
// Using four lanes, one per sub-index, is this design's choice; the source
// gives the equations and says that independent loops are unrolled.
// N_ID must be a power of two (all ID sizes the source evaluates are).
// Interface: start (one cycle) begins a run using v1/v2, which must stay
// stable until done.  Each out_valid cycle delivers element out_idx of all
// four sub-indices on out_data[0..3]; elements come in order, with no
// backpressure.  done pulses with the last element.
module knn_matvec
  import knn_pkg::*;
#(
  parameter int unsigned N_ID = DEF_N_ID,
  parameter split_mode_e MODE = MODE_RA,
  localparam int unsigned AW  = $clog2(N_ID * N_ID),
  localparam int unsigned KW  = (N_ID > 1) ? $clog2(N_ID) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  fp64_t         v1 [N_ID],
  input  fp64_t         v2 [N_ID],
  output logic [AW-1:0] key_raddr [NUM_SUB],
  input  fp64_t         key_rdata [NUM_SUB],
  output logic          busy,
  output logic          out_valid,
  output logic [KW-1:0] out_idx,
  output fp64_t         out_data [NUM_SUB],
  output logic          done
);

  if (N_ID < 2 || (N_ID & (N_ID - 1)) != 0) begin : g_size_check
    $error("knn_matvec: N_ID must be a power of two, at least 2");
  end

  logic [KW-1:0] o, k;
  logic          run;
  // stage 1: key read in flight, vector elements registered
  logic          s1_v, s1_first, s1_last;
  fp64_t         s1_va, s1_vb;
  logic [NUM_SUB-1:0] lane_ov;
  logic [KW-1:0] oidx;

  always_comb begin
    for (int j = 0; j < NUM_SUB; j++)
      key_raddr[j] = (MODE == MODE_RA) ? AW'({k, o}) : AW'({o, k});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run      <= 1'b0;
      o        <= '0;
      k        <= '0;
      s1_v     <= 1'b0;
      s1_first <= 1'b0;
      s1_last  <= 1'b0;
      s1_va    <= FP64_ZERO;
      s1_vb    <= FP64_ZERO;
      oidx     <= '0;
    end else begin
      s1_v     <= run;
      s1_first <= (k == '0);
      s1_last  <= (k == KW'(N_ID - 1));
      s1_va    <= v1[k];
      s1_vb    <= v2[k];
      if (start && !busy) begin
        run <= 1'b1;
        o   <= '0;
        k   <= '0;
        oidx <= '0;
      end else if (run) begin
        if (k == KW'(N_ID - 1)) begin
          k <= '0;
          if (o == KW'(N_ID - 1)) run <= 1'b0;
          else                    o   <= o + 1'b1;
        end else begin
          k <= k + 1'b1;
        end
      end
      if (out_valid) oidx <= oidx + 1'b1;
    end
  end

  for (genvar j = 0; j < NUM_SUB; j++) begin : g_lane
    fp64_mac u_mac (
      .clk, .rst_n,
      .in_valid (s1_v),
      .in_first (s1_first),
      .in_last  (s1_last),
      .x        (key_rdata[j]),
      .y        ((j < 2) ? s1_va : s1_vb),
      .out_valid(lane_ov[j]),
      .out_sum  (out_data[j])
    );
  end

  assign out_valid = lane_ov[0];
  assign out_idx   = oidx;
  assign done      = out_valid && (oidx == KW'(N_ID - 1));

  // busy from start until the last element has left the pipeline
  logic busy_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                busy_q <= 1'b0;
    else if (start && !busy_q) busy_q <= 1'b1;
    else if (done)             busy_q <= 1'b0;
  end
  assign busy = busy_q;

endmodule

// 32-bit Mersenne Twister (MT19937) random-word generator.
//
// The source names a seeded mt19937 as its random-number source; here it
// supplies the random values of the split function inside each kNN
// encryption unit, so that no two encryptions of the same ID look alike.
// Seeding: pulse seed_load with seed; the 624-word state is then filled one
// word per cycle (state[i] = 1812433253*(state[i-1]^(state[i-1]>>30)) + i),
// and ready rises after 624 cycles.  Generation: word always shows the
// current tempered output; pulsing next (only while ready) advances to the
// following one.  The state is twisted one word at a time, just before that
// word is used, which yields exactly the reference sequence
// (seed 5489 -> 3499211612, 581869302, ...).  The state is a 624 x 32-bit
// array with three reads and one write per cycle.
module mt19937 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] seed,
  input  logic        seed_load,
  input  logic        next,
  output logic        ready,
  output logic [31:0] word
);

  localparam int unsigned NW = 624;
  localparam int unsigned MM = 397;
  localparam logic [31:0] MATRIX_A = 32'h9908_B0DF;

  typedef enum logic [1:0] {S_IDLE, S_SEED, S_TWIST, S_READY} state_e;

  state_e      st;
  logic [31:0] mt [NW];
  logic [9:0]  idx;            // seeding: word being written; run: word to output
  logic [31:0] prev;           // last seeded word

  function automatic logic [31:0] temper(input logic [31:0] v);
    logic [31:0] t;
    t = v ^ (v >> 11);
    t = t ^ ((t << 7) & 32'h9D2C_5680);
    t = t ^ ((t << 15) & 32'hEFC6_0000);
    t = t ^ (t >> 18);
    return t;
  endfunction

  logic [9:0]  i1, im;
  logic [31:0] yv, newv;
  always_comb begin
    i1   = (idx == 10'(NW - 1)) ? 10'd0 : idx + 10'd1;
    im   = (idx >= 10'(NW - MM)) ? idx - 10'(NW - MM) : idx + 10'(MM);
    yv   = {mt[idx][31], mt[i1][30:0]};
    newv = mt[im] ^ (yv >> 1) ^ (yv[0] ? MATRIX_A : 32'd0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      idx  <= '0;
      prev <= '0;
      word <= '0;
    end else begin
      unique case (st)
        S_IDLE: ;
        S_SEED: begin
          prev <= 32'd1812433253 * (prev ^ (prev >> 30)) + 32'(idx);
          if (idx == 10'(NW)) begin
            idx <= '0;
            st  <= S_TWIST;
          end else begin
            idx <= idx + 10'd1;
          end
        end
        S_TWIST: begin
          // twist word idx and present it
          word <= temper(newv);
          st   <= S_READY;
        end
        S_READY: begin
          if (next) begin
            idx <= i1;
            st  <= S_TWIST;
          end
        end
        default: st <= S_IDLE;
      endcase
      if (seed_load) begin
        st   <= S_SEED;
        idx  <= 10'd1;
        prev <= seed;
      end
    end
  end

  // state array write port
  always_ff @(posedge clk) begin
    if (seed_load)
      mt[0] <= seed;
    else if (st == S_SEED && idx != 10'(NW))
      mt[idx] <= 32'd1812433253 * (prev ^ (prev >> 30)) + 32'(idx);
    else if (st == S_TWIST)
      mt[idx] <= newv;
  end

  assign ready = (st == S_READY);

endmodule

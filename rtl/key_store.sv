// Key memory of one kNN encryption unit.
//
// Holds the four N_ID x N_ID double matrices of a secret key: for the
// registration authority the products m1*n1, m1*n2, m2*n3, m2*n4; for a drone
// n1^-1*m', n2^-1*m'', n3^-1*m''', n4^-1*m'''' (the S vector of the key is kept
// outside, by the user of the unit).  Element (row, col) of matrix j lives at
// address row*N_ID + col of bank j.
// The key is loaded one word per cycle through the write port (we, wmat,
// waddr, wdata).  The four banks are read in parallel, each at its own
// address, with one cycle of latency (registered read, as block RAM would).
module key_store
  import knn_pkg::*;
#(
  parameter int unsigned N_ID = DEF_N_ID,
  localparam int unsigned AW  = $clog2(N_ID * N_ID)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [1:0]    wmat,
  input  logic [AW-1:0] waddr,
  input  fp64_t         wdata,
  input  logic [AW-1:0] raddr [NUM_SUB],
  output fp64_t         rdata [NUM_SUB]
);

  for (genvar j = 0; j < NUM_SUB; j++) begin : g_bank
    fp64_t mem [N_ID * N_ID];
    always_ff @(posedge clk) begin
      if (we && wmat == 2'(j))
        mem[waddr] <= wdata;
      rdata[j] <= mem[raddr[j]];
    end
  end

endmodule

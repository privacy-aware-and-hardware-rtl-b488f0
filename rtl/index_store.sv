// Encrypted-index memory of the authentication server.
//
// Stores the encrypted indices E(p_i) = [I1, I2, I3, I4] uploaded by the
// registration authority, one slot per registered drone.  Sub-index j is kept
// in bank j, element o of slot s at address s*N_ID + o, so one read returns
// element o of all four sub-indices at once.
// Write port: we with wslot/widx writes wdata[0..3] (one element of each
// sub-index, the order the encryption unit streams them).  Writing element
// N_ID-1 of a slot completes it: count (number of slots the search covers)
// becomes at least wslot+1.  Read port: registered, one cycle of latency.
// clear empties the store (count = 0) without touching the data.
// count as "highest completed slot + 1" is this design's choice; the source
// only says that the server keeps all registered drones' indices.
module index_store
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
  input  logic          clear,
  input  logic          we,
  input  logic [SW-1:0] wslot,
  input  logic [KW-1:0] widx,
  input  fp64_t         wdata [NUM_SUB],
  input  logic [SW-1:0] rslot,
  input  logic [KW-1:0] ridx,
  output fp64_t         rdata [NUM_SUB],
  output logic [CW-1:0] count
);

  localparam int unsigned DEPTH = NUM_DRONES * N_ID;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic [AW-1:0] wa, ra;
  assign wa = AW'(wslot) * AW'(N_ID) + AW'(widx);
  assign ra = AW'(rslot) * AW'(N_ID) + AW'(ridx);

  for (genvar j = 0; j < NUM_SUB; j++) begin : g_bank
    fp64_t mem [DEPTH];
    always_ff @(posedge clk) begin
      if (we) mem[wa] <= wdata[j];
      rdata[j] <= mem[ra];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      count <= '0;
    else if (clear)
      count <= '0;
    else if (we && widx == KW'(N_ID - 1) && CW'(wslot) >= count)
      count <= CW'(wslot) + 1'b1;
  end

endmodule

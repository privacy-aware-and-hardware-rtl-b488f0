// Self-checking testbench for index_store.
//
// Writes random encrypted indices into a 5-slot, 8-element store in a
// shuffled slot order, checking count after every completed slot (highest
// completed slot + 1), then reads back every element of every slot and
// compares with the copy kept in the testbench; finally checks clear.
module tb_index_store;
  import knn_pkg::*;
  localparam int N = 8, D = 5;
  localparam int KW = 3, SW = 3, CW = 3;

  logic clk = 0, rst_n = 0, clear = 0, we = 0;
  logic [SW-1:0] wslot = 0, rslot = 0;
  logic [KW-1:0] widx = 0, ridx = 0;
  fp64_t wdata [NUM_SUB], rdata [NUM_SUB];
  logic [CW-1:0] count;
  fp64_t model [D][N][NUM_SUB];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  index_store #(.N_ID(N), .NUM_DRONES(D)) dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [D] = '{2, 0, 4, 1, 3};
    int maxc;
    for (int j = 0; j < NUM_SUB; j++) wdata[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(count == 0, "count after reset");
    maxc = 0;
    for (int i = 0; i < D; i++) begin
      for (int o = 0; o < N; o++) begin
        we = 1; wslot = SW'(order[i]); widx = KW'(o);
        for (int j = 0; j < NUM_SUB; j++) begin
          wdata[j] = {$urandom, $urandom};
          model[order[i]][o][j] = wdata[j];
        end
        @(negedge clk);
        if (o < N - 1) chk(count == CW'(maxc), "count mid-slot");
      end
      we = 0;
      if (order[i] + 1 > maxc) maxc = order[i] + 1;
      chk(count == CW'(maxc), $sformatf("count %0d exp %0d", count, maxc));
    end
    for (int s = 0; s < D; s++)
      for (int o = 0; o < N; o++) begin
        rslot = SW'(s); ridx = KW'(o);
        @(negedge clk);
        for (int j = 0; j < NUM_SUB; j++)
          chk(rdata[j] === model[s][o][j], $sformatf("read s%0d o%0d j%0d", s, o, j));
      end
    clear = 1;
    @(negedge clk);
    clear = 0;
    chk(count == 0, "count after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for key_store.
//
// Fills the four banks of an 8x8 key store with distinct random words, then
// reads random addresses of all four banks in parallel every cycle and checks
// the data one cycle later against a copy kept in the testbench.  Also checks
// that a write to one bank leaves the other three unchanged.
module tb_key_store;
  import knn_pkg::*;
  localparam int N = 8;
  localparam int AW = $clog2(N * N);

  logic clk = 0;
  logic we = 0;
  logic [1:0] wmat = 0;
  logic [AW-1:0] waddr = 0;
  fp64_t wdata = 0;
  logic [AW-1:0] raddr [NUM_SUB];
  fp64_t rdata [NUM_SUB];
  fp64_t model [NUM_SUB][N*N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  key_store #(.N_ID(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] ra [NUM_SUB];
    for (int j = 0; j < NUM_SUB; j++) raddr[j] = '0;
    @(negedge clk);
    for (int j = 0; j < NUM_SUB; j++)
      for (int a = 0; a < N*N; a++) begin
        we = 1; wmat = 2'(j); waddr = AW'(a); wdata = {$urandom, $urandom};
        model[j][a] = wdata;
        @(negedge clk);
      end
    we = 0;
    for (int t = 0; t < 2000; t++) begin
      // occasional write to one bank while reading
      if (t % 7 == 3) begin
        we = 1; wmat = 2'($urandom); waddr = AW'($urandom); wdata = {$urandom, $urandom};
      end else we = 0;
      for (int j = 0; j < NUM_SUB; j++) begin
        ra[j] = AW'($urandom);
        raddr[j] = ra[j];
      end
      @(negedge clk);
      for (int j = 0; j < NUM_SUB; j++) begin
        checks++;
        if (rdata[j] !== model[j][ra[j]]) begin
          failures++;
          $display("FAIL bank %0d addr %0d got %h exp %h", j, ra[j], rdata[j], model[j][ra[j]]);
        end
      end
      if (we) model[wmat][waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

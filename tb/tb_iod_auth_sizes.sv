// ID-size sweep: the end-to-end scenario of tb_auth_scenario run on
// iod_auth_top at other ID sizes evaluated for the scheme, 4, 32, 64 and 256
// elements (encrypted indices of 16 to 1024 doubles), one after the other,
// each with a small store (the 128-element, 200-drone configuration is
// covered by tb_iod_auth_full).  4-element IDs of weight 2 allow only six
// distinct IDs, so that run uses four slots.  Only the running scenario's
// clock toggles.
module tb_iod_auth_sizes;
  localparam int NS = 4;
  logic go [NS];
  logic fin [NS];
  int   c [NS], f [NS];
  int   checks = 0, failures = 0;

  tb_auth_scenario #(.N_P(4),   .D_P(4)) s0 (.go(go[0]), .fin(fin[0]), .checks(c[0]), .failures(f[0]));
  tb_auth_scenario #(.N_P(32),  .D_P(6)) s1 (.go(go[1]), .fin(fin[1]), .checks(c[1]), .failures(f[1]));
  tb_auth_scenario #(.N_P(64),  .D_P(6)) s2 (.go(go[2]), .fin(fin[2]), .checks(c[2]), .failures(f[2]));
  tb_auth_scenario #(.N_P(256), .D_P(3)) s3 (.go(go[3]), .fin(fin[3]), .checks(c[3]), .failures(f[3]));

  initial begin
    #200ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < NS; i++) go[i] = 1'b0;
    #10;
    for (int i = 0; i < NS; i++) begin
      go[i] = 1'b1;
      wait (fin[i] === 1'b1);
      go[i] = 1'b0;
      checks   += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

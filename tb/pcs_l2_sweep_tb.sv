// pcs_l2_sweep_tb: the parameter studies of the PCS scheme, run end to end
// at 1/64 of the default array sizes (32 data entries per core instead of
// 2048, 64 tag entries instead of 4096). Each configuration is one instance
// of pcs_l2_env running the same kind of traffic:
//   private region 8 / 24 of 32 entries   (512 / 1536 of 2048)
//   VTag of 2 entries                     (32 of 256, the smallest size)
//   levels {2/5, 1/2, 3/5}                (a set drawn from the six studied)
//   levels {1/3, 1/2, 2/3, 3/4}           (four levels)
// Every instance checks read data, latency and the mechanisms of the cache;
// the sweep adds up their checks and failures.
module pcs_l2_sweep_tb;
  localparam int unsigned NC = 5;
  localparam int unsigned LS3 [3] = '{2, 1, 3};
  localparam int unsigned LP3 [3] = '{3, 1, 2};
  localparam int unsigned LS4 [4] = '{1, 1, 2, 3};
  localparam int unsigned LP4 [4] = '{2, 1, 1, 1};
  logic [NC-1:0] done;
  int chk [NC];
  int fl  [NC];

  pcs_l2_env #(.PE(8))  u_p512  (.done(done[0]), .checks(chk[0]), .failures(fl[0]));
  pcs_l2_env #(.PE(24)) u_p1536 (.done(done[1]), .checks(chk[1]), .failures(fl[1]));
  pcs_l2_env #(.VE(2))  u_vmon  (.done(done[2]), .checks(chk[2]), .failures(fl[2]));
  pcs_l2_env #(.KL(3), .LS(LS3), .LP(LP3), .DL(1))
                        u_lv3   (.done(done[3]), .checks(chk[3]), .failures(fl[3]));
  pcs_l2_env #(.KL(4), .LS(LS4), .LP(LP4), .DL(1))
                        u_lv4   (.done(done[4]), .checks(chk[4]), .failures(fl[4]));

  int checks = 0, failures = 0;
  initial begin
    #1;
    wait (&done);
    checks = 0; failures = 0;
    for (int i = 0; i < NC; i++) begin checks += chk[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: 3 million cycles of 10 time units
  initial begin
    #30_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

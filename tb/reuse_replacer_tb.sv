// reuse_replacer_tb: self-checking test of the global reuse replacement.
// The testbench holds the valid bits and reuse counters of a 16-entry
// region itself and answers the replacer's scan port. For each search a
// model walks from the entry after the global pointer, decrementing every
// valid entry with a non-zero count, and stops at the first invalid or
// zero-count entry; victim, final counters, pointer and the search time
// (one cycle per entry visited) are compared with the replacer.
module reuse_replacer_tb;
  localparam int unsigned ENTRIES = 16, REUSE_W = 2, AW = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, scan_v, dec_en;
  logic [AW-1:0] victim, scan_addr;
  logic [REUSE_W-1:0] scan_reuse;

  reuse_replacer #(.ENTRIES(ENTRIES), .REUSE_W(REUSE_W)) dut (.*);

  int checks = 0, failures = 0;
  bit          v [ENTRIES];
  int unsigned r [ENTRIES];
  int unsigned m_r [ENTRIES];
  int unsigned ptr;

  assign scan_v     = v[scan_addr];
  assign scan_reuse = REUSE_W'(r[scan_addr]);
  always_ff @(posedge clk) if (dec_en && r[scan_addr] > 0) r[scan_addr] <= r[scan_addr] - 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic search();
    int unsigned cur, exp_cycles, cycles;
    // model
    foreach (r[i]) m_r[i] = r[i];
    cur = (ptr + 1) % ENTRIES; exp_cycles = 1;
    while (v[cur] && m_r[cur] != 0) begin
      m_r[cur]--; cur = (cur + 1) % ENTRIES; exp_cycles++;
    end
    start = 1; @(posedge clk); #1 start = 0;
    cycles = 0;
    while (!done) begin @(posedge clk); #1; cycles++; end
    check(victim == AW'(cur), $sformatf("victim %0d exp %0d", victim, cur));
    check(cycles == exp_cycles, $sformatf("search cycles %0d exp %0d", cycles, exp_cycles));
    foreach (r[i]) check(r[i] == m_r[i], "reuse after search");
    check(!busy, "idle after done");
    ptr = cur;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; ptr = ENTRIES - 1;
    foreach (v[i]) begin v[i] = 0; r[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    // empty region: entries are taken in order 0, 1, 2 ...
    for (int n = 0; n < 4; n++) begin search(); v[victim] = 1; end
    // full region, every counter at 3 except one: full circular pass(es)
    foreach (v[i]) begin v[i] = 1; r[i] = 3; end
    r[2] = 1;
    search();
    // random counters
    for (int n = 0; n < 300; n++) begin
      foreach (v[i]) begin
        v[i] = ($urandom_range(0, 9) != 0);
        r[i] = $urandom_range(0, 3);
      end
      search();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// vmon_tb: self-checking test of the VMON monitor with 4 cores.
// Random accesses (hits and misses) and evictions are applied; a model keeps
// a per-core FIFO of evicted lines and the per-core Access and VTagHits
// counts, and checks the values VMON hands over at each interval end, and
// that the live counts restart from zero.
module vmon_tb;
  localparam int unsigned N = 4, ENTRIES = 4, LA_W = 10, CNT_W = 16, CW = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic acc_en, acc_miss, vtag_hit, ev_en, interval_end;
  logic [CW-1:0] acc_core, ev_core;
  logic [LA_W-1:0] acc_line, ev_line;
  logic [CNT_W-1:0] vtag_hits [N];
  logic [CNT_W-1:0] accesses [N];

  vmon #(.N_CORES(N), .ENTRIES(ENTRIES), .LA_W(LA_W), .CNT_W(CNT_W)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned m_line [N][ENTRIES];
  bit          m_v    [N][ENTRIES];
  int unsigned wp [N];
  int unsigned m_hits [N], m_acc [N];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc_en = 0; ev_en = 0; interval_end = 0; acc_miss = 0;
    acc_core = '0; ev_core = '0; acc_line = '0; ev_line = '0;
    foreach (m_v[c, i]) m_v[c][i] = 0;
    foreach (wp[c]) begin wp[c] = 0; m_hits[c] = 0; m_acc[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    for (int iv = 0; iv < 12; iv++) begin
      for (int n = 0; n < 200; n++) begin
        bit exp;
        acc_en = $urandom_range(0, 1); acc_core = CW'($urandom_range(0, N - 1));
        acc_miss = $urandom_range(0, 2) != 0; acc_line = LA_W'($urandom_range(0, 12));
        ev_en = $urandom_range(0, 1); ev_core = CW'($urandom_range(0, N - 1));
        ev_line = LA_W'($urandom_range(0, 12));
        interval_end = (n == 199);
        #1;
        exp = 0;
        if (acc_en && acc_miss)
          foreach (m_v[acc_core][i]) if (m_v[acc_core][i] && m_line[acc_core][i] == acc_line) exp = 1;
        check(vtag_hit == exp, "vtag_hit");
        @(posedge clk); #1;
        if (acc_en) begin
          m_acc[acc_core]++;
          if (exp) begin
            m_hits[acc_core]++;
            foreach (m_v[acc_core][i]) if (m_line[acc_core][i] == acc_line) m_v[acc_core][i] = 0;
          end
        end
        if (ev_en) begin
          m_line[ev_core][wp[ev_core]] = ev_line; m_v[ev_core][wp[ev_core]] = 1;
          wp[ev_core] = (wp[ev_core] + 1) % ENTRIES;
        end
      end
      acc_en = 0; ev_en = 0; interval_end = 0;
      for (int c = 0; c < N; c++) begin
        check(accesses[c] == m_acc[c], $sformatf("Access[%0d] %0d exp %0d", c, accesses[c], m_acc[c]));
        check(vtag_hits[c] == m_hits[c], $sformatf("VTagHits[%0d] %0d exp %0d", c, vtag_hits[c], m_hits[c]));
        check(m_hits[c] <= m_acc[c], "hits within accesses");
        m_acc[c] = 0; m_hits[c] = 0;
      end
    end
    // an idle interval reports zero
    interval_end = 1; @(posedge clk); #1 interval_end = 0;
    for (int c = 0; c < N; c++) check(accesses[c] == 0 && vtag_hits[c] == 0, "zero interval");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

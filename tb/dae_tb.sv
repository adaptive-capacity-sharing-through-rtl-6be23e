// dae_tb: self-checking test of the placement control.
// With the default levels {1/3, 1/2, 3/4} as (s,p) = (1,2), (1,1), (3,1),
// each core must place, once its P is full, s blocks into sData, then p into
// P, repeating; placements while P is not full must all go to P and leave
// the pattern where it was. Over many placements the shared fraction must
// equal s/(p+s). Level writes must clamp and restart the pattern.
// A second instance in probability-generator mode is checked against a model
// of its per-core LFSR and its threshold s/(p+s), and its long-run shared
// fraction must lie within 5 % of s/(p+s).
module dae_tb;
  localparam int unsigned N = 4, K = 3, CW = 2, LW = 2;
  localparam int unsigned LS [K] = '{1, 1, 3};
  localparam int unsigned LP [K] = '{2, 1, 1};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we; logic [CW-1:0] cfg_core; logic [LW-1:0] cfg_level;
  logic [LW-1:0] level [N];
  logic [CW-1:0] sel_core; logic sel_pfull, sel_shared, commit;

  dae #(.N_CORES(N), .N_LEVELS(K), .LEVEL_S(LS), .LEVEL_P(LP), .DEFAULT_LEVEL(1)) dut (.*);

  logic sel_shared_pg;
  logic [LW-1:0] level_pg [N];
  dae #(.N_CORES(N), .N_LEVELS(K), .LEVEL_S(LS), .LEVEL_P(LP), .DEFAULT_LEVEL(1),
        .USE_PG(1'b1)) dut_pg (
    .clk, .rst_n, .cfg_we, .cfg_core, .cfg_level, .level(level_pg),
    .sel_core, .sel_pfull, .sel_shared(sel_shared_pg), .commit);

  int checks = 0, failures = 0;
  logic [15:0] m_pr [N];
  int pg_sh [K], pg_tot [K];
  int unsigned m_lvl [N], m_pos [N];   // position inside the s+p pattern

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic set_level(input int c, input int l);
    cfg_we = 1; cfg_core = CW'(c); cfg_level = LW'(l);
    @(posedge clk); #1 cfg_we = 0;
    m_lvl[c] = (l > K - 1) ? K - 1 : l; m_pos[c] = 0;
    check(level[c] == LW'(m_lvl[c]), "level readback");
  endtask

  // one placement for core c; returns whether it went to sData
  task automatic place(input int c, input bit pfull, output bit shared);
    bit exp;
    sel_core = CW'(c); sel_pfull = pfull; commit = 1;
    #1;
    exp = pfull && (m_pos[c] < LS[m_lvl[c]]);
    check(sel_shared == exp, $sformatf("core %0d lvl %0d pos %0d shared %0d", c, m_lvl[c], m_pos[c], sel_shared));
    shared = sel_shared;
    // probability-generator instance
    begin
      bit exp_pg;
      int th;
      th = (LS[m_lvl[c]] * 65536) / (LS[m_lvl[c]] + LP[m_lvl[c]]);
      exp_pg = pfull && (int'(m_pr[c]) < th);
      check(sel_shared_pg == exp_pg, $sformatf("PG core %0d pr %h", c, m_pr[c]));
      if (pfull) begin
        pg_tot[m_lvl[c]]++; if (sel_shared_pg) pg_sh[m_lvl[c]]++;
        m_pr[c] = {m_pr[c][14:0], m_pr[c][15] ^ m_pr[c][13] ^ m_pr[c][12] ^ m_pr[c][10]};
      end
    end
    @(posedge clk); #1 commit = 0;
    if (pfull) m_pos[c] = (m_pos[c] + 1) % (LS[m_lvl[c]] + LP[m_lvl[c]]);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit sh;
    cfg_we = 0; commit = 0; sel_core = '0; sel_pfull = 0; cfg_core = '0; cfg_level = '0;
    foreach (m_lvl[c]) begin
      m_lvl[c] = 1; m_pos[c] = 0;
      m_pr[c] = 16'hACE1 ^ 16'(c * 16'h1F3B);
    end
    foreach (pg_sh[l]) begin pg_sh[l] = 0; pg_tot[l] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    for (int c = 0; c < N; c++) check(level[c] == 1, "default level 1/2");
    // P not full: always private
    for (int n = 0; n < 10; n++) begin place(0, 0, sh); check(!sh, "P first"); end
    // measured ratio per level
    for (int l = 0; l < K; l++) begin
      int shared_cnt, total;
      shared_cnt = 0; total = 0;
      set_level(1, l);
      for (int n = 0; n < 12 * (LS[l] + LP[l]); n++) begin
        place(1, 1, sh); total++; if (sh) shared_cnt++;
      end
      check(shared_cnt * (LS[l] + LP[l]) == total * LS[l], $sformatf("ratio level %0d: %0d/%0d", l, shared_cnt, total));
    end
    // clamp
    set_level(2, 3);
    // random mix over cores
    for (int n = 0; n < 2000; n++) begin
      int c;
      c = $urandom_range(0, N - 1);
      if ($urandom_range(0, 30) == 0) set_level(c, $urandom_range(0, K - 1));
      else place(c, $urandom_range(0, 4) != 0, sh);
    end
    // long run per level on core 3 in generator mode
    for (int l = 0; l < K; l++) begin
      set_level(3, l);
      for (int n = 0; n < 4000; n++) place(3, 1, sh);
    end
    for (int l = 0; l < K; l++) begin
      real f, e;
      f = real'(pg_sh[l]) / real'(pg_tot[l]);
      e = real'(LS[l]) / real'(LS[l] + LP[l]);
      check(f > e - 0.05 && f < e + 0.05, $sformatf("PG fraction level %0d: %f exp %f", l, f, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

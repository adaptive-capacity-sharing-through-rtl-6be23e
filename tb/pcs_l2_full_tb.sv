// pcs_l2_full_tb: the PCS L2 cache at its full default size (8 cores,
// 4096 tag and 2048 data entries per core, 1024-entry private regions, an
// 8192-entry shared region, 256-entry VTags, 64 B lines, 64-bit addresses)
// with a 250-cycle memory.
//
// Cores 0-3 reuse a small working set; cores 4-7 stream through more lines
// than their private region holds, so their P fills and later blocks go to
// sData in the ratio of their probability level. Read data and the read-hit
// latency are checked against a reference memory image; the operating-system
// model applies the PCS algorithm at every interval end as in pcs_l2_tb.
// Hits, misses, placement into P and into sData, VMON counting and the
// interval hand-over must all occur.
module pcs_l2_full_tb;
  import pcs_pkg::*;

  localparam int unsigned N        = 8;
  localparam int unsigned AW       = 64;
  localparam int unsigned LW       = 512;
  localparam int unsigned TAGS     = 4096;
  localparam int unsigned WAYS     = 4;
  localparam int unsigned DPC      = 2048;
  localparam int unsigned PE       = 1024;
  localparam int unsigned VE       = 256;
  localparam int unsigned OFF      = 6;
  localparam int unsigned LAW      = AW - OFF;
  localparam int unsigned CW       = 3;
  localparam int unsigned KL       = 3;
  localparam int unsigned MEM_LAT  = 250;
  localparam int unsigned N_OPS    = 1400;     // per core
  localparam int unsigned INTERVAL = 2000;     // accesses per interval
  localparam real         INC_TH   = 0.5;
  localparam real         DEC_TH   = 0.5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0]    req_valid, req_ready, req_we, resp_valid;
  logic [AW-1:0]   req_addr  [N];
  logic [LW-1:0]   req_wdata [N];
  logic [LW-1:0]   resp_rdata;
  logic            mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [LAW-1:0]  mem_req_line;
  logic [LW-1:0]   mem_req_wdata, mem_resp_data;
  logic            cfg_we, interval_end;
  logic [CW-1:0]   cfg_core;
  logic [1:0]      cfg_level;
  logic [1:0]      level [N];
  logic [31:0]     vtag_hits [N];
  logic [31:0]     accesses  [N];
  l2_events_t      events;

  pcs_l2 dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------- reference memory and memory model ----------------
  logic [LW-1:0] ref_mem [logic [LAW-1:0]];
  logic [LW-1:0] mem     [logic [LAW-1:0]];
  function automatic logic [LW-1:0] init_val(input logic [LAW-1:0] l);
    return {8{l[31:0] ^ 32'h5a5a_1234, l[31:0]}};
  endfunction

  initial begin
    mem_req_ready = 0; mem_resp_valid = 0; mem_resp_data = '0;
    forever begin
      @(posedge clk); #1;
      mem_req_ready = 0; mem_resp_valid = 0;
      if (mem_req_valid) begin
        logic [LAW-1:0] a;
        a = mem_req_line;
        mem_req_ready = 1;
        if (mem_req_we) mem[a] = mem_req_wdata;
        @(posedge clk); #1 mem_req_ready = 0;
        if (!mem_req_we) begin
          repeat (MEM_LAT - 1) @(posedge clk);
          #1;
          mem_resp_valid = 1;
          mem_resp_data  = mem.exists(a) ? mem[a] : init_val(a);
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_hit, n_miss, n_vhit, n_local, n_pp, n_ps, n_ev, n_evr, n_wb, n_dec;
  int n_prom, n_dem, n_lat;
  always @(posedge clk) if (rst_n) begin
    n_hit  += int'(events.tag_hit);   n_miss += int'(events.tag_miss);
    n_vhit += int'(events.vtag_hit);  n_local += int'(events.local_repl);
    n_pp   += int'(events.place_p);   n_ps   += int'(events.place_s);
    n_ev   += int'(events.evict);     n_evr  += int'(events.evict_remote);
    n_wb   += int'(events.writeback); n_dec  += int'(events.reuse_dec);
  end

  // ---------------- cores ----------------
  int done_ops = 0;
  int unsigned ws [N];

  task automatic core_run(input int c);
    for (int n = 0; n < N_OPS; n++) begin
      logic [LAW-1:0] line;
      bit we;
      int t0, t1;
      bit was_hit;
      line = (c < N / 2) ? LAW'((c << 16) | $urandom_range(0, ws[c] - 1))
                           : LAW'((c << 16) | (n % ws[c]));
      we   = ($urandom_range(0, 3) == 0);
      req_addr[c]  = {line, OFF'(0)};
      req_we[c]    = we;
      req_wdata[c] = {16{$urandom}};
      req_valid[c] = 1;
      do @(posedge clk); while (!req_ready[c]);
      t0 = $time;
      #1 req_valid[c] = 0;
      if (we) ref_mem[line] = req_wdata[c];
      was_hit = 0;
      forever begin
        @(posedge clk);
        if (events.tag_hit && dut.cur_core_q == CW'(c)) was_hit = 1;
        if (resp_valid[c]) break;
      end
      t1 = $time;
      if (!we) begin
        logic [LW-1:0] exp;
        exp = ref_mem.exists(line) ? ref_mem[line] : init_val(line);
        check(resp_rdata == exp, $sformatf("core %0d read line %h: got %h exp %h", c, line, resp_rdata, exp));
        if (was_hit) begin
          check((t1 - t0) == 20, $sformatf("read hit latency %0d", (t1 - t0) / 10));
          n_lat++;
        end
      end
      #1;
      done_ops++;
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 4)) @(posedge clk);
    end
  endtask

  // ---------------- operating system: PCS algorithm ----------------
  task automatic os_interval();
    real mg [N];
    real amg;
    int  nl [N];
    interval_end = 1;
    @(posedge clk); #1 interval_end = 0;
    amg = 0.0;
    for (int c = 0; c < N; c++) begin
      mg[c] = (accesses[c] == 0) ? 0.0 : real'(vtag_hits[c]) / real'(accesses[c]);
      amg += mg[c] / N;
    end
    for (int c = 0; c < N; c++) begin
      nl[c] = int'(level[c]);
      if (mg[c] > amg * (1.0 + INC_TH) && nl[c] != KL - 1) begin nl[c]++; n_prom++; end
      else if (mg[c] < amg * (1.0 - DEC_TH) && nl[c] != 0) begin nl[c]--; n_dem++; end
    end
    for (int c = 0; c < N; c++) begin
      if (nl[c] != int'(level[c])) begin
        cfg_we = 1; cfg_core = CW'(c); cfg_level = 2'(nl[c]);
        @(posedge clk); #1 cfg_we = 0;
        check(level[c] == 2'(nl[c]), "level written");
      end
    end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {n_hit, n_miss, n_vhit, n_local, n_pp, n_ps, n_ev, n_evr, n_wb, n_dec} = '0;
    n_prom = 0; n_dem = 0; n_lat = 0;
    req_valid = '0; req_we = '0; cfg_we = 0; interval_end = 0; cfg_core = '0; cfg_level = '0;
    for (int c = 0; c < N; c++) begin
      req_addr[c] = '0; req_wdata[c] = '0;
      ws[c] = (c < N / 2) ? 200 : 1300 + 300 * (c - N / 2);
    end
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    fork
      for (int c = 0; c < N; c++) begin
        automatic int cc = c;
        fork core_run(cc); join_none
      end
      begin
        int next = INTERVAL;
        while (done_ops < N * N_OPS) begin
          @(posedge clk); #2;
          if (done_ops >= next) begin os_interval(); next += INTERVAL; end
        end
      end
    join_any
    wait fork;
    $display("hits %0d misses %0d vtag_hits %0d local %0d placeP %0d placeS %0d evict %0d evict_remote %0d wb %0d dec %0d prom %0d dem %0d lat %0d",
             n_hit, n_miss, n_vhit, n_local, n_pp, n_ps, n_ev, n_evr, n_wb, n_dec, n_prom, n_dem, n_lat);
    $display("levels: %0d %0d %0d %0d %0d %0d %0d %0d", level[0], level[1], level[2], level[3],
             level[4], level[5], level[6], level[7]);
    check(n_hit > 0, "tag hits occurred");
    check(n_miss > 0, "misses occurred");
    check(n_pp > 0, "placement into P occurred");
    check(n_ps > 0, "placement into sData occurred");
    check(n_lat > 0, "hit latency measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

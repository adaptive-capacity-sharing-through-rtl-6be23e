// tag_array_tb: self-checking test of one core's tag array.
// A reference model (associative arrays of the written entries plus a
// per-set LRU order list) predicts hit/hit_way, the read-back fields and
// the victim way (first invalid way, else least recently touched way) for
// random writes, invalidations, touches and reads on a small array.
module tag_array_tb;
  localparam int unsigned SETS = 8, WAYS = 4, TAG_W = 10, DPTR_W = 6;
  localparam int unsigned SET_W = 3, WAY_W = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd_en; logic [SET_W-1:0] rd_set; logic [TAG_W-1:0] cmp_tag;
  logic [WAYS-1:0] rd_valid, rd_dirty, rd_s;
  logic [TAG_W-1:0] rd_tag [WAYS]; logic [DPTR_W-1:0] rd_dptr [WAYS];
  logic hit, victim_free; logic [WAY_W-1:0] hit_way, victim_way;
  logic wr_en; logic [SET_W-1:0] wr_set; logic [WAY_W-1:0] wr_way;
  logic wr_valid, wr_dirty, wr_s; logic [TAG_W-1:0] wr_tag; logic [DPTR_W-1:0] wr_dptr;
  logic touch_en; logic [SET_W-1:0] touch_set; logic [WAY_W-1:0] touch_way;

  tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W), .DPTR_W(DPTR_W)) dut (.*);

  int checks = 0, failures = 0;
  // model
  bit           m_v [SETS][WAYS];
  bit           m_d [SETS][WAYS];
  bit           m_s [SETS][WAYS];
  int unsigned  m_t [SETS][WAYS];
  int unsigned  m_p [SETS][WAYS];
  int unsigned  order [SETS][$];   // front = MRU

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic idle();
    rd_en = 0; wr_en = 0; touch_en = 0;
  endtask

  task automatic do_touch(input int s, input int w);
    int pos;
    touch_en = 1; touch_set = SET_W'(s); touch_way = WAY_W'(w);
    @(posedge clk); #1 idle();
    foreach (order[s][i]) if (order[s][i] == w) pos = i;
    order[s].delete(pos);
    order[s].push_front(w);
  endtask

  task automatic do_write(input int s, input int w, input bit v, input int t);
    wr_en = 1; wr_set = SET_W'(s); wr_way = WAY_W'(w); wr_valid = v;
    wr_dirty = $urandom_range(0, 1); wr_s = $urandom_range(0, 1);
    wr_tag = TAG_W'(t); wr_dptr = DPTR_W'($urandom);
    @(posedge clk); #1;
    m_v[s][w] = v; m_d[s][w] = wr_dirty; m_s[s][w] = wr_s; m_t[s][w] = t; m_p[s][w] = wr_dptr;
    idle();
  endtask

  task automatic do_read(input int s, input int t);
    int exp_hit, exp_way, exp_vic; bit exp_free;
    rd_en = 1; rd_set = SET_W'(s); cmp_tag = TAG_W'(t);
    @(posedge clk); #1 idle();
    exp_hit = 0; exp_way = 0; exp_free = 0; exp_vic = order[s][WAYS-1];
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (m_v[s][w] && m_t[s][w] == t) begin exp_hit = 1; exp_way = w; end
      if (!m_v[s][w]) begin exp_free = 1; exp_vic = w; end
    end
    check(hit == exp_hit, $sformatf("hit set %0d tag %0d", s, t));
    if (exp_hit) check(hit_way == exp_way, "hit_way");
    check(victim_free == exp_free, "victim_free");
    check(victim_way == exp_vic, $sformatf("victim_way %0d exp %0d", victim_way, exp_vic));
    for (int w = 0; w < WAYS; w++) begin
      check(rd_valid[w] == m_v[s][w], "rd_valid");
      if (m_v[s][w]) begin
        check(rd_tag[w] == m_t[s][w] && rd_dptr[w] == m_p[s][w], "tag/dptr");
        check(rd_dirty[w] == m_d[s][w] && rd_s[w] == m_s[s][w], "dirty/s");
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle();
    for (int s = 0; s < SETS; s++) begin
      order[s] = {};
      for (int w = 0; w < WAYS; w++) begin m_v[s][w] = 0; order[s].push_front(w); end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // empty array: every read misses and finds way 0 free
    for (int s = 0; s < SETS; s++) do_read(s, s);
    for (int n = 0; n < 1500; n++) begin
      int s, w, t, op;
      s = $urandom_range(0, SETS - 1); w = $urandom_range(0, WAYS - 1);
      t = $urandom_range(0, 15); op = $urandom_range(0, 9);
      if (op < 3) do_write(s, w, 1, t);
      else if (op == 3) do_write(s, w, 0, t);
      else if (op < 6) do_touch(s, w);
      else do_read(s, t);
    end
    // fill one set completely and check the victim is the LRU way
    for (int w = 0; w < WAYS; w++) do_write(2, w, 1, 100 + w);
    do_touch(2, 1); do_touch(2, 3); do_touch(2, 0); do_touch(2, 2);
    do_read(2, 999);
    check(!victim_free && victim_way == 1, "LRU victim after ordered touches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

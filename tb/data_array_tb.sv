// data_array_tb: self-checking test of a data region with owner ids.
// A model of every entry (data, t_ptr, id, valid, reuse) predicts read-back
// values, the reuse counter after fills (0), hits (+1, saturating at 3) and
// decrements (-1, floor 0), hit writes, and the full flag, which must rise
// exactly when the last invalid entry is filled.
module data_array_tb;
  localparam int unsigned ENTRIES = 16, LINE_W = 32, TPTR_W = 5, ID_W = 3, REUSE_W = 2;
  localparam int unsigned AW = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd_en; logic [AW-1:0] rd_addr; logic [LINE_W-1:0] rd_data;
  logic [TPTR_W-1:0] rd_tptr; logic [ID_W-1:0] rd_id; logic rd_v;
  logic fill_en; logic [AW-1:0] fill_addr; logic [LINE_W-1:0] fill_data;
  logic [TPTR_W-1:0] fill_tptr; logic [ID_W-1:0] fill_id;
  logic hit_en, hit_wr; logic [AW-1:0] hit_addr; logic [LINE_W-1:0] hit_data;
  logic [AW-1:0] scan_addr; logic scan_v; logic [REUSE_W-1:0] scan_reuse;
  logic dec_en; logic [AW-1:0] dec_addr; logic full;

  data_array #(.ENTRIES(ENTRIES), .LINE_W(LINE_W), .TPTR_W(TPTR_W), .ID_W(ID_W),
               .REUSE_W(REUSE_W)) dut (.*);

  int checks = 0, failures = 0;
  bit          m_v [ENTRIES];
  int unsigned m_r [ENTRIES];
  int unsigned m_d [ENTRIES], m_t [ENTRIES], m_i [ENTRIES];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic idle(); rd_en = 0; fill_en = 0; hit_en = 0; hit_wr = 0; dec_en = 0; endtask

  task automatic do_fill(input int a);
    fill_en = 1; fill_addr = AW'(a); fill_data = $urandom; fill_tptr = TPTR_W'($urandom);
    fill_id = ID_W'($urandom);
    @(posedge clk); #1;
    m_v[a] = 1; m_r[a] = 0; m_d[a] = fill_data; m_t[a] = fill_tptr; m_i[a] = fill_id;
    idle();
  endtask
  task automatic do_hit(input int a, input bit wr);
    hit_en = 1; hit_wr = wr; hit_addr = AW'(a); hit_data = $urandom;
    @(posedge clk); #1;
    if (m_r[a] < 3) m_r[a]++;
    if (wr) m_d[a] = hit_data;
    idle();
  endtask
  task automatic do_dec(input int a);
    dec_en = 1; dec_addr = AW'(a);
    @(posedge clk); #1;
    if (m_r[a] > 0) m_r[a]--;
    idle();
  endtask
  task automatic do_read(input int a);
    bit all;
    rd_en = 1; rd_addr = AW'(a); scan_addr = AW'(a);
    #1;
    check(scan_v == m_v[a], "scan_v");
    if (m_v[a]) check(scan_reuse == m_r[a], $sformatf("reuse[%0d]=%0d exp %0d", a, scan_reuse, m_r[a]));
    @(posedge clk); #1 idle();
    check(rd_v == m_v[a], "rd_v");
    if (m_v[a]) check(rd_data == m_d[a] && rd_tptr == m_t[a] && rd_id == m_i[a], "payload");
    all = 1;
    foreach (m_v[i]) if (!m_v[i]) all = 0;
    check(full == all, "full");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle(); scan_addr = '0;
    foreach (m_v[i]) begin m_v[i] = 0; m_r[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int a = 0; a < ENTRIES; a++) do_read(a);
    for (int n = 0; n < 2000; n++) begin
      int a, op;
      a = $urandom_range(0, ENTRIES - 1); op = $urandom_range(0, 9);
      if (op < 2 || (!m_v[a] && op < 5)) do_fill(a);
      else if (!m_v[a]) do_read(a);
      else if (op < 5) do_hit(a, op == 4);
      else if (op < 7) do_dec(a);
      else do_read(a);
    end
    for (int a = 0; a < ENTRIES; a++) if (!m_v[a]) do_fill(a);
    do_read(0);
    check(full == 1'b1, "full after all filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

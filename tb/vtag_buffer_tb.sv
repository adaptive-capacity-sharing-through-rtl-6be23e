// vtag_buffer_tb: self-checking test of the recently-evicted-tag buffer.
// A queue model of the last ENTRIES inserted line addresses (oldest dropped
// first, a matching entry dropped on a lookup hit) predicts every lookup.
module vtag_buffer_tb;
  localparam int unsigned ENTRIES = 8, LA_W = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ins_en, lookup_en, hit;
  logic [LA_W-1:0] ins_line, lookup_line;

  vtag_buffer #(.ENTRIES(ENTRIES), .LA_W(LA_W)) dut (.*);

  int checks = 0, failures = 0;
  // model: slot contents and valid bits, written round robin
  int unsigned m_line [ENTRIES];
  bit          m_v    [ENTRIES];
  int unsigned wp;
  int hits = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ins_en = 0; lookup_en = 0; ins_line = '0; lookup_line = '0; wp = 0;
    foreach (m_v[i]) m_v[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    for (int n = 0; n < 3000; n++) begin
      bit exp; int unsigned l;
      ins_en    = $urandom_range(0, 1);
      ins_line  = LA_W'($urandom_range(0, 24));
      lookup_en = $urandom_range(0, 1);
      lookup_line = LA_W'($urandom_range(0, 24));
      #1;
      exp = 0;
      if (lookup_en) foreach (m_v[i]) if (m_v[i] && m_line[i] == lookup_line) exp = 1;
      check(hit == exp, $sformatf("lookup %0d hit %0d exp %0d", lookup_line, hit, exp));
      if (exp) hits++;
      @(posedge clk); #1;
      if (lookup_en) foreach (m_v[i]) if (m_v[i] && m_line[i] == lookup_line) m_v[i] = 0;
      if (ins_en) begin m_line[wp] = ins_line; m_v[wp] = 1; wp = (wp + 1) % ENTRIES; end
    end
    check(hits > 100, "enough hits exercised");
    ins_en = 0; lookup_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

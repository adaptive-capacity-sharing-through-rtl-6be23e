// mem_interface_tb: self-checking test of the memory port.
// A memory model with a random ready delay and a random read latency holds
// lines in an associative array. Writes must reach memory with their line
// address and data and complete once accepted; reads must return the line
// last written, with done one cycle after the response.
module mem_interface_tb;
  localparam int unsigned LA_W = 16, LINE_W = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_we, busy, done;
  logic [LA_W-1:0] req_line; logic [LINE_W-1:0] req_wdata, rdata;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [LA_W-1:0] mem_req_line; logic [LINE_W-1:0] mem_req_wdata, mem_resp_data;

  mem_interface #(.LA_W(LA_W), .LINE_W(LINE_W)) dut (.*);

  int checks = 0, failures = 0;
  logic [LINE_W-1:0] mem [int unsigned];
  logic [LINE_W-1:0] ref_mem [int unsigned];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // memory model
  initial begin
    mem_req_ready = 0; mem_resp_valid = 0; mem_resp_data = '0;
    forever begin
      @(posedge clk); #1;
      mem_req_ready = 0; mem_resp_valid = 0;
      if (mem_req_valid) begin
        repeat ($urandom_range(0, 3)) begin @(posedge clk); #1; end
        mem_req_ready = 1;
        if (mem_req_we) begin
          mem[mem_req_line] = mem_req_wdata;
          @(posedge clk); #1 mem_req_ready = 0;
        end else begin
          int unsigned a;
          a = mem_req_line;
          @(posedge clk); #1 mem_req_ready = 0;
          repeat ($urandom_range(0, 6)) begin @(posedge clk); #1; end
          mem_resp_valid = 1;
          mem_resp_data  = mem.exists(a) ? mem[a] : LINE_W'(a) * 3;
        end
      end
    end
  end

  task automatic op(input bit we, input int unsigned line);
    int cyc = 0;
    req_valid = 1; req_we = we; req_line = LA_W'(line); req_wdata = {$urandom, $urandom};
    check(!busy, "idle before request");
    @(posedge clk); #1 req_valid = 0;
    while (!done) begin @(posedge clk); #1; cyc++; end
    if (we) begin
      ref_mem[line] = req_wdata;
      check(mem.exists(line) && mem[line] == req_wdata, "write reached memory");
    end else begin
      logic [LINE_W-1:0] exp = ref_mem.exists(line) ? ref_mem[line] : LINE_W'(line) * 3;
      check(rdata == exp, $sformatf("read line %0d", line));
    end
    @(posedge clk); #1;
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_valid = 0; req_we = 0; req_line = '0; req_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    for (int n = 0; n < 400; n++) op($urandom_range(0, 1), $urandom_range(0, 20));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

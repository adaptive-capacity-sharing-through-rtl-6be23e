// reuse_replacer: global reuse replacement for one data region.
//
// Keeps the region's global search pointer. On start it walks the region
// circularly from the entry after the pointer, one entry per cycle: an entry
// that is invalid or has a zero reuse count is the victim (done pulses,
// victim holds its index and the pointer moves to it); any other entry has
// its reuse count decremented through dec_en and the walk continues. Since
// every pass lowers the counters, the walk ends within
// (2^REUSE_W - 1) * ENTRIES + 1 cycles.
//
// Following the document: the circular search from the next position of the
// global pointer, and the decrement of passed entries. This design's own
// choices: one entry per cycle, and taking invalid entries at once.
module reuse_replacer #(
  parameter int unsigned ENTRIES = pcs_pkg::P_ENTRIES,
  parameter int unsigned REUSE_W = pcs_pkg::REUSE_W,
  localparam int unsigned ADDR_W = $clog2(ENTRIES)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic               done,
  output logic [ADDR_W-1:0]  victim,
  // scan port into the data array
  output logic [ADDR_W-1:0]  scan_addr,
  input  logic               scan_v,
  input  logic [REUSE_W-1:0] scan_reuse,
  output logic               dec_en
);

  logic [ADDR_W-1:0] ptr_q, cur_q;
  logic              busy_q;

  function automatic logic [ADDR_W-1:0] next_idx(input logic [ADDR_W-1:0] i);
    return (i == ADDR_W'(ENTRIES - 1)) ? '0 : i + 1'b1;
  endfunction

  logic found;
  assign scan_addr = cur_q;
  assign found     = !scan_v || scan_reuse == '0;
  assign busy      = busy_q;
  assign dec_en    = busy_q && !found;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q  <= ADDR_W'(ENTRIES - 1);
      cur_q  <= '0;
      busy_q <= 1'b0;
      done   <= 1'b0;
      victim <= '0;
    end else begin
      done <= 1'b0;
      if (busy_q) begin
        if (found) begin
          busy_q <= 1'b0;
          done   <= 1'b1;
          victim <= cur_q;
          ptr_q  <= cur_q;
        end else begin
          cur_q <= next_idx(cur_q);
        end
      end else if (start) begin
        busy_q <= 1'b1;
        cur_q  <= next_idx(ptr_q);
      end
    end
  end

endmodule

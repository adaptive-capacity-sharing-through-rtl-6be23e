// vtag_buffer: VTag, the record of one core's recently evicted blocks.
//
// Holds the line addresses of the last ENTRIES blocks evicted from the core's
// L2 space, in first-in first-out order. ins_en writes an evicted line
// address over the oldest entry. lookup_en with lookup_line (an L2 miss of
// the core) compares all entries at once; hit is combinational in the same
// cycle, and a matching entry is dropped at the clock edge, since the block is
// about to be back in the cache. An insert and a lookup may share a cycle.
//
// Following the document: a per-core buffer of the tags of the G most
// recently evicted blocks, searched on L2 misses. This design's own choices:
// full line addresses as tags, FIFO order, fully associative search and
// dropping an entry on a hit.
module vtag_buffer #(
  parameter int unsigned ENTRIES = pcs_pkg::VMON_ENTRIES,
  parameter int unsigned LA_W    = 58,
  localparam int unsigned PTR_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ins_en,
  input  logic [LA_W-1:0] ins_line,
  input  logic            lookup_en,
  input  logic [LA_W-1:0] lookup_line,
  output logic            hit
);

  logic [LA_W-1:0]    line_q [ENTRIES];
  logic [ENTRIES-1:0] v_q;
  logic [PTR_W-1:0]   wptr_q;
  logic [ENTRIES-1:0] match;

  always_comb begin
    for (int i = 0; i < ENTRIES; i++)
      match[i] = v_q[i] && line_q[i] == lookup_line;
  end
  assign hit = lookup_en && (match != '0);

  always_ff @(posedge clk) begin
    if (ins_en) line_q[wptr_q] <= ins_line;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q    <= '0;
      wptr_q <= '0;
    end else begin
      if (lookup_en) v_q <= v_q & ~match;
      if (ins_en) begin
        v_q[wptr_q] <= 1'b1;
        wptr_q      <= (wptr_q == PTR_W'(ENTRIES - 1)) ? '0 : wptr_q + 1'b1;
      end
    end
  end

endmodule

// tag_array: the L2 tag store of one core in the PCS cache.
//
// Tag and data entries are decoupled: each tag entry holds {tag, status,
// d_ptr, s}, where d_ptr addresses a data entry and s says whether it lies in
// the core's private region P (s=0) or in the shared region sData (s=1).
// There are more tag entries than data entries, so many tag entries are
// valid only while they own a data entry. Status is kept as a valid and a
// dirty bit. The array is SETS x WAYS with true LRU order per set.
//
// Read port: rd_en with rd_set and cmp_tag; one cycle later rd_* hold the
// whole set, hit/hit_way give the tag compare, and victim_way/victim_free
// give the way a miss would take: the first invalid ("free") way, otherwise
// the LRU way. Write port: wr_en writes one full entry (valid=0 invalidates).
// touch_en makes a way the most recently used. All writes take effect at the
// clock edge; a read in the same cycle sees the old contents.
//
// Following the document: the entry fields, tag compare, LRU way and the
// free test. This design's own choices: 4 ways, true LRU by age ranks, and
// status reduced to valid/dirty (coherence states are not modelled).
module tag_array #(
  parameter int unsigned SETS   = 1024,
  parameter int unsigned WAYS   = 4,
  parameter int unsigned TAG_W  = 48,
  parameter int unsigned DPTR_W = 13,
  localparam int unsigned SET_W = $clog2(SETS),
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // read / compare
  input  logic                    rd_en,
  input  logic [SET_W-1:0]        rd_set,
  input  logic [TAG_W-1:0]        cmp_tag,
  output logic [WAYS-1:0]         rd_valid,
  output logic [WAYS-1:0]         rd_dirty,
  output logic [WAYS-1:0]         rd_s,
  output logic [TAG_W-1:0]        rd_tag  [WAYS],
  output logic [DPTR_W-1:0]       rd_dptr [WAYS],
  output logic                    hit,
  output logic [WAY_W-1:0]        hit_way,
  output logic [WAY_W-1:0]        victim_way,
  output logic                    victim_free,
  // write one entry
  input  logic                    wr_en,
  input  logic [SET_W-1:0]        wr_set,
  input  logic [WAY_W-1:0]        wr_way,
  input  logic                    wr_valid,
  input  logic                    wr_dirty,
  input  logic                    wr_s,
  input  logic [TAG_W-1:0]        wr_tag,
  input  logic [DPTR_W-1:0]       wr_dptr,
  // LRU update
  input  logic                    touch_en,
  input  logic [SET_W-1:0]        touch_set,
  input  logic [WAY_W-1:0]        touch_way
);

  localparam int unsigned N = SETS * WAYS;

  logic [TAG_W-1:0]  tag_mem  [N];
  logic [DPTR_W-1:0] dptr_mem [N];
  logic [N-1:0]      valid_q, dirty_q, s_q;
  // age 0 = most recently used, WAYS-1 = least recently used
  logic [WAY_W-1:0]  age_q [SETS][WAYS];

  logic [TAG_W-1:0]  cmp_tag_q;
  logic [WAY_W-1:0]  lru_q;

  function automatic int unsigned idx(input logic [SET_W-1:0] s, input int unsigned w);
    return int'(s) * WAYS + w;
  endfunction

  // payload arrays, no reset (guarded by valid)
  always_ff @(posedge clk) begin
    if (wr_en) begin
      tag_mem [idx(wr_set, int'(wr_way))] <= wr_tag;
      dptr_mem[idx(wr_set, int'(wr_way))] <= wr_dptr;
    end
    if (rd_en) begin
      for (int w = 0; w < WAYS; w++) begin
        rd_tag[w]  <= tag_mem [idx(rd_set, w)];
        rd_dptr[w] <= dptr_mem[idx(rd_set, w)];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q   <= '0;
      dirty_q   <= '0;
      s_q       <= '0;
      rd_valid  <= '0;
      rd_dirty  <= '0;
      rd_s      <= '0;
      cmp_tag_q <= '0;
      lru_q     <= '0;
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++)
          age_q[s][w] <= WAY_W'(w);
    end else begin
      if (wr_en) begin
        valid_q[idx(wr_set, int'(wr_way))] <= wr_valid;
        dirty_q[idx(wr_set, int'(wr_way))] <= wr_dirty;
        s_q    [idx(wr_set, int'(wr_way))] <= wr_s;
      end
      if (rd_en) begin
        cmp_tag_q <= cmp_tag;
        lru_q     <= '0;
        for (int w = 0; w < WAYS; w++) begin
          rd_valid[w] <= valid_q[idx(rd_set, w)];
          rd_dirty[w] <= dirty_q[idx(rd_set, w)];
          rd_s[w]     <= s_q    [idx(rd_set, w)];
          if (age_q[rd_set][w] == WAY_W'(WAYS - 1)) lru_q <= WAY_W'(w);
        end
      end
      if (touch_en) begin
        for (int w = 0; w < WAYS; w++) begin
          if (WAY_W'(w) == touch_way)
            age_q[touch_set][w] <= '0;
          else if (age_q[touch_set][w] < age_q[touch_set][touch_way])
            age_q[touch_set][w] <= age_q[touch_set][w] + 1'b1;
        end
      end
    end
  end

  // tag compare and victim choice on the registered set
  always_comb begin
    hit         = 1'b0;
    hit_way     = '0;
    victim_free = 1'b0;
    victim_way  = lru_q;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (rd_valid[w] && rd_tag[w] == cmp_tag_q) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
      if (!rd_valid[w]) begin
        victim_free = 1'b1;
        victim_way  = WAY_W'(w);
      end
    end
  end

endmodule

// data_array: one data region of the PCS cache, either a core's private
// region P or the shared region sData formed by linking the S slices of all
// cores.
//
// Each entry holds {data, reuse, t_ptr, v} and, in sData, the owner core id.
// t_ptr points back to the owning tag entry ({set, way} in the owner's tag
// array), so data and tag entries are linked both ways. reuse is the reuse
// counter of the reuse replacement policy: cleared when a block is filled,
// incremented (saturating) on every hit, decremented by the replacement
// search through the scan port.
//
// Ports: rd_en/rd_addr read an entry, valid one cycle later. fill_en writes a
// new block (v=1, reuse=0). hit_en counts a hit; with hit_wr it also writes
// the hit line. scan_addr is a combinational look at v/reuse for the
// replacer, dec_en decrements one reuse counter. full is high when every entry
// is valid; valid entries are only ever replaced, never dropped, so a running
// count of fills into invalid entries gives it. ID_W=0 leaves the id out.
//
// Following the document: the entry fields and the reuse counter rules. This
// design's own choices: a 2-bit saturating counter and the port set.
module data_array #(
  parameter int unsigned ENTRIES = pcs_pkg::P_ENTRIES,
  parameter int unsigned LINE_W  = pcs_pkg::LINE_W,
  parameter int unsigned TPTR_W  = 12,
  parameter int unsigned ID_W    = 0,
  parameter int unsigned REUSE_W = pcs_pkg::REUSE_W,
  localparam int unsigned ADDR_W = $clog2(ENTRIES),
  localparam int unsigned IDS_W  = (ID_W > 0) ? ID_W : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // read
  input  logic               rd_en,
  input  logic [ADDR_W-1:0]  rd_addr,
  output logic [LINE_W-1:0]  rd_data,
  output logic [TPTR_W-1:0]  rd_tptr,
  output logic [IDS_W-1:0]   rd_id,
  output logic               rd_v,
  // fill a new block
  input  logic               fill_en,
  input  logic [ADDR_W-1:0]  fill_addr,
  input  logic [LINE_W-1:0]  fill_data,
  input  logic [TPTR_W-1:0]  fill_tptr,
  input  logic [IDS_W-1:0]   fill_id,
  // hit: bump reuse, optionally write the line
  input  logic               hit_en,
  input  logic               hit_wr,
  input  logic [ADDR_W-1:0]  hit_addr,
  input  logic [LINE_W-1:0]  hit_data,
  // replacement scan
  input  logic [ADDR_W-1:0]  scan_addr,
  output logic               scan_v,
  output logic [REUSE_W-1:0] scan_reuse,
  input  logic               dec_en,
  input  logic [ADDR_W-1:0]  dec_addr,
  // occupancy
  output logic               full
);

  logic [LINE_W-1:0]  data_mem [ENTRIES];
  logic [TPTR_W-1:0]  tptr_mem [ENTRIES];
  logic [IDS_W-1:0]   id_mem   [ENTRIES];
  logic [ENTRIES-1:0] v_q;
  logic [REUSE_W-1:0] reuse_q  [ENTRIES];
  logic [ADDR_W:0]    count_q;

  always_ff @(posedge clk) begin
    if (fill_en) begin
      data_mem[fill_addr] <= fill_data;
      tptr_mem[fill_addr] <= fill_tptr;
      id_mem  [fill_addr] <= (ID_W > 0) ? fill_id : '0;
    end else if (hit_en && hit_wr) begin
      data_mem[hit_addr] <= hit_data;
    end
    // reuse counters: only meaningful while v is set, so not reset
    if (dec_en && reuse_q[dec_addr] != '0)
      reuse_q[dec_addr] <= reuse_q[dec_addr] - 1'b1;
    if (hit_en && !(fill_en && fill_addr == hit_addr) && reuse_q[hit_addr] != '1)
      reuse_q[hit_addr] <= reuse_q[hit_addr] + 1'b1;
    if (fill_en) reuse_q[fill_addr] <= '0;
    if (rd_en) begin
      rd_data <= data_mem[rd_addr];
      rd_tptr <= tptr_mem[rd_addr];
      rd_id   <= id_mem  [rd_addr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q     <= '0;
      count_q <= '0;
      rd_v    <= 1'b0;
    end else begin
      if (rd_en) rd_v <= v_q[rd_addr];
      if (fill_en) begin
        v_q[fill_addr] <= 1'b1;
        if (!v_q[fill_addr]) count_q <= count_q + 1'b1;
      end
    end
  end

  assign scan_v     = v_q[scan_addr];
  assign scan_reuse = reuse_q[scan_addr];
  assign full       = (count_q == (ADDR_W + 1)'(ENTRIES));

endmodule

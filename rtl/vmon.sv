// vmon: the VMON capacity-demand monitor.
//
// One VTag buffer per core records the core's recently evicted blocks. For
// every L2 access of core i (acc_en, acc_core) Access_i is counted; when the
// access is a miss (acc_miss) its line is looked up in VTag_i and a hit
// counts VTagHits_i. VTagHits_i / Access_i is the marginal gain MG_i of
// giving the core more capacity. Evictions (ev_en, ev_core, ev_line) are
// written into the owner core's VTag. interval_end closes a time interval:
// the counts, including an access in that same cycle, are copied to
// vtag_hits/accesses for the operating system to read, and the live counters
// restart from zero. vtag_hit reports a VTag hit in the same cycle.
//
// Following the document: the per-core VTag, the two counters and their use
// per interval. This design's own choices: 32-bit saturating counters and an
// explicit interval_end strobe from the system.
module vmon #(
  parameter int unsigned N_CORES = pcs_pkg::N_CORES,
  parameter int unsigned ENTRIES = pcs_pkg::VMON_ENTRIES,
  parameter int unsigned LA_W    = 58,
  parameter int unsigned CNT_W   = pcs_pkg::CNT_W,
  localparam int unsigned CORE_W = (N_CORES > 1) ? $clog2(N_CORES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             acc_en,
  input  logic [CORE_W-1:0] acc_core,
  input  logic             acc_miss,
  input  logic [LA_W-1:0]  acc_line,
  output logic             vtag_hit,
  input  logic             ev_en,
  input  logic [CORE_W-1:0] ev_core,
  input  logic [LA_W-1:0]  ev_line,
  input  logic             interval_end,
  output logic [CNT_W-1:0] vtag_hits [N_CORES],
  output logic [CNT_W-1:0] accesses  [N_CORES]
);

  logic [N_CORES-1:0] buf_hit;
  logic [CNT_W-1:0]   hits_q [N_CORES];
  logic [CNT_W-1:0]   acc_q  [N_CORES];

  for (genvar c = 0; c < N_CORES; c++) begin : g_vtag
    vtag_buffer #(.ENTRIES(ENTRIES), .LA_W(LA_W)) u_vtag (
      .clk, .rst_n,
      .ins_en     (ev_en && ev_core == CORE_W'(c)),
      .ins_line   (ev_line),
      .lookup_en  (acc_en && acc_miss && acc_core == CORE_W'(c)),
      .lookup_line(acc_line),
      .hit        (buf_hit[c])
    );
  end

  assign vtag_hit = buf_hit != '0;

  function automatic logic [CNT_W-1:0] sat_inc(input logic [CNT_W-1:0] v, input logic en);
    return (en && v != '1) ? v + 1'b1 : v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CORES; c++) begin
        hits_q[c]    <= '0;
        acc_q[c]     <= '0;
        vtag_hits[c] <= '0;
        accesses[c]  <= '0;
      end
    end else begin
      for (int c = 0; c < N_CORES; c++) begin
        logic this_acc;
        this_acc = acc_en && acc_core == CORE_W'(c);
        if (interval_end) begin
          vtag_hits[c] <= sat_inc(hits_q[c], buf_hit[c]);
          accesses[c]  <= sat_inc(acc_q[c], this_acc);
          hits_q[c]    <= '0;
          acc_q[c]     <= '0;
        end else begin
          hits_q[c] <= sat_inc(hits_q[c], buf_hit[c]);
          acc_q[c]  <= sat_inc(acc_q[c], this_acc);
        end
      end
    end
  end

endmodule

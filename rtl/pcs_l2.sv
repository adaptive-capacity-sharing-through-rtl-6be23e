// pcs_l2: private L2 caches of an N-core chip multiprocessor with adaptive
// capacity sharing by probabilistic controlled placement (PCS).
//
// Every core has a tag array and a data array of its own. Tag and data
// entries are decoupled and linked by pointers both ways (d_ptr/s in the tag
// entry, t_ptr/id in the data entry); there are twice as many tag entries as
// data entries. Each core's data array is split into a private region P and a
// slice S; the S slices of all cores are linked into one shared region sData
// (here one array of N * (DATA_PER_CORE - P_ENTRIES) entries). Data entries
// are replaced by the global reuse replacement policy, one search pointer per
// region.
//
// Access flow for core i (one access at a time, cores served round robin):
//   1. read core i's tag set and compare tags (2 cycles from the grant);
//   2. hit: access the data entry through d_ptr and s, bump its reuse count;
//      a read returns the line one cycle later, a write marks the tag dirty;
//   3. miss: VMON counts the access and looks the line up in VTag_i. The
//      victim tag way is the first invalid way, else the LRU way.
//      - LRU way holds a block: its data entry is evicted and reused;
//      - way is free: the DAE selects P_i or sData (sData only when P_i is
//        full, in the core's private-to-shared ratio) and the reuse
//        replacer of that region finds a data entry to take;
//      an evicted block's owner tag (found through t_ptr and, in sData, id,
//      possibly in another core) is invalidated, its line address goes to the
//      owner's VTag, and a dirty block is written back to memory;
//   4. the line is fetched from memory (a write carries the full line and is
//      not fetched), written into the data entry and linked to the tag entry.
// Every access is counted in VMON; at interval_end VMON hands its counts to
// the operating system, which writes new probability levels into the DAE.
//
// Core ports: req_valid/req_ready handshake per core with a full-line address
// and write data (writes are full-line L1 write-backs); resp_valid[i] pulses
// with resp_rdata for reads and as the acknowledge of writes. The events
// output pulses one bit per mechanism for monitoring.
//
// Following the document: the decoupled arrays and their fields, the P/S
// split and sData, the access flow, VMON, the ratio placement and reuse
// replacement. This design's own choices: a single access engine shared by
// all cores, the cycle timing, valid/dirty in place of coherence states, the
// memory handshake and write handling. Snooping coherence and remote hits are
// not modelled.
//
// Lint note: the assertions at the end sample rst_n in their disable clause,
// which Verilator reports as a reset used both synchronously and
// asynchronously; the logic itself resets asynchronously only.
module pcs_l2 #(
  parameter int unsigned N_CORES       = pcs_pkg::N_CORES,
  parameter int unsigned ADDR_W        = pcs_pkg::ADDR_W,
  parameter int unsigned LINE_W        = pcs_pkg::LINE_W,
  parameter int unsigned TAG_ENTRIES   = pcs_pkg::TAG_ENTRIES,
  parameter int unsigned TAG_WAYS      = pcs_pkg::TAG_WAYS,
  parameter int unsigned DATA_PER_CORE = pcs_pkg::DATA_PER_CORE,
  parameter int unsigned P_ENTRIES     = pcs_pkg::P_ENTRIES,
  parameter int unsigned VMON_ENTRIES  = pcs_pkg::VMON_ENTRIES,
  parameter int unsigned REUSE_W       = pcs_pkg::REUSE_W,
  parameter int unsigned CNT_W         = pcs_pkg::CNT_W,
  parameter int unsigned N_LEVELS      = pcs_pkg::N_LEVELS,
  parameter int unsigned LEVEL_S [N_LEVELS] = pcs_pkg::LEVEL_S,
  parameter int unsigned LEVEL_P [N_LEVELS] = pcs_pkg::LEVEL_P,
  parameter int unsigned DEFAULT_LEVEL = pcs_pkg::DEFAULT_LEVEL,
  parameter bit          USE_PG        = 1'b0,
  localparam int unsigned CORE_W    = (N_CORES > 1) ? $clog2(N_CORES) : 1,
  localparam int unsigned LVL_W     = (N_LEVELS > 1) ? $clog2(N_LEVELS) : 1,
  localparam int unsigned OFF_W     = $clog2(LINE_W / 8),
  localparam int unsigned LA_W      = ADDR_W - OFF_W,
  localparam int unsigned SETS      = TAG_ENTRIES / TAG_WAYS,
  localparam int unsigned SET_W     = $clog2(SETS),
  localparam int unsigned WAY_W     = (TAG_WAYS > 1) ? $clog2(TAG_WAYS) : 1,
  localparam int unsigned TAG_W     = LA_W - SET_W,
  localparam int unsigned TPTR_W    = SET_W + WAY_W,
  localparam int unsigned S_ENTRIES = N_CORES * (DATA_PER_CORE - P_ENTRIES),
  localparam int unsigned PA_W      = $clog2(P_ENTRIES),
  localparam int unsigned SA_W      = $clog2(S_ENTRIES),
  localparam int unsigned DPTR_W    = (PA_W > SA_W) ? PA_W : SA_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // L2 requests from the cores' L1 caches
  input  logic [N_CORES-1:0] req_valid,
  output logic [N_CORES-1:0] req_ready,
  input  logic [N_CORES-1:0] req_we,
  input  logic [ADDR_W-1:0]  req_addr  [N_CORES],
  input  logic [LINE_W-1:0]  req_wdata [N_CORES],
  output logic [N_CORES-1:0] resp_valid,
  output logic [LINE_W-1:0]  resp_rdata,
  // main memory, line addressed
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic               mem_req_we,
  output logic [LA_W-1:0]    mem_req_line,
  output logic [LINE_W-1:0]  mem_req_wdata,
  input  logic               mem_resp_valid,
  input  logic [LINE_W-1:0]  mem_resp_data,
  // operating system: probability levels and VMON statistics
  input  logic               cfg_we,
  input  logic [CORE_W-1:0]  cfg_core,
  input  logic [LVL_W-1:0]   cfg_level,
  output logic [LVL_W-1:0]   level     [N_CORES],
  input  logic               interval_end,
  output logic [CNT_W-1:0]   vtag_hits [N_CORES],
  output logic [CNT_W-1:0]   accesses  [N_CORES],
  // monitoring
  output pcs_pkg::l2_events_t events
);

  // ------------------------------------------------------------------
  // controller state
  // ------------------------------------------------------------------
  typedef enum logic [3:0] {
    S_IDLE, S_TAG, S_HITRD, S_SEARCH, S_VRD, S_VTAG, S_WB, S_FETCH, S_FWAIT, S_FILL
  } state_e;

  state_e             state_q;
  logic [CORE_W-1:0]  cur_core_q;
  logic [LA_W-1:0]    cur_line_q;
  logic               cur_we_q;
  logic [LINE_W-1:0]  cur_wdata_q;
  logic [WAY_W-1:0]   v_way_q;       // tag way the new block takes
  logic               tgt_s_q;       // region of the target data entry
  logic [DPTR_W-1:0]  tgt_ptr_q;     // target data entry
  logic [CORE_W-1:0]  own_core_q;    // owner of the evicted block
  logic [TPTR_W-1:0]  own_tptr_q;
  logic [LINE_W-1:0]  vdata_q;       // evicted line, for write-back

  logic [SET_W-1:0]   cur_set;
  logic [TAG_W-1:0]   cur_tag;
  assign cur_set = cur_line_q[SET_W-1:0];
  assign cur_tag = cur_line_q[LA_W-1:SET_W];

  // ------------------------------------------------------------------
  // arbiter
  // ------------------------------------------------------------------
  logic              gnt_valid;
  logic [CORE_W-1:0] gnt;

  rr_arbiter #(.N(N_CORES)) u_arb (
    .clk, .rst_n,
    .en       (state_q == S_IDLE),
    .req      (req_valid),
    .gnt_valid(gnt_valid),
    .gnt      (gnt)
  );

  // ------------------------------------------------------------------
  // tag arrays, one per core
  // ------------------------------------------------------------------
  logic                ta_rd_en;
  logic [CORE_W-1:0]   ta_rd_core;
  logic [SET_W-1:0]    ta_rd_set;
  logic [TAG_W-1:0]    ta_cmp_tag;
  logic                ta_wr_en;
  logic [CORE_W-1:0]   ta_wr_core;
  logic [SET_W-1:0]    ta_wr_set;
  logic [WAY_W-1:0]    ta_wr_way;
  logic                ta_wr_valid, ta_wr_dirty, ta_wr_s;
  logic [TAG_W-1:0]    ta_wr_tag;
  logic [DPTR_W-1:0]   ta_wr_dptr;
  logic                ta_touch_en;
  logic [WAY_W-1:0]    ta_touch_way;

  logic [TAG_WAYS-1:0] ta_valid [N_CORES];
  logic [TAG_WAYS-1:0] ta_dirty [N_CORES];
  logic [TAG_WAYS-1:0] ta_s     [N_CORES];
  logic [TAG_W-1:0]    ta_tag   [N_CORES][TAG_WAYS];
  logic [DPTR_W-1:0]   ta_dptr  [N_CORES][TAG_WAYS];
  logic [N_CORES-1:0]  ta_hit, ta_vfree;
  logic [WAY_W-1:0]    ta_hit_way [N_CORES];
  logic [WAY_W-1:0]    ta_vway    [N_CORES];

  for (genvar c = 0; c < N_CORES; c++) begin : g_tag
    tag_array #(.SETS(SETS), .WAYS(TAG_WAYS), .TAG_W(TAG_W), .DPTR_W(DPTR_W)) u_tag (
      .clk, .rst_n,
      .rd_en      (ta_rd_en && ta_rd_core == CORE_W'(c)),
      .rd_set     (ta_rd_set),
      .cmp_tag    (ta_cmp_tag),
      .rd_valid   (ta_valid[c]),
      .rd_dirty   (ta_dirty[c]),
      .rd_s       (ta_s[c]),
      .rd_tag     (ta_tag[c]),
      .rd_dptr    (ta_dptr[c]),
      .hit        (ta_hit[c]),
      .hit_way    (ta_hit_way[c]),
      .victim_way (ta_vway[c]),
      .victim_free(ta_vfree[c]),
      .wr_en      (ta_wr_en && ta_wr_core == CORE_W'(c)),
      .wr_set     (ta_wr_set),
      .wr_way     (ta_wr_way),
      .wr_valid   (ta_wr_valid),
      .wr_dirty   (ta_wr_dirty),
      .wr_s       (ta_wr_s),
      .wr_tag     (ta_wr_tag),
      .wr_dptr    (ta_wr_dptr),
      .touch_en   (ta_touch_en && cur_core_q == CORE_W'(c)),
      .touch_set  (cur_set),
      .touch_way  (ta_touch_way)
    );
  end

  // ------------------------------------------------------------------
  // data regions: P per core and the shared sData, each with a replacer
  // ------------------------------------------------------------------
  logic               d_rd_en, d_rd_s;
  logic [DPTR_W-1:0]  d_rd_addr;
  logic               d_fill_en;
  logic [LINE_W-1:0]  d_fill_data;
  logic               d_hit_en, d_hit_wr, d_hit_s;
  logic [DPTR_W-1:0]  d_hit_addr;
  logic               rep_start, rep_s;

  logic [LINE_W-1:0]  p_rd_data [N_CORES];
  logic [TPTR_W-1:0]  p_rd_tptr [N_CORES];
  logic [N_CORES-1:0] p_rd_v, p_full, p_done, p_dec, p_busy;
  logic [PA_W-1:0]    p_victim  [N_CORES];

  logic [LINE_W-1:0]  s_rd_data;
  logic [TPTR_W-1:0]  s_rd_tptr;
  logic [CORE_W-1:0]  s_rd_id;
  logic               s_rd_v, s_full, s_done, s_dec, s_busy;
  logic [SA_W-1:0]    s_victim;

  for (genvar c = 0; c < N_CORES; c++) begin : g_p
    logic [PA_W-1:0]    scan_addr;
    logic               scan_v;
    logic [REUSE_W-1:0] scan_reuse;
    logic               unused_id;
    logic               mine;
    assign mine = cur_core_q == CORE_W'(c);

    data_array #(.ENTRIES(P_ENTRIES), .LINE_W(LINE_W), .TPTR_W(TPTR_W), .ID_W(0),
                 .REUSE_W(REUSE_W)) u_p (
      .clk, .rst_n,
      .rd_en     (d_rd_en && !d_rd_s && mine),
      .rd_addr   (d_rd_addr[PA_W-1:0]),
      .rd_data   (p_rd_data[c]),
      .rd_tptr   (p_rd_tptr[c]),
      .rd_id     (unused_id),
      .rd_v      (p_rd_v[c]),
      .fill_en   (d_fill_en && !tgt_s_q && mine),
      .fill_addr (tgt_ptr_q[PA_W-1:0]),
      .fill_data (d_fill_data),
      .fill_tptr ({cur_set, v_way_q}),
      .fill_id   (1'b0),
      .hit_en    (d_hit_en && !d_hit_s && mine),
      .hit_wr    (d_hit_wr),
      .hit_addr  (d_hit_addr[PA_W-1:0]),
      .hit_data  (cur_wdata_q),
      .scan_addr (scan_addr),
      .scan_v    (scan_v),
      .scan_reuse(scan_reuse),
      .dec_en    (p_dec[c]),
      .dec_addr  (scan_addr),
      .full      (p_full[c])
    );

    reuse_replacer #(.ENTRIES(P_ENTRIES), .REUSE_W(REUSE_W)) u_rep (
      .clk, .rst_n,
      .start     (rep_start && !rep_s && mine),
      .busy      (p_busy[c]),

      .done      (p_done[c]),
      .victim    (p_victim[c]),
      .scan_addr (scan_addr),
      .scan_v    (scan_v),
      .scan_reuse(scan_reuse),
      .dec_en    (p_dec[c])
    );
  end

  begin : g_s
    logic [SA_W-1:0]    scan_addr;
    logic               scan_v;
    logic [REUSE_W-1:0] scan_reuse;

    data_array #(.ENTRIES(S_ENTRIES), .LINE_W(LINE_W), .TPTR_W(TPTR_W), .ID_W(CORE_W),
                 .REUSE_W(REUSE_W)) u_s (
      .clk, .rst_n,
      .rd_en     (d_rd_en && d_rd_s),
      .rd_addr   (d_rd_addr[SA_W-1:0]),
      .rd_data   (s_rd_data),
      .rd_tptr   (s_rd_tptr),
      .rd_id     (s_rd_id),
      .rd_v      (s_rd_v),
      .fill_en   (d_fill_en && tgt_s_q),
      .fill_addr (tgt_ptr_q[SA_W-1:0]),
      .fill_data (d_fill_data),
      .fill_tptr ({cur_set, v_way_q}),
      .fill_id   (cur_core_q),
      .hit_en    (d_hit_en && d_hit_s),
      .hit_wr    (d_hit_wr),
      .hit_addr  (d_hit_addr[SA_W-1:0]),
      .hit_data  (cur_wdata_q),
      .scan_addr (scan_addr),
      .scan_v    (scan_v),
      .scan_reuse(scan_reuse),
      .dec_en    (s_dec),
      .dec_addr  (scan_addr),
      .full      (s_full)
    );

    reuse_replacer #(.ENTRIES(S_ENTRIES), .REUSE_W(REUSE_W)) u_rep (
      .clk, .rst_n,
      .start     (rep_start && rep_s),
      .busy      (s_busy),

      .done      (s_done),
      .victim    (s_victim),
      .scan_addr (scan_addr),
      .scan_v    (scan_v),
      .scan_reuse(scan_reuse),
      .dec_en    (s_dec)
    );
  end

  // ------------------------------------------------------------------
  // VMON, DAE, memory interface
  // ------------------------------------------------------------------
  logic              vm_acc_en, vm_vtag_hit, vm_ev_en;
  logic [LA_W-1:0]   vm_ev_line;

  vmon #(.N_CORES(N_CORES), .ENTRIES(VMON_ENTRIES), .LA_W(LA_W), .CNT_W(CNT_W)) u_vmon (
    .clk, .rst_n,
    .acc_en      (vm_acc_en),
    .acc_core    (cur_core_q),
    .acc_miss    (!ta_hit[cur_core_q]),
    .acc_line    (cur_line_q),
    .vtag_hit    (vm_vtag_hit),
    .ev_en       (vm_ev_en),
    .ev_core     (own_core_q),
    .ev_line     (vm_ev_line),
    .interval_end(interval_end),
    .vtag_hits   (vtag_hits),
    .accesses    (accesses)
  );

  logic dae_shared, dae_commit;

  dae #(.N_CORES(N_CORES), .N_LEVELS(N_LEVELS), .LEVEL_S(LEVEL_S), .LEVEL_P(LEVEL_P),
        .DEFAULT_LEVEL(DEFAULT_LEVEL), .USE_PG(USE_PG)) u_dae (
    .clk, .rst_n,
    .cfg_we, .cfg_core, .cfg_level,
    .level     (level),
    .sel_core  (cur_core_q),
    .sel_pfull (p_full[cur_core_q]),
    .sel_shared(dae_shared),
    .commit    (dae_commit)
  );

  logic              mi_req, mi_we, mi_busy, mi_done;
  logic [LA_W-1:0]   mi_line;
  logic [LINE_W-1:0] mi_rdata;

  mem_interface #(.LA_W(LA_W), .LINE_W(LINE_W)) u_mem (
    .clk, .rst_n,
    .req_valid(mi_req),
    .req_we   (mi_we),
    .req_line (mi_line),
    .req_wdata(vdata_q),
    .busy     (mi_busy),
    .done     (mi_done),
    .rdata    (mi_rdata),
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_line, .mem_req_wdata,
    .mem_resp_valid, .mem_resp_data
  );

  // ------------------------------------------------------------------
  // access flow
  // ------------------------------------------------------------------
  // views of the current core's tag read
  logic              t_hit, t_vfree;
  logic [WAY_W-1:0]  t_hit_way, t_vway;
  assign t_hit     = ta_hit[cur_core_q];
  assign t_vfree   = ta_vfree[cur_core_q];
  assign t_hit_way = ta_hit_way[cur_core_q];
  assign t_vway    = ta_vway[cur_core_q];

  // views of the owner's tag entry and the target data entry
  logic [WAY_W-1:0]  own_way;
  logic [SET_W-1:0]  own_set;
  assign own_way = own_tptr_q[WAY_W-1:0];
  assign own_set = own_tptr_q[TPTR_W-1:WAY_W];

  logic              d_v;
  logic [TPTR_W-1:0] d_tptr;
  logic [LINE_W-1:0] d_data;
  assign d_v    = tgt_s_q ? s_rd_v    : p_rd_v[cur_core_q];
  assign d_tptr = tgt_s_q ? s_rd_tptr : p_rd_tptr[cur_core_q];
  assign d_data = tgt_s_q ? s_rd_data : p_rd_data[cur_core_q];

  logic              rep_done;
  logic [DPTR_W-1:0] rep_victim;
  assign rep_done   = tgt_s_q ? s_done : p_done[cur_core_q];
  assign rep_victim = tgt_s_q ? DPTR_W'(s_victim) : DPTR_W'(p_victim[cur_core_q]);

  assign vm_ev_line  = {ta_tag[own_core_q][own_way], own_set};
  assign d_fill_data = cur_we_q ? cur_wdata_q : mi_rdata;

  always_comb begin
    req_ready    = '0;
    resp_valid   = '0;
    resp_rdata   = d_fill_data;
    ta_rd_en     = 1'b0;
    ta_rd_core   = cur_core_q;
    ta_rd_set    = cur_set;
    ta_cmp_tag   = cur_tag;
    ta_wr_en     = 1'b0;
    ta_wr_core   = cur_core_q;
    ta_wr_set    = cur_set;
    ta_wr_way    = v_way_q;
    ta_wr_valid  = 1'b1;
    ta_wr_dirty  = cur_we_q;
    ta_wr_s      = tgt_s_q;
    ta_wr_tag    = cur_tag;
    ta_wr_dptr   = tgt_ptr_q;
    ta_touch_en  = 1'b0;
    ta_touch_way = v_way_q;
    d_rd_en      = 1'b0;
    d_rd_s       = tgt_s_q;
    d_rd_addr    = tgt_ptr_q;
    d_fill_en    = 1'b0;
    d_hit_en     = 1'b0;
    d_hit_wr     = cur_we_q;
    d_hit_s      = ta_s[cur_core_q][t_hit_way];
    d_hit_addr   = ta_dptr[cur_core_q][t_hit_way];
    rep_start    = 1'b0;
    rep_s        = dae_shared;
    dae_commit   = 1'b0;
    vm_acc_en    = 1'b0;
    vm_ev_en     = 1'b0;
    mi_req       = 1'b0;
    mi_we        = 1'b0;
    mi_line      = cur_line_q;
    events       = '0;

    unique case (state_q)
      S_IDLE: begin
        if (gnt_valid) begin
          req_ready[gnt] = 1'b1;
          ta_rd_en       = 1'b1;
          ta_rd_core     = gnt;
          ta_rd_set      = req_addr[gnt][OFF_W +: SET_W];
          ta_cmp_tag     = req_addr[gnt][ADDR_W-1 -: TAG_W];
        end
      end
      S_TAG: begin
        vm_acc_en = 1'b1;
        if (t_hit) begin
          events.tag_hit = 1'b1;
          ta_touch_en    = 1'b1;
          ta_touch_way   = t_hit_way;
          d_hit_en       = 1'b1;
          if (cur_we_q) begin
            // write hit: update the line and mark the tag entry dirty
            ta_wr_en    = 1'b1;
            ta_wr_way   = t_hit_way;
            ta_wr_dirty = 1'b1;
            ta_wr_s     = ta_s[cur_core_q][t_hit_way];
            ta_wr_dptr  = ta_dptr[cur_core_q][t_hit_way];
            resp_valid[cur_core_q] = 1'b1;
          end else begin
            d_rd_en   = 1'b1;
            d_rd_s    = ta_s[cur_core_q][t_hit_way];
            d_rd_addr = ta_dptr[cur_core_q][t_hit_way];
          end
        end else begin
          events.tag_miss = 1'b1;
          events.vtag_hit = vm_vtag_hit;
          if (!t_vfree) begin
            // LRU tag way owns a data entry: evict its block, reuse the entry
            events.local_repl = 1'b1;
            d_rd_en   = 1'b1;
            d_rd_s    = ta_s[cur_core_q][t_vway];
            d_rd_addr = ta_dptr[cur_core_q][t_vway];
          end else begin
            // free tag way: region select, then global reuse replacement
            dae_commit     = 1'b1;
            rep_start      = 1'b1;
            events.place_p = !dae_shared;
            events.place_s = dae_shared;
          end
        end
      end
      S_HITRD: begin
        resp_valid[cur_core_q] = 1'b1;
        resp_rdata             = d_data;
      end
      S_SEARCH: begin
        if (rep_done) d_rd_en = 1'b1;
        d_rd_addr = rep_victim;
      end
      S_VRD: begin
        if (d_v) begin
          ta_rd_en   = 1'b1;
          ta_rd_core = tgt_s_q ? s_rd_id : cur_core_q;
          ta_rd_set  = d_tptr[TPTR_W-1:WAY_W];
        end
      end
      S_VTAG: begin
        events.evict        = 1'b1;
        events.evict_remote = own_core_q != cur_core_q;
        events.writeback    = ta_dirty[own_core_q][own_way];
        vm_ev_en     = 1'b1;
        ta_wr_en     = 1'b1;
        ta_wr_core   = own_core_q;
        ta_wr_set    = own_set;
        ta_wr_way    = own_way;
        ta_wr_valid  = 1'b0;
        ta_wr_dirty  = 1'b0;
        ta_wr_s      = 1'b0;
        ta_wr_tag    = ta_tag[own_core_q][own_way];
        ta_wr_dptr   = '0;
        if (ta_dirty[own_core_q][own_way]) begin
          mi_req  = 1'b1;
          mi_we   = 1'b1;
          mi_line = vm_ev_line;
        end
      end
      S_FETCH: begin
        if (!cur_we_q && !mi_busy) mi_req = 1'b1;
      end
      S_FILL: begin
        d_fill_en   = 1'b1;
        ta_wr_en    = 1'b1;
        ta_touch_en = 1'b1;
        resp_valid[cur_core_q] = 1'b1;
      end
      default: ;
    endcase

    events.reuse_dec = (s_dec || p_dec != '0);
  end

  always_ff @(posedge clk) begin
    unique case (state_q)
      S_IDLE: if (gnt_valid) begin
        cur_core_q  <= gnt;
        cur_line_q  <= req_addr[gnt][ADDR_W-1:OFF_W];
        cur_we_q    <= req_we[gnt];
        cur_wdata_q <= req_wdata[gnt];
      end
      S_TAG: if (!t_hit) begin
        v_way_q <= t_vway;
        if (!t_vfree) begin
          tgt_s_q   <= ta_s[cur_core_q][t_vway];
          tgt_ptr_q <= ta_dptr[cur_core_q][t_vway];
        end else begin
          tgt_s_q <= dae_shared;
        end
      end else begin
        tgt_s_q <= ta_s[cur_core_q][t_hit_way];
      end
      S_SEARCH: if (rep_done) tgt_ptr_q <= rep_victim;
      S_VRD: begin
        own_core_q <= tgt_s_q ? s_rd_id : cur_core_q;
        own_tptr_q <= d_tptr;
        vdata_q    <= d_data;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
    end else begin
      unique case (state_q)
        S_IDLE:   if (gnt_valid) state_q <= S_TAG;
        S_TAG:    if (t_hit) state_q <= cur_we_q ? S_IDLE : S_HITRD;
                  else       state_q <= t_vfree ? S_SEARCH : S_VRD;
        S_HITRD:  state_q <= S_IDLE;
        S_SEARCH: if (rep_done) state_q <= S_VRD;
        S_VRD:    state_q <= d_v ? S_VTAG : S_FETCH;
        S_VTAG:   state_q <= ta_dirty[own_core_q][own_way] ? S_WB : S_FETCH;
        S_WB:     if (mi_done) state_q <= S_FETCH;
        S_FETCH:  if (cur_we_q) state_q <= S_FILL;
                  else if (!mi_busy) state_q <= S_FWAIT;
        S_FWAIT:  if (mi_done) state_q <= S_FILL;
        S_FILL:   state_q <= S_IDLE;
        default:  state_q <= S_IDLE;
      endcase
    end
  end

  // A replacement search is only started on an idle replacer, and sData is
  // only searched once its core's private region is full.
  assert property (@(posedge clk) disable iff (!rst_n)
    rep_start |-> (rep_s ? !s_busy && p_full[cur_core_q] : !p_busy[cur_core_q]));

  // sData fills before blocks are evicted from it.
  assert property (@(posedge clk) disable iff (!rst_n)
    state_q == S_VTAG && own_core_q != cur_core_q |-> s_full);

  // The owner tag of an evicted block must point back at the data entry.
  assert property (@(posedge clk) disable iff (!rst_n)
    state_q == S_VTAG |-> ta_valid[own_core_q][own_way]
                          && ta_dptr[own_core_q][own_way] == tgt_ptr_q
                          && ta_s[own_core_q][own_way] == tgt_s_q);

endmodule

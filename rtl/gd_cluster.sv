// gd_cluster: a gracefully degradable processor cluster (top level).
//
// Fault-tolerant cluster of 3*N_DRNM processor modules (PMs) that run in
// lock-step triads (triple modular redundancy). It has two halves:
//
// * The dynamic reconfiguration network (drn): a ring of DRN modules, each
//   switching the clock and control signals of three PMs. When the
//   processors' error handler retires a PM (`pm_fail`), the ring regroups
//   the fault-free PMs into as many triads as their number allows and
//   re-locks each triad's clocks in an ADPLL. Each PM gets a running clock
//   (`pm_clk`, a tick of the sampling clock), whether it is in a triad, and
//   the identifier of the DRNM hosting its triad.
// * The monitoring-at-transmission (MAT) bus: every PM queues its writes in
//   a mat_node; a triad whose three queues all hold a word is granted the
//   wired-AND bus by bus_arbiter; the three members transmit at once and
//   each compares the bus with its own word. A difference invalidates the
//   transfer, which is retried; repeated failure raises `pm_perm_fault` to
//   the processors. A transfer nobody invalidates is written to memory
//   (`mem_wr_*`). The word carries the memory address in its upper bits
//   ([W-1:8]) and the data byte in [7:0].
// * The interrupt synchronizer (irq_sync): an external interrupt for a
//   triad reaches its three members at the same count of their own clock
//   ticks, at a synchronization-cycle boundary.
// * The page update tags (page_tag_scan): every memory write tags its page;
//   on `realign_start` the tagged pages are walked word by word on
//   `rv_valid/rv_addr` so that an outside voter can realign the memory
//   copies after a fault.
//
// Alongside stands a single pipelined voter (pipelined_voter), the basic
// organisation of one processor triad in front of its own memory: it masks,
// rather than only detects, a disagreeing channel. Its ports are brought
// out separately (`pv_*`).
//
// Processors, caches and main memory are outside this design: their
// signals are ports. One sampling clock runs everything.
//
// From the document: the ring of DRN modules with three PMs each, the MAT
// bus with its arbiter and queues, the voter organisation, update tags on
// memory pages, interrupts taken at synchronization-cycle boundaries, and
// the sizes (15 PMs, 8-word buffers, divide-by-16, 6320 pages of a
// 4 * 10^6-word memory). This design's own: the single sampling clock with
// clock ticks, the triad tags that the arbiter and bus nodes use, the word
// layout, and placing the voter beside the bus instead of inside it.
// Lint: the arbiter's per-triad request vector is status only and left
// open.
module gd_cluster
  import gd_pkg::*;
#(
  parameter int unsigned N_DRNM    = 5,   // DRN modules on the ring
  parameter int unsigned W         = 32,  // bus word: 24-bit address, 8-bit data
  parameter int unsigned DEPTH     = 8,   // write queue / voter buffer words
  parameter int unsigned MAX_RETRY = 3,   // MAT retries before a permanent fault
  parameter int unsigned DIV       = 16,  // ADPLL synchronisation divider
  parameter int unsigned SKEW_MAX  = 2,   // ADPLL skew threshold in pulses
  parameter int unsigned TIMEOUT   = 64,  // pipelined voter watchdog cycles
  parameter int unsigned MEM_WORDS = 4000000, // main memory words
  parameter int unsigned K_PAGES   = 6320,    // pages with an update tag
  localparam int unsigned N_PM     = 3 * N_DRNM
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor modules
  input  logic [N_PM-1:0]   pm_osc,         // raw clock ticks
  input  logic [N_PM-1:0]   pm_fail,        // PM retired by the error handler
  output logic [N_PM-1:0]   pm_clk,         // running clock ticks
  output logic [N_PM-1:0]   pm_active,      // member of a triad
  output logic [ID_W-1:0]   pm_tag [N_PM],  // triad host
  input  logic [N_PM-1:0]   pm_wr_en,
  input  logic [W-1:0]      pm_wr_data [N_PM],
  output logic [N_PM-1:0]   pm_full,
  output logic [N_PM-1:0]   pm_perm_fault,
  input  logic [N_PM-1:0]   pm_clear_fault,
  input  logic [N_DRNM-1:0] irq_req,        // external interrupt per triad host
  output logic [N_PM-1:0]   pm_irq,         // interrupt, aligned to the PM's clock
  output logic [N_DRNM-1:0] irq_pending,
  // main memory write port of the MAT bus
  input  logic              mem_ready,
  output logic              mem_wr_valid,
  output logic [W-1:0]      mem_wr_data,
  // memory realignment
  input  logic              realign_start,
  output logic              realign_busy,
  output logic              realign_done,
  output logic              rv_valid,
  output logic [W-9:0]      rv_addr,
  input  logic              rv_ready,
  output logic [$clog2(K_PAGES+1)-1:0] n_tagged,
  // cluster status
  output logic              err,
  output logic [N_DRNM-1:0] triad_here,
  output logic [N_DRNM-1:0] locked,
  output logic [N_DRNM-1:0] bypass,
  output msg_t              req_msg [N_DRNM],
  output msg_t              rsp_msg [N_DRNM],
  output logic [N_DRNM-1:0] pulse_fix,
  output logic              grant_valid,
  output logic [ID_W-1:0]   grant_id,
  output logic              inval_bus,
  // stand-alone pipelined voter
  input  logic [2:0]        pv_ch_wr,
  input  logic [W-1:0]      pv_ch_data [3],
  output logic [2:0]        pv_ch_full,
  output logic              pv_mem_valid,
  output logic [W-1:0]      pv_mem_data,
  input  logic              pv_mem_ready,
  output logic              pv_fault_valid,
  output logic [2:0]        pv_fault_mask,
  output logic              pv_timeout,
  output logic [2:0]        pv_stalled
);

  // ------------------------------------------------------------------ DRN
  drn #(.N_DRNM(N_DRNM), .DIV(DIV), .SKEW_MAX(SKEW_MAX)) u_drn (
    .clk, .rst_n,
    .pm_fail, .pm_osc, .pm_clk, .pm_active, .pm_tag,
    .err, .triad_here, .locked, .bypass, .req_msg, .rsp_msg, .pulse_fix
  );

  // -------------------------------------------------------------- MAT bus
  logic [N_PM-1:0] ready, inval, committed;
  logic [W-1:0]    drive [N_PM];
  logic [W-1:0]    bus;

  for (genvar p = 0; p < N_PM; p++) begin : g_pm
    mat_node #(.W(W), .DEPTH(DEPTH), .MAX_RETRY(MAX_RETRY)) u_node (
      .clk, .rst_n,
      .wr_en      (pm_wr_en[p]),
      .wr_data    (pm_wr_data[p]),
      .full       (pm_full[p]),
      .perm_fault (pm_perm_fault[p]),
      .clear_fault(pm_clear_fault[p]),
      .active     (pm_active[p]),
      .tag        (pm_tag[p]),
      .ready      (ready[p]),
      .grant_valid,
      .grant_id,
      .drive      (drive[p]),
      .bus,
      .invalidate (inval[p]),
      .inval_bus,
      .committed  (committed[p])
    );
  end

  mat_bus #(.W(W), .N(N_PM)) u_bus (
    .drive, .inval, .bus, .inval_bus
  );

  bus_arbiter #(.N_DRNM(N_DRNM)) u_arb (
    .clk, .rst_n,
    .ready, .active(pm_active), .tag(pm_tag),
    .mem_ready,
    .grant_valid, .grant_id,
    .triad_req()
  );

  // memory takes the word when a granted transfer is not invalidated
  assign mem_wr_valid = grant_valid && !inval_bus && (|committed);
  assign mem_wr_data  = bus;

  // --------------------------------------------------------- interrupts
  irq_sync #(.N_DRNM(N_DRNM), .DIV(DIV)) u_irq (
    .clk, .rst_n,
    .pm_clk, .pm_active, .pm_tag,
    .irq_req, .pm_irq, .irq_pending
  );

  // ------------------------------------------------- page update tags
  page_tag_scan #(.MEM_WORDS(MEM_WORDS), .K(K_PAGES), .AW(W - 8)) u_tags (
    .clk, .rst_n,
    .wr_valid(mem_wr_valid),
    .wr_addr (mem_wr_data[W-1:8]),
    .start   (realign_start),
    .busy    (realign_busy),
    .done    (realign_done),
    .rv_valid,
    .rv_addr,
    .rv_ready,
    .n_tagged
  );

  // ------------------------------------------------ stand-alone voter
  pipelined_voter #(.W(W), .DEPTH(DEPTH), .TIMEOUT(TIMEOUT)) u_pv (
    .clk, .rst_n,
    .ch_wr      (pv_ch_wr),
    .ch_data    (pv_ch_data),
    .ch_full    (pv_ch_full),
    .mem_valid  (pv_mem_valid),
    .mem_data   (pv_mem_data),
    .mem_ready  (pv_mem_ready),
    .fault_valid(pv_fault_valid),
    .fault_mask (pv_fault_mask),
    .timeout    (pv_timeout),
    .stalled    (pv_stalled)
  );

endmodule

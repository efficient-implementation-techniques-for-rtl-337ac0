// drn: dynamic reconfiguration network (DRN) of one processor cluster.
//
// N_DRNM DRN modules (drnm.sv) in a ring, each with three processor modules
// (PMs). DRNM i's R1 port is wired to DRNM i+1's R5 port, and the last
// DRNM's R1 to the first one's R5, so requests circle the ring in index
// order and replies come back the other way. The error line is the wired-OR
// of the DRNMs' error outputs. PM p belongs to DRNM p/3, access port p%3.
// After any sequence of single PM retirements the ring regroups the
// fault-free PMs of the DRNMs with one or two fault-free PMs into triads,
// first fit along the ring; DRNMs with three fault-free PMs keep their own
// triad.
// The ring of five DRNMs matches the fifteen-PM example of the document;
// the index order of the wiring is this design's choice.
// Lint: the DRNMs' initiator flags are status only and left open.
module drn
  import gd_pkg::*;
#(
  parameter int unsigned N_DRNM   = 5,
  parameter int unsigned DIV      = 16,
  parameter int unsigned SKEW_MAX = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [3*N_DRNM-1:0] pm_fail,
  input  logic [3*N_DRNM-1:0] pm_osc,
  output logic [3*N_DRNM-1:0] pm_clk,
  output logic [3*N_DRNM-1:0] pm_active,
  output logic [ID_W-1:0]     pm_tag [3*N_DRNM],
  output logic                err,         // the wired-OR error line
  output logic [N_DRNM-1:0]   triad_here,
  output logic [N_DRNM-1:0]   locked,
  output logic [N_DRNM-1:0]   bypass,
  output msg_t                req_msg [N_DRNM],  // message leaving R1
  output msg_t                rsp_msg [N_DRNM],  // message leaving R5
  output logic [N_DRNM-1:0]   pulse_fix        // an ADPLL added or deleted a pulse
);

  ring_link_t         r1_out [N_DRNM];
  ring_link_t         r5_out [N_DRNM];
  logic [N_DRNM-1:0]  err_out;
  logic [2:0]         n_ins [N_DRNM];
  logic [2:0]         n_del [N_DRNM];

  assign err = |err_out;

  for (genvar i = 0; i < N_DRNM; i++) begin : g_m
    localparam int unsigned NXT = (i + 1) % N_DRNM;
    localparam int unsigned PRV = (i + N_DRNM - 1) % N_DRNM;
    logic [ID_W-1:0] tag [3];

    drnm #(.ID(i), .N_RING(N_DRNM), .DIV(DIV), .SKEW_MAX(SKEW_MAX)) u_drnm (
      .clk, .rst_n,
      .pm_fail   (pm_fail[3*i +: 3]),
      .pm_osc    (pm_osc[3*i +: 3]),
      .pm_clk    (pm_clk[3*i +: 3]),
      .pm_active (pm_active[3*i +: 3]),
      .pm_tag    (tag),
      .err_in    (err),
      .err_out   (err_out[i]),
      .r1_in     (r5_out[NXT]),
      .r1_out    (r1_out[i]),
      .r5_in     (r1_out[PRV]),
      .r5_out    (r5_out[i]),
      .bypass    (bypass[i]),
      .triad_here(triad_here[i]),
      .locked    (locked[i]),
      .initiator (),
      .n_insert  (n_ins[i]),
      .n_delete  (n_del[i])
    );

    for (genvar k = 0; k < 3; k++) begin : g_t
      assign pm_tag[3*i+k] = tag[k];
    end
    assign req_msg[i]   = r1_out[i].msg;
    assign rsp_msg[i]   = r5_out[i].msg;
    assign pulse_fix[i] = |(n_ins[i] | n_del[i]);
  end

endmodule

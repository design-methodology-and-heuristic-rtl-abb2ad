// hmpm_top -- reconfigurable hybrid macro-pipeline multiprocessor (HMPM).
//
// Parallel subtasks of an application run side by side in four clusters; inside
// a cluster a subtask runs as a macro pipeline, each PE of the cluster doing
// one stage and passing its result to the next PE. All PEs sit on one linear
// chain and a cluster is a contiguous run of it, so PEs can be handed between
// neighbouring clusters. When a new task arrives the number of PEs of each
// cluster is recomputed from the cycle counts of the subtasks allocated to the
// clusters, and the cluster boundaries are moved until they match.
//
// Blocks:
//   sync_fifo       queue for external subtask data (word + cluster tag)
//   lower_bus       carries a queued item to the first PE of its cluster
//   pe_node x PES   cluster status and bus/chain switch of each PE
//   upper_bus       one bus per cluster; the last PE of the cluster sends on it
//   reconfig_ratio  new PE count per cluster: x_i / sum(x) * PES
//   reconfig_ctrl   moves one PE per cycle across a cluster boundary
// The processors inside the PEs and the partitioning controller are not part
// of this RTL: the processor ports (core_*) and the controller's outputs
// (ext_* subtask data with its cluster tag, cfg_* subtask cycle counts) are
// ports of this module.
//
// Reconfiguration sequence (this design's own choice of ordering): cfg_start
// with cfg_x[i], the cycle count of the subtask of cluster i, and cfg_v, the
// queue and bus overhead counted into the task cycles (zero in the heuristic),
// while cfg_busy is low. The lower bus is held at once, so no new item enters a cluster,
// and the ratio is computed. When the ratio is ready and every item that
// entered a cluster has come out of its upper bus (in-flight count zero), the
// boundaries are moved, one PE per cycle; then the lower bus is released.
// When nothing has to drain, cfg_done is high 152+N clock edges after the edge
// that took cfg_start at the defaults (149 for the ratio, 3 for hand-over and
// completion, N = number of PEs moved); draining adds its own time.
//
// Results: res_valid/res_data/res_ready[k] is upper bus k, the output of the
// last stage of cluster k. Items of one cluster come out in the order they
// went in. Reset gives each cluster PES/CLUSTERS PEs.
module hmpm_top
  import hmpm_pkg::*;
#(
  parameter int unsigned CLUSTERS = HMPM_CLUSTERS,
  parameter int unsigned PES      = HMPM_PES,
  parameter int unsigned DATA_W   = HMPM_DATA_W,
  parameter int unsigned CYC_W    = HMPM_CYC_W,
  parameter int unsigned Q_DEPTH  = 8,
  localparam int unsigned CI      = (CLUSTERS > 1) ? $clog2(CLUSTERS) : 1,
  localparam int unsigned SW      = $clog2(PES + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // external subtask data, tagged with the cluster it is allocated to
  input  logic                             ext_valid,
  input  logic [CI-1:0]                    ext_cluster,
  input  logic [DATA_W-1:0]                ext_data,
  output logic                             ext_ready,
  // reconfiguration request: subtask cycle counts
  input  logic                             cfg_start,
  input  logic [CLUSTERS-1:0][CYC_W-1:0]   cfg_x,
  input  logic [CYC_W-1:0]                 cfg_v,   // queue and bus overhead cycles
  output logic                             cfg_busy,
  output logic                             cfg_done,
  output logic                             cfg_move,      // a PE changes cluster this cycle
  output logic                             cfg_move_grow, // ... joining the cluster on its left
  // configuration state
  output logic [CLUSTERS-1:0][SW-1:0]      cluster_size,
  output logic [PES-1:0][CI-1:0]           pe_cluster,
  output logic [PES-1:0]                   pe_first,
  output logic [PES-1:0]                   pe_last,
  output logic [$clog2(Q_DEPTH+1)-1:0]     queue_count,
  output logic                             lb_stalled,  // queue holds data, lower bus held
  // results, one upper bus per cluster
  output logic [CLUSTERS-1:0]              res_valid,
  output logic [CLUSTERS-1:0][DATA_W-1:0]  res_data,
  input  logic [CLUSTERS-1:0]              res_ready,
  // processors of the PEs
  output logic [PES-1:0]                   core_in_valid,
  output logic [PES-1:0][DATA_W-1:0]       core_in_data,
  input  logic [PES-1:0]                   core_in_ready,
  input  logic [PES-1:0]                   core_out_valid,
  input  logic [PES-1:0][DATA_W-1:0]       core_out_data,
  output logic [PES-1:0]                   core_out_ready
);

  localparam int unsigned PW = (PES > 1) ? $clog2(PES) : 1;
  localparam int unsigned FW = (DATA_W + CI);
  localparam int unsigned IW = 16;   // in-flight item counter

  // ---------------------------------------------------------------- queue
  logic          q_valid, q_ready;
  logic [FW-1:0] q_data;

  sync_fifo #(.WIDTH(FW), .DEPTH(Q_DEPTH)) u_queue (
    .clk, .rst_n,
    .in_valid (ext_valid),
    .in_ready (ext_ready),
    .in_data  ({ext_cluster, ext_data}),
    .out_valid(q_valid),
    .out_ready(q_ready),
    .out_data (q_data),
    .count    (queue_count)
  );

  // ---------------------------------------------------------- reconfiguration
  typedef enum logic [1:0] {PH_RUN, PH_WAIT, PH_MOVE} phase_t;
  phase_t phase;

  logic                        ratio_start, ratio_done, ratio_ready;
  logic [CLUSTERS-1:0][SW-1:0] ratio_target;
  logic                        ctrl_start, ctrl_done;
  logic                        move_valid, move_grow;
  logic [PW-1:0]               move_pe;
  logic [CI-1:0]               move_cluster;
  logic [IW-1:0]               inflight;

  assign ratio_start = cfg_start && (phase == PH_RUN);
  assign ctrl_start  = (phase == PH_WAIT) && ratio_ready && (inflight == '0);

  reconfig_ratio #(.CLUSTERS(CLUSTERS), .PES(PES), .CYC_W(CYC_W)) u_ratio (
    .clk, .rst_n,
    .start (ratio_start),
    .x     (cfg_x),
    .v     (cfg_v),
    .busy  (),
    .done  (ratio_done),
    .target(ratio_target)
  );

  reconfig_ctrl #(.CLUSTERS(CLUSTERS), .PES(PES)) u_ctrl (
    .clk, .rst_n,
    .start       (ctrl_start),
    .target      (ratio_target),
    .busy        (),
    .done        (ctrl_done),
    .move_valid  (move_valid),
    .move_pe     (move_pe),
    .move_cluster(move_cluster),
    .move_grow   (move_grow),
    .size        (cluster_size)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase       <= PH_RUN;
      ratio_ready <= 1'b0;
    end else begin
      unique case (phase)
        PH_RUN:  if (cfg_start) begin
          phase       <= PH_WAIT;
          ratio_ready <= 1'b0;
        end
        PH_WAIT: begin
          if (ratio_done) ratio_ready <= 1'b1;
          if (ctrl_start) phase <= PH_MOVE;
        end
        PH_MOVE: if (ctrl_done) phase <= PH_RUN;
        default: phase <= PH_RUN;
      endcase
    end
  end

  assign cfg_busy = (phase != PH_RUN);
  assign cfg_done      = ctrl_done;
  assign cfg_move      = move_valid;
  assign cfg_move_grow = move_valid && move_grow;
  assign lb_stalled    = q_valid && (phase != PH_RUN);

  // ------------------------------------------------------------- lower bus
  logic                lb_valid;
  logic [CI-1:0]       lb_cluster;
  logic [DATA_W-1:0]   lb_data;
  logic [PES-1:0]      pe_take;

  lower_bus #(.CLUSTERS(CLUSTERS), .PES(PES), .DATA_W(DATA_W)) u_lower (
    .clk, .rst_n,
    .enable     (phase == PH_RUN),
    .src_valid  (q_valid),
    .src_cluster(q_data[FW-1:DATA_W]),
    .src_data   (q_data[DATA_W-1:0]),
    .src_ready  (q_ready),
    .lb_valid   (lb_valid),
    .lb_cluster (lb_cluster),
    .lb_data    (lb_data),
    .pe_take    (pe_take),
    .taken      ()
  );

  // ------------------------------------------------------------- PE chain
  logic [PES-1:0]             ch_out_valid, ch_in_ready;
  logic [PES-1:0][DATA_W-1:0] ch_out_data;
  logic [PES-1:0]             ub_drive, ub_valid, ub_ready;
  logic [PES-1:0][CI-1:0]     ub_sel;
  logic [PES-1:0][DATA_W-1:0] ub_data;

  for (genvar j = 0; j < PES; j++) begin : g_pe
    localparam bit LEND = (j == 0);
    localparam bit REND = (j == PES - 1);
    localparam int unsigned LJ = LEND ? j : j - 1;
    localparam int unsigned RJ = REND ? j : j + 1;

    pe_node #(
      .CLUSTERS  (CLUSTERS),
      .DATA_W    (DATA_W),
      .INIT_CLUST(init_cluster(j, PES, CLUSTERS)),
      .LEFT_END  (LEND),
      .RIGHT_END (REND)
    ) u_node (
      .clk, .rst_n,
      .upd_en        (move_valid && (move_pe == PW'(j))),
      .upd_cluster   (move_cluster),
      .status        (pe_cluster[j]),
      .left_status   (pe_cluster[LJ]),
      .right_status  (pe_cluster[RJ]),
      .is_first      (pe_first[j]),
      .is_last       (pe_last[j]),
      .lb_valid      (lb_valid),
      .lb_cluster    (lb_cluster),
      .lb_data       (lb_data),
      .lb_take       (pe_take[j]),
      .ch_in_valid   (LEND ? 1'b0 : ch_out_valid[LJ]),
      .ch_in_data    (ch_out_data[LJ]),
      .ch_in_ready   (ch_in_ready[j]),
      .ch_out_valid  (ch_out_valid[j]),
      .ch_out_data   (ch_out_data[j]),
      .ch_out_ready  (REND ? 1'b0 : ch_in_ready[RJ]),
      .ub_drive      (ub_drive[j]),
      .ub_sel        (ub_sel[j]),
      .ub_valid      (ub_valid[j]),
      .ub_data       (ub_data[j]),
      .ub_ready      (ub_ready[j]),
      .core_in_valid (core_in_valid[j]),
      .core_in_data  (core_in_data[j]),
      .core_in_ready (core_in_ready[j]),
      .core_out_valid(core_out_valid[j]),
      .core_out_data (core_out_data[j]),
      .core_out_ready(core_out_ready[j])
    );
  end

  // ------------------------------------------------------------- upper buses
  logic [CLUSTERS-1:0]         bus_owned;

  upper_bus #(.CLUSTERS(CLUSTERS), .PES(PES), .DATA_W(DATA_W)) u_upper (
    .clk, .rst_n,
    .pe_drive (ub_drive),
    .pe_sel   (ub_sel),
    .pe_valid (ub_valid),
    .pe_data  (ub_data),
    .pe_ready (ub_ready),
    .bus_valid(res_valid),
    .bus_data (res_data),
    .bus_ready(res_ready),
    .owned    (bus_owned),
    .sender   ()
  );

  // ----------------------------------------------------- in-flight counter
  // Items that entered a cluster and have not yet left on its upper bus.
  always_ff @(posedge clk) begin
    if (!rst_n) inflight <= '0;
    else begin
      logic [IW-1:0] n;
      n = inflight + IW'(q_ready);
      for (int k = 0; k < CLUSTERS; k++)
        n = n - IW'(res_valid[k] && res_ready[k]);
      inflight <= n;
    end
  end

  // Every cluster keeps a last stage, hence an owner of its upper bus.
  a_bus_owned: assert property (@(posedge clk) disable iff (!rst_n)
    &bus_owned);
  a_no_move_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    move_valid |-> inflight == '0);

endmodule

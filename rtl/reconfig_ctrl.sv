// reconfig_ctrl -- moves PEs between neighbouring clusters, one PE per clock,
// until every cluster holds its target number of PEs.
//
// The clusters are contiguous runs of one PE chain, so the configuration is
// kept as the C-1 boundaries bnd[i] = index of the first PE of cluster i+1.
// Following the reconfiguration heuristic, a cluster that must grow
// (PE_i' > PE_i) takes the first PE of cluster i+1 (bnd[i] moves right), and a
// cluster that must shrink (PE_i' < PE_i) hands its last PE to cluster i+1
// (bnd[i] moves left). Each move is reported on move_* so the PE concerned can
// update its cluster status register. A move is only made if it leaves every
// cluster at least one PE; the lowest-numbered boundary that can legally move
// towards its target moves first. That ordering and the one-PE minimum are
// this design's choice; with targets that are all at least one and add up to
// PES, some boundary can always move, so the walk ends after exactly
// sum_i |bnd[i] - target boundary i| moves.
//
// Interface: pulse start for one cycle (busy low) with target valid. From the
// next cycle on, one move per cycle is issued (move_valid high, applied at the
// end of that cycle). With N moves, done is high for one cycle N+1 clock edges
// after the edge that took start (one edge when nothing moves). size gives the current PE count of each cluster.
// Reset restores the even power-on split of hmpm_pkg::init_boundary.
module reconfig_ctrl
  import hmpm_pkg::*;
#(
  parameter int unsigned CLUSTERS = HMPM_CLUSTERS,
  parameter int unsigned PES      = HMPM_PES,
  localparam int unsigned SW      = $clog2(PES + 1),
  localparam int unsigned PW      = (PES > 1) ? $clog2(PES) : 1,
  localparam int unsigned CI      = (CLUSTERS > 1) ? $clog2(CLUSTERS) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [CLUSTERS-1:0][SW-1:0] target,
  output logic                        busy,
  output logic                        done,
  output logic                        move_valid,
  output logic [PW-1:0]               move_pe,
  output logic [CI-1:0]               move_cluster,
  output logic                        move_grow,    // 1: cluster move_cluster grew
  output logic [CLUSTERS-1:0][SW-1:0] size
);

  // Boundaries 0..CLUSTERS-2 are registers; -1 is 0 and CLUSTERS-1 is PES.
  logic [CLUSTERS-1:0][SW-1:0] bnd, tbnd;
  logic                        active;

  // Cumulative target boundaries.
  logic [CLUSTERS-1:0][SW-1:0] tbnd_in;
  always_comb begin
    logic [SW-1:0] acc;
    acc = '0;
    for (int i = 0; i < CLUSTERS; i++) begin
      acc        = acc + target[i];
      tbnd_in[i] = acc;
    end
  end

  always_comb
    for (int i = 0; i < CLUSTERS; i++)
      size[i] = (i == 0) ? bnd[0] : bnd[i] - bnd[i-1];

  // Pick the first boundary that can move towards its target.
  logic          mv_any, mv_right;
  logic [CI-1:0] mv_idx;
  always_comb begin
    mv_any   = 1'b0;
    mv_right = 1'b0;
    mv_idx   = '0;
    for (int i = 0; i < CLUSTERS - 1; i++) begin
      logic [SW-1:0] lo, hi;
      lo = (i == 0) ? '0 : bnd[i-1];
      hi = bnd[i+1];
      if (!mv_any) begin
        if (bnd[i] < tbnd[i] && (hi - bnd[i]) >= SW'(2)) begin
          mv_any = 1'b1; mv_right = 1'b1; mv_idx = CI'(i);
        end else if (bnd[i] > tbnd[i] && (bnd[i] - lo) >= SW'(2)) begin
          mv_any = 1'b1; mv_right = 1'b0; mv_idx = CI'(i);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      done   <= 1'b0;
      for (int i = 0; i < CLUSTERS; i++) begin
        bnd[i]  <= SW'(init_boundary(i, PES, CLUSTERS));
        tbnd[i] <= SW'(init_boundary(i, PES, CLUSTERS));
      end
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (start) begin
          tbnd   <= tbnd_in;
          active <= 1'b1;
        end
      end else if (mv_any) begin
        bnd[mv_idx] <= mv_right ? bnd[mv_idx] + 1'b1 : bnd[mv_idx] - 1'b1;
      end else begin
        active <= 1'b0;
        done   <= 1'b1;
      end
    end
  end

  // Grow (right): PE bnd[i] leaves cluster i+1 for cluster i.
  // Shrink (left): PE bnd[i]-1 leaves cluster i for cluster i+1.
  assign move_valid   = active && mv_any;
  assign move_grow    = mv_right;
  assign move_pe      = mv_right ? PW'(bnd[mv_idx]) : PW'(bnd[mv_idx] - 1'b1);
  assign move_cluster = mv_right ? mv_idx : mv_idx + 1'b1;
  assign busy         = active;

  a_targets_sum: assert property (@(posedge clk) disable iff (!rst_n)
    start && !active |-> tbnd_in[CLUSTERS-1] == SW'(PES));

endmodule

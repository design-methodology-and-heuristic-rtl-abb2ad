// reconfig_ratio -- computes the new number of PEs for every cluster from the
// cycle counts of the subtasks allocated to the clusters.
//
// The reconfiguration ratio is PE_i' = x_i / Tc * P, where x_i is the cycle
// count of the subtask of cluster i, Tc the task cycle count and P the total
// number of PEs. Tc = sum(x_i) + v, where v is the queue and bus overhead in
// cycles; the heuristic then takes v as zero, so tie the v input to zero for
// that reading. That formula is the architecture's;
// how it is rounded is this design's choice:
//   * each quotient floor(x_i * P / Tc) comes from one shared restoring
//     divider, one quotient bit per clock;
//   * a cluster never gets fewer than one PE (a cluster with no PE could not
//     run its subtask);
//   * the PEs left over, or taken back by that minimum, are added to or
//     removed from the most loaded cluster (largest x_i, lowest index on a
//     tie), so the targets always add up to P.
// If every x_i is zero the even split P/C is returned (remainder to cluster 0).
// The correction cannot drive the most loaded cluster below one PE as long as
// PES >= CLUSTERS*CLUSTERS, which the defaults (16 PEs, 4 clusters) meet.
//
// Interface: pulse start for one cycle while busy is low, with x and v valid
// in that cycle. done pulses for one cycle C*NW+1 cycles later (NW = CYC_W +
// clog2(PES+1), 149 cycles at the defaults); target holds the result from then
// until the next start.
module reconfig_ratio
  import hmpm_pkg::*;
#(
  parameter int unsigned CLUSTERS = HMPM_CLUSTERS,
  parameter int unsigned PES      = HMPM_PES,
  parameter int unsigned CYC_W    = HMPM_CYC_W,
  localparam int unsigned SW      = $clog2(PES + 1)   // width of a PE count
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic [CLUSTERS-1:0][CYC_W-1:0] x,
  input  logic [CYC_W-1:0]               v,     // queue and bus overhead cycles
  output logic                           busy,
  output logic                           done,
  output logic [CLUSTERS-1:0][SW-1:0]    target
);

  localparam int unsigned CI = (CLUSTERS > 1) ? $clog2(CLUSTERS) : 1;
  localparam int unsigned NW = CYC_W + SW;                  // dividend width
  localparam int unsigned TW = CYC_W + $clog2(CLUSTERS) + 2; // Tc width
  localparam int unsigned RW = TW + 1;                       // remainder width
  localparam int unsigned BW = (NW > 1) ? $clog2(NW) : 1;

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_FIX} state_t;

  state_t                         state;
  logic [CLUSTERS-1:0][CYC_W-1:0] xs;
  logic [TW-1:0]                  tc;
  logic [CI-1:0]                  idx;
  logic [BW-1:0]                  bitcnt;
  logic [NW-1:0]                  num;
  logic [SW-1:0]                  quo;
  logic [TW-1:0]                  rem;
  logic [CLUSTERS-1:0][SW-1:0]    base;

  // Sum of the subtask cycles, and the task cycle count Tc = sum + v.
  logic [TW-1:0] sum_x, tc_in;
  always_comb begin
    sum_x = '0;
    for (int i = 0; i < CLUSTERS; i++) sum_x += TW'(x[i]);
    tc_in = sum_x + TW'(v);
  end

  function automatic logic [NW-1:0] scaled(logic [CYC_W-1:0] xi);
    return NW'(xi) * NW'(PES);
  endfunction

  // One restoring-division step.
  logic [RW-1:0] rem_sh, rem_nx;
  logic          qbit;
  always_comb begin
    rem_sh = {rem, num[NW-1]};
    qbit   = (rem_sh >= RW'(tc));
    rem_nx = qbit ? rem_sh - RW'(tc) : rem_sh;
  end
  // The quotient never exceeds PES, so only its low SW bits are kept.
  logic [SW-1:0] quo_nx;
  assign quo_nx = {quo[SW-2:0], qbit};

  // Minimum of one PE per cluster, then the correction on the most loaded one.
  logic [CLUSTERS-1:0][SW-1:0] fixed;
  always_comb begin
    int unsigned big;
    int          sum;
    big = 0;
    sum = 0;
    for (int i = 0; i < CLUSTERS; i++) begin
      fixed[i] = (base[i] == '0) ? SW'(1) : base[i];
      sum += int'(fixed[i]);
      if (xs[i] > xs[big]) big = i;
    end
    fixed[big] = SW'(int'(fixed[big]) + int'(PES) - sum);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      idx    <= '0;
      bitcnt <= '0;
      num    <= '0;
      quo    <= '0;
      rem    <= '0;
      tc     <= '0;
      xs     <= '0;
      base   <= '0;
      for (int i = 0; i < CLUSTERS; i++) target[i] <= SW'(PES / CLUSTERS);
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          xs     <= x;
          tc     <= tc_in;
          idx    <= '0;
          bitcnt <= '0;
          num    <= scaled(x[0]);
          rem    <= '0;
          quo    <= '0;
          if (sum_x == '0) begin
            for (int i = 0; i < CLUSTERS; i++) base[i] <= SW'(PES / CLUSTERS);
            state <= S_FIX;
          end else begin
            state <= S_DIV;
          end
        end
        S_DIV: begin
          rem    <= rem_nx[TW-1:0];
          quo    <= quo_nx;
          num    <= {num[NW-2:0], 1'b0};
          bitcnt <= bitcnt + 1'b1;
          if (bitcnt == BW'(NW - 1)) begin
            base[idx] <= quo_nx;
            bitcnt    <= '0;
            rem       <= '0;
            quo       <= '0;
            if (idx == CI'(CLUSTERS - 1)) begin
              state <= S_FIX;
            end else begin
              idx <= idx + 1'b1;
              num <= scaled(xs[idx + 1'b1]);
            end
          end
        end
        S_FIX: begin
          target <= fixed;
          done   <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule

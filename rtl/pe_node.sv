// pe_node -- the connection point of one processing element (PE): its cluster
// status register and the switch that joins the PE to the lower bus, to its
// chain neighbours and to one of the upper cluster buses.
//
// Every PE carries a cluster status. The status is changed by the
// reconfiguration controller (upd_en) and is compared with the neighbours'
// status to find out whether this PE is the first or the last stage of its
// cluster's macro pipeline:
//   * first stage: input comes from the lower bus, but only items tagged with
//     this PE's cluster; the chain input from the left is refused;
//   * other stages: input comes from the left neighbour on the chain;
//   * last stage: output is sent on the upper bus selected by the status;
//   * other stages: output goes to the right neighbour on the chain.
// That roles follow from cluster status and that the first PE of a cluster
// is fed by the lower bus comes from the architecture description. The
// valid/ready handshakes, the output register and the use of the upper bus
// for the last stage's result are this design's choices.
//
// The processor that does the work (core_*) is outside this module. The
// result it returns is held in a one-word output register until the next
// stage or the bus takes it, so a stage that cannot deliver stalls its own
// processor (core_out_ready low) and, through it, the stages before it.
// Latency through the node: input to core_in is combinational; a core result
// accepted in cycle n is offered downstream from cycle n+1.
module pe_node
  import hmpm_pkg::*;
#(
  parameter int unsigned CLUSTERS   = HMPM_CLUSTERS,
  parameter int unsigned DATA_W     = HMPM_DATA_W,
  parameter int unsigned INIT_CLUST = 0,     // cluster status after reset
  parameter bit          LEFT_END   = 1'b0,  // no left neighbour on the chain
  parameter bit          RIGHT_END  = 1'b0,  // no right neighbour on the chain
  localparam int unsigned CI        = (CLUSTERS > 1) ? $clog2(CLUSTERS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // cluster status
  input  logic              upd_en,
  input  logic [CI-1:0]     upd_cluster,
  output logic [CI-1:0]     status,
  input  logic [CI-1:0]     left_status,
  input  logic [CI-1:0]     right_status,
  output logic              is_first,
  output logic              is_last,
  // lower bus (broadcast)
  input  logic              lb_valid,
  input  logic [CI-1:0]     lb_cluster,
  input  logic [DATA_W-1:0] lb_data,
  output logic              lb_take,      // this node accepts the lower-bus item
  // chain from the left neighbour
  input  logic              ch_in_valid,
  input  logic [DATA_W-1:0] ch_in_data,
  output logic              ch_in_ready,
  // chain to the right neighbour
  output logic              ch_out_valid,
  output logic [DATA_W-1:0] ch_out_data,
  input  logic              ch_out_ready,
  // upper bus switch
  output logic              ub_drive,     // switch closed: this PE sends on a bus
  output logic [CI-1:0]     ub_sel,       // which bus
  output logic              ub_valid,
  output logic [DATA_W-1:0] ub_data,
  input  logic              ub_ready,
  // processor of this PE
  output logic              core_in_valid,
  output logic [DATA_W-1:0] core_in_data,
  input  logic              core_in_ready,
  input  logic              core_out_valid,
  input  logic [DATA_W-1:0] core_out_data,
  output logic              core_out_ready
);

  logic              out_valid_q;
  logic [DATA_W-1:0] out_data_q;
  logic              down_ready;

  always_ff @(posedge clk) begin
    if (!rst_n)      status <= CI'(INIT_CLUST);
    else if (upd_en) status <= upd_cluster;
  end

  assign is_first = LEFT_END  || (left_status  != status);
  assign is_last  = RIGHT_END || (right_status != status);

  // Input switch.
  logic lb_hit;
  assign lb_hit        = is_first && lb_valid && (lb_cluster == status);
  assign core_in_valid = is_first ? lb_hit : ch_in_valid;
  assign core_in_data  = is_first ? lb_data : ch_in_data;
  assign lb_take       = lb_hit && core_in_ready;
  assign ch_in_ready   = !is_first && core_in_ready;

  // Output register and output switch.
  assign down_ready     = is_last ? ub_ready : ch_out_ready;
  assign core_out_ready = !out_valid_q || down_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid_q <= 1'b0;
      out_data_q  <= '0;
    end else if (core_out_ready) begin
      out_valid_q <= core_out_valid;
      if (core_out_valid) out_data_q <= core_out_data;
    end
  end

  assign ch_out_valid = !is_last && out_valid_q;
  assign ch_out_data  = out_data_q;
  assign ub_drive     = is_last;
  assign ub_sel       = status;
  assign ub_valid     = is_last && out_valid_q;
  assign ub_data      = out_data_q;

  // A status change while the node holds data would misroute that data.
  a_quiet_update: assert property (@(posedge clk) disable iff (!rst_n)
    upd_en |-> !out_valid_q);

endmodule

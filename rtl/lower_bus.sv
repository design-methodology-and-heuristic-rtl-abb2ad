// lower_bus -- the lower bus that carries the allocated subtask data to the
// first PE of each cluster.
//
// The item at the head of the input queue is broadcast with its cluster tag to
// all PEs; the PE that is currently the first stage of the tagged cluster
// takes it (pe_take). The queue is the only sender, so no arbitration is
// needed. The bus can be held (enable low): the system does this while the
// clusters are being reconfigured. That the lower bus feeds the first PE of
// each cluster is from the architecture description; tagging, the hold input
// and the valid/ready handshake are this design's choices.
//
// Purely combinational. src_ready is high in the cycle an item is taken.
// taken_cluster reports the tag of the item taken, for bookkeeping.
module lower_bus
  import hmpm_pkg::*;
#(
  parameter int unsigned CLUSTERS = HMPM_CLUSTERS,
  parameter int unsigned PES      = HMPM_PES,
  parameter int unsigned DATA_W   = HMPM_DATA_W,
  localparam int unsigned CI      = (CLUSTERS > 1) ? $clog2(CLUSTERS) : 1
) (
  input  logic                clk,     // used by the assertion only
  input  logic                rst_n,   // used by the assertion only
  input  logic                enable,
  // from the queue
  input  logic                src_valid,
  input  logic [CI-1:0]       src_cluster,
  input  logic [DATA_W-1:0]   src_data,
  output logic                src_ready,
  // broadcast to the PEs
  output logic                lb_valid,
  output logic [CI-1:0]       lb_cluster,
  output logic [DATA_W-1:0]   lb_data,
  input  logic [PES-1:0]      pe_take,
  // per-cluster take strobe
  output logic [CLUSTERS-1:0] taken
);

  assign lb_valid   = enable && src_valid;
  assign lb_cluster = src_cluster;
  assign lb_data    = src_data;
  assign src_ready  = lb_valid && (|pe_take);

  always_comb begin
    taken = '0;
    if (src_ready) taken[src_cluster] = 1'b1;
  end

  a_one_taker: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(pe_take));
  a_take_when_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (|pe_take) |-> lb_valid);

endmodule

// upper_bus -- the upper cluster buses, one per cluster.
//
// Every PE has a switch that can put it on one of the buses (drive, sel).
// Bus k carries the word of the PE whose switch is closed onto bus k; since
// a cluster has exactly one last stage, and only last stages close their
// switch, each bus has a single sender and needs no arbiter. That property is
// what the architecture relies on to do without a bus controller; it is
// checked here by an assertion. The number of buses equals the number of
// clusters as in the architecture; buses are modelled as AND-OR multiplexers
// rather than tri-state wires, and carry a valid/ready handshake (this
// design's choice). Purely combinational.
//
// sender[k] is the index of the PE that owns bus k and owned[k] says whether
// any PE does.
module upper_bus
  import hmpm_pkg::*;
#(
  parameter int unsigned CLUSTERS = HMPM_CLUSTERS,
  parameter int unsigned PES      = HMPM_PES,
  parameter int unsigned DATA_W   = HMPM_DATA_W,
  localparam int unsigned CI      = (CLUSTERS > 1) ? $clog2(CLUSTERS) : 1,
  localparam int unsigned PW      = (PES > 1) ? $clog2(PES) : 1
) (
  input  logic                           clk,    // used by the assertion only
  input  logic                           rst_n,  // used by the assertion only
  // PE side
  input  logic [PES-1:0]                 pe_drive,
  input  logic [PES-1:0][CI-1:0]         pe_sel,
  input  logic [PES-1:0]                 pe_valid,
  input  logic [PES-1:0][DATA_W-1:0]     pe_data,
  output logic [PES-1:0]                 pe_ready,
  // bus side
  output logic [CLUSTERS-1:0]            bus_valid,
  output logic [CLUSTERS-1:0][DATA_W-1:0] bus_data,
  input  logic [CLUSTERS-1:0]            bus_ready,
  output logic [CLUSTERS-1:0]            owned,
  output logic [CLUSTERS-1:0][PW-1:0]    sender
);

  logic [CLUSTERS-1:0][PES-1:0] on_bus;

  always_comb begin
    for (int k = 0; k < CLUSTERS; k++) begin
      bus_valid[k] = 1'b0;
      bus_data[k]  = '0;
      owned[k]     = 1'b0;
      sender[k]    = '0;
      for (int j = 0; j < PES; j++) begin
        on_bus[k][j] = pe_drive[j] && (pe_sel[j] == CI'(k));
        if (on_bus[k][j]) begin
          bus_valid[k] = bus_valid[k] | pe_valid[j];
          bus_data[k]  = bus_data[k]  | pe_data[j];
          owned[k]     = 1'b1;
          sender[k]    = PW'(j);
        end
      end
    end
    for (int j = 0; j < PES; j++)
      pe_ready[j] = pe_drive[j] && bus_ready[pe_sel[j]];
  end

  for (genvar k = 0; k < CLUSTERS; k++) begin : g_chk
    a_single_sender: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0(on_bus[k]));
  end

endmodule

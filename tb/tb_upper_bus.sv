// tb_upper_bus -- self-checking test of the upper cluster buses.
// Builds random valid configurations (each bus owned by at most one PE, any
// number of PEs with their switch open), drives random data and checks every
// bus's valid, data, owner and the ready returned to each PE.
module tb_upper_bus;
  localparam int C = 4, P = 16, W = 32;
  logic clk = 0, rst_n = 0;
  logic [P-1:0] pe_drive, pe_valid, pe_ready;
  logic [P-1:0][1:0] pe_sel;
  logic [P-1:0][W-1:0] pe_data;
  logic [C-1:0] bus_valid, bus_ready, owned;
  logic [C-1:0][W-1:0] bus_data;
  logic [C-1:0][3:0] sender;
  int checks = 0, failures = 0;

  upper_bus #(.CLUSTERS(C), .PES(P), .DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pe_drive = 0; pe_valid = 0; pe_sel = 0; pe_data = 0; bus_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int own[C];
      @(negedge clk);
      pe_drive = '0;
      for (int j = 0; j < P; j++) begin
        pe_sel[j]  = 2'($urandom);
        pe_data[j] = $urandom;
        pe_valid[j] = 1'($urandom);
      end
      for (int k = 0; k < C; k++) begin
        own[k] = -1;
        if ($urandom % 5 != 0) begin
          int j;
          do j = $urandom % P; while (pe_drive[j]);
          pe_drive[j] = 1'b1; pe_sel[j] = 2'(k); own[k] = j;
        end
      end
      bus_ready = C'($urandom);
      #1;
      for (int k = 0; k < C; k++) begin
        if (own[k] < 0) begin
          check(!owned[k] && !bus_valid[k] && bus_data[k] == 0, "idle bus");
        end else begin
          check(owned[k] && sender[k] == 4'(own[k]), "owner");
          check(bus_valid[k] == pe_valid[own[k]], "bus valid");
          check(bus_data[k] == pe_data[own[k]], "bus data");
        end
      end
      for (int j = 0; j < P; j++)
        check(pe_ready[j] == (pe_drive[j] && bus_ready[pe_sel[j]]), "pe ready");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

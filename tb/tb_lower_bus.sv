// tb_lower_bus -- self-checking test of the lower bus.
// Drives random queue heads, enables and taker patterns (at most one PE takes,
// and only when the bus is valid) and checks broadcast, handshake and the
// per-cluster take strobe against values worked out here.
module tb_lower_bus;
  localparam int C = 4, P = 16, W = 32;
  logic clk = 0, rst_n = 0;
  logic enable, src_valid, src_ready, lb_valid;
  logic [1:0] src_cluster, lb_cluster;
  logic [W-1:0] src_data, lb_data;
  logic [P-1:0] pe_take;
  logic [C-1:0] taken;
  int checks = 0, failures = 0;

  lower_bus #(.CLUSTERS(C), .PES(P), .DATA_W(W)) dut (.*);

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
    enable = 0; src_valid = 0; src_cluster = 0; src_data = 0; pe_take = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      bit exp_valid, exp_ready;
      @(negedge clk);
      enable      = ($urandom % 4) != 0;
      src_valid   = ($urandom % 3) != 0;
      src_cluster = 2'($urandom);
      src_data    = $urandom;
      exp_valid   = enable && src_valid;
      pe_take     = '0;
      if (exp_valid && (($urandom % 2) != 0)) pe_take[$urandom % P] = 1'b1;
      exp_ready = exp_valid && (pe_take != 0);
      #1;
      check(lb_valid == exp_valid, "lb_valid");
      check(lb_cluster == src_cluster && lb_data == src_data, "broadcast");
      check(src_ready == exp_ready, "src_ready");
      check(taken == (exp_ready ? C'(1) << src_cluster : '0), "taken strobe");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

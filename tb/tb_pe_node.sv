// tb_pe_node -- self-checking test of a PE connection point.
// Each cycle drives random neighbour status, lower-bus, chain, bus and core
// signals (status updates only while the node holds no data) and compares all
// outputs with a reference model kept here: first/last role from the status
// comparison, input taken from the lower bus (matching tag) or the chain,
// output register that stalls the core, output to the chain or to the bus
// selected by the status. Counts that every role and a stall occurred.
module tb_pe_node;
  localparam int C = 4, W = 32;
  logic clk = 0, rst_n = 0;
  logic upd_en;
  logic [1:0] upd_cluster, status, left_status, right_status, lb_cluster, ub_sel;
  logic is_first, is_last;
  logic lb_valid, lb_take, ch_in_valid, ch_in_ready, ch_out_valid, ch_out_ready;
  logic [W-1:0] lb_data, ch_in_data, ch_out_data, ub_data, core_in_data, core_out_data;
  logic ub_drive, ub_valid, ub_ready;
  logic core_in_valid, core_in_ready, core_out_valid, core_out_ready;
  int checks = 0, failures = 0;
  int n_first = 0, n_mid = 0, n_last = 0, n_stall = 0, n_lb = 0, n_ub = 0, n_upd = 0;

  pe_node #(.CLUSTERS(C), .DATA_W(W), .INIT_CLUST(1)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  logic [1:0]   m_status;
  logic         m_ov;
  logic [W-1:0] m_od;

  initial begin
    upd_en = 0; upd_cluster = 0; left_status = 0; right_status = 0;
    lb_valid = 0; lb_cluster = 0; lb_data = 0; ch_in_valid = 0; ch_in_data = 0;
    ch_out_ready = 0; ub_ready = 0; core_in_ready = 0; core_out_valid = 0; core_out_data = 0;
    m_status = 1; m_ov = 0; m_od = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(status == 2'd1, "reset status");
    for (int i = 0; i < 5000; i++) begin
      bit f, l, down, cor;
      @(negedge clk);
      // neighbours mostly agree with us so that middle stages occur
      left_status  = (($urandom % 2) != 0) ? m_status : 2'($urandom);
      right_status = (($urandom % 2) != 0) ? m_status : 2'($urandom);
      lb_valid     = 1'($urandom);
      lb_cluster   = (($urandom % 2) != 0) ? m_status : 2'($urandom);
      lb_data      = $urandom;
      ch_in_valid  = 1'($urandom);
      ch_in_data   = $urandom;
      ch_out_ready = ($urandom % 3) != 0;
      ub_ready     = ($urandom % 3) != 0;
      core_in_ready  = ($urandom % 4) != 0;
      core_out_valid = 1'($urandom);
      core_out_data  = $urandom;
      upd_en       = !m_ov && ($urandom % 20 == 0);
      upd_cluster  = 2'($urandom);
      #1;
      f = (left_status != m_status);
      l = (right_status != m_status);
      check(status == m_status, "status");
      check(is_first == f && is_last == l, "role");
      if (f) begin
        n_first++;
        check(core_in_valid == (lb_valid && lb_cluster == m_status), "first: input valid from lower bus");
        check(core_in_data == lb_data, "first: input data from lower bus");
        check(lb_take == (lb_valid && lb_cluster == m_status && core_in_ready), "first: take");
        check(!ch_in_ready, "first: chain refused");
        if (lb_take) n_lb++;
      end else begin
        n_mid++;
        check(core_in_valid == ch_in_valid && core_in_data == ch_in_data, "chain input");
        check(ch_in_ready == core_in_ready && !lb_take, "chain ready");
      end
      down = l ? ub_ready : ch_out_ready;
      cor  = !m_ov || down;
      check(core_out_ready == cor, "core_out_ready");
      if (!cor) n_stall++;
      check(ub_drive == l && ub_sel == m_status, "switch");
      if (l) begin
        n_last++;
        check(ub_valid == m_ov && !ch_out_valid, "last: output on bus");
        if (m_ov) check(ub_data == m_od, "last: bus data");
        if (m_ov && ub_ready) n_ub++;
      end else begin
        check(ch_out_valid == m_ov && !ub_valid, "chain output");
        if (m_ov) check(ch_out_data == m_od, "chain data");
      end
      @(posedge clk);
      if (cor) begin
        m_ov = core_out_valid;
        if (core_out_valid) m_od = core_out_data;
      end
      if (upd_en) begin m_status = upd_cluster; n_upd++; end
    end
    check(n_first > 0 && n_mid > 0 && n_last > 0 && n_stall > 0 && n_lb > 0 && n_ub > 0 && n_upd > 0,
          "every role, a stall and a status update seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

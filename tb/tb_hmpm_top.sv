// tb_hmpm_top -- end-to-end test of the whole multiprocessor at its default
// size (4 clusters, 16 PEs).
//
// Every PE processor is a behavioural model that adds one to a word after a
// random 1..4 cycle delay, so a word that passes through cluster k comes out
// of upper bus k increased by the number of PEs in cluster k. The test streams
// random words tagged with random clusters, with random backpressure on the
// results, and checks every result word and its order. Between bursts, and
// once in the middle of a burst, it requests a reconfiguration with subtask
// cycle counts and checks the new cluster sizes against the ratio worked out
// here, the PE roles, and the reconfiguration time when nothing has to drain.
// Counted mechanisms, each of which must happen at least once: queue full,
// lower bus held during reconfiguration, draining of in-flight work before
// PEs move, PE moved to the left cluster (grow) and to the right (shrink),
// stage stall inside a cluster, result backpressure, results on every bus.
module tb_hmpm_top;
  import hmpm_pkg::*;
  localparam int C = HMPM_CLUSTERS, P = HMPM_PES, W = HMPM_DATA_W, SW = $clog2(P + 1);
  localparam int NW = HMPM_CYC_W + SW;
  localparam int RATIO_LAT = C * NW + 1;

  logic clk = 0, rst_n = 0;
  logic ext_valid, ext_ready;
  logic [1:0] ext_cluster;
  logic [W-1:0] ext_data;
  logic cfg_start, cfg_busy, cfg_done, cfg_move, cfg_move_grow, lb_stalled;
  logic [C-1:0][HMPM_CYC_W-1:0] cfg_x;
  logic [HMPM_CYC_W-1:0] cfg_v;
  logic [C-1:0][SW-1:0] cluster_size;
  logic [P-1:0][1:0] pe_cluster;
  logic [P-1:0] pe_first, pe_last;
  logic [$clog2(9)-1:0] queue_count;
  logic [C-1:0] res_valid, res_ready;
  logic [C-1:0][W-1:0] res_data;
  logic [P-1:0] core_in_valid, core_in_ready, core_out_valid, core_out_ready;
  logic [P-1:0][W-1:0] core_in_data, core_out_data;

  int checks = 0, failures = 0;
  int n_qfull = 0, n_lbhold = 0, n_drain = 0, n_grow = 0, n_shrink = 0;
  int n_drainwait = 0, n_stagestall = 0, n_resbp = 0, n_reconf = 0;
  int n_res[C];
  logic [W-1:0] sb[C][$];
  int res_ready_pct = 70;

  hmpm_top dut (.*);

  for (genvar j = 0; j < P; j++) begin : g_core
    pe_core_model #(.LAT(4), .LAT_RAND(1'b1)) u_core (
      .clk, .rst_n,
      .in_valid (core_in_valid[j]),
      .in_data  (core_in_data[j]),
      .in_ready (core_in_ready[j]),
      .out_valid(core_out_valid[j]),
      .out_data (core_out_data[j]),
      .out_ready(core_out_ready[j])
    );
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ monitor
  always @(posedge clk) if (rst_n) begin
    if (ext_valid && ext_ready) sb[ext_cluster].push_back(ext_data);
    if (ext_valid && !ext_ready) n_qfull++;
    if (lb_stalled) n_lbhold++;
    if (cfg_move) begin
      if (cfg_move_grow) n_grow++; else n_shrink++;
    end
    for (int j = 0; j < P; j++)
      if (core_out_valid[j] && !core_out_ready[j] && !pe_last[j]) n_stagestall++;
    for (int k = 0; k < C; k++) begin
      if (res_valid[k] && !res_ready[k]) n_resbp++;
      if (res_valid[k] && res_ready[k]) begin
        n_res[k]++;
        if (cfg_busy) n_drain++;
        if (sb[k].size() == 0) check(1'b0, $sformatf("unexpected result on bus %0d", k));
        else begin
          logic [W-1:0] exp;
          exp = sb[k].pop_front() + W'(cluster_size[k]);
          check(res_data[k] == exp,
                $sformatf("bus %0d got %h expected %h", k, res_data[k], exp));
        end
      end
    end
  end

  // random result backpressure
  always @(negedge clk)
    for (int k = 0; k < C; k++) res_ready[k] = ($urandom % 100) < res_ready_pct;

  // ------------------------------------------------------------ helpers
  function automatic void ratio_model(input logic [C-1:0][HMPM_CYC_W-1:0] xv, output int t[C]);
    longint tc, sx, sum;
    int big;
    sx = 0; sum = 0; big = 0;
    for (int i = 0; i < C; i++) sx += longint'(xv[i]);
    tc = sx + longint'(cfg_v);
    for (int i = 0; i < C; i++) begin
      t[i] = (sx == 0) ? P / C : int'((longint'(xv[i]) * P) / tc);
      if (t[i] < 1) t[i] = 1;
      sum += longint'(t[i]);
      if (xv[i] > xv[big]) big = i;
    end
    t[big] += P - int'(sum);
  endfunction

  task automatic check_layout(input int t[C]);
    int j = 0;
    for (int k = 0; k < C; k++) begin
      check(int'(cluster_size[k]) == t[k],
            $sformatf("cluster %0d size %0d expected %0d", k, cluster_size[k], t[k]));
      for (int n = 0; n < t[k]; n++) begin
        check(pe_cluster[j] == 2'(k), "PE cluster status");
        check(pe_first[j] == (n == 0) && pe_last[j] == (n == t[k] - 1), "PE role");
        j++;
      end
    end
  endtask

  task automatic send(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      ext_valid = 1; ext_cluster = 2'($urandom); ext_data = $urandom & 32'h7FFFFFFF;
      #1;
      while (!ext_ready) begin @(negedge clk); #1; end
      @(negedge clk) ext_valid = 0;
      if ($urandom % 4 == 0) repeat ($urandom % 3) @(negedge clk);
    end
  endtask

  task automatic wait_empty();
    int guard = 0;
    bit empty;
    do begin
      @(posedge clk); guard++;
      empty = 1;
      for (int k = 0; k < C; k++) if (sb[k].size() != 0) empty = 0;
    end while (!empty && guard < 100000);
    check(empty, "all results returned");
  endtask

  // returns the number of clock edges from the edge taking cfg_start to cfg_done
  task automatic reconfigure(input logic [C-1:0][HMPM_CYC_W-1:0] xv, output int cyc);
    @(negedge clk);
    check(!cfg_busy, "idle before reconfiguration");
    cfg_x = xv; cfg_start = 1;
    @(posedge clk); #1 cfg_start = 0;
    cyc = 0;
    while (!cfg_done && cyc < 100000) begin @(posedge clk); #1 cyc++; end
    check(cfg_done, "reconfiguration done");
    @(posedge clk); #1;
    check(!cfg_busy, "lower bus released");
    n_reconf++;
  endtask

  task automatic reconf_idle(input logic [C-1:0][HMPM_CYC_W-1:0] xv);
    int t[C], cyc, moves, cb, tb_;
    ratio_model(xv, t);
    moves = 0; cb = 0; tb_ = 0;
    for (int i = 0; i < C - 1; i++) begin
      cb += int'(cluster_size[i]); tb_ += t[i];
      moves += (cb > tb_) ? cb - tb_ : tb_ - cb;
    end
    reconfigure(xv, cyc);
    check(cyc == RATIO_LAT + 3 + moves,
          $sformatf("reconfiguration took %0d cycles, expected %0d", cyc, RATIO_LAT + 3 + moves));
    check_layout(t);
  endtask

  initial begin
    int t[C], cyc;
    ext_valid = 0; ext_cluster = 0; ext_data = 0; cfg_start = 0; cfg_x = '0; cfg_v = '0;
    for (int k = 0; k < C; k++) n_res[k] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    t = '{4, 4, 4, 4};
    check_layout(t);

    // burst with the power-on configuration, results often held back
    res_ready_pct = 30;
    send(150);
    wait_empty();
    res_ready_pct = 70;

    // heavy cluster 3, then heavy cluster 0: PEs travel both ways
    reconf_idle({32'd7000, 32'd1000, 32'd1000, 32'd1000});
    send(150); wait_empty();
    reconf_idle({32'd100, 32'd100, 32'd100, 32'd1300});
    send(150); wait_empty();

    // reconfiguration requested while words are in the clusters and queue
    fork
      send(200);
      begin
        int mv, cb, tb_;
        repeat (60) @(posedge clk);
        ratio_model({32'd300, 32'd900, 32'd500, 32'd300}, t);
        mv = 0; cb = 0; tb_ = 0;
        for (int i = 0; i < C - 1; i++) begin
          cb += int'(cluster_size[i]); tb_ += t[i];
          mv += (cb > tb_) ? cb - tb_ : tb_ - cb;
        end
        // results are held back longer than the ratio takes, so the PE moves
        // must wait for the clusters to drain
        res_ready_pct = 0;
        fork begin
          repeat (RATIO_LAT + 100) @(posedge clk);
          res_ready_pct = 70;
        end join_none
        reconfigure({32'd300, 32'd900, 32'd500, 32'd300}, cyc);
        check(cyc > RATIO_LAT + 100, $sformatf("moves waited for the drain (%0d cycles)", cyc));
        if (cyc > RATIO_LAT + 3 + mv) n_drainwait++;
        check_layout(t);
      end
    join
    wait_empty();

    // with queue and bus overhead counted into the task cycles
    cfg_v = 32'd4000;
    reconf_idle({32'd1000, 32'd3000, 32'd1000, 32'd1000});
    send(60); wait_empty();
    cfg_v = '0;

    // random loads
    for (int n = 0; n < 6; n++) begin
      logic [C-1:0][HMPM_CYC_W-1:0] xv;
      for (int i = 0; i < C; i++) xv[i] = $urandom % 10000;
      reconf_idle(xv);
      send(80); wait_empty();
    end

    $display("mechanisms: queue_full=%0d lower_bus_held=%0d drained=%0d drain_wait=%0d grow=%0d shrink=%0d stage_stall=%0d result_backpressure=%0d reconfigurations=%0d",
             n_qfull, n_lbhold, n_drain, n_drainwait, n_grow, n_shrink, n_stagestall, n_resbp, n_reconf);
    check(n_qfull > 0, "queue full happened");
    check(n_lbhold > 0, "lower bus held during reconfiguration");
    check(n_drain > 0, "work drained before PEs moved");
    check(n_drainwait > 0, "PE moves waited for in-flight work");
    check(n_grow > 0, "PE moved to the left cluster");
    check(n_shrink > 0, "PE moved to the right cluster");
    check(n_stagestall > 0, "stage stall happened");
    check(n_resbp > 0, "result backpressure happened");
    for (int k = 0; k < C; k++) check(n_res[k] > 0, $sformatf("results on bus %0d", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

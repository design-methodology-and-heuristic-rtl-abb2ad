// tb_reconfig_ctrl -- self-checking test of the PE move sequencer.
// Keeps its own pmap of which cluster every PE belongs to, applies each move
// the block reports and checks that: the PE moved sits on a cluster boundary
// and joins the neighbouring cluster; no cluster ever becomes empty; the
// final pmap matches the targets; the number of moves is the sum of boundary
// distances; done arrives moves+1 cycles after start.
module tb_reconfig_ctrl;
  import hmpm_pkg::*;
  localparam int C = 4, P = 16, SW = $clog2(P + 1);
  logic clk = 0, rst_n = 0;
  logic start, busy, done, move_valid, move_grow;
  logic [C-1:0][SW-1:0] target, size;
  logic [3:0] move_pe;
  logic [1:0] move_cluster;
  int checks = 0, failures = 0;
  int pmap[P];
  int grows = 0, shrinks = 0;

  reconfig_ctrl #(.CLUSTERS(C), .PES(P)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int count_of(int k);
    int n = 0;
    for (int j = 0; j < P; j++) if (pmap[j] == k) n++;
    return n;
  endfunction

  task automatic run(input int t[C]);
    int distance, cur_b, tgt_b, moves, cyc;
    distance = 0; cur_b = 0; tgt_b = 0;
    for (int i = 0; i < C - 1; i++) begin
      cur_b += count_of(i); tgt_b += t[i];
      distance += (cur_b > tgt_b) ? cur_b - tgt_b : tgt_b - cur_b;
    end
    @(negedge clk);
    for (int i = 0; i < C; i++) target[i] = SW'(t[i]);
    start = 1;
    @(posedge clk); #1 start = 0;
    moves = 0; cyc = 0;
    while (!done && cyc < 4 * P + 10) begin
      if (move_valid) begin
        int pe = int'(move_pe), from = pmap[int'(move_pe)], to = int'(move_cluster);
        check(to == from + 1 || to == from - 1, "move to a neighbour cluster");
        if (move_grow) begin
          grows++;
          check(to == from - 1 && (pe == 0 || pmap[pe-1] == to), "grow takes first PE");
        end else begin
          shrinks++;
          check(to == from + 1 && (pe == P - 1 || pmap[pe+1] == to), "shrink gives last PE");
        end
        pmap[pe] = to;
        moves++;
        for (int k = 0; k < C; k++) check(count_of(k) >= 1, "no empty cluster");
      end
      @(posedge clk); #1 cyc++;
    end
    check(done, "done");
    check(moves == distance, $sformatf("moves %0d expected %0d", moves, distance));
    check(cyc == moves + 1, $sformatf("done after %0d cycles, moves %0d", cyc, moves));
    for (int j = 1; j < P; j++) check(pmap[j] >= pmap[j-1], "clusters contiguous");
    for (int k = 0; k < C; k++) begin
      check(count_of(k) == t[k], $sformatf("cluster %0d has %0d want %0d", k, count_of(k), t[k]));
      check(int'(size[k]) == t[k], "size output");
    end
  endtask

  initial begin
    int t[C];
    start = 0; target = '0;
    for (int j = 0; j < P; j++) pmap[j] = int'(init_cluster(j, P, C));
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < C; k++) check(size[k] == SW'(P / C), "reset split");
    t = '{1, 1, 1, 13}; run(t);
    t = '{13, 1, 1, 1}; run(t);
    t = '{13, 1, 1, 1}; run(t);     // nothing to move
    t = '{2, 5, 7, 2};  run(t);
    for (int n = 0; n < 60; n++) begin
      int left, a;
      left = P - C;
      for (int k = 0; k < C - 1; k++) begin
        a = $urandom % (left + 1);
        t[k] = 1 + a; left -= a;
      end
      t[C-1] = 1 + left;
      run(t);
    end
    check(grows > 0 && shrinks > 0, "both move kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

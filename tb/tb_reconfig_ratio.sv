// tb_reconfig_ratio -- self-checking test of the reconfiguration ratio.
// For hand-picked and random subtask cycle vectors the targets are worked out
// here (floor(x_i*P/(sum+v)), at least one per cluster, correction on the most
// loaded cluster) and compared with the block. The latency from start to done
// is checked against C*(CYC_W+clog2(P+1))+1 cycles.
module tb_reconfig_ratio;
  localparam int C = 4, P = 16, CW = 32, SW = $clog2(P + 1);
  localparam int LAT = C * (CW + SW) + 1;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [C-1:0][CW-1:0] x;
  logic [CW-1:0] v;
  logic [C-1:0][SW-1:0] target;
  int checks = 0, failures = 0;

  reconfig_ratio #(.CLUSTERS(C), .PES(P), .CYC_W(CW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void model(input logic [C-1:0][CW-1:0] xv, input logic [CW-1:0] vv,
                                output int t[C]);
    longint tc, sx, sum;
    int big;
    sx = 0; sum = 0; big = 0;
    for (int i = 0; i < C; i++) sx += longint'(xv[i]);
    tc = sx + longint'(vv);
    for (int i = 0; i < C; i++) begin
      t[i] = (sx == 0) ? P / C : int'((longint'(xv[i]) * P) / tc);
      if (t[i] < 1) t[i] = 1;
      sum += longint'(t[i]);
      if (xv[i] > xv[big]) big = i;
    end
    t[big] += P - int'(sum);
  endfunction

  task automatic run(input logic [C-1:0][CW-1:0] xv, input logic [CW-1:0] vv = '0);
    int t[C], cyc, tot;
    model(xv, vv, t);
    @(negedge clk);
    x = xv; v = vv; start = 1;
    @(posedge clk); #1 start = 0; x = '0;
    cyc = 0;
    while (!done && cyc < 10 * LAT) begin @(posedge clk); #1 cyc++; end
    if (xv != '0) check(cyc == LAT, $sformatf("latency %0d expected %0d", cyc, LAT));
    tot = 0;
    for (int i = 0; i < C; i++) begin
      check(int'(target[i]) == t[i],
            $sformatf("target[%0d]=%0d expected %0d", i, target[i], t[i]));
      check(target[i] >= 1, "at least one PE");
      tot += int'(target[i]);
    end
    check(tot == P, "targets add up to P");
    @(posedge clk); #1 check(!done && !busy, "done is a pulse");
  endtask

  initial begin
    start = 0; x = '0; v = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run({32'd100, 32'd100, 32'd100, 32'd100});   // even load
    run({32'd700, 32'd100, 32'd100, 32'd100});   // cluster 3 heavy
    run({32'd1, 32'd1, 32'd1, 32'd1000000});     // minimum of one PE
    run({32'd0, 32'd0, 32'd0, 32'd0});           // no load
    run({32'hFFFFFFFF, 32'hFFFFFFFF, 32'd3, 32'hFFFFFFFF}); // full width
    run({32'hFFFFFFFF, 32'hFFFFFFFF, 32'd3, 32'hFFFFFFFF}, 32'hFFFFFFFF);
    run({32'd400, 32'd400, 32'd400, 32'd400}, 32'd1600); // overhead halves the shares
    run({32'd0, 32'd0, 32'd0, 32'd0}, 32'd50);
    for (int n = 0; n < 40; n++) begin
      logic [C-1:0][CW-1:0] xv;
      for (int i = 0; i < C; i++) xv[i] = ((n % 2) != 0) ? $urandom : $urandom % 5000;
      run(xv, (n % 3 == 0) ? 32'($urandom % 20000) : 32'd0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

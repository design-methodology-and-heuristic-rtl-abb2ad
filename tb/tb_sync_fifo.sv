// tb_sync_fifo -- self-checking test of the input queue.
// Pushes random words with random stalls on both sides and compares every
// word read with a reference queue; also checks that in_ready drops exactly
// when DEPTH words are held, that count tracks the occupancy and that a word
// is readable in the cycle after it was written.
module tb_sync_fifo;
  localparam int W = 34, D = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] ref_q[$];
  int full_seen = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!out_valid && int'(count) == 0, "empty after reset");
    // fill without reading
    for (int i = 0; i < D; i++) begin
      in_valid = 1; in_data = W'(i * 7 + 1);
      check(in_ready, "ready while not full");
      @(posedge clk); ref_q.push_back(in_data); @(negedge clk);
      check(out_valid, "word readable the cycle after write");
      check(int'(count) == i + 1, "count while filling");
    end
    check(!in_ready, "not ready when full");
    in_valid = 1; in_data = 'h3;
    @(posedge clk); @(negedge clk);
    check(int'(count) == D, "no write when full");
    // read and write in the same cycle while full
    out_ready = 1; in_data = 'h55; #1;
    check(in_ready, "ready when full and reading");
    check(out_data == ref_q[0], "head word");
    @(posedge clk); void'(ref_q.pop_front()); ref_q.push_back('h55); @(negedge clk);
    check(int'(count) == D, "count stays on read+write");
    in_valid = 0; out_ready = 0;
    // random traffic
    for (int cyc = 0; cyc < 3000; cyc++) begin
      in_valid  = ($urandom % 3) != 0;
      in_data   = {$urandom, 2'($urandom)};
      out_ready = ($urandom % 2) != 0;
      #1;
      check(in_ready == ((ref_q.size() < D) || out_ready), "in_ready rule");
      check(out_valid == (ref_q.size() != 0), "out_valid rule");
      if (out_valid) check(out_data == ref_q[0], "data order");
      if (!in_ready) full_seen++;
      @(posedge clk);
      if (out_valid && out_ready) void'(ref_q.pop_front());
      if (in_valid && in_ready) ref_q.push_back(in_data);
      @(negedge clk);
      check(int'(count) == ref_q.size(), "count matches");
    end
    check(full_seen > 0, "full reached in random traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

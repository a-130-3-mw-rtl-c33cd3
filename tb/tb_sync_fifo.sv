// tb_sync_fifo: self-checking test of the first-word-fall-through FIFO used
// as the approximation position buffer, the task ID queue and the sampled
// pixel task queue. Random push/pop traffic against a queue model checks
// data order, count, in_ready when full and out_valid when empty, and that
// a pushed word is visible at the output one cycle after the push.
module tb_sync_fifo;
  localparam int DEPTH = 32, WIDTH = 51;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [WIDTH-1:0] in_data = 0, out_data;
  logic [$clog2(DEPTH):0] count;
  logic [WIDTH-1:0] q [$];

  sync_fifo #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .count);

  initial begin
    #(64'd2_000_000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  initial begin
    bit saw_full = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      chk(count == q.size(), $sformatf("count %0d model %0d", count, q.size()));
      chk(in_ready == (q.size() < DEPTH), "in_ready");
      chk(out_valid == (q.size() > 0), "out_valid");
      if (q.size() > 0) chk(out_data == q[0], "out_data order");
      if (q.size() == DEPTH) saw_full = 1;
      // phases: fill, drain, mixed
      in_valid  = (n < 1000) ? ($urandom_range(0, 3) != 0) : (n < 2000) ? ($urandom_range(0, 3) == 0) : $urandom_range(0, 1);
      out_ready = (n < 1000) ? ($urandom_range(0, 3) == 0) : (n < 2000) ? ($urandom_range(0, 3) != 0) : $urandom_range(0, 1);
      in_data   = {$urandom, $urandom};
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    chk(saw_full, "FIFO reached full");
    // latency: push into an empty FIFO, visible after one edge
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (DEPTH + 2) @(negedge clk);
    q.delete();
    out_ready = 0; in_valid = 1; in_data = 51'h1234;
    @(posedge clk); #1; in_valid = 0;
    chk(out_valid && out_data == 51'h1234, "one-cycle fall-through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

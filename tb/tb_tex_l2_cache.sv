// tb_tex_l2_cache: checks the shared 64 KB texture L2 cache (4096 lines of
// 16 bytes) with four L1 ports issuing random line requests at once. A
// memory model behind it answers line requests after a random delay.
// Checks: every port gets exactly one response per request, carrying the
// requested line; the ports are served round-robin (no port waits while
// more than three other requests are served first); a line another port
// fetched before is a hit (no new memory request); n_req counts all
// requests and n_fill the memory requests.
module tb_tex_l2_cache;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] l1_req_valid = 0, l1_req_ready, l1_rsp_valid;
  logic [31:0] l1_req_addr [4];
  logic [127:0] l1_rsp_data, mem_rsp_data = 0;
  logic mem_req_valid, mem_req_ready = 1, mem_rsp_valid = 0;
  logic [31:0] mem_req_addr, n_req, n_fill;

  tex_l2_cache #(.NPORT(4), .LINES(4096), .LINE_WORDS(4)) dut (.clk, .rst_n, .flush(1'b0),
    .l1_req_valid, .l1_req_ready, .l1_req_addr, .l1_rsp_valid, .l1_rsp_data,
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_rsp_valid, .mem_rsp_data, .n_req, .n_fill);

  initial begin
    #(64'd50_000_000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic logic [127:0] meml(logic [31:0] la);
    return {la * 32'h0101_0101 + 3, la * 32'h0101_0101 + 2, la * 32'h0101_0101 + 1, la ^ 32'hA5A5_0000};
  endfunction

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  int mem_reqs = 0;
  initial begin
    forever begin
      @(posedge clk);
      if (mem_req_valid && mem_req_ready) begin
        automatic logic [31:0] la = mem_req_addr;
        mem_reqs++;
        repeat ($urandom_range(1, 6)) @(posedge clk);
        #1 mem_rsp_valid = 1; mem_rsp_data = meml(la);
        @(posedge clk); #1 mem_rsp_valid = 0;
      end
    end
  end

  // one requester per port
  int served [4], waits [4], total = 0;
  for (genvar p = 0; p < 4; p++) begin : g_port
    initial begin
      served[p] = 0; waits[p] = 0;
      l1_req_addr[p] = 0;
      @(posedge rst_n);
      for (int n = 0; n < 400; n++) begin
        automatic logic [31:0] la = (n % 4 == 0) ? 32'(n / 4) : 32'($urandom_range(0, 20000));
        automatic int others;
        @(negedge clk); l1_req_valid[p] = 1; l1_req_addr[p] = la;
        others = total;
        @(posedge clk);
        while (!l1_req_ready[p]) @(posedge clk);
        chk(total - others <= 3, $sformatf("port %0d waited for %0d other requests", p, total - others));
        #1 l1_req_valid[p] = 0;
        while (!l1_rsp_valid[p]) @(posedge clk);
        chk(l1_rsp_data == meml(la), $sformatf("port %0d line %h", p, la));
        served[p]++; total++;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (served[0] == 400 && served[1] == 400 && served[2] == 400 && served[3] == 400);
    @(negedge clk);
    chk(n_req == 1600, $sformatf("n_req %0d", n_req));
    chk(n_fill == mem_reqs, "n_fill counts line fetches");
    chk(n_fill < 1600 - 250, $sformatf("shared lines hit (%0d fills)", n_fill));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

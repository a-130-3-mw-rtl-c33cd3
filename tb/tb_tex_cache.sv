// tb_tex_cache: checks the direct-mapped texture L1 cache (256 lines of four
// 32-bit words) against a tag model. Random word addresses with locality
// and conflicts are requested; a next-level memory model answers line
// requests after a random delay. Checks: every response carries the right
// word and line; a hit answers exactly one cycle after acceptance without a
// line request; a miss issues exactly one line request for the right line
// address and answers in the cycle after the line returns; n_req and n_fill
// match the model; flush invalidates every line.
module tb_tex_cache;
  localparam int LINES = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic flush = 0, req_valid = 0, req_ready, rsp_valid, mem_req_valid, mem_req_ready = 1, mem_rsp_valid = 0;
  logic [31:0] req_addr = 0, rsp_data, mem_req_addr, n_req, n_fill;
  logic [127:0] rsp_line, mem_rsp_data = 0;

  tex_cache #(.LINES(LINES), .LINE_WORDS(4)) dut (.clk, .rst_n, .flush, .req_valid, .req_ready, .req_addr,
    .rsp_valid, .rsp_data, .rsp_line, .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_rsp_valid, .mem_rsp_data,
    .n_req, .n_fill);

  initial begin
    #(64'd20_000_000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic logic [31:0] memw(logic [31:0] a); return a * 32'h9E37_79B9 ^ 32'h5A5A_0F0F; endfunction
  function automatic logic [127:0] meml(logic [31:0] la);
    return {memw(la*4+3), memw(la*4+2), memw(la*4+1), memw(la*4)};
  endfunction

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  // next level: answers each line request after 1..8 cycles
  int mem_reqs = 0;
  logic [31:0] last_line;
  initial begin
    forever begin
      @(posedge clk);
      if (mem_req_valid && mem_req_ready) begin
        automatic logic [31:0] la = mem_req_addr;
        mem_reqs++; last_line = la;
        repeat ($urandom_range(1, 8)) @(posedge clk);
        #1 mem_rsp_valid = 1; mem_rsp_data = meml(la);
        @(posedge clk); #1 mem_rsp_valid = 0;
      end
    end
  end

  initial begin
    logic [31:0] mtag [LINES];
    bit mvld [LINES];
    int fills = 0, reqs = 0, hits = 0;
    for (int i = 0; i < LINES; i++) mvld[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      logic [31:0] a;
      int idx, cyc, mr0;
      bit hit;
      if (n == 3000) begin
        @(negedge clk); flush = 1; @(negedge clk); flush = 0;
        for (int i = 0; i < LINES; i++) mvld[i] = 0;
      end
      a = (n % 3 == 0) ? 32'($urandom_range(0, 64)) : 32'($urandom_range(0, 8191)) + ((n % 5 == 0) ? 32'h0010_0000 : 0);
      idx = (a >> 2) % LINES;
      hit = mvld[idx] && mtag[idx] == (a >> 2) / LINES;
      @(negedge clk);
      chk(req_ready, "ready when idle");
      req_valid = 1; req_addr = a;
      mr0 = mem_reqs;
      @(negedge clk); req_valid = 0;
      reqs++;
      cyc = 1;
      while (!rsp_valid && cyc < 100) begin @(negedge clk); cyc++; end
      chk(rsp_valid && rsp_data == memw(a) && rsp_line == meml(a >> 2), $sformatf("data for %h", a));
      if (hit) begin
        hits++;
        chk(cyc == 1 && mem_reqs == mr0, $sformatf("hit at %h answered after %0d cycles", a, cyc));
      end else begin
        fills++;
        chk(mem_reqs == mr0 + 1 && last_line == a >> 2, $sformatf("miss at %h: one line request", a));
        mvld[idx] = 1; mtag[idx] = (a >> 2) / LINES;
      end
    end
    @(negedge clk);
    chk(n_req == reqs && n_fill == fills, $sformatf("counters %0d/%0d expected %0d/%0d", n_req, n_fill, reqs, fills));
    chk(hits > 500 && fills > 500, "both hits and misses exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_data_fetch: checks the external memory access unit with two clients
// (texture L2 and vertex fetch) requesting random lines at once, and an
// external bus model with random ready and response delay. Checks: each
// client gets its requested line (four consecutive words, word i of line L
// read from word address 4L+i, in that order); requests are served
// round-robin; at most one bus read is outstanding; n_words counts the bus
// words; with an always-ready bus answering in one cycle a line takes
// exactly 4 bus reads back to back (rate check: one word per two cycles at
// most, and the line returned within 2*4 + 3 cycles of acceptance).
module tb_data_fetch;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] cli_req_valid = 0, cli_req_ready, cli_rsp_valid;
  logic [31:0] cli_req_addr [2];
  logic [127:0] cli_rsp_data;
  logic ext_req_valid, ext_req_ready = 1, ext_rsp_valid = 0;
  logic [31:0] ext_req_addr, ext_rsp_data = 0, n_words;
  bit slow = 0;

  data_fetch #(.NCLI(2), .LINE_WORDS(4)) dut (.clk, .rst_n, .cli_req_valid, .cli_req_ready, .cli_req_addr,
    .cli_rsp_valid, .cli_rsp_data, .ext_req_valid, .ext_req_ready, .ext_req_addr, .ext_rsp_valid, .ext_rsp_data, .n_words);

  initial begin
    #(64'd50_000_000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic logic [31:0] memw(logic [31:0] a); return a * 32'h0001_0003 + 32'h77; endfunction

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  // bus model
  int bus_reads = 0, outstanding = 0;
  logic [31:0] prev_addr = '1;
  initial begin
    forever begin
      @(negedge clk);
      ext_req_ready = slow ? $urandom_range(0, 1) : 1'b1;
      @(posedge clk);
      if (ext_req_valid && ext_req_ready) begin
        automatic logic [31:0] a = ext_req_addr;
        bus_reads++;
        chk(a[1:0] == 2'd0 || a == prev_addr + 1, "words of a line read in order");
        prev_addr = a;
        if (slow) repeat ($urandom_range(0, 3)) @(posedge clk);
        #1 ext_rsp_valid = 1; ext_rsp_data = memw(a);
        @(posedge clk); #1 ext_rsp_valid = 0;
      end
    end
  end

  int served [2], total = 0;
  for (genvar c = 0; c < 2; c++) begin : g_cli
    initial begin
      served[c] = 0; cli_req_addr[c] = 0;
      @(posedge rst_n);
      for (int n = 0; n < 300; n++) begin
        automatic logic [31:0] la = $urandom_range(0, 1 << 20);
        automatic int others, cyc;
        slow = (n >= 150);
        @(negedge clk); cli_req_valid[c] = 1; cli_req_addr[c] = la;
        others = total;
        @(posedge clk);
        while (!cli_req_ready[c]) @(posedge clk);
        chk(total - others <= 1, $sformatf("client %0d waited for %0d other lines", c, total - others));
        #1 cli_req_valid[c] = 0;
        cyc = 0;
        while (!cli_rsp_valid[c]) begin @(posedge clk); cyc++; end
        chk(cli_rsp_data == {memw(la*4+3), memw(la*4+2), memw(la*4+1), memw(la*4)}, $sformatf("client %0d line %h", c, la));
        if (!slow) chk(cyc <= 2*4 + 3, $sformatf("line took %0d cycles", cyc));
        served[c]++; total++;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (served[0] == 300 && served[1] == 300);
    @(negedge clk);
    chk(n_words == 4 * 600 && bus_reads == 4 * 600, $sformatf("n_words %0d bus reads %0d", n_words, bus_reads));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

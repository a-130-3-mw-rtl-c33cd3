// tb_sram_1r1w: self-checking test of the one-read/one-write SRAM used for
// the raster's plane equation SRAM (9 entries x 144 bits) and tile scalar
// value SRAM (9 x 192 bits). Random writes and reads against a model array;
// checks the one-cycle read latency (data of the address presented in cycle
// n appears after the edge ending cycle n) and read-before-write behaviour
// when both ports hit the same address in the same cycle.
module tb_sram_1r1w;
  localparam int DEPTH = 9, WIDTH = 144, AW = $clog2(DEPTH);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [WIDTH-1:0] wdata = 0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  bit               mvalid [DEPTH];

  sram_1r1w #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    #(64'd1_000_000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] v;
    for (int i = 0; i < WIDTH; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    logic [WIDTH-1:0] expv;
    bit               expok;
    for (int i = 0; i < DEPTH; i++) mvalid[i] = 0;
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = AW'(i); wdata = rnd();
      model[i] = wdata; mvalid[i] = 1;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      waddr = AW'($urandom_range(0, DEPTH - 1));
      raddr = (n % 7 == 0) ? waddr : AW'($urandom_range(0, DEPTH - 1));
      wdata = rnd();
      expv = model[raddr];          // read returns the old contents
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL: read %0d got %h expected %h", raddr, rdata, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

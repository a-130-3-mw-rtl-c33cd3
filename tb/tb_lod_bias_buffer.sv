// tb_lod_bias_buffer: checks the LOD bias buffer of approximated texturing
// at its default size (one 2-bit bias per texel of every mip level of a
// 256x256 texture, 87381 entries in 5462 words). The whole map is loaded
// with random words, then random (level, x, y) lookups are compared with a
// model using the level offsets sum_{j<k} 4^(8-j) and row-major order
// inside a level. The lookup latency is one cycle (bias valid after the
// clock edge that samples rd_en) and bias holds while rd_en is low.
module tb_lod_bias_buffer;
  localparam int TL = 8;
  localparam int ENTRIES = ((1 << (2*TL + 2)) - 1) / 3;
  localparam int WORDS = (ENTRIES + 15) / 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en = 0, rd_en = 0;
  logic [$clog2(WORDS)-1:0] wr_addr = 0;
  logic [31:0] wr_data = 0;
  logic [3:0] rd_level = 0;
  logic [15:0] rd_x = 0, rd_y = 0;
  logic [1:0] bias;
  logic [31:0] model [WORDS];

  lod_bias_buffer #(.TEX_LOG2(TL)) dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_level, .rd_x, .rd_y, .bias);

  initial begin
    #(64'd10_000_000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk); wr_en = 1; wr_addr = 13'(w); wr_data = $urandom; model[w] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 5000; n++) begin
      int lv, sz, off, e;
      logic [1:0] expb, held;
      lv = $urandom_range(0, TL);
      sz = 1 << (TL - lv);
      off = 0;
      for (int j = 0; j < lv; j++) off += 1 << (2 * (TL - j));
      rd_level = 4'(lv); rd_x = 16'($urandom_range(0, sz - 1)); rd_y = 16'($urandom_range(0, sz - 1));
      e = off + int'(rd_y) * sz + int'(rd_x);
      expb = model[e / 16][2 * (e % 16) +: 2];
      rd_en = 1;
      @(posedge clk); #1;
      checks++;
      if (bias != expb) begin
        failures++;
        if (failures < 10) $display("FAIL: level %0d (%0d,%0d) bias %0d expected %0d", lv, rd_x, rd_y, bias, expb);
      end
      // held while not reading
      held = bias;
      @(negedge clk); rd_en = 0; rd_level = 0; rd_x = 0; rd_y = 0;
      @(posedge clk); #1;
      checks++;
      if (bias != held) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

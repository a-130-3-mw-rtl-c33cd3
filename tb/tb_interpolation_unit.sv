// tb_interpolation_unit: checks the interpolation unit of the raster, which
// evaluates one scalar for 16 pixels (a 4x4 half tile) in parallel from the
// stored leftmost-column values and the x slope M (eq. (2):
// s(x+1, y) = s(x, y) + M). Random Q24.24 planes; every output is compared
// with s = left + (half*4 + i)*M converted to Q16.16. Combinational:
// all 16 values are valid one time step after the inputs.
module tb_interpolation_unit;
  int checks = 0, failures = 0;
  logic signed [47:0] left_col [4];
  logic signed [47:0] plane_m;
  logic half;
  logic signed [31:0] value [16];

  interpolation_unit dut (.left_col, .plane_m, .half, .value);

  initial begin
    #(64'd1_000_000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic signed [47:0] e;
    for (int n = 0; n < 2000; n++) begin
      plane_m = 48'(signed'($urandom)) <<< ($urandom_range(0, 8));
      for (int j = 0; j < 4; j++) left_col[j] = 48'(signed'($urandom)) <<< ($urandom_range(0, 12));
      half = $urandom_range(0, 1);
      #1;
      for (int j = 0; j < 4; j++) for (int i = 0; i < 4; i++) begin
        e = left_col[j] + plane_m * (half ? 4 + i : i);
        checks++;
        if (value[j*4 + i] != 32'(e >>> 8)) begin
          failures++;
          if (failures < 10) $display("FAIL: pixel (%0d,%0d) got %h expected %h", i, j, value[j*4+i], 32'(e >>> 8));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

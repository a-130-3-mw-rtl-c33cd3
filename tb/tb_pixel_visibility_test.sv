// tb_pixel_visibility_test: exhaustive-style random test of the pixel
// visibility test (depth test LESS, stencil test EQUAL, each switchable).
// Combinational; checked one time step after the inputs change.
module tb_pixel_visibility_test;
  int checks = 0, failures = 0;
  logic depth_en, stencil_en, color_update, depth_update;
  logic [7:0] stencil_ref, old_stencil;
  logic [15:0] new_depth, old_depth;

  pixel_visibility_test dut (.depth_en, .stencil_en, .stencil_ref, .new_depth, .old_depth, .old_stencil,
    .color_update, .depth_update);

  initial begin
    #(64'd1_000_000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit pass;
    for (int n = 0; n < 5000; n++) begin
      depth_en = $urandom_range(0, 1); stencil_en = $urandom_range(0, 1);
      stencil_ref = 8'($urandom_range(0, 3)); old_stencil = 8'($urandom_range(0, 3));
      new_depth = 16'($urandom); old_depth = (n % 9 == 0) ? new_depth : 16'($urandom);
      #1;
      pass = (!depth_en || new_depth < old_depth) && (!stencil_en || old_stencil == stencil_ref);
      checks++;
      if (color_update != pass || depth_update != (pass && depth_en)) begin
        failures++;
        if (failures < 10) $display("FAIL: d%0b s%0b ref %0d st %0d new %h old %h -> %b %b", depth_en, stencil_en,
                                    stencil_ref, old_stencil, new_depth, old_depth, color_update, depth_update);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

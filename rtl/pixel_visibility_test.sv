// pixel_visibility_test: depth and stencil test of the ROP (Fig. 17).
//
// A pixel is visible when the stencil test passes (disabled, or the stored
// stencil equals the reference) and the depth test passes (disabled, or the
// new depth is less than the stored depth). Visible pixels raise the colour
// update enable; with depth writes enabled they also update the depth cache.
// The comparison functions (LESS, EQUAL) are this design's fixed choice; the
// source names the tests but not their functions. Combinational.
module pixel_visibility_test (
  input  logic        depth_en,
  input  logic        stencil_en,
  input  logic [7:0]  stencil_ref,
  input  logic [15:0] new_depth,
  input  logic [15:0] old_depth,
  input  logic [7:0]  old_stencil,
  output logic        color_update,
  output logic        depth_update
);
  logic st_pass, z_pass;
  assign st_pass      = !stencil_en || old_stencil == stencil_ref;
  assign z_pass       = !depth_en || new_depth < old_depth;
  assign color_update = st_pass && z_pass;
  assign depth_update = color_update && depth_en;
endmodule

// task_buffer: attribute / varying buffer of the GPU, addressed by task ID.
//
// Each task owns NSLOT vec4 slots: a vertex task holds its fetched vertex
// attributes, a pixel task its position and interpolated varyings. Shader
// cores read their inputs from here by task ID when the task dispatcher
// issues the thread (Sec. VI: "Based on the task ID, shader clusters can
// access the pixel input variables"). Two write forms: one slot (wr_all
// low) or a whole record (wr_all high, wr_rec). Reads are combinational.
// The source builds these buffers on a configurable memory array of earlier
// work; a plain register array is this design's substitute.
module task_buffer
  import gpu_pkg::*;
#(
  parameter int unsigned NTASK = 32,
  parameter int unsigned NSLOT = 4,
  localparam int unsigned TW = $clog2(NTASK),
  localparam int unsigned SW = $clog2(NSLOT)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic          wr_all,
  input  logic [TW-1:0] wr_id,
  input  logic [SW-1:0] wr_slot,
  input  vec4_t         wr_vec,
  input  vec4_t         wr_rec [NSLOT],
  input  logic [TW-1:0] rd_id,
  input  logic [SW-1:0] rd_slot,
  output vec4_t         rd_vec
);
  vec4_t mem [NTASK][NSLOT];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      if (wr_all) mem[wr_id] <= wr_rec;
      else mem[wr_id][wr_slot] <= wr_vec;
    end
  end

  assign rd_vec = mem[rd_id][rd_slot];
endmodule

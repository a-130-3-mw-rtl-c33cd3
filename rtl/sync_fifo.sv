// sync_fifo: synchronous first-in first-out queue with valid/ready handshakes.
//
// Serves as the task dispatcher's task ID queue and sampled pixel task queue
// and as the approximation position buffer of the screen-space approximated
// lighting path. A word is accepted when in_valid && in_ready and leaves when
// out_valid && out_ready; out_data shows the oldest word combinationally
// (first-word fall-through). count gives the occupancy. Depth and width are
// parameters of this design (the source gives no sizes); DEPTH must be a
// power of two.
module sync_fifo #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;

  assign count     = wp - rp;
  assign in_ready  = count != (AW+1)'(DEPTH);
  assign out_valid = count != '0;
  assign out_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wp[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (in_valid && in_ready)   wp <= wp + 1'b1;
      if (out_valid && out_ready) rp <= rp + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule

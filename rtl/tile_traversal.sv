// tile_traversal: first level of the two-level tile-based scan (Fig. 6).
//
// Scans the 8x4-pixel screen tiles inside the triangle's tile-level bounding
// box, one tile test per cycle. The first row starts at the tile holding the
// top vertex (the Start Tile); each row is scanned from the Start Tile to the
// right and then from the tile left of it to the left, and a direction ends
// at the first tile that fails after a passing one. The last covered tile of
// a row (the leftmost one) gives the Start Tile of the next row, one tile
// row below. A tile passes when, for every edge, at least one of its four
// corner pixels is on the inside (e >= 0); this is conservative and the
// interior traversal finds the exact pixels. Continuing past failing tiles
// until the first passing one (instead of stopping at once) is this design's
// addition, so a Start Tile that misses the next row's span cannot end the
// scan early. Output: tile_x/tile_y (tile indices) with valid/ready; done
// pulses after the last tile. Coordinates are clamped to the screen.
module tile_traversal #(
  parameter int unsigned SCREEN_W = 512,
  parameter int unsigned SCREEN_H = 512
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic signed [31:0] alpha [3],
  input  logic signed [31:0] beta  [3],
  input  logic signed [31:0] gamma [3],
  input  logic signed [15:0] xmin, xmax, ymin, ymax,
  input  logic signed [15:0] top_x,
  output logic               tile_valid,
  input  logic               tile_ready,
  output logic [15:0]        tile_x,
  output logic [15:0]        tile_y,
  output logic               done
);
  localparam int TXN = SCREEN_W / 8;
  localparam int TYN = SCREEN_H / 4;

  typedef enum logic [1:0] { S_IDLE, S_RIGHT, S_LEFT, S_EMIT } state_e;
  state_e state, ret_state;

  int tx0, tx1, ty1;          // bounding box in tiles
  int cx, cy, st, last;       // current tile, start tile, last covered
  logic found;
  logic pass;

  function automatic int clampi(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // four-corner test of tile (cx, cy)
  always_comb begin
    pass = 1'b1;
    for (int e = 0; e < 3; e++) begin
      logic signed [31:0] x0, y0, e00, e10, e01, e11;
      x0  = 32'(cx * 8);
      y0  = 32'(cy * 4);
      e00 = alpha[e] * x0 + beta[e] * y0 + gamma[e];
      e10 = e00 + alpha[e] * 7;
      e01 = e00 + beta[e] * 3;
      e11 = e10 + beta[e] * 3;
      if (e00 < 0 && e10 < 0 && e01 < 0 && e11 < 0) pass = 1'b0;
    end
  end

  assign tile_valid = state == S_EMIT;
  assign tile_x = 16'(cx);
  assign tile_y = 16'(cy);

  // bounding box in tiles, clamped to the screen
  int a, b, c, d;
  always_comb begin
    a = clampi(int'(xmin) >>> 3, 0, TXN - 1);
    b = clampi(int'(xmax) >>> 3, 0, TXN - 1);
    c = clampi(int'(ymin) >>> 2, 0, TYN - 1);
    d = clampi(int'(ymax) >>> 2, 0, TYN - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ret_state <= S_IDLE;
      done  <= 1'b0;
      tx0 <= 0; tx1 <= 0; ty1 <= 0;
      cx <= 0; cy <= 0; st <= 0; last <= 0;
      found <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          tx0 <= a; tx1 <= b; ty1 <= d;
          st  <= clampi(int'(top_x) >>> 3, a, b);
          cx  <= clampi(int'(top_x) >>> 3, a, b);
          last <= clampi(int'(top_x) >>> 3, a, b);
          cy  <= c;
          found <= 1'b0;
          state <= S_RIGHT;
        end
        S_RIGHT: begin
          if (pass) begin
            found <= 1'b1;
            last  <= cx;
            ret_state <= S_RIGHT;
            state <= S_EMIT;
          end else if (found || cx >= tx1) begin
            // right scan over; start the left scan
            if (st > tx0) begin
              cx <= st - 1;
              state <= S_LEFT;
            end else begin
              state <= S_LEFT;
              cx <= tx0 - 1;      // nothing to the left: S_LEFT ends the row
            end
          end else cx <= cx + 1;
        end
        S_LEFT: begin
          if (cx >= tx0 && pass) begin
            found <= 1'b1;
            last  <= cx;
            ret_state <= S_LEFT;
            state <= S_EMIT;
          end else if (cx < tx0 || found || cx == tx0) begin
            // row done
            if (cy >= ty1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              cy    <= cy + 1;
              st    <= last;
              cx    <= last;
              found <= 1'b0;
              state <= S_RIGHT;
            end
          end else cx <= cx - 1;
        end
        S_EMIT: if (tile_ready) begin
          if (ret_state == S_RIGHT) begin
            if (cx >= tx1) begin
              cx <= (st > tx0) ? st - 1 : tx0 - 1;
              state <= S_LEFT;
            end else begin
              cx <= cx + 1;
              state <= S_RIGHT;
            end
          end else begin
            if (cx <= tx0) begin
              cx <= tx0 - 1;
            end else cx <= cx - 1;
            state <= S_LEFT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

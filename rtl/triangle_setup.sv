// triangle_setup: edge and plane equations of a screen-space triangle.
//
// For the three edges it forms e(x,y) = alpha*x + beta*y + gamma, signed so
// that a pixel is inside when all three are >= 0 (eq. (1)). For every scalar
// variable s it forms the plane s(x,y) = M*x + N*y + C with N_vec = A x B,
// A = p1-p0, B = p2-p0 in (x, y, s): M = -a/c, N = -b/c (Sec. III-A, Fig. 5).
// The ALU set is folded as the source describes: one sequential divider
// produces 2^40/|c| once per triangle (41 cycles), then one scalar's
// coefficients are made per cycle by cross products, multiplications and
// additions and written to the plane equation SRAM (address = scalar index,
// data = {M, N, C}, each signed Q24.24 in 48 bits; this design's format).
// Vertex coordinates are integer pixel positions; scalars are signed Q16.16.
// A triangle of zero area is reported as culled. Handshake: in_valid/in_ready
// accepts a triangle when idle; done pulses when all outputs are valid; the
// edge and bounding box outputs hold until the next triangle is accepted.
module triangle_setup #(
  parameter int unsigned NS = 9     // scalars per vertex (depth + varyings)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [15:0]      vx [3],
  input  logic signed [15:0]      vy [3],
  input  logic signed [31:0]      vs [3][NS],
  output logic                    done,
  output logic                    culled,
  output logic signed [31:0]      alpha [3],
  output logic signed [31:0]      beta  [3],
  output logic signed [31:0]      gamma [3],
  output logic signed [15:0]      xmin, xmax, ymin, ymax,
  output logic signed [15:0]      top_x,
  output logic                    pe_we,
  output logic [$clog2(NS)-1:0]   pe_addr,
  output logic [143:0]            pe_data
);
  typedef enum logic [1:0] { S_IDLE, S_DIV, S_PLANE } state_e;
  state_e state;

  logic signed [15:0] x [3], y [3];
  logic signed [31:0] s [3][NS];
  logic signed [31:0] c2;           // twice the signed area, = c of N_vec
  logic        [40:0] quo, rem;
  logic        [25:0] cabs;
  logic        [5:0]  bitn;
  logic [$clog2(NS)-1:0] si;

  assign in_ready = state == S_IDLE;

  // ---- plane coefficients of scalar si (combinational, one per cycle) ----
  logic signed [15:0] ax, ay, bx, by;
  logic signed [32:0] as_, bs_;
  logic signed [63:0] pa, pb;
  logic signed [127:0] m_full, n_full;
  logic signed [47:0] m_q, n_q, c_q;
  always_comb begin
    ax  = x[1] - x[0];  ay = y[1] - y[0];
    bx  = x[2] - x[0];  by = y[2] - y[0];
    as_ = 33'(s[1][si]) - 33'(s[0][si]);
    bs_ = 33'(s[2][si]) - 33'(s[0][si]);
    pa  = 64'(ay) * 64'(bs_) - 64'(as_) * 64'(by);   // a
    pb  = 64'(as_) * 64'(bx) - 64'(ax) * 64'(bs_);   // b
    // M = -a/c in Q.24: a (Q.16) * 2^40/|c| >> 32
    m_full = -(128'(pa) * $signed({87'd0, quo}));
    n_full = -(128'(pb) * $signed({87'd0, quo}));
    if (c2 < 0) begin
      m_full = -m_full;
      n_full = -n_full;
    end
    m_q = 48'(m_full >>> 32);
    n_q = 48'(n_full >>> 32);
    c_q = (48'(s[0][si]) <<< 8) - 48'(m_q * 48'(x[0])) - 48'(n_q * 48'(y[0]));
  end

  // ---- edge equations ----
  always_comb begin
    for (int i = 0; i < 3; i++) begin
      int j;
      logic signed [31:0] dx, dy;
      j  = (i + 1) % 3;
      dx = 32'(x[j]) - 32'(x[i]);
      dy = 32'(y[j]) - 32'(y[i]);
      // inside positive: e = (y-yi)*dx - (x-xi)*dy, times sign(c)
      alpha[i] = (c2 > 0) ? -dy : dy;
      beta[i]  = (c2 > 0) ?  dx : -dx;
      gamma[i] = (c2 > 0) ? (32'(x[i]) * dy - 32'(y[i]) * dx)
                          : (32'(y[i]) * dx - 32'(x[i]) * dy);
    end
  end

  // doubled signed area, top vertex index and the divider's partial remainder
  logic signed [31:0] area;
  int                 t;
  logic [41:0]        r2;
  always_comb begin
    area = (32'(vx[1]) - 32'(vx[0])) * (32'(vy[2]) - 32'(vy[0])) -
           (32'(vy[1]) - 32'(vy[0])) * (32'(vx[2]) - 32'(vx[0]));
    t = 0;
    if (vy[1] < vy[t] || (vy[1] == vy[t] && vx[1] < vx[t])) t = 1;
    if (vy[2] < vy[t] || (vy[2] == vy[t] && vx[2] < vx[t])) t = 2;
    r2 = {rem, (bitn == 6'd40)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      culled <= 1'b0;
      pe_we <= 1'b0;
      pe_addr <= '0;
      pe_data <= '0;
      si    <= '0;
      c2    <= '0;
      quo   <= '0;
      rem   <= '0;
      cabs  <= '0;
      bitn  <= '0;
      xmin <= '0; xmax <= '0; ymin <= '0; ymax <= '0; top_x <= '0;
      for (int v = 0; v < 3; v++) begin
        x[v] <= '0; y[v] <= '0;
        for (int k = 0; k < NS; k++) s[v][k] <= '0;
      end
    end else begin
      done  <= 1'b0;
      pe_we <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          c2 <= area;
          cabs <= 26'(area < 0 ? -area : area);
          x <= vx; y <= vy; s <= vs;
          top_x <= vx[t];
          xmin <= (vx[0] < vx[1]) ? ((vx[0] < vx[2]) ? vx[0] : vx[2]) : ((vx[1] < vx[2]) ? vx[1] : vx[2]);
          xmax <= (vx[0] > vx[1]) ? ((vx[0] > vx[2]) ? vx[0] : vx[2]) : ((vx[1] > vx[2]) ? vx[1] : vx[2]);
          ymin <= (vy[0] < vy[1]) ? ((vy[0] < vy[2]) ? vy[0] : vy[2]) : ((vy[1] < vy[2]) ? vy[1] : vy[2]);
          ymax <= (vy[0] > vy[1]) ? ((vy[0] > vy[2]) ? vy[0] : vy[2]) : ((vy[1] > vy[2]) ? vy[1] : vy[2]);
          if (area == 0) begin
            culled <= 1'b1;
            done   <= 1'b1;
          end else begin
            culled <= 1'b0;
            quo    <= '0;
            rem    <= '0;
            bitn   <= 6'd40;
            state  <= S_DIV;
          end
        end
        S_DIV: begin  // restoring division 2^40 / |c|, one quotient bit per cycle
          if (r2 >= 42'(cabs)) begin
            rem <= 41'(r2 - 42'(cabs));
            quo[bitn] <= 1'b1;
          end else begin
            rem <= 41'(r2);
          end
          if (bitn == 0) begin
            state <= S_PLANE;
            si    <= '0;
          end else bitn <= bitn - 1'b1;
        end
        S_PLANE: begin
          pe_we   <= 1'b1;
          pe_addr <= si;
          pe_data <= {m_q, n_q, c_q};
          if (int'(si) == NS - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else si <= si + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

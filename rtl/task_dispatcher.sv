// task_dispatcher: thread scheduler and SSAL orchestrator (TD in the chip).
//
// Runs the per-triangle flow of the GPU:
//  1. Vertex phase: fetch the NATTR vec4 attributes of the triangle's three
//     vertices from external memory through the data fetch unit into the task
//     buffer (task IDs 0..2), issue three vertex threads to free
//     full-precision cores (the approximated precision cluster is kept for
//     pixel programs), wait for them and read their output buffers: o0 is the
//     screen-space position (x, y, depth z, w), o1..oNVAR the varyings.
//  2. The assembled triangle (integer x, y; Q16.16 depth and varyings) goes to
//     the raster.
//  3. Per tile: every pixel the raster marks for shading gets a task ID from
//     the task ID queue, its inputs (i0 = (x, y, z, 1), i1.. = varyings) are
//     written to the task buffer and its ID enters the sampled pixel task
//     queue; every approximated pixel's position, depth and role enter the
//     approximation position buffer.
//  4. Sampled pixel tasks are issued round-robin over all NCORE cores (inputs
//     copied to the core, then start). A finished core's o0 (position, moved
//     at full precision) and o1 (colour, converted to RGBA8) go to the ROP
//     and its task ID returns to the queue.
//  5. When all sampled pixels of the tile are shaded the dispatcher raises
//     the ROP's approximation phase and streams the approximation position
//     buffer to it; then it clears the ROP's shaded colour buffer and takes
//     the next tile.
// The order of these steps follows the source's SSAL description; processing
// one triangle and one tile at a time, the round-robin issue, the data
// formats and the vertex/pixel program conventions are this design's choices.
module task_dispatcher
  import gpu_pkg::*;
#(
  parameter int unsigned NCORE   = 16,
  parameter int unsigned NFULL   = 12,  // cores 0..NFULL-1 have full precision
  parameter int unsigned NATTR   = 4,
  parameter int unsigned NVAR    = 2,
  parameter int unsigned NTASK   = 32,
  localparam int unsigned NS     = 1 + 4 * NVAR,
  localparam int unsigned CW     = $clog2(NCORE),
  localparam int unsigned TW     = $clog2(NTASK)
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration
  input  logic [7:0]         vs_pc,
  input  logic [7:0]         ps_pc,
  input  logic [31:0]        vbase,
  // triangles (vertex indices)
  input  logic               tri_valid,
  output logic               tri_ready,
  input  logic [15:0]        tri_idx [3],
  output logic               idle,
  // data fetch client (vertex attributes)
  output logic               vf_req_valid,
  input  logic               vf_req_ready,
  output logic [31:0]        vf_req_addr,
  input  logic               vf_rsp_valid,
  input  logic [127:0]       vf_rsp_data,
  // shader cores
  input  logic [NCORE-1:0]   core_busy,
  input  logic [NCORE-1:0]   core_done,
  output logic [NCORE-1:0]   core_in_we,
  output logic [2:0]         core_in_addr,
  output vec4_t              core_in_data,
  output logic [NCORE-1:0]   core_start,
  output logic [7:0]         core_pc,
  output logic [2:0]         core_out_addr,
  input  vec4_t              core_out_data [NCORE],
  // raster
  output logic               r_tri_valid,
  input  logic               r_tri_ready,
  output logic signed [15:0] r_vx [3],
  output logic signed [15:0] r_vy [3],
  output logic signed [31:0] r_vs [3][NS],
  input  logic               r_pix_valid,
  output logic               r_pix_ready,
  input  logic [15:0]        r_pix_x,
  input  logic [15:0]        r_pix_y,
  input  pix_role_e          r_pix_role,
  input  logic               r_pix_last,
  input  logic signed [31:0] r_pix_scal [NS],
  input  logic               r_tri_done,
  // ROP
  output logic               rop_tile_clear,
  output logic               rop_approx_phase,
  output logic               rop_px_valid,
  input  logic               rop_px_ready,
  output logic [15:0]        rop_px_x,
  output logic [15:0]        rop_px_y,
  output logic [15:0]        rop_px_depth,
  output logic [31:0]        rop_px_color,
  output pix_role_e          rop_px_role,
  // statistics
  output logic [31:0]        n_vthreads,
  output logic [31:0]        n_pthreads,
  output logic [31:0]        n_approx,
  output logic [31:0]        n_tiles,
  output logic [31:0]        n_task_stall
);
  typedef enum logic [3:0] {
    D_INIT, D_IDLE, D_VF_REQ, D_VF_WAIT, D_VISSUE, D_VWAIT, D_VCOLLECT,
    D_RSETUP, D_RPIX, D_SHADE, D_ISSUE, D_COLLECT0, D_COLLECT1, D_APPROX, D_TILE_END
  } state_e;
  state_e state;

  // ---------------- queues and task buffer ----------------
  logic          fl_in_valid, fl_in_ready, fl_out_valid, fl_out_ready;
  logic [TW-1:0] fl_in_data, fl_out_data;
  logic          sq_in_valid, sq_in_ready, sq_out_valid, sq_out_ready;
  logic [TW-1:0] sq_out_data;
  localparam int unsigned APW = 16 + 16 + 16 + 3;
  logic           ap_in_valid, ap_in_ready, ap_out_valid, ap_out_ready;
  logic [APW-1:0] ap_in_data, ap_out_data;
  logic [TW:0]    fl_count, sq_count;
  logic [5:0]     ap_count;

  // task ID queue (free task IDs)
  sync_fifo #(.DEPTH(NTASK), .WIDTH(TW)) u_task_id_q (
    .clk, .rst_n, .in_valid(fl_in_valid), .in_ready(fl_in_ready), .in_data(fl_in_data),
    .out_valid(fl_out_valid), .out_ready(fl_out_ready), .out_data(fl_out_data), .count(fl_count));
  // sampled pixel task queue
  sync_fifo #(.DEPTH(NTASK), .WIDTH(TW)) u_sample_q (
    .clk, .rst_n, .in_valid(sq_in_valid), .in_ready(sq_in_ready), .in_data(fl_out_data),
    .out_valid(sq_out_valid), .out_ready(sq_out_ready), .out_data(sq_out_data), .count(sq_count));
  // approximation position buffer
  sync_fifo #(.DEPTH(32), .WIDTH(APW)) u_approx_pos (
    .clk, .rst_n, .in_valid(ap_in_valid), .in_ready(ap_in_ready), .in_data(ap_in_data),
    .out_valid(ap_out_valid), .out_ready(ap_out_ready), .out_data(ap_out_data), .count(ap_count));

  logic          tb_we, tb_all;
  logic [TW-1:0] tb_wid, tb_rid;
  logic [1:0]    tb_wslot, tb_rslot;
  vec4_t         tb_wvec, tb_rvec;
  vec4_t         tb_wrec [4];

  task_buffer #(.NTASK(NTASK), .NSLOT(4)) u_tbuf (
    .clk, .wr_en(tb_we), .wr_all(tb_all), .wr_id(tb_wid), .wr_slot(tb_wslot), .wr_vec(tb_wvec),
    .wr_rec(tb_wrec), .rd_id(tb_rid), .rd_slot(tb_rslot), .rd_vec(tb_rvec));

  // ---------------- state ----------------
  logic [TW:0]        init_cnt;
  logic [1:0]         v;
  logic [2:0]         a;
  logic [15:0]        idx [3];
  logic [CW-1:0]      vcore [3];
  logic [NCORE-1:0]   assigned, finished;
  logic [TW-1:0]      ctask [NCORE];
  logic [CW-1:0]      cg, rr;
  logic [TW-1:0]      cur_task;
  logic               raster_done;
  vec4_t              pos_q;

  function automatic logic [15:0] depth16(input logic signed [31:0] z);
    if (z < 0) return 16'h0000;
    if (z >= 32'sh0001_0000) return 16'hFFFF;
    return z[15:0];
  endfunction

  // free core search (round-robin from rr; vertex threads only on full cores)
  logic [CW-1:0] free_core;
  logic          free_any;
  always_comb begin
    free_core = rr; free_any = 1'b0;
    for (int i = NCORE - 1; i >= 0; i--) begin
      logic [CW-1:0] c;
      c = CW'((int'(rr) + i) % NCORE);
      if (!assigned[c] && !core_busy[c] &&
          (state != D_VISSUE || int'(c) < int'(NFULL))) begin
        free_core = c; free_any = 1'b1;
      end
    end
  end

  logic [CW-1:0] fin_core;
  logic          fin_any;
  always_comb begin
    fin_core = '0; fin_any = 1'b0;
    for (int i = NCORE - 1; i >= 0; i--)
      if (finished[i] && assigned[i]) begin fin_core = CW'(i); fin_any = 1'b1; end
  end

  // ---------------- combinational outputs ----------------
  assign tri_ready    = state == D_IDLE;
  assign idle         = state == D_IDLE;
  assign vf_req_valid = state == D_VF_REQ;
  assign vf_req_addr  = (vbase + 32'(idx[v]) * 32'(NATTR * 4) + 32'(a) * 32'd4) >> 2;
  assign core_pc      = (state == D_ISSUE) ? ps_pc : vs_pc;
  assign r_tri_valid  = state == D_RSETUP;

  wire pix_shade = r_pix_role == PR_SHADE;
  assign r_pix_ready = state == D_RPIX &&
                       (pix_shade ? (fl_out_valid && sq_in_ready) : ap_in_ready);
  wire pix_fire  = r_pix_valid && r_pix_ready;

  assign fl_out_ready = pix_fire && pix_shade;
  assign sq_in_valid  = pix_fire && pix_shade;
  assign ap_in_valid  = pix_fire && !pix_shade;
  assign ap_in_data   = {r_pix_x, r_pix_y, depth16(r_pix_scal[0]), r_pix_role};

  assign sq_out_ready = state == D_SHADE && !fin_any && sq_out_valid && free_any;

  always_comb begin
    tb_we = 1'b0; tb_all = 1'b0; tb_wid = '0; tb_wslot = '0; tb_wvec = '0;
    for (int s = 0; s < 4; s++) tb_wrec[s] = '0;
    if (state == D_VF_WAIT && vf_rsp_valid) begin
      tb_we    = 1'b1;
      tb_wid   = TW'(v);
      tb_wslot = a[1:0];
      tb_wvec  = vf_rsp_data;
    end else if (pix_fire && pix_shade) begin
      tb_we  = 1'b1;
      tb_all = 1'b1;
      tb_wid = fl_out_data;
      tb_wrec[0] = {F32_ONE, fix_to_f32(r_pix_scal[0]),
                    fix_to_f32({r_pix_y, 16'd0}), fix_to_f32({r_pix_x, 16'd0})};
      for (int k = 0; k < NVAR && k < 3; k++)
        for (int l = 0; l < 4; l++) tb_wrec[k+1][l] = fix_to_f32(r_pix_scal[1 + 4*k + l]);
    end
  end

  assign tb_rid   = (state == D_VISSUE) ? TW'(v) : cur_task;
  assign tb_rslot = a[1:0];

  always_comb begin
    core_in_we   = '0;
    core_start   = '0;
    core_in_addr = a;
    core_in_data = tb_rvec;
    if (state == D_VISSUE && free_any && int'(a) < int'(NATTR)) core_in_we[free_core] = 1'b1;
    if (state == D_ISSUE && int'(a) < 1 + int'(NVAR)) core_in_we[cg] = 1'b1;
    if (state == D_ISSUE && int'(a) == 1 + int'(NVAR)) core_start[cg] = 1'b1;
    if (state == D_VISSUE && free_any && int'(a) == int'(NATTR)) core_start[free_core] = 1'b1;
  end

  always_comb begin
    unique case (state)
      D_COLLECT0: core_out_addr = 3'd0;
      D_COLLECT1: core_out_addr = 3'd1;
      default:    core_out_addr = a;
    endcase
  end

  // ROP pixel port
  vec4_t col_v;
  assign col_v = core_out_data[cg];
  always_comb begin
    rop_px_valid = 1'b0;
    rop_px_x = '0; rop_px_y = '0; rop_px_depth = '0; rop_px_color = '0; rop_px_role = PR_SHADE;
    if (state == D_COLLECT1) begin
      rop_px_valid = 1'b1;
      rop_px_x     = 16'(f32_to_fix(pos_q[0]) >>> 16);
      rop_px_y     = 16'(f32_to_fix(pos_q[1]) >>> 16);
      rop_px_depth = depth16(f32_to_fix(pos_q[2]));
      rop_px_color = {f32_to_u8(col_v[3]), f32_to_u8(col_v[2]), f32_to_u8(col_v[1]), f32_to_u8(col_v[0])};
    end else if (state == D_APPROX && ap_out_valid) begin
      rop_px_valid = 1'b1;
      rop_px_x     = ap_out_data[APW-1 -: 16];
      rop_px_y     = ap_out_data[APW-17 -: 16];
      rop_px_depth = ap_out_data[APW-33 -: 16];
      rop_px_role  = pix_role_e'(ap_out_data[2:0]);
    end
  end
  assign rop_approx_phase = state == D_APPROX;
  assign rop_tile_clear   = state == D_TILE_END;
  assign ap_out_ready     = state == D_APPROX && rop_px_ready;

  assign fl_in_valid = (state == D_INIT && int'(init_cnt) < NTASK) ||
                       (state == D_COLLECT1 && rop_px_ready);
  assign fl_in_data  = (state == D_INIT) ? TW'(init_cnt) : ctask[cg];

  // output buffer word of the core that ran vertex v
  vec4_t o;
  assign o = core_out_data[vcore[v]];

  // ---------------- sequential control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_INIT;
      init_cnt <= '0;
      v <= '0; a <= '0; cg <= '0; rr <= '0; cur_task <= '0;
      assigned <= '0; finished <= '0; raster_done <= 1'b0;
      n_vthreads <= '0; n_pthreads <= '0; n_approx <= '0; n_tiles <= '0; n_task_stall <= '0;
      pos_q <= '0;
      for (int i = 0; i < 3; i++) begin
        idx[i] <= '0; vcore[i] <= '0; r_vx[i] <= '0; r_vy[i] <= '0;
        for (int s = 0; s < NS; s++) r_vs[i][s] <= '0;
      end
      for (int i = 0; i < NCORE; i++) ctask[i] <= '0;
    end else begin
      finished <= finished | core_done;
      if (r_tri_done) raster_done <= 1'b1;
      if (state == D_RPIX && r_pix_valid && pix_shade && !fl_out_valid) n_task_stall <= n_task_stall + 1;
      unique case (state)
        D_INIT: begin
          init_cnt <= init_cnt + 1'b1;
          if (int'(init_cnt) == NTASK) state <= D_IDLE;
        end
        D_IDLE: if (tri_valid) begin
          idx <= tri_idx;
          v <= '0; a <= '0;
          state <= D_VF_REQ;
        end
        D_VF_REQ: if (vf_req_ready) state <= D_VF_WAIT;
        D_VF_WAIT: if (vf_rsp_valid) begin
          if (int'(a) == NATTR - 1) begin
            a <= '0;
            if (v == 2'd2) begin v <= '0; state <= D_VISSUE; end
            else begin v <= v + 1'b1; state <= D_VF_REQ; end
          end else begin
            a <= a + 1'b1;
            state <= D_VF_REQ;
          end
        end
        D_VISSUE: if (free_any) begin
          if (int'(a) == NATTR) begin
            assigned[free_core] <= 1'b1;
            finished[free_core] <= 1'b0;
            vcore[v] <= free_core;
            rr <= CW'((int'(free_core) + 1) % NCORE);
            n_vthreads <= n_vthreads + 1;
            a <= '0;
            if (v == 2'd2) state <= D_VWAIT;
            else v <= v + 1'b1;
          end else a <= a + 1'b1;
        end
        D_VWAIT: if (finished[vcore[0]] && finished[vcore[1]] && finished[vcore[2]]) begin
          v <= '0; a <= '0;
          state <= D_VCOLLECT;
        end
        D_VCOLLECT: begin
          if (a == 3'd0) begin
            r_vx[v] <= 16'(f32_to_fix(o[0]) >>> 16);
            r_vy[v] <= 16'(f32_to_fix(o[1]) >>> 16);
            r_vs[v][0] <= f32_to_fix(o[2]);
          end else begin
            for (int l = 0; l < 4; l++) r_vs[v][1 + 4*(int'(a) - 1) + l] <= f32_to_fix(o[l]);
          end
          if (int'(a) == NVAR) begin
            a <= '0;
            assigned[vcore[v]] <= 1'b0;
            finished[vcore[v]] <= 1'b0;
            if (v == 2'd2) begin
              state <= D_RSETUP;
              raster_done <= 1'b0;
            end else v <= v + 1'b1;
          end else a <= a + 1'b1;
        end
        D_RSETUP: if (r_tri_ready) state <= D_RPIX;
        D_RPIX: begin
          if (pix_fire) begin
            if (!pix_shade) n_approx <= n_approx + 1;
            if (r_pix_last) begin
              state <= D_SHADE;
              n_tiles <= n_tiles + 1;
            end
          end else if (raster_done && !r_pix_valid) state <= D_IDLE;
        end
        D_SHADE: begin
          if (fin_any) begin
            cg <= fin_core;
            state <= D_COLLECT0;
          end else if (sq_out_valid && free_any) begin
            cg <= free_core;
            cur_task <= sq_out_data;
            rr <= CW'((int'(free_core) + 1) % NCORE);
            a <= '0;
            state <= D_ISSUE;
          end else if (!sq_out_valid && assigned == '0) begin
            state <= D_APPROX;
          end
        end
        D_ISSUE: begin
          if (int'(a) == 1 + int'(NVAR)) begin
            assigned[cg] <= 1'b1;
            finished[cg] <= 1'b0;
            ctask[cg]    <= cur_task;
            n_pthreads   <= n_pthreads + 1;
            a <= '0;
            state <= D_SHADE;
          end else a <= a + 1'b1;
        end
        D_COLLECT0: begin
          pos_q <= core_out_data[cg];
          state <= D_COLLECT1;
        end
        D_COLLECT1: if (rop_px_ready) begin
          assigned[cg] <= 1'b0;
          finished[cg] <= 1'b0;
          state <= D_SHADE;
        end
        D_APPROX: if (!ap_out_valid) state <= D_TILE_END;
        D_TILE_END: state <= D_RPIX;
        default: state <= D_IDLE;
      endcase
    end
  end
endmodule

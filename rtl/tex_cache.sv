// tex_cache: blocking, direct-mapped, read-only texture cache.
//
// Used as each shader cluster's texture L1 cache and, with a line-wide
// response, as the array of the shared texture L2 cache. Requests carry a
// 32-bit word address; a hit answers on the next cycle with the word and the
// whole line; a miss requests the line (line address = word address /
// LINE_WORDS) from the next level, fills it and then answers. One request
// is handled at a time. n_req counts accepted requests and n_fill counts
// line updates (the "cache updates" the approximated texturing technique
// reduces). Organisation (direct-mapped, LINE_WORDS words per line, no
// write path) is this design's choice; the source gives only the L2 size.
module tex_cache #(
  parameter int unsigned LINES      = 256,  // 256 x 4 words x 4 B = 4 KB
  parameter int unsigned LINE_WORDS = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  logic                       req_valid,
  output logic                       req_ready,
  input  logic [31:0]                req_addr,
  output logic                       rsp_valid,
  output logic [31:0]                rsp_data,
  output logic [LINE_WORDS*32-1:0]   rsp_line,
  output logic                       mem_req_valid,
  input  logic                       mem_req_ready,
  output logic [31:0]                mem_req_addr,
  input  logic                       mem_rsp_valid,
  input  logic [LINE_WORDS*32-1:0]   mem_rsp_data,
  output logic [31:0]                n_req,
  output logic [31:0]                n_fill
);
  localparam int unsigned OW = $clog2(LINE_WORDS);
  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned TW = 32 - OW - IW;

  logic [LINE_WORDS*32-1:0] data [LINES];
  logic [TW-1:0]            tag  [LINES];
  logic [LINES-1:0]         vld;

  typedef enum logic [1:0] { C_IDLE, C_REQ, C_WAIT } state_e;
  state_e state;
  logic [31:0] addr_q;

  wire [IW-1:0] idx_in  = req_addr[OW +: IW];
  wire [TW-1:0] tag_in  = req_addr[31 -: TW];
  wire [IW-1:0] idx_q   = addr_q[OW +: IW];
  wire          hit     = vld[idx_in] && tag[idx_in] == tag_in;

  assign req_ready     = state == C_IDLE && !flush;
  assign mem_req_valid = state == C_REQ;
  assign mem_req_addr  = addr_q >> OW;

  always_ff @(posedge clk) begin
    if (state == C_WAIT && mem_rsp_valid) begin
      data[idx_q] <= mem_rsp_data;
      tag[idx_q]  <= addr_q[31 -: TW];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= C_IDLE;
      vld       <= '0;
      addr_q    <= '0;
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
      rsp_line  <= '0;
      n_req     <= '0;
      n_fill    <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        C_IDLE: if (flush) vld <= '0;
          else if (req_valid) begin
          n_req  <= n_req + 1;
          addr_q <= req_addr;
          if (hit) begin
            rsp_valid <= 1'b1;
            rsp_line  <= data[idx_in];
            rsp_data  <= data[idx_in][req_addr[OW-1:0]*32 +: 32];
          end else state <= C_REQ;
        end
        C_REQ: if (mem_req_ready) state <= C_WAIT;
        C_WAIT: if (mem_rsp_valid) begin
          vld[idx_q] <= 1'b1;
          n_fill    <= n_fill + 1;
          rsp_valid <= 1'b1;
          rsp_line  <= mem_rsp_data;
          rsp_data  <= mem_rsp_data[addr_q[OW-1:0]*32 +: 32];
          state     <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule

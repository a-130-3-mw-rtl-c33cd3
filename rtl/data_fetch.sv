// data_fetch: the GPU's external memory access unit.
//
// Serves NCLI on-chip clients that read whole lines (the texture L2 cache
// and the task dispatcher's vertex attribute fetch). A round-robin arbiter
// picks one line request; the unit then reads its LINE_WORDS 32-bit words
// from the external bus one after another (word address = line address *
// LINE_WORDS + i), assembles the line and returns it. External bus: one
// outstanding read, ext_req_valid/ready/addr and ext_rsp_valid/data. The bus
// protocol and the line assembly are this design's choices; the source only
// says the unit accesses external memory.
module data_fetch #(
  parameter int unsigned NCLI       = 2,
  parameter int unsigned LINE_WORDS = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NCLI-1:0]          cli_req_valid,
  output logic [NCLI-1:0]          cli_req_ready,
  input  logic [31:0]              cli_req_addr [NCLI],
  output logic [NCLI-1:0]          cli_rsp_valid,
  output logic [LINE_WORDS*32-1:0] cli_rsp_data,
  output logic                     ext_req_valid,
  input  logic                     ext_req_ready,
  output logic [31:0]              ext_req_addr,
  input  logic                     ext_rsp_valid,
  input  logic [31:0]              ext_rsp_data,
  output logic [31:0]              n_words
);
  localparam int unsigned OW = $clog2(LINE_WORDS);
  logic                     l_valid, l_ready, l_rsp_valid;
  logic [31:0]              l_addr;
  logic [LINE_WORDS*32-1:0] line;

  line_arbiter #(.N(NCLI), .LINE_W(LINE_WORDS*32)) u_arb (
    .clk, .rst_n, .cli_req_valid, .cli_req_ready, .cli_req_addr, .cli_rsp_valid, .cli_rsp_data,
    .dn_req_valid(l_valid), .dn_req_ready(l_ready), .dn_req_addr(l_addr),
    .dn_rsp_valid(l_rsp_valid), .dn_rsp_data(line));

  typedef enum logic [1:0] { D_IDLE, D_ISSUE, D_WAIT, D_DONE } state_e;
  state_e state;
  logic [31:0]   base;
  logic [OW-1:0] w;

  assign l_ready       = state == D_IDLE;
  assign ext_req_valid = state == D_ISSUE;
  assign ext_req_addr  = (base << OW) + 32'(w);
  assign l_rsp_valid   = state == D_DONE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_IDLE; base <= '0; w <= '0; line <= '0; n_words <= '0;
    end else begin
      unique case (state)
        D_IDLE: if (l_valid) begin base <= l_addr; w <= '0; state <= D_ISSUE; end
        D_ISSUE: if (ext_req_ready) state <= D_WAIT;
        D_WAIT: if (ext_rsp_valid) begin
          line[w*32 +: 32] <= ext_rsp_data;
          n_words <= n_words + 1;
          if (int'(w) == LINE_WORDS - 1) state <= D_DONE;
          else begin w <= w + 1'b1; state <= D_ISSUE; end
        end
        D_DONE: state <= D_IDLE;
        default: state <= D_IDLE;
      endcase
    end
  end
endmodule

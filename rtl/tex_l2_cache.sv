// tex_l2_cache: shared texture L2 cache of the GPU (64 KB by default, the
// size the source gives), behind a round-robin arbiter that takes line
// requests from the NPORT texture L1 caches. A request is a line address;
// the response is the whole line. Misses go to the data fetch unit as line
// requests. Organisation: direct-mapped, LINES x LINE_WORDS 32-bit words
// (this design's choice). n_req/n_fill count accesses and line updates.
module tex_l2_cache #(
  parameter int unsigned NPORT      = 4,
  parameter int unsigned LINES      = 4096,   // 4096 x 16 B = 64 KB
  parameter int unsigned LINE_WORDS = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      flush,
  input  logic [NPORT-1:0]          l1_req_valid,
  output logic [NPORT-1:0]          l1_req_ready,
  input  logic [31:0]               l1_req_addr [NPORT],
  output logic [NPORT-1:0]          l1_rsp_valid,
  output logic [LINE_WORDS*32-1:0]  l1_rsp_data,
  output logic                      mem_req_valid,
  input  logic                      mem_req_ready,
  output logic [31:0]               mem_req_addr,
  input  logic                      mem_rsp_valid,
  input  logic [LINE_WORDS*32-1:0]  mem_rsp_data,
  output logic [31:0]               n_req,
  output logic [31:0]               n_fill
);
  localparam int unsigned OW = $clog2(LINE_WORDS);
  logic                     a_valid, a_ready, c_rsp_valid;
  logic [31:0]              a_addr, c_word;
  logic [LINE_WORDS*32-1:0] c_line;

  line_arbiter #(.N(NPORT), .LINE_W(LINE_WORDS*32)) u_arb (
    .clk, .rst_n,
    .cli_req_valid(l1_req_valid), .cli_req_ready(l1_req_ready), .cli_req_addr(l1_req_addr),
    .cli_rsp_valid(l1_rsp_valid), .cli_rsp_data(l1_rsp_data),
    .dn_req_valid(a_valid), .dn_req_ready(a_ready), .dn_req_addr(a_addr),
    .dn_rsp_valid(c_rsp_valid), .dn_rsp_data(c_line));

  // line address -> word address of the line's first word
  tex_cache #(.LINES(LINES), .LINE_WORDS(LINE_WORDS)) u_array (
    .clk, .rst_n, .flush,
    .req_valid(a_valid), .req_ready(a_ready), .req_addr(a_addr << OW),
    .rsp_valid(c_rsp_valid), .rsp_data(c_word), .rsp_line(c_line),
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_rsp_valid, .mem_rsp_data,
    .n_req, .n_fill);

  // the word output of the array is not needed at line granularity
  logic unused_word;
  assign unused_word = ^c_word;
endmodule

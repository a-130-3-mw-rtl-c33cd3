// line_arbiter: round-robin arbiter for N requesters of whole cache lines.
//
// Grants one requester at a time and keeps the grant until the line comes
// back (one outstanding request), then moves priority past the granted
// requester. Used in front of the texture L2 cache (four L1 caches) and in
// the data fetch unit. Requests: cli_req_valid/ready/addr; the response
// (dn_rsp_valid/data) is routed to the granted requester only.
module line_arbiter #(
  parameter int unsigned N     = 4,
  parameter int unsigned LINE_W = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      cli_req_valid,
  output logic [N-1:0]      cli_req_ready,
  input  logic [31:0]       cli_req_addr [N],
  output logic [N-1:0]      cli_rsp_valid,
  output logic [LINE_W-1:0] cli_rsp_data,
  output logic              dn_req_valid,
  input  logic              dn_req_ready,
  output logic [31:0]       dn_req_addr,
  input  logic              dn_rsp_valid,
  input  logic [LINE_W-1:0] dn_rsp_data
);
  localparam int unsigned GW = (N > 1) ? $clog2(N) : 1;
  logic [GW-1:0] grant, prio;
  logic          busy, sent;
  logic [GW-1:0] pick;
  logic          any;

  always_comb begin
    pick = prio; any = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      int c;
      c = (int'(prio) + i) % N;
      if (cli_req_valid[c]) begin pick = GW'(c); any = 1'b1; end
    end
  end

  assign dn_req_valid = busy && !sent;
  assign dn_req_addr  = cli_req_addr[grant];
  assign cli_rsp_data = dn_rsp_data;
  always_comb begin
    cli_req_ready = '0;
    cli_rsp_valid = '0;
    if (busy && !sent) cli_req_ready[grant] = dn_req_ready;
    if (busy) cli_rsp_valid[grant] = dn_rsp_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grant <= '0; prio <= '0; busy <= 1'b0; sent <= 1'b0;
    end else begin
      if (!busy) begin
        if (any) begin grant <= pick; busy <= 1'b1; sent <= 1'b0; end
      end else begin
        if (dn_req_valid && dn_req_ready) sent <= 1'b1;
        if (sent && dn_rsp_valid) begin
          busy <= 1'b0;
          prio <= GW'((int'(grant) + 1) % N);
        end
      end
    end
  end
endmodule

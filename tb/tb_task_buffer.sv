// tb_task_buffer: checks the task buffer (32 task records of four vec4
// slots) with random single-slot writes and whole-record writes against a
// model; reads are combinational and must return the latest data written
// before the current clock edge.
module tb_task_buffer;
  import gpu_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en = 0, wr_all = 0;
  logic [4:0] wr_id = 0, rd_id = 0;
  logic [1:0] wr_slot = 0, rd_slot = 0;
  vec4_t wr_vec = '0, rd_vec;
  vec4_t wr_rec [4];
  vec4_t model [32][4];

  task_buffer #(.NTASK(32), .NSLOT(4)) dut (.clk, .wr_en, .wr_all, .wr_id, .wr_slot, .wr_vec, .wr_rec, .rd_id, .rd_slot, .rd_vec);

  initial begin
    #(64'd2_000_000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic vec4_t rv();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    for (int s = 0; s < 4; s++) wr_rec[s] = '0;
    // initialise every record
    for (int t = 0; t < 32; t++) begin
      @(negedge clk); wr_en = 1; wr_all = 1; wr_id = 5'(t);
      for (int s = 0; s < 4; s++) begin wr_rec[s] = rv(); model[t][s] = wr_rec[s]; end
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1); wr_all = $urandom_range(0, 3) == 0;
      wr_id = 5'($urandom); wr_slot = 2'($urandom); wr_vec = rv();
      for (int s = 0; s < 4; s++) wr_rec[s] = rv();
      rd_id = (n % 4 == 0) ? wr_id : 5'($urandom); rd_slot = 2'($urandom);
      #1;
      checks++;
      if (rd_vec != model[rd_id][rd_slot]) begin
        failures++;
        if (failures < 10) $display("FAIL: read task %0d slot %0d", rd_id, rd_slot);
      end
      @(posedge clk);
      if (wr_en) begin
        if (wr_all) for (int s = 0; s < 4; s++) model[wr_id][s] = wr_rec[s];
        else model[wr_id][wr_slot] = wr_vec;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

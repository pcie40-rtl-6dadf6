// tb_fpga_buffer: self-checking test of fpga_buffer.
// Random pushes and pops on a 16-entry buffer, compared with a queue model:
// head data and address, count, full/empty flags and the peek port.
// Expected behaviour follows the block's header comment; stimulus, reduced
// parameter values and check counts are this test's own choices.
module tb_fpga_buffer;
  logic clk = 0, rst_n = 0;
  logic wr_valid, wr_ready, rd_valid, rd_ready;
  logic [255:0] wr_data, rd_data;
  logic [9:0] wr_addr, rd_addr, peek_addr;
  logic [3:0] peek_off;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [265:0] q[$];

  always #5 clk = ~clk;

  fpga_buffer #(.DEPTH(16), .AW(10)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; rd_ready = 0; wr_data = 0; wr_addr = 0; peek_off = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // phases: fill, drain, mixed
      wr_valid = (t % 600 < 200) ? 1'b1 : (t % 600 < 400) ? 1'b0 : ($urandom_range(0, 1) == 1);
      rd_ready = (t % 600 < 200) ? 1'b0 : (t % 600 < 400) ? 1'b1 : ($urandom_range(0, 1) == 1);
      wr_data = {8{$urandom}};
      wr_addr = 10'($urandom);
      peek_off = 4'($urandom_range(0, 15));
      #1;
      checks += 4;
      if (count !== 5'(q.size())) begin failures++; if (failures < 50) $display("count %0d exp %0d", count, q.size()); end
      if (wr_ready !== (q.size() < 16)) begin failures++; if (failures < 50) $display("wr_ready wrong"); end
      if (rd_valid !== (q.size() > 0)) begin failures++; if (failures < 50) $display("rd_valid wrong"); end
      if (q.size() > 0 && {rd_addr, rd_data} !== q[0]) begin failures++; if (failures < 50) $display("head wrong"); end
      if (int'(peek_off) < q.size()) begin
        checks++;
        if (peek_addr !== q[peek_off][265:256]) begin failures++; if (failures < 50) $display("peek wrong"); end
      end
      @(posedge clk);
      if (rd_valid && rd_ready) void'(q.pop_front());
      if (wr_valid && wr_ready) q.push_back({wr_addr, wr_data});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

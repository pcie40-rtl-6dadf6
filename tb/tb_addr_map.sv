// tb_addr_map: self-checking test of addr_map.
// Programs every entry of a small map (64 KiB buffer of 4 KiB blocks) with a
// shuffled set of physical block addresses, then checks random linear offsets
// on both read ports against base[offset / block] + offset % block.
// Expected behaviour follows the block's header comment; stimulus, reduced
// parameter values and check counts are this test's own choices.
module tb_addr_map;
  logic clk = 0, we = 0;
  logic [3:0] widx = 0;
  logic [63:0] wbase = 0;
  logic [31:0] lin [2];
  logic [63:0] phys [2];
  logic [63:0] bases [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  addr_map #(.HOST_LOG2(16), .BLOCK_LOG2(12), .NPORTS(2)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lin[0] = 0; lin[1] = 0;
    for (int i = 0; i < 16; i++) bases[i] = {20'h0, $urandom_range(0, 1 << 20), 12'h000} + 64'h1_0000_0000 * (i % 3);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); we = 1; widx = 4'(15 - i); wbase = bases[15 - i];
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 500; t++) begin
      lin[0] = 32'($urandom_range(0, 65535));
      lin[1] = 32'($urandom_range(0, 65535));
      #1;
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (phys[p] !== bases[lin[p][15:12]] + 64'(lin[p][11:0])) begin
          failures++; if (failures < 50) $display("port %0d lin %h -> %h", p, lin[p], phys[p]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

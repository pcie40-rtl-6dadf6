// tb_dma_writer: self-checking test of dma_writer.
// A 64 KiB circular buffer mapped by 8 KiB descriptors onto scattered
// physical pages; words are pushed in runs with forward jumps, the TX port
// stalls at random and a host model returns the read offset late.  Every TLP
// beat is checked against the word and physical address it should carry;
// TLPs must be 1..8 words inside one 256-byte chunk with sop/eop in place,
// and must never overrun the host's read offset.  Checks the flush of a
// partial chunk after FLUSH_TIMEOUT idle cycles and the 8-cycle duration of a
// full TLP.
// Expected behaviour follows the block's header comment; stimulus, reduced
// parameter values and check counts are this test's own choices.
module tb_dma_writer;
  import pcie40_pkg::*;

  localparam int HL = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, tlp_valid, tlp_ready, map_inval = 0;
  wr_word_t in;
  logic [31:0] rd_off, map_lin, sent_ptr, words_sent, tlp_cnt;
  logic [63:0] map_phys;
  tlp_t tlp;
  int checks = 0, failures = 0;
  logic [63:0] pages [8];
  bit stall_tx = 1;

  always #5 clk = ~clk;

  dma_writer #(.DEPTH(64), .HOST_LOG2(HL), .FLUSH_TIMEOUT(40)) dut (.*);

  assign map_phys = pages[map_lin[15:13]] + 64'(map_lin[12:0]);

  typedef struct { logic [255:0] d; logic [31:0] lin; bit jump; } ent_t;
  ent_t drv_q[$];
  ent_t exp_q[$];
  int beat = 0, cur_len = 0, big = 0, space_stall = 0;
  always_ff @(posedge clk) if (rst_n && dut.rd_valid && dut.need > 17'h10000) space_stall++;
  logic [31:0] cur_lin;

  always_comb begin
    in_valid = rst_n && drv_q.size() > 0;
    in.data = (drv_q.size() > 0) ? drv_q[0].d : '0;
    in.jump = (drv_q.size() > 0) ? drv_q[0].jump : 1'b0;
    in.addr = (drv_q.size() > 0) ? drv_q[0].lin : '0;
  end
  always_ff @(posedge clk) if (rst_n && in_valid && in_ready) exp_q.push_back(drv_q.pop_front());
  always_ff @(posedge clk) tlp_ready <= stall_tx ? ($urandom_range(0, 3) != 0) : 1'b1;

  // host: read offset follows sent_ptr after a delay
  int lag = 0;
  always_ff @(posedge clk) begin
    if (!rst_n) begin rd_off <= 0; lag <= 0; end
    else begin
      lag <= lag + 1;
      if (lag == 2500) begin rd_off <= sent_ptr; lag <= 0; end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && tlp_valid && tlp_ready) begin
      ent_t e;
      checks++;
      if (tlp.sop) begin
        cur_len = int'(tlp.len);
        if (beat != 0) begin failures++; if (failures < 50) $display("sop mid TLP"); end
        if (exp_q.size() == 0) begin failures++; if (failures < 50) $display("TLP with nothing pushed"); end
        else cur_lin = exp_q[0].lin;
        if (cur_len < 1 || cur_len > 8 || (cur_lin % 256) / 32 + cur_len > 8) begin
          failures++; if (failures < 50) $display("bad TLP length %0d at %h", cur_len, cur_lin);
        end
        // never write into data the host has not read yet
        if (((cur_lin + 32 * cur_len - rd_off) & 32'hFFFF) == 0 ||
            ((cur_lin - rd_off) & 32'hFFFF) > 32'hFFFF - 32 * cur_len) begin
          failures++; if (failures < 50) $display("overrun: lin %h rd_off %h", cur_lin, rd_off);
        end
        if (cur_len == 8) big++;
      end
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        if (tlp.data !== e.d || tlp.addr !== pages[cur_lin[15:13]] + 64'(cur_lin[12:0]) ||
            e.lin != cur_lin + 32 * beat ||
            tlp.len != 4'(cur_len) || tlp.eop !== (beat == cur_len - 1)) begin
          failures++;
          $display("beat mismatch lin %h TLP addr %h", e.lin, tlp.addr);
        end
      end
      beat = tlp.eop ? 0 : beat + 1;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] lin;
    int t0, t1;
    for (int i = 0; i < 8; i++) pages[i] = 64'h0000_0040_0000_0000 + 64'(i * 7 % 8) * 64'h20_0000 + 64'h2000;
    lin = 0;
    // about five laps of the 64 KiB buffer, with jumps of 1..40 words
    for (int i = 0; i < 10000; i++) begin
      ent_t e;
      e.d = {8{$urandom}};
      e.jump = (i % 97 == 50);
      if (e.jump) lin = (lin + 32 * $urandom_range(1, 40)) & 32'hFFFF;
      e.lin = lin;
      drv_q.push_back(e);
      lin = (lin + 32) & 32'hFFFF;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (drv_q.size() == 0 && exp_q.size() == 0);
    checks++;
    if (big == 0) begin failures++; if (failures < 50) $display("no full-size TLP"); end
    checks++;
    if (space_stall == 0) begin failures++; if (failures < 50) $display("buffer-full stall never happened"); end
    // flush timeout: three words that do not fill a chunk
    stall_tx = 0;
    repeat (100) @(posedge clk);
    lin = sent_ptr;
    if (lin[7:5] > 3'd4) lin = {lin[31:8] + 24'd1, 8'd0};
    for (int i = 0; i < 3; i++) begin
      ent_t e; e.d = {8{$urandom}}; e.jump = (i == 0); e.lin = lin + 32 * i; drv_q.push_back(e);
    end
    t0 = $time;
    wait (tlp_valid);
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 < 40 || (t1 - t0) / 10 > 48) begin
      failures++; if (failures < 50) $display("flush after %0d cycles, expected about 40", (t1 - t0) / 10);
    end
    wait (exp_q.size() == 0);
    // a full chunk goes out as one 8-beat TLP in 8 cycles
    repeat (50) @(posedge clk);
    lin = {sent_ptr[31:8] + 24'd1, 8'd0} & 32'hFFFF;
    for (int i = 0; i < 8; i++) begin
      ent_t e; e.d = {8{$urandom}}; e.jump = (i == 0); e.lin = lin + 32 * i; drv_q.push_back(e);
    end
    wait (tlp_valid);
    t0 = $time;
    wait (!tlp_valid);
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 != 8) begin failures++; if (failures < 50) $display("full TLP took %0d cycles", (t1 - t0) / 10); end
    repeat (5) @(posedge clk);
    checks++;
    if (words_sent != 32'd10011) begin failures++; if (failures < 50) $display("words_sent %0d", words_sent); end
    $display("TLPs %0d, full-size %0d, cycles stalled on a full host buffer %0d", tlp_cnt, big, space_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

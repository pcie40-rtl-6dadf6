// tb_tx_arbiter: self-checking test of tx_arbiter.
// Three sources offer TLPs of 1..8 beats (data tagged with source and
// sequence number) while the output stalls at random.  Checks that TLPs are
// never interleaved (also when a source pauses mid-TLP), each source's beats arrive complete and in order, and
// that with all sources busy the grants rotate 0,1,2,0,...
// Expected behaviour follows the block's header comment; stimulus, reduced
// parameter values and check counts are this test's own choices.
module tb_tx_arbiter;
  import pcie40_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid [N];
  logic in_ready [N];
  tlp_t in [N];
  logic out_valid, out_ready;
  tlp_t out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tx_arbiter #(.N(N)) dut (.*);

  tlp_t src_q [N][$];
  int cur = -1, last_src = -1, rot_ok = 0, rot_bad = 0;

  for (genvar i = 0; i < N; i++) begin : g_src
    always_comb begin
      in_valid[i] = rst_n && src_q[i].size() > 0 && !gap[i];
      in[i] = (src_q[i].size() > 0) ? src_q[i][0] : '0;
    end
  end
  always_ff @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);
  // Sources pause at random, also between beats of one TLP: the grant must
  // stay with the source until its eop beat.
  logic gap [N];
  always_ff @(posedge clk) for (int i = 0; i < N; i++) gap[i] <= ($urandom_range(0, 4) == 0);

  always_ff @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int s;
      tlp_t e;
      s = int'(out.data[255:248]);
      checks++;
      if (out.sop) begin
        if (cur != -1) begin failures++; if (failures < 50) $display("interleaved TLP"); end
        cur = s;
        if (last_src != -1) begin
          if (s == (last_src + 1) % N) rot_ok++; else rot_bad++;
        end
      end
      if (s != cur || s >= N) begin failures++; if (failures < 50) $display("beat from source %0d inside TLP of %0d", s, cur); end
      else begin
        e = src_q[s].pop_front();
        if (out !== e) begin failures++; if (failures < 50) $display("beat mismatch from %0d", s); end
      end
      if (out.eop) begin last_src = cur; cur = -1; end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++)
      for (int t = 0; t < 200; t++) begin
        int len;
        len = $urandom_range(1, 8);
        for (int b = 0; b < len; b++) begin
          tlp_t x;
          x.addr = 64'(t); x.len = 4'(len); x.sop = (b == 0); x.eop = (b == len - 1);
          x.data = {8'(i), 16'(t), 8'(b), 224'($urandom)};
          src_q[i].push_back(x);
        end
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (src_q[0].size() == 0 && src_q[1].size() == 0 && src_q[2].size() == 0);
    repeat (20) @(posedge clk);
    checks++;
    if (rot_bad > 150) begin failures++; if (failures < 50) $display("grant did not rotate: %0d ok, %0d not", rot_ok, rot_bad); end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (src_q[i].size() != 0) begin failures++; if (failures < 50) $display("source %0d beats missing", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

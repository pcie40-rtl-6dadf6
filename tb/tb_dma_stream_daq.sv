// tb_dma_stream_daq: end-to-end test of one DMA stream in its three modes.
// A 256 KiB host buffer of 16 KiB scattered blocks (host_consumer plays the
// host) and a 2 KiB FPGA buffer keep the run short but make the stream wrap
// around the circular buffer and stall on it in every mode.
//   byte mode   9003 random words (the last three flushed by the timeout)
//   packet mode 1500 packets, some cut short, some too long, with EVID holes
//   block mode  MFPs of 7 fragments (odd header length) with EVID holes
// The host model checks the data it parses against what was sent, after
// truncation and throttle compensation as the stream must apply them; the
// test checks the correction counters and the final write offset.
// Expected behaviour follows the block's header comment; stimulus, reduced
// parameter values and check counts are this test's own choices.
module tb_dma_stream_daq;
  import pcie40_pkg::*;
  import tb_host_pkg::*;

  localparam int HL = 18, BL = 14;
  logic clk = 0, rst_n = 0;
  stream_mode_e mode = MODE_BYTE;
  logic [15:0] pack_n = 7, srcid = 16'h0ABC;
  logic [7:0] fversion = 8'd1;
  logic in_valid, in_ready, tlp_valid, tlp_ready, map_we = 0;
  frag_t in;
  logic [31:0] rd_off, wr_off, trunc_cnt, insert_cnt, resync_cnt, blocks_done;
  logic [15:0] map_idx = 0;
  logic [63:0] map_base = 0;
  tlp_t tlp;
  int hchecks, hfail, words_seen, mfps_seen, wraps;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dma_stream_daq #(.DEPTH(64), .HOST_LOG2(HL), .BLOCK_LOG2(BL), .NMAX(64),
                   .META_DEPTH(16), .MAX_GAP(64), .FLUSH_TIMEOUT(32)) dut (.*);

  host_consumer #(.HOST_LOG2(HL), .BLOCK_LOG2(BL)) u_host (
    .clk, .rst_n, .mode (mode), .pack_n, .srcid, .fversion,
    .tlp_valid, .tlp_ready, .ext_ready (1'b0), .tlp, .wr_off, .rd_off,
    .checks (hchecks), .failures (hfail), .words_seen, .mfps_seen, .wraps
  );

  frag_t drv_q[$];
  always_comb begin
    in_valid = rst_n && drv_q.size() > 0;
    in = (drv_q.size() > 0) ? drv_q[0] : '0;
  end
  always_ff @(posedge clk) if (rst_n && in_valid && in_ready) void'(drv_q.pop_front());

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 50) $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic restart(input stream_mode_e m);
    @(negedge clk);
    rst_n = 0; mode = m;
    repeat (3) @(negedge clk);
    for (int i = 0; i < (1 << (HL - BL)); i++) begin
      map_we = 1; map_idx = 16'(i); map_base = u_host.block_phys(i);
      @(negedge clk);
    end
    map_we = 0;
  endtask

  task automatic finish_phase(input string name);
    int t;
    t = 0;
    while ((drv_q.size() != 0 || u_host.exp_words.size() != 0 || u_host.exp_frags.size() != 0) && t < 400000) begin
      @(posedge clk); t++;
    end
    repeat (200) @(posedge clk);
    expect_eq({name, ": data left unparsed"}, u_host.exp_words.size() + u_host.exp_frags.size(), 0);
    $display("%s: words %0d, MFPs %0d, wraps %0d, truncations %0d, inserted %0d",
             name, words_seen, mfps_seen, wraps, trunc_cnt, insert_cnt);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks + hchecks, failures + hfail);
    $finish;
  end

  initial begin
    int exp_tr, exp_ins, w0;
    logic [63:0] ev;
    // ---------------- byte mode
    restart(MODE_BYTE);
    rst_n = 1;
    for (int i = 0; i < 9003; i++) begin
      frag_t b;
      b = '0; b.data = {8{$urandom}};
      drv_q.push_back(b); u_host.exp_words.push_back(b.data);
    end
    finish_phase("byte");
    expect_eq("byte wr_off", wr_off, (9003 * 32) % (1 << HL));
    expect_eq("byte wraps", wraps > 0, 1);
    // ---------------- packet mode
    restart(MODE_PACKET);
    w0 = words_seen;
    exp_tr = 0; exp_ins = 0; ev = 64'd500;
    for (int p = 0; p < 1500; p++) begin
      logic [15:0] size;
      int w, n;
      logic [255:0] d;
      if (p % 13 == 5) begin
        int g;
        g = $urandom_range(1, 4);
        for (int k = 0; k < g; k++) u_host.exp_words.push_back({ev + 64'(k), 192'd0});
        ev += 64'(g); exp_ins += g;
      end
      size = 16'($urandom_range(1, 200));
      w = int'(words_of(size));
      n = (p % 9 == 2) ? $urandom_range(1, w) : (p % 9 == 4) ? w + 2 : w;
      if (n != w) exp_tr++;
      for (int j = 0; j < n; j++) begin
        frag_t b;
        d = {ev, 8'h00, 8'(size >> 8), 8'(size), 8'h5A, 32'(p), 32'(j), 64'($urandom), 32'($urandom)};
        b.data = d; b.sop = (j == 0); b.eop = (j == n - 1);
        b.evid = ev; b.ftype = 8'h5A; b.size = size;
        drv_q.push_back(b);
        if (j < w) u_host.exp_words.push_back(d);
      end
      for (int j = n; j < w; j++) u_host.exp_words.push_back('0);
      ev++;
    end
    rst_n = 1;
    finish_phase("packet");
    expect_eq("truncations", trunc_cnt, exp_tr);
    expect_eq("inserted", insert_cnt, exp_ins);
    // ---------------- block mode
    restart(MODE_BLOCK);
    exp_ins = 0; ev = 64'h77_0000;
    for (int f = 0; f < 7 * 400; f++) begin
      frag_s s;
      int w;
      if (f % 17 == 9) begin
        frag_s z;
        z.evid = ev; z.ty = 8'h00; z.size = 0;
        u_host.exp_frags.push_back(z); ev++; exp_ins++; f++;
      end
      s.evid = ev; s.ty = 8'($urandom); s.size = 16'($urandom_range(0, 200));
      w = int'(words_of(s.size));
      for (int j = 0; j < 8; j++) s.w[j] = {8{$urandom}};
      for (int j = 0; j < w; j++) begin
        frag_t b;
        b.data = s.w[j]; b.sop = (j == 0); b.eop = (j == w - 1);
        b.evid = s.evid; b.ftype = s.ty; b.size = s.size;
        drv_q.push_back(b);
      end
      u_host.exp_frags.push_back(s);
      ev++;
    end
    rst_n = 1;
    finish_phase("block");
    expect_eq("inserted", insert_cnt, exp_ins);
    expect_eq("blocks", blocks_done, 400);
    expect_eq("block wraps", wraps > 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks + hchecks, failures + hfail);
    $finish;
  end
endmodule

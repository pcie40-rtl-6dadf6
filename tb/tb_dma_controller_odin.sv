// tb_dma_controller_odin: test of a DMA controller in the ODIN flavor, where
// five ODIN streams share one TX port.  Stream 0 carries the META group and
// runs in block mode (60 MFPs of 8 fragments); streams 1-4 run in packet mode,
// stream 3 with EVID holes that throttle compensation must fill.  Reduced
// sizes: 32 KiB host buffers of 8 KiB blocks, 16-word FPGA buffers.  Five
// host models watch the shared port, each keeping the writes of its own
// physical range, and check what they parse; the test also checks that all
// five buffers wrapped around, all
// five streams got TLPs through and that the port changed hands often.
// Expected behaviour follows the block's header comment; stimulus, reduced
// parameter values and check counts are this test's own choices.
module tb_dma_controller_odin;
  import pcie40_pkg::*;
  import tb_host_pkg::*;

  localparam int OHL = 15, BL = 13, NS = 5;
  logic clk = 0, rst_n = 0;
  stream_mode_e mode        [MAX_STREAMS];
  logic [15:0]  pack_n      [MAX_STREAMS];
  logic [15:0]  srcid       [MAX_STREAMS];
  logic [7:0]   fversion    [MAX_STREAMS];
  logic         in_valid    [MAX_STREAMS];
  logic         in_ready    [MAX_STREAMS];
  frag_t        in          [MAX_STREAMS];
  logic [31:0]  rd_off      [MAX_STREAMS];
  logic [31:0]  wr_off      [MAX_STREAMS];
  logic [31:0]  trunc_cnt   [MAX_STREAMS];
  logic [31:0]  insert_cnt  [MAX_STREAMS];
  logic [31:0]  blocks_done [MAX_STREAMS];
  logic         map_we = 0;
  logic [2:0]   map_sel = 0;
  logic [15:0]  map_idx = 0;
  logic [63:0]  map_base = 0;
  logic         tlp_valid, tlp_ready;
  logic         r [NS];
  tlp_t         tlp;
  int hc [NS], hf [NS], ws [NS], ms [NS], wr [NS], tlps [NS];
  int checks = 0, failures = 0, switches = 0, last_src = -1, exp_ins3 = 0;
  bit go = 0;

  always #5 clk = ~clk;

  dma_controller #(.FLAVOR(FLAVOR_ODIN), .ODIN_DEPTH(16), .ODIN_HOST_LOG2(OHL),
                   .BLOCK_LOG2(BL), .NMAX(16), .MAX_GAP(16), .FLUSH_TIMEOUT(32)) dut (.*);

  always_ff @(posedge clk) tlp_ready <= ($urandom_range(0, 3) != 0);

  frag_t drv_q [NS][$];

  for (genvar s = 0; s < NS; s++) begin : g_s
    host_consumer #(.HOST_LOG2(OHL), .BLOCK_LOG2(BL), .RD_DELAY(200),
                    .PHYS_BASE(64'h10_0000_0000 * (s + 1)), .EXT_READY(1)) u_host (
      .clk, .rst_n, .mode (mode[s]), .pack_n (pack_n[s]), .srcid (srcid[s]), .fversion (fversion[s]),
      .tlp_valid, .tlp_ready (r[s]), .ext_ready (tlp_ready), .tlp, .wr_off (wr_off[s]), .rd_off (rd_off[s]),
      .checks (hc[s]), .failures (hf[s]), .words_seen (ws[s]), .mfps_seen (ms[s]), .wraps (wr[s]));

    // stimulus and expected buffer contents of stream s
    initial begin
      logic [63:0] ev;
      wait (go);
      ev = 64'd1000 * (s + 1);
      if (s == 0) begin
        for (int f = 0; f < 8 * 60; f++) begin
          frag_s x;
          int w;
          x.evid = ev; x.ty = 8'($urandom); x.size = 16'($urandom_range(1, 160));
          w = int'(words_of(x.size));
          for (int j = 0; j < 8; j++) x.w[j] = {8{$urandom}};
          for (int j = 0; j < w; j++) begin
            frag_t b;
            b.data = x.w[j]; b.sop = (j == 0); b.eop = (j == w - 1);
            b.evid = x.evid; b.ftype = x.ty; b.size = x.size;
            drv_q[s].push_back(b);
          end
          u_host.exp_frags.push_back(x);
          ev++;
        end
      end else begin
        for (int p = 0; p < 700; p++) begin
          int w;
          if (s == 3 && p % 17 == 5) begin   // a lost packet upstream
            u_host.exp_words.push_back({ev, 192'd0});
            ev++;
            exp_ins3++;
          end
          w = $urandom_range(1, 4);
          for (int j = 0; j < w; j++) begin
            frag_t b;
            b.data = {ev, 8'(s), 24'(p), 32'(j), 128'({$urandom, $urandom, $urandom, $urandom})};
            b.sop = (j == 0); b.eop = (j == w - 1); b.evid = ev; b.ftype = 8'h0D; b.size = 16'(32 * w);
            drv_q[s].push_back(b);
            u_host.exp_words.push_back(b.data);
          end
          ev++;
        end
      end
    end
  end

  always_comb begin
    for (int s = 0; s < MAX_STREAMS; s++) begin
      in_valid[s] = rst_n && drv_q[s].size() > 0;
      in[s] = (drv_q[s].size() > 0) ? drv_q[s][0] : '0;
    end
  end
  always_ff @(posedge clk) if (rst_n) begin
    for (int s = 0; s < NS; s++) if (in_valid[s] && in_ready[s]) void'(drv_q[s].pop_front());
    if (tlp_valid && tlp_ready && tlp.sop) begin
      int src;
      src = int'(tlp.addr >> 36) - 1;
      if (src >= 0 && src < NS) tlps[src]++;
      if (last_src != -1 && src != last_src) switches++;
      last_src = src;
    end
  end

  function automatic int left();
    int n;
    n = g_s[0].u_host.exp_frags.size() + g_s[1].u_host.exp_words.size() +
        g_s[2].u_host.exp_words.size() + g_s[3].u_host.exp_words.size() +
        g_s[4].u_host.exp_words.size();
    for (int s = 0; s < NS; s++) n += drv_q[s].size();
    return n;
  endfunction

  function automatic int total(input int a [NS]);
    int n;
    n = 0;
    for (int s = 0; s < NS; s++) n += a[s];
    return n;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks + total(hc), failures + total(hf));
    $finish;
  end

  initial begin
    for (int s = 0; s < MAX_STREAMS; s++) begin
      mode[s] = MODE_PACKET; pack_n[s] = 16'd1; srcid[s] = 16'(16'h0050 + s); fversion[s] = 8'd3;
      tlps[s % NS] = 0;
    end
    mode[0] = MODE_BLOCK; pack_n[0] = 16'd8;
    repeat (3) @(negedge clk);
    for (int s = 0; s < NS; s++)
      for (int i = 0; i < (1 << (OHL - BL)); i++) begin
        map_we = 1; map_sel = 3'(s); map_idx = 16'(i);
        map_base = 64'h10_0000_0000 * (s + 1) + 64'(((i * 37 + 11) % 1024)) * (64'd1 << BL) * 2;
        @(negedge clk);
      end
    map_we = 0;
    go = 1;
    #1;
    rst_n = 1;
    while (left() != 0) @(posedge clk);
    repeat (200) @(posedge clk);
    checks += 4 + NS;
    if (blocks_done[0] != 60) begin failures++; $display("blocks_done %0d", blocks_done[0]); end
    if (ms[0] != 60) begin failures++; $display("MFPs parsed %0d", ms[0]); end
    if (insert_cnt[3] != 32'(exp_ins3)) begin failures++; $display("stream 3 inserted %0d, expected %0d", insert_cnt[3], exp_ins3); end
    if (switches < 100) begin failures++; $display("streams did not share the port: %0d switches", switches); end
    for (int s = 0; s < NS; s++)
      if (tlps[s] == 0 || wr[s] == 0) begin failures++; $display("stream %0d: %0d TLPs, %0d wraps", s, tlps[s], wr[s]); end
    $display("TLPs per stream %0d %0d %0d %0d %0d, switches %0d, inserted %0d, wraps %0d %0d %0d %0d %0d",
             tlps[0], tlps[1], tlps[2], tlps[3], tlps[4], switches, insert_cnt[3], wr[0], wr[1], wr[2], wr[3], wr[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks + total(hc), failures + total(hf));
    $finish;
  end
endmodule

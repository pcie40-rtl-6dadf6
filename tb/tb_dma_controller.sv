// tb_dma_controller: test of a DMA controller in the MINIDAQ flavor, where a
// MAIN stream (block mode, with its META group) and an ODIN stream (packet
// mode) share one TX port.  Reduced sizes: 64 KiB / 32 KiB host buffers of
// 4 KiB blocks.  Two host models watch the shared port, each keeping the
// writes of its own physical range, and check what they parse.  Also checks
// that both streams got TLPs through and that they interleaved at TLP level.
// Expected behaviour follows the block's header comment; stimulus, reduced
// parameter values and check counts are this test's own choices.
module tb_dma_controller;
  import pcie40_pkg::*;
  import tb_host_pkg::*;

  localparam int MHL = 16, OHL = 15, BL = 13;
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
  logic         tlp_valid, tlp_ready, r0, r1;
  tlp_t         tlp;
  int hc [2], hf [2], ws [2], ms [2], wr [2];
  int checks = 0, failures = 0, switches = 0, last_src = -1;

  always #5 clk = ~clk;

  dma_controller #(.FLAVOR(FLAVOR_MINIDAQ), .MAIN_DEPTH(64), .MAIN_HOST_LOG2(MHL),
                   .ODIN_DEPTH(16), .ODIN_HOST_LOG2(OHL), .BLOCK_LOG2(BL), .NMAX(32),
                   .MAX_GAP(16), .FLUSH_TIMEOUT(32)) dut (.*);

  always_ff @(posedge clk) tlp_ready <= ($urandom_range(0, 3) != 0);

  host_consumer #(.HOST_LOG2(MHL), .BLOCK_LOG2(BL), .PHYS_BASE(64'h10_0000_0000), .EXT_READY(1)) u_main (
    .clk, .rst_n, .mode (mode[0]), .pack_n (pack_n[0]), .srcid (srcid[0]), .fversion (fversion[0]),
    .tlp_valid, .tlp_ready (r0), .ext_ready (tlp_ready), .tlp, .wr_off (wr_off[0]), .rd_off (rd_off[0]),
    .checks (hc[0]), .failures (hf[0]), .words_seen (ws[0]), .mfps_seen (ms[0]), .wraps (wr[0]));
  host_consumer #(.HOST_LOG2(OHL), .BLOCK_LOG2(BL), .PHYS_BASE(64'h20_0000_0000), .EXT_READY(1)) u_odin (
    .clk, .rst_n, .mode (mode[1]), .pack_n (pack_n[1]), .srcid (srcid[1]), .fversion (fversion[1]),
    .tlp_valid, .tlp_ready (r1), .ext_ready (tlp_ready), .tlp, .wr_off (wr_off[1]), .rd_off (rd_off[1]),
    .checks (hc[1]), .failures (hf[1]), .words_seen (ws[1]), .mfps_seen (ms[1]), .wraps (wr[1]));

  frag_t drv_q [2][$];
  always_comb begin
    for (int s = 0; s < MAX_STREAMS; s++) begin
      in_valid[s] = 1'b0; in[s] = '0;
      if (s > 1) rd_off[s] = '0;
    end
    for (int s = 0; s < 2; s++) begin
      in_valid[s] = rst_n && drv_q[s].size() > 0;
      in[s] = (drv_q[s].size() > 0) ? drv_q[s][0] : '0;
    end
  end
  always_ff @(posedge clk) if (rst_n) begin
    for (int s = 0; s < 2; s++) if (in_valid[s] && in_ready[s]) void'(drv_q[s].pop_front());
    if (tlp_valid && tlp_ready && tlp.sop) begin
      int src;
      src = (tlp.addr >= 64'h20_0000_0000) ? 1 : 0;
      if (last_src != -1 && src != last_src) switches++;
      last_src = src;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks + hc[0] + hc[1], failures + hf[0] + hf[1]);
    $finish;
  end

  initial begin
    logic [63:0] ev;
    for (int s = 0; s < MAX_STREAMS; s++) begin
      mode[s] = MODE_BYTE; pack_n[s] = 16'd1; srcid[s] = 16'h0042; fversion[s] = 8'd7;
    end
    mode[0] = MODE_BLOCK; pack_n[0] = 16'd16;
    mode[1] = MODE_PACKET;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      map_we = 1; map_sel = 0; map_idx = 16'(i); map_base = u_main.block_phys(i); @(negedge clk);
    end
    for (int i = 0; i < 4; i++) begin
      map_we = 1; map_sel = 1; map_idx = 16'(i); map_base = u_odin.block_phys(i); @(negedge clk);
    end
    map_we = 0;
    ev = 64'd10;
    for (int f = 0; f < 16 * 40; f++) begin
      frag_s s;
      int w;
      s.evid = ev; s.ty = 8'($urandom); s.size = 16'($urandom_range(1, 200));
      w = int'(words_of(s.size));
      for (int j = 0; j < 8; j++) s.w[j] = {8{$urandom}};
      for (int j = 0; j < w; j++) begin
        frag_t b;
        b.data = s.w[j]; b.sop = (j == 0); b.eop = (j == w - 1);
        b.evid = s.evid; b.ftype = s.ty; b.size = s.size;
        drv_q[0].push_back(b);
      end
      u_main.exp_frags.push_back(s);
      ev++;
    end
    ev = 64'd5000;
    for (int p = 0; p < 800; p++) begin
      int w;
      w = $urandom_range(1, 4);
      for (int j = 0; j < w; j++) begin
        frag_t b;
        b.data = {ev, 32'(p), 32'(j), 128'({$urandom, $urandom, $urandom, $urandom})};
        b.sop = (j == 0); b.eop = (j == w - 1); b.evid = ev; b.ftype = 8'h0D; b.size = 16'(32 * w);
        drv_q[1].push_back(b);
        u_odin.exp_words.push_back(b.data);
      end
      ev++;
    end
    rst_n = 1;
    while (drv_q[0].size() + drv_q[1].size() + u_main.exp_frags.size() + u_odin.exp_words.size() != 0)
      @(posedge clk);
    repeat (200) @(posedge clk);
    checks += 3;
    if (blocks_done[0] != 40) begin failures++; if (failures < 50) $display("blocks_done %0d", blocks_done[0]); end
    if (ms[0] != 40) begin failures++; if (failures < 50) $display("MFPs parsed %0d", ms[0]); end
    if (switches < 10) begin failures++; if (failures < 50) $display("streams did not share the port: %0d switches", switches); end
    $display("MAIN: %0d MFPs, ODIN: %0d words, TX owner switches %0d, wraps %0d/%0d", ms[0], ws[1], switches, wr[0], wr[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks + hc[0] + hc[1], failures + hf[0] + hf[1]);
    $finish;
  end
endmodule

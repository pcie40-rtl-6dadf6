// tb_pcie40_top: end-to-end test of the PCIe40 DMA design (TELL40 flavor,
// two PCIe interfaces), at reduced sizes: 256 KiB host buffers of 16 KiB
// blocks, 2 KiB FPGA buffers, packing factors up to 64.
// Interface 0 runs its MAIN stream in packet mode, interface 1 in block
// (MFP) mode, at the same time; a host model per interface checks every
// word or MFP it parses from its circular buffer.  A last phase feeds both
// streams from their TDET fragment builders (packet and MFP layout).  The
// test counts how often each mechanism happened and fails any that never
// did: the TDET builders in both layouts, truncation compensation, throttle compensation (both modes), fragment realignment to
// 16 bytes, MFP headers written by the META group, stalls on a full host
// buffer, wrap-around, descriptor translations, timeout flushes and TX
// backpressure.
// Expected behaviour follows the block's header comment; stimulus, reduced
// parameter values and check counts are this test's own choices.
module tb_pcie40_top;
  import pcie40_pkg::*;
  import tb_host_pkg::*;

  localparam int NIF = 2, HL = 18, BL = 14;
  logic clk = 0, rst_n = 0;
  stream_mode_e mode        [NIF][MAX_STREAMS];
  logic [15:0]  pack_n      [NIF][MAX_STREAMS];
  logic [15:0]  srcid       [NIF][MAX_STREAMS];
  logic [7:0]   fversion    [NIF][MAX_STREAMS];
  logic         in_valid    [NIF][MAX_STREAMS];
  logic         in_ready    [NIF][MAX_STREAMS];
  frag_t        in          [NIF][MAX_STREAMS];
  logic [31:0]  rd_off      [NIF][MAX_STREAMS];
  logic [31:0]  wr_off      [NIF][MAX_STREAMS];
  logic [31:0]  trunc_cnt   [NIF][MAX_STREAMS];
  logic [31:0]  insert_cnt  [NIF][MAX_STREAMS];
  logic [31:0]  blocks_done [NIF][MAX_STREAMS];
  logic         map_we      [NIF];
  logic [2:0]   map_sel     [NIF];
  logic [15:0]  map_idx     [NIF];
  logic [63:0]  map_base    [NIF];
  logic         tlp_valid   [NIF];
  logic         tlp_ready   [NIF];
  tlp_t         tlp         [NIF];
  logic         tdet_sel       [NIF];
  logic         tdet_fib_valid [NIF][12];
  logic [11:0]  tdet_fib_bxid  [NIF][12];
  logic [99:0]  tdet_fib_data  [NIF][12];
  logic [31:0]  tdet_built     [NIF];
  logic [31:0]  tdet_cut       [NIF];
  logic [31:0]  tdet_lost      [NIF];
  int hchecks [NIF], hfail [NIF], words_seen [NIF], mfps_seen [NIF], wraps [NIF];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pcie40_top #(.FLAVOR(FLAVOR_TELL40), .NIF(NIF), .MAIN_DEPTH(64), .MAIN_HOST_LOG2(HL),
               .BLOCK_LOG2(BL), .NMAX(64), .MAX_GAP(64), .FLUSH_TIMEOUT(32)) dut (.*);

  frag_t drv_q [NIF][$];

  for (genvar k = 0; k < NIF; k++) begin : g_h
    host_consumer #(.HOST_LOG2(HL), .BLOCK_LOG2(BL), .RD_DELAY(10000), .PHYS_BASE(64'h10_0000_0000 * (k + 1))) u_host (
      .clk, .rst_n, .mode (mode[k][0]), .pack_n (pack_n[k][0]), .srcid (srcid[k][0]),
      .fversion (fversion[k][0]), .tlp_valid (tlp_valid[k]), .tlp_ready (tlp_ready[k]),
      .ext_ready (1'b0), .tlp (tlp[k]), .wr_off (wr_off[k][0]), .rd_off (rd_off[k][0]),
      .checks (hchecks[k]), .failures (hfail[k]), .words_seen (words_seen[k]),
      .mfps_seen (mfps_seen[k]), .wraps (wraps[k])
    );
    always_comb begin
      for (int s = 0; s < MAX_STREAMS; s++) begin
        in_valid[k][s] = 1'b0; in[k][s] = '0;
        if (s > 0) rd_off[k][s] = '0;
      end
      in_valid[k][0] = rst_n && drv_q[k].size() > 0;
      in[k][0] = (drv_q[k].size() > 0) ? drv_q[k][0] : '0;
    end
    always_ff @(posedge clk) if (rst_n && in_valid[k][0] && in_ready[k][0]) void'(drv_q[k].pop_front());
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_full [NIF], n_lookup [NIF], n_flush [NIF], n_txstall [NIF], n_meta_tlp, n_half;
  always_ff @(posedge clk) if (rst_n) begin
    if (dut.g_if[0].u_ctrl.g_s[0].g_on.u_stream.u_main.rd_valid &&
        dut.g_if[0].u_ctrl.g_s[0].g_on.u_stream.u_main.need > (19'd1 << HL)) n_full[0]++;
    if (dut.g_if[1].u_ctrl.g_s[0].g_on.u_stream.u_main.rd_valid &&
        dut.g_if[1].u_ctrl.g_s[0].g_on.u_stream.u_main.need > (19'd1 << HL)) n_full[1]++;
    if (dut.g_if[0].u_ctrl.g_s[0].g_on.u_stream.u_main.state == 2'd1) n_lookup[0]++;
    if (dut.g_if[1].u_ctrl.g_s[0].g_on.u_stream.u_main.state == 2'd1) n_lookup[1]++;
    if (dut.g_if[0].u_ctrl.g_s[0].g_on.u_stream.u_main.state == 2'd0 &&
        dut.g_if[0].u_ctrl.g_s[0].g_on.u_stream.u_main.go &&
        dut.g_if[0].u_ctrl.g_s[0].g_on.u_stream.u_main.avail !=
        dut.g_if[0].u_ctrl.g_s[0].g_on.u_stream.u_main.chunk &&
        dut.g_if[0].u_ctrl.g_s[0].g_on.u_stream.u_main.consec) n_flush[0]++;
    if (tlp_valid[0] && !tlp_ready[0]) n_txstall[0]++;
    if (tlp_valid[1] && !tlp_ready[1]) n_txstall[1]++;
  end
  assign n_meta_tlp = int'(dut.g_if[1].u_ctrl.g_s[0].g_on.u_stream.g_mfp.u_meta.tlp_cnt);

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 50) $display("%s: got %0d expected %0d", what, got, exp); end
  endtask
  task automatic expect_happened(input string what, input longint n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n <= 0) begin failures++; if (failures < 50) $display("  ... never happened"); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks + hchecks[0] + hchecks[1], failures + hfail[0] + hfail[1]);
    $finish;
  end

  initial begin
    int exp_tr, exp_ins0, exp_ins1, tdet_words0;
    logic [63:0] ev;
    for (int k = 0; k < NIF; k++) begin
      tdet_sel[k] = 1'b0;
      for (int f = 0; f < 12; f++) begin
        tdet_fib_valid[k][f] = 1'b0; tdet_fib_bxid[k][f] = '0; tdet_fib_data[k][f] = '0;
      end
    end
    n_half = 0;
    for (int k = 0; k < NIF; k++) begin
      for (int s = 0; s < MAX_STREAMS; s++) begin
        mode[k][s] = MODE_BYTE; pack_n[k][s] = 16'd1; srcid[k][s] = 16'(16'h1780 + k); fversion[k][s] = 8'd2;
      end
      map_we[k] = 0; map_sel[k] = 0; map_idx[k] = 0; map_base[k] = 0;
      n_full[k] = 0; n_lookup[k] = 0; n_flush[k] = 0; n_txstall[k] = 0;
    end
    mode[0][0] = MODE_PACKET;
    mode[1][0] = MODE_BLOCK; pack_n[1][0] = 16'd37;    // 20+40+74 = 134 -> 144 bytes, odd
    repeat (3) @(negedge clk);
    // the driver programs both maps
    for (int i = 0; i < (1 << (HL - BL)); i++) begin
      for (int k = 0; k < NIF; k++) begin
        map_we[k] = 1; map_sel[k] = 0; map_idx[k] = 16'(i);
        map_base[k] = (k == 0) ? g_h[0].u_host.block_phys(i) : g_h[1].u_host.block_phys(i);
      end
      @(negedge clk);
    end
    for (int k = 0; k < NIF; k++) map_we[k] = 0;

    // interface 0: packets, some cut by upstream backpressure, with EVID holes
    exp_tr = 0; exp_ins0 = 0; ev = 64'd1;
    for (int p = 0; p < 2500; p++) begin
      logic [15:0] size;
      int w, n;
      logic [255:0] d;
      if (p % 23 == 7) begin
        int g;
        g = $urandom_range(1, 3);
        for (int q = 0; q < g; q++) g_h[0].u_host.exp_words.push_back({ev + 64'(q), 192'd0});
        ev += 64'(g); exp_ins0 += g;
      end
      size = 16'($urandom_range(100, 192));
      w = int'(words_of(size));
      n = (p % 11 == 3) ? $urandom_range(1, w - 1) : (p % 11 == 8) ? w + 1 : w;
      if (n != w) exp_tr++;
      for (int j = 0; j < n; j++) begin
        frag_t b;
        d = {ev, 16'h0000, size, 32'(p), 32'(j), 96'({$urandom, $urandom, $urandom})};
        b.data = d; b.sop = (j == 0); b.eop = (j == n - 1);
        b.evid = ev; b.ftype = 8'h01; b.size = size;
        drv_q[0].push_back(b);
        if (j < w) g_h[0].u_host.exp_words.push_back(d);
      end
      for (int j = n; j < w; j++) g_h[0].u_host.exp_words.push_back('0);
      ev++;
    end
    // interface 1: TDET-like fragments of 154 bytes and others, in MFPs of 37
    exp_ins1 = 0; ev = 64'h100;
    for (int f = 0; f < 37 * 60; f++) begin
      frag_s s;
      int w;
      if (f % 29 == 11) begin
        frag_s z;
        z.evid = ev; z.ty = 8'h00; z.size = 0;
        g_h[1].u_host.exp_frags.push_back(z); ev++; exp_ins1++; f++;
      end
      s.evid = ev; s.ty = 8'($urandom); s.size = (f % 3 == 0) ? 16'd154 : 16'($urandom_range(0, 250));
      if (units_of(s.size) % 2 == 1) n_half++;
      w = int'(words_of(s.size));
      for (int j = 0; j < 8; j++) s.w[j] = {8{$urandom}};
      for (int j = 0; j < w; j++) begin
        frag_t b;
        b.data = s.w[j]; b.sop = (j == 0); b.eop = (j == w - 1);
        b.evid = s.evid; b.ftype = s.ty; b.size = s.size;
        drv_q[1].push_back(b);
      end
      g_h[1].u_host.exp_frags.push_back(s);
      ev++;
    end
    rst_n = 1;
    while (drv_q[0].size() + drv_q[1].size() + g_h[0].u_host.exp_words.size() +
           g_h[1].u_host.exp_frags.size() != 0) @(posedge clk);
    repeat (300) @(posedge clk);

    tdet_words0 = words_seen[0];
    $display("interface 0 (packet): %0d words parsed; interface 1 (block): %0d MFPs parsed",
             words_seen[0], mfps_seen[1]);
    expect_eq("truncations", trunc_cnt[0][0], exp_tr);
    expect_eq("inserted packets", insert_cnt[0][0], exp_ins0);
    expect_eq("inserted fragments", insert_cnt[1][0], exp_ins1);
    expect_eq("MFP blocks", blocks_done[1][0], 60);
    expect_eq("MFPs parsed", mfps_seen[1], 60);
    // last phase: the TDET builders replace the input ports.  Their EVIDs
    // restart at 0 (a resynchronisation, not a hole).  On interface 0 each
    // crossing must arrive as one 6-word packet {EVID, header, fibers}; on
    // interface 1 as a 154-byte fragment of an MFP.
    tdet_sel[0] = 1'b1;
    tdet_sel[1] = 1'b1;
    for (int c = 0; c < 111; c++) begin
      frag_s x;
      logic [1279:0] fz;
      logic [31:0]   gh;
      int skew [12];
      fz = '0;
      for (int f = 0; f < 12; f++) begin
        fz[100*f +: 100] = {4'($urandom), $urandom, $urandom, $urandom};
        skew[f] = $urandom_range(0, 5);
      end
      gh = {16'd162, 4'b0, 12'(c)};
      g_h[0].u_host.exp_words.push_back({64'(c), gh, fz[159:0]});
      for (int w = 1; w < 6; w++) g_h[0].u_host.exp_words.push_back(fz[256*w - 96 +: 256]);
      // interface 1 (block mode): the MFP layout, {fibers, header} from byte 0
      x.evid = 64'(c); x.ty = 8'h00; x.size = 16'd154;
      for (int w = 0; w < 8; w++) x.w[w] = '0;
      for (int w = 0; w < 5; w++) x.w[w] = {fz, 16'd154, 4'b0, 12'(c)} >> (256 * w);
      g_h[1].u_host.exp_frags.push_back(x);
      for (int t = 0; t < 40; t++) begin
        @(negedge clk);
        for (int f = 0; f < 12; f++) begin
          tdet_fib_valid[0][f] = (skew[f] == t);
          tdet_fib_bxid[0][f]  = 12'(c);
          tdet_fib_data[0][f]  = fz[100*f +: 100];
          tdet_fib_valid[1][f] = (skew[f] == t);
          tdet_fib_bxid[1][f]  = 12'(c);
          tdet_fib_data[1][f]  = fz[100*f +: 100];
        end
      end
    end
    while (g_h[0].u_host.exp_words.size() + g_h[1].u_host.exp_frags.size() != 0) @(posedge clk);
    repeat (300) @(posedge clk);
    expect_eq("TDET fragments built", tdet_built[0], 111);
    expect_eq("TDET fragments cut or lost", tdet_cut[0] + tdet_lost[0], 0);
    expect_eq("TDET words parsed", words_seen[0] - tdet_words0, 666);
    expect_eq("TDET fragments built, if 1", tdet_built[1], 111);
    expect_eq("TDET fragments cut or lost, if 1", tdet_cut[1] + tdet_lost[1], 0);
    expect_eq("MFP blocks after TDET phase", blocks_done[1][0], 63);
    expect_eq("MFPs parsed after TDET phase", mfps_seen[1], 63);
    $display("mechanisms:");
    expect_happened("TDET builder feeding stream 0, packet", tdet_built[0]);
    expect_happened("TDET builder feeding stream 0, block", tdet_built[1]);
    expect_happened("truncation compensation", trunc_cnt[0][0]);
    expect_happened("throttle compensation, packet", insert_cnt[0][0]);
    expect_happened("throttle compensation, block", insert_cnt[1][0]);
    expect_happened("16-byte realigned fragments", n_half);
    expect_happened("MFP header TLPs (META group)", n_meta_tlp);
    expect_happened("host buffer full, if 0 (cycles)", n_full[0]);
    expect_happened("host buffer full, if 1 (cycles)", n_full[1]);
    expect_happened("wrap-around, if 0", wraps[0]);
    expect_happened("wrap-around, if 1", wraps[1]);
    expect_happened("descriptor translations, if 0", n_lookup[0]);
    expect_happened("descriptor translations, if 1", n_lookup[1]);
    expect_happened("timeout flushes", n_flush[0]);
    expect_happened("TX backpressure (cycles)", n_txstall[0] + n_txstall[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks + hchecks[0] + hchecks[1], failures + hfail[0] + hfail[1]);
    $finish;
  end
endmodule

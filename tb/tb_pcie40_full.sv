// tb_pcie40_full: the PCIe40 DMA design at its full size (every parameter at
// its default: TELL40 flavor, two interfaces, 4 GiB host buffers of 4 MiB
// blocks, 32 KiB FPGA buffers, packing factors up to 8192).
// The driver programs all 1024 entries of both address maps.  Interface 0
// then carries 1000 TDET-like fragments of 192 bytes in packet mode (with one
// EVID hole and one cut fragment), interface 1 two MFPs of 3564 fragments
// (one LHC orbit) of 154 bytes in block mode.  The host models check every
// word and every MFP field and fragment.
// Sizes follow the described system (default top parameters, 192-byte TDET
// packets, a packing factor of one LHC orbit, 3564, which is general
// knowledge rather than part of the description); the traffic pattern is
// this test's own choice.
module tb_pcie40_full;
  import pcie40_pkg::*;
  import tb_host_pkg::*;

  localparam int NIF = 2, HL = 32, BL = 22;
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

  pcie40_top dut (.*);

  frag_t drv_q [NIF][$];

  for (genvar k = 0; k < NIF; k++) begin : g_h
    host_consumer #(.HOST_LOG2(HL), .BLOCK_LOG2(BL), .RD_DELAY(50), .PHYS_BASE(64'h10_0000_0000 * (k + 1))) u_host (
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
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks + hchecks[0] + hchecks[1], failures + hfail[0] + hfail[1]);
    $finish;
  end

  initial begin
    int exp_tr, exp_ins0, exp_ins1;
    logic [63:0] ev;
    for (int k = 0; k < NIF; k++) begin
      tdet_sel[k] = 1'b0;
      for (int f = 0; f < 12; f++) begin
        tdet_fib_valid[k][f] = 1'b0; tdet_fib_bxid[k][f] = '0; tdet_fib_data[k][f] = '0;
      end
    end
    for (int k = 0; k < NIF; k++) begin
      for (int s = 0; s < MAX_STREAMS; s++) begin
        mode[k][s] = MODE_BYTE; pack_n[k][s] = 16'd1; srcid[k][s] = 16'(16'h1780 + k); fversion[k][s] = 8'd2;
      end
      map_we[k] = 0; map_sel[k] = 0; map_idx[k] = 0; map_base[k] = 0;
    end
    mode[0][0] = MODE_PACKET;
    mode[1][0] = MODE_BLOCK; pack_n[1][0] = 16'd3564;  // one LHC orbit
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
    for (int p = 0; p < 1000; p++) begin
      logic [15:0] size;
      int w, n;
      logic [255:0] d;
      if (p == 400) begin
        int g;
        g = $urandom_range(1, 3);
        for (int q = 0; q < g; q++) g_h[0].u_host.exp_words.push_back({ev + 64'(q), 192'd0});
        ev += 64'(g); exp_ins0 += g;
      end
      size = 16'd192;
      w = int'(words_of(size));
      n = (p == 700) ? 3 : w;
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
    // interface 1: TDET fragments of 154 bytes in MFPs of one orbit
    exp_ins1 = 0; ev = 64'h100;
    for (int f = 0; f < 3564 * 2; f++) begin
      frag_s s;
      int w;
      s.evid = ev; s.ty = 8'($urandom); s.size = 16'd154;
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

    $display("interface 0 (packet): %0d words parsed; interface 1 (block): %0d MFPs parsed",
             words_seen[0], mfps_seen[1]);
    expect_eq("truncations", trunc_cnt[0][0], exp_tr);
    expect_eq("inserted packets", insert_cnt[0][0], exp_ins0);
    expect_eq("inserted fragments", insert_cnt[1][0], exp_ins1);
    expect_eq("MFP blocks", blocks_done[1][0], 2);
    expect_eq("MFPs parsed", mfps_seen[1], 2);
    expect_eq("write offset, if 0", wr_off[0][0], (6000 + exp_ins0) * 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks + hchecks[0] + hchecks[1], failures + hfail[0] + hfail[1]);
    $finish;
  end
endmodule

// tb_dma_stream_mfp: self-checking test of the block-mode assembler.
// Fragments of 0..150 bytes go in under random backpressure; the MAIN and
// META word streams are written into a model of the linear host buffer only
// when a slow "sent" counter (updated every 16 cycles) says so, as a DMA
// writer would.  Whenever commit_off moves, the test parses the new MFPs from
// the model: magic, NFRAGS, PSIZE, EVID of the first fragment, SRCID, ALIGN,
// FVERSION, the FTYPE and FSIZE tables and every fragment's bytes at its
// 16-byte aligned place.  Run once with an odd and once with an even header
// length (pack_n 5 and 4).
// Expected behaviour follows the block's header comment; stimulus, reduced
// parameter values and check counts are this test's own choices.
module tb_dma_stream_mfp;
  import pcie40_pkg::*;

  logic clk = 0, rst_n = 0, en = 1;
  logic [15:0] pack_n = 5, srcid = 16'h1784;
  logic [7:0] fversion = 8'h03;
  logic in_valid, in_ready, d_valid, d_ready, h_valid, h_ready;
  frag_t in;
  wr_word_t d_word, h_word;
  logic [31:0] main_sent = 0, meta_sent = 0, commit_off, blocks_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dma_stream_mfp #(.NMAX(64)) dut (.*);

  typedef struct { logic [63:0] evid; logic [7:0] ty; logic [15:0] size; logic [255:0] w [8]; } frag_s;
  frag_s sent_q[$];
  frag_t drv_q[$];
  logic [255:0] mem [int];
  logic [255:0] pd_d[$], pd_h[$];
  int pa_d[$], pa_h[$];
  int dptr = 0, hptr = 0, dcnt = 0, hcnt = 0, tick = 0;
  logic [31:0] parsed = 0;
  int blocks_parsed = 0;

  always_comb begin
    in_valid = rst_n && drv_q.size() > 0;
    in = (drv_q.size() > 0) ? drv_q[0] : '0;
  end
  always_ff @(posedge clk) begin
    d_ready <= ($urandom_range(0, 3) != 0);
    h_ready <= ($urandom_range(0, 2) != 0);
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) void'(drv_q.pop_front());
      if (d_valid && d_ready) begin
        int a;
        a = d_word.jump ? int'(d_word.addr) : dptr;
        pd_d.push_back(d_word.data); pa_d.push_back(a); dptr = a + 32; dcnt++;
      end
      if (h_valid && h_ready) begin
        int a;
        a = h_word.jump ? int'(h_word.addr) : hptr;
        pd_h.push_back(h_word.data); pa_h.push_back(a); hptr = a + 32; hcnt++;
      end
      tick++;
      if (tick % 16 == 0) begin
        while (pd_d.size() > 0) mem[pa_d.pop_front() / 32] = pd_d.pop_front();
        while (pd_h.size() > 0) mem[pa_h.pop_front() / 32] = pd_h.pop_front();
        main_sent <= 32'(dcnt);
        meta_sent <= 32'(hcnt);
      end
    end
  end

  function automatic byte unsigned rd_byte(input int a);
    logic [255:0] w;
    if (!mem.exists(a / 32)) return 8'hEE;
    w = mem[a / 32];
    return w[8 * (a % 32) +: 8];
  endfunction
  function automatic int rd_le(input int a, input int n);
    int v = 0;
    for (int i = n - 1; i >= 0; i--) v = (v << 8) | int'(rd_byte(a + i));
    return v;
  endfunction

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 50) $display("%s: got %0h expected %0h", what, got, exp); end
  endtask

  // parse every MFP below commit_off
  always @(posedge clk) begin
    if (rst_n && commit_off != parsed) begin
      int b, n, hb, off, tpos, spos;
      longint ev;
      b = int'(parsed);
      n = int'(pack_n);
      hb = int'(mfp_hdr_bytes(pack_n));
      expect_eq("magic", rd_le(b, 2), 16'h40CE);
      expect_eq("NFRAGS", rd_le(b + 2, 2), n);
      ev = longint'(unsigned'(rd_le(b + 8, 4))) | (longint'(unsigned'(rd_le(b + 12, 4))) << 32);
      expect_eq("SRCID", rd_le(b + 16, 2), srcid);
      expect_eq("ALIGN", rd_le(b + 18, 1), 4);
      expect_eq("FVERSION", rd_le(b + 19, 1), fversion);
      tpos = b + 20; spos = b + 20 + (n + 3) / 4 * 4;
      off = b + hb;
      for (int i = 0; i < n; i++) begin
        frag_s f;
        if (sent_q.size() == 0) begin failures++; if (failures < 50) $display("block has more fragments than sent"); break; end
        f = sent_q.pop_front();
        if (i == 0) expect_eq("EVID", ev, longint'(f.evid));
        expect_eq("FTYPE", rd_le(tpos + i, 1), f.ty);
        expect_eq("FSIZE", rd_le(spos + 2 * i, 2), f.size);
        for (int k = 0; k < int'(f.size); k++) begin
          checks++;
          if (rd_byte(off + k) != f.w[k / 32][8 * (k % 32) +: 8]) begin
            failures++; if (failures < 50) $display("fragment %0d byte %0d wrong", i, k); break;
          end
        end
        off += (int'(f.size) + 15) / 16 * 16;
      end
      expect_eq("PSIZE", rd_le(b + 4, 4), (off - b + 31) / 32 * 32);
      parsed = 32'(b + rd_le(b + 4, 4));
      blocks_parsed++;
      if (parsed != commit_off && $urandom_range(0, 0) == 0) ;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("blocks_done %0d commit %0h dcnt %0d hcnt %0d fcount %0d drv %0d sent %0d", blocks_done, commit_off, dcnt, hcnt, dut.fcount, drv_q.size(), sent_q.size());
    $display("rbusy %0d pend %0d flushing %0d mbusy %0d cq %0d rstate %0d", dut.r_busy, dut.pend_valid, dut.flushing, dut.meta_busy, dut.cq_cnt, dut.u_realign.state);
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int pn, input int nblocks);
    pack_n = 16'(pn);
    for (int f = 0; f < pn * nblocks; f++) begin
      frag_s s;
      int w;
      s.evid = 64'h1_0000_0000 + 64'(f); s.ty = 8'($urandom); s.size = 16'($urandom_range(0, 150));
      if (f % 11 == 3) s.size = 0;
      w = int'(words_of(s.size));
      for (int j = 0; j < 8; j++) s.w[j] = {8{$urandom}};
      for (int j = 0; j < w; j++) begin
        frag_t x;
        x.data = s.w[j]; x.sop = (j == 0); x.eop = (j == w - 1);
        x.evid = s.evid; x.ftype = s.ty; x.size = s.size;
        drv_q.push_back(x);
      end
      sent_q.push_back(s);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (drv_q.size() == 0 && sent_q.size() == 0);
    repeat (50) @(posedge clk);
    expect_eq("blocks_done", blocks_done, nblocks);
    expect_eq("blocks parsed", blocks_parsed, nblocks);
    expect_eq("commit at last block end", commit_off, parsed);
  endtask

  initial begin
    run(5, 12);
    // second run with an even header length, from reset
    rst_n = 0;
    mem.delete(); dptr = 0; hptr = 0; dcnt = 0; hcnt = 0; parsed = 0; blocks_parsed = 0;
    main_sent = 0; meta_sent = 0;
    run(4, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

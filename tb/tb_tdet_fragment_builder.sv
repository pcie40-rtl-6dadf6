// tb_tdet_fragment_builder: self-checking test of tdet_fragment_builder.
// Twelve fibers send one frame per bunch crossing (BXID wrapping at 3564)
// with a random per-fiber skew; now and then one fiber misses a crossing,
// which must cost exactly that crossing.  Phase 1 (packet layout) and
// phase 2 (MFP layout) keep the output ready often enough that every
// fragment must arrive whole: each word, SIZE, EVID and the header are
// compared with a model.  Phase 3 stalls the output for long stretches and
// checks that only whole or cut fragments come out, in EVID order, that
// both cut and lost fragments occur, and that the counters agree.
// Expected behaviour follows the block's header comment; stimulus, reduced
// parameter values and check counts are this test's own choices.
module tb_tdet_fragment_builder;
  import pcie40_pkg::*;
  localparam int NFIB = 12, FBITS = 100, PERIOD = 16;
  logic clk = 0, rst_n = 0;
  logic mfp = 0;
  logic             fib_valid [NFIB];
  logic [11:0]      fib_bxid  [NFIB];
  logic [FBITS-1:0] fib_data  [NFIB];
  logic out_valid, out_ready;
  frag_t out;
  logic [31:0] built_cnt, cut_cnt, lost_cnt, fib_drop_cnt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tdet_fragment_builder dut (.*);

  typedef struct { logic [11:0] bx; logic [NFIB*FBITS-1:0] f; } bx_s;
  bx_s exp_q [$];
  int  nbx = 0, stall_pct = 0, phase = 0;
  logic [63:0] next_evid = 0;
  int  frags_ok = 0, frags_cut = 0, missed_bx = 0;

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ---- fiber stimulus: one crossing every PERIOD cycles ----
  initial begin
    for (int f = 0; f < NFIB; f++) begin fib_valid[f] = 0; fib_bxid[f] = 0; fib_data[f] = 0; end
  end
  task automatic send_bx(input logic [11:0] bx);
    bx_s e;
    int skew [NFIB];
    int miss;
    e.bx = bx;
    for (int f = 0; f < NFIB; f++) begin
      e.f[FBITS*f +: FBITS] = {4'($urandom), $urandom, $urandom, $urandom};
      skew[f] = $urandom_range(0, 5);
    end
    miss = ($urandom_range(0, 39) == 0) ? $urandom_range(0, NFIB - 1) : -1;
    if (miss < 0) exp_q.push_back(e); else missed_bx++;
    for (int t = 0; t < PERIOD; t++) begin
      @(negedge clk);
      for (int f = 0; f < NFIB; f++) begin
        fib_valid[f] = (skew[f] == t) && (f != miss);
        fib_bxid[f]  = bx;
        fib_data[f]  = e.f[FBITS*f +: FBITS];
      end
    end
  endtask

  always_ff @(posedge clk) out_ready <= ($urandom_range(0, 99) >= stall_pct);

  // ---- output checker ----
  bx_s cur;
  int  w = 0;
  bit  in_frag = 0;
  logic [WORD_BITS-1:0] exp_w;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int unsigned nw;
      logic [15:0] sz;
      logic [31:0] gh;
      logic [NW_PKT_T*256-1:0] fz;
      logic [NW_PKT_T*256+31:0] s;
      if (out.sop) begin
        if (in_frag) frags_cut++;
        // drop crossings whose fragment was lost while stalled
        while (exp_q.size() > 0 && out.evid != next_evid) begin
          void'(exp_q.pop_front());
          next_evid++;
        end
        check(exp_q.size() > 0 && out.evid == next_evid, "fragment with unexpected EVID");
        cur = exp_q.pop_front();
        next_evid++;
        w = 0;
        in_frag = 1;
      end
      check(in_frag, "word outside a fragment");
      sz = mfp ? 16'd154 : 16'd162;
      nw = mfp ? 5 : 6;
      gh = {sz, 4'b0, cur.bx};
      fz = (NW_PKT_T*256)'(cur.f);
      s  = {fz, gh};
      if (mfp) exp_w = s[256*w +: 256];
      else if (w == 0) exp_w = {out.evid, gh, fz[159:0]};
      else exp_w = fz[256*w - 96 +: 256];
      check(out.size == sz, "SIZE");
      check(out.data == exp_w, $sformatf("data of word %0d of EVID %0d", w, out.evid));
      check(out.eop == (w == int'(nw) - 1), "eop position");
      if (!mfp && w == 0) check(out.data[255:192] == out.evid, "EVID in word 0");
      w++;
      if (out.eop) begin in_frag = 0; frags_ok++; end
    end
  end
  localparam int NW_PKT_T = 6;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] bx;
    int ok_before, lost_expected;
    bx = 12'd3500;                   // crosses the 3564 wrap early on
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (phase = 1; phase <= 3; phase++) begin
      mfp = (phase == 2);
      stall_pct = (phase == 3) ? 80 : 5;
      ok_before = frags_ok;
      for (int i = 0; i < 400; i++) begin
        send_bx(bx);
        bx = (bx == 12'd3563) ? 12'd0 : bx + 12'd1;
      end
      stall_pct = 0;
      repeat (4 * PERIOD) @(posedge clk);
      if (phase < 3) begin
        check(exp_q.size() == 0, $sformatf("phase %0d: %0d fragments missing", phase, exp_q.size()));
        check(cut_cnt == 0 && lost_cnt == 0, "no cut or loss expected with a ready output");
      end
      $display("phase %0d: %0d whole fragments", phase, frags_ok - ok_before);
    end
    lost_expected = int'(built_cnt) - frags_ok - frags_cut - int'(in_frag);
    check(cut_cnt > 0, "stalls never cut a fragment");
    check(lost_cnt > 0, "stalls never lost a fragment");
    check(int'(cut_cnt) == frags_cut, "cut counter");
    check(int'(lost_cnt) == lost_expected, "lost counter");
    check(int'(built_cnt) + missed_bx == 1200, "built + missed crossings");
    // a crossing missed at the very end stays queued: allow one
    check(missed_bx > 1 && fib_drop_cnt >= 32'((missed_bx - 1) * (NFIB - 1)), "misaligned frames dropped");
    $display("built %0d, cut %0d, lost %0d, crossings missed %0d, fiber frames dropped %0d", built_cnt, cut_cnt, lost_cnt, missed_bx, fib_drop_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

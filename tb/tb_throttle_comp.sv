// tb_throttle_comp: self-checking test of throttle_comp.
// Sends multi-word packets whose EVIDs have holes of 1..5, one jump larger
// than MAX_GAP and one jump backwards, under random backpressure.  Checks
// that an empty one-word packet (EVID in bits 255:192, SIZE 0) is inserted for
// every missing EVID of a small hole, nothing for the two restarts, and that
// the packets themselves pass unchanged; checks the counters.
// Expected behaviour follows the block's header comment; stimulus, reduced
// parameter values and check counts are this test's own choices.
module tb_throttle_comp;
  import pcie40_pkg::*;

  logic clk = 0, rst_n = 0, en = 1;
  logic in_valid, in_ready, out_valid, out_ready;
  frag_t in, out;
  logic [31:0] insert_cnt, resync_cnt;
  int checks = 0, failures = 0;
  int exp_ins = 0, exp_res = 0;

  always #5 clk = ~clk;

  throttle_comp #(.MAX_GAP(64)) dut (.*);

  frag_t exp_q[$];
  frag_t drv_q[$];

  task automatic push_packet(input logic [63:0] evid, input logic [63:0] prev, input bit first);
    int n;
    if (!first && evid > prev + 1 && evid - prev - 1 <= 64) begin
      for (logic [63:0] e = prev + 1; e < evid; e++) begin
        frag_t z;
        z = '0; z.data = {e, 192'd0}; z.sop = 1; z.eop = 1; z.evid = e;
        exp_q.push_back(z);
        exp_ins++;
      end
    end else if (!first && evid != prev + 1) exp_res++;
    n = $urandom_range(1, 4);
    for (int j = 0; j < n; j++) begin
      frag_t b;
      b.data = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      b.sop = (j == 0); b.eop = (j == n - 1);
      b.evid = evid; b.ftype = 8'h11; b.size = 16'(32 * n);
      drv_q.push_back(b); exp_q.push_back(b);
    end
  endtask

  always_ff @(posedge clk) if (rst_n && in_valid && in_ready) void'(drv_q.pop_front());
  always_comb begin
    in_valid = rst_n && drv_q.size() > 0;
    in = (drv_q.size() > 0) ? drv_q[0] : '0;
  end
  always_ff @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  always_ff @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      frag_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; if (failures < 50) $display("unexpected output"); end
      else begin
        e = exp_q.pop_front();
        if (out !== e) begin
          failures++;
          $display("mismatch: got evid=%0d sop=%0b size=%0d / exp evid=%0d sop=%0b size=%0d",
                   out.evid, out.sop, out.size, e.evid, e.sop, e.size);
        end
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] ev, prev;
    ev = 64'd1000; prev = 0;
    for (int p = 0; p < 200; p++) begin
      push_packet(ev, prev, p == 0);
      prev = ev;
      if (p == 80) ev = ev + 5000;          // restart far ahead
      else if (p == 120) ev = ev - 300;     // restart backwards
      else ev = ev + (($urandom_range(0, 2) == 0) ? $urandom_range(2, 6) : 1);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (drv_q.size() == 0 && exp_q.size() == 0);
    repeat (3) @(posedge clk);
    checks += 2;
    if (insert_cnt != 32'(exp_ins)) begin failures++; if (failures < 50) $display("insert_cnt %0d exp %0d", insert_cnt, exp_ins); end
    if (resync_cnt != 32'(exp_res)) begin failures++; if (failures < 50) $display("resync_cnt %0d exp %0d", resync_cnt, exp_res); end
    $display("inserted %0d empty packets", insert_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

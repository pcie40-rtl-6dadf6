// tb_truncation_comp: self-checking test of truncation_comp.
// Sends packets whose word count is shorter than, equal to or longer than
// their SIZE asks (also packets cut by the next sop, with no eop), with random
// backpressure, and checks that every packet comes out with exactly
// ceil(SIZE/32) words (at least one): original words first, zero pads after,
// sop on the first and eop on the last.  Also checks the correction counter
// and the pass-through when disabled.
// Expected behaviour follows the block's header comment; stimulus, reduced
// parameter values and check counts are this test's own choices.
module tb_truncation_comp;
  import pcie40_pkg::*;

  logic clk = 0, rst_n = 0, en = 1;
  logic in_valid, in_ready, out_valid, out_ready;
  frag_t in, out;
  logic [31:0] trunc_cnt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  truncation_comp dut (.*);

  frag_t       exp_q[$];
  frag_t       drv_q[$];
  int          exp_trunc = 0;

  task automatic make_packet(input int p);
    logic [15:0] size;
    int w, n, mode;
    size = 16'($urandom_range(1, 200));
    if (p % 7 == 0) size = 0;
    w = int'(words_of(size));
    mode = $urandom_range(0, 3);
    n = (mode == 0) ? w : (mode == 1) ? $urandom_range(1, w) : (mode == 2) ? w + $urandom_range(1, 3) : $urandom_range(1, w + 2);
    if (n != w) exp_trunc++;
    for (int j = 0; j < n; j++) begin
      frag_t b;
      b.data  = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, 16'(p), 16'(j)};
      b.sop   = (j == 0);
      // packets of mode 3 that are short end without eop: the next sop cuts them
      b.eop   = (j == n - 1) && !(mode == 3 && n < w);
      b.evid  = 64'(p); b.ftype = 8'(p); b.size = size;
      drv_q.push_back(b);
      if (j < w) exp_q.push_back(b);
    end
    for (int j = n; j < w; j++) begin
      frag_t b;
      b = '0; b.evid = 64'(p); b.ftype = 8'(p); b.size = size;
      exp_q.push_back(b);
    end
    // fix sop/eop of the expected words
    for (int j = 0; j < w; j++) begin
      exp_q[exp_q.size() - w + j].sop = (j == 0);
      exp_q[exp_q.size() - w + j].eop = (j == w - 1);
    end
  endtask

  // driver
  always_ff @(posedge clk) begin
    if (rst_n && in_valid && in_ready) void'(drv_q.pop_front());
  end
  always_comb begin
    in_valid = rst_n && drv_q.size() > 0;
    in = (drv_q.size() > 0) ? drv_q[0] : '0;
  end
  always_ff @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  // monitor
  always_ff @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      frag_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; if (failures < 50) $display("unexpected output"); end
      else begin
        e = exp_q.pop_front();
        if (out !== e) begin
          failures++;
          $display("mismatch: got sop=%0b eop=%0b d=%h evid=%0d / exp sop=%0b eop=%0b d=%h evid=%0d",
                   out.sop, out.eop, out.data[31:0], out.evid, e.sop, e.eop, e.data[31:0], e.evid);
        end
      end
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
    for (int p = 0; p < 300; p++) make_packet(p);
    // the last packet must end with eop for the queue to drain
    drv_q[drv_q.size() - 1].eop = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (drv_q.size() == 0 && exp_q.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (trunc_cnt != 32'(exp_trunc)) begin
      failures++; if (failures < 50) $display("trunc_cnt %0d expected %0d", trunc_cnt, exp_trunc);
    end
    // disabled: a short packet passes untouched
    en = 0;
    @(negedge clk);
    begin
      frag_t b;
      b = '0; b.data = 256'h1234; b.sop = 1; b.eop = 1; b.size = 16'd100;
      drv_q.push_back(b); exp_q.push_back(b);
    end
    wait (exp_q.size() == 0);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

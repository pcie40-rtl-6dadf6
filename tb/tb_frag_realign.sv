// tb_frag_realign: self-checking test of frag_realign.
// Fragments of 0..200 bytes, sent with the right number of words or with too
// few / too many, under random backpressure on both sides.  Checks that each
// gives ceil(SIZE/16) 16-byte units in order (low half of a word first),
// zeros where words were missing, u_last on the last unit, and one frag_acc
// per fragment.
// Expected behaviour follows the block's header comment; stimulus, reduced
// parameter values and check counts are this test's own choices.
module tb_frag_realign;
  import pcie40_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, u_valid, u_ready, u_last, frag_acc, busy;
  frag_t in;
  logic [127:0] u_data;
  int checks = 0, failures = 0, nfrag = 0, nacc = 0;
  bit in_stall;

  always #5 clk = ~clk;

  frag_realign dut (.*);

  frag_t drv_q[$];
  logic [128:0] exp_q[$];   // {last, unit}

  always_ff @(posedge clk) if (rst_n && in_valid && in_ready) void'(drv_q.pop_front());
  always_ff @(posedge clk) in_stall <= ($urandom_range(0, 4) == 0);
  always_comb begin
    in_valid = rst_n && drv_q.size() > 0 && !in_stall;
    in = (drv_q.size() > 0) ? drv_q[0] : '0;
  end
  always_ff @(posedge clk) u_ready <= ($urandom_range(0, 3) != 0);

  always_ff @(posedge clk) begin
    if (rst_n && frag_acc) nacc++;
    if (rst_n && u_valid && u_ready) begin
      logic [128:0] e;
      checks++;
      if (exp_q.size() == 0) begin failures++; if (failures < 50) $display("unexpected unit"); end
      else begin
        e = exp_q.pop_front();
        if ({u_last, u_data} !== e) begin
          failures++;
          $display("mismatch: got last=%0b %h exp last=%0b %h", u_last, u_data[31:0], e[128], e[31:0]);
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
    for (int f = 0; f < 300; f++) begin
      logic [15:0] size;
      int w, n, u;
      logic [255:0] words [8];
      size = 16'($urandom_range(0, 200));
      w = int'(words_of(size));
      u = int'(units_of(size));
      case ($urandom_range(0, 3))
        0: n = $urandom_range(1, w);
        1: n = w + $urandom_range(1, 2);
        default: n = w;
      endcase
      for (int j = 0; j < n; j++) begin
        frag_t b;
        words[j] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, 16'(f), 16'(j), 32'hABCD0000 + 32'(j)};
        b.data = words[j]; b.sop = (j == 0); b.eop = (j == n - 1);
        b.evid = 64'(f); b.ftype = 8'h5; b.size = size;
        drv_q.push_back(b);
      end
      for (int k = 0; k < u; k++) begin
        logic [127:0] v;
        v = (k / 2 < n) ? words[k / 2][128 * (k % 2) +: 128] : 128'd0;
        exp_q.push_back({k == u - 1, v});
      end
      nfrag++;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (drv_q.size() == 0 && exp_q.size() == 0);
    repeat (3) @(posedge clk);
    checks++;
    if (nacc != nfrag) begin failures++; if (failures < 50) $display("frag_acc %0d exp %0d", nacc, nfrag); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mfp_meta: self-checking test of mfp_meta.
// For several packing factors, and then every one from 1 to 64 (even and
// odd header lengths in 16-byte units)
// it fills the type/size tables of alternating banks, starts a header and
// compares the header words with a byte image built here from the MFP format
// (magic CE 40, NFRAGS, PSIZE, EVID, SRCID, ALIGN=4, FVERSION, FTYPE array
// padded to 4 bytes, FSIZE array, padding to 16 bytes; the lead unit after an
// odd-length header).  Checks the jump flag and base of the first word and
// the cycle count of a header sent without backpressure.
// Expected behaviour follows the block's header comment; stimulus, reduced
// parameter values and check counts are this test's own choices.
module tb_mfp_meta;
  import pcie40_pkg::*;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_bank = 0, start = 0, busy, st_bank = 0;
  logic [15:0] wr_idx = 0, wr_size = 0, st_n = 0, st_srcid = 0;
  logic [7:0] wr_type = 0, st_fversion = 0;
  logic [31:0] st_psize = 0, st_base = 0;
  logic [63:0] st_evid = 0;
  logic [127:0] st_lead = 0;
  logic h_valid, h_ready = 1;
  wr_word_t h_word;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mfp_meta #(.NMAX(256)) dut (.*);

  task automatic run_block(input int n, input bit bank, input bit stall);
    byte unsigned img [];
    byte unsigned ty [];
    shortint unsigned sz [];
    int hb, t0, nw, pos, cycles;
    logic [255:0] w;
    ty = new[n]; sz = new[n];
    // fill tables
    for (int i = 0; i < n; i++) begin
      ty[i] = 8'($urandom); sz[i] = 16'($urandom);
      @(negedge clk);
      wr_en = 1; wr_bank = bank; wr_idx = 16'(i); wr_type = ty[i]; wr_size = sz[i];
    end
    @(negedge clk); wr_en = 0;
    // expected image
    hb = 20 + ((n + 3) / 4) * 4 + 2 * n;
    hb = (hb + 15) / 16 * 16;
    nw = (hb + 31) / 32;
    img = new[nw * 32];
    foreach (img[i]) img[i] = 0;
    st_psize = $urandom; st_evid = {$urandom, $urandom}; st_srcid = 16'($urandom);
    st_fversion = 8'($urandom); st_base = {$urandom_range(0, 1000), 5'd0};
    st_lead = {$urandom, $urandom, $urandom, $urandom};
    img[0] = 8'hCE; img[1] = 8'h40; img[2] = 8'(n); img[3] = 8'(n >> 8);
    for (int b = 0; b < 4; b++) img[4 + b] = st_psize[8*b +: 8];
    for (int b = 0; b < 8; b++) img[8 + b] = st_evid[8*b +: 8];
    img[16] = st_srcid[7:0]; img[17] = st_srcid[15:8]; img[18] = 8'd4; img[19] = st_fversion;
    for (int i = 0; i < n; i++) img[20 + i] = ty[i];
    pos = 20 + ((n + 3) / 4) * 4;
    for (int i = 0; i < n; i++) begin img[pos + 2*i] = sz[i][7:0]; img[pos + 2*i + 1] = sz[i][15:8]; end
    if (hb % 32 == 16) for (int b = 0; b < 16; b++) img[hb + b] = st_lead[8*b +: 8];
    // start
    @(negedge clk);
    start = 1; st_n = 16'(n); st_bank = bank;
    @(negedge clk); start = 0;
    t0 = 0; cycles = 0;
    for (int k = 0; k < nw; k++) begin
      h_ready = stall ? ($urandom_range(0, 1) == 1) : 1'b1;
      while (!(h_valid && h_ready)) begin
        @(negedge clk); cycles++;
        h_ready = stall ? ($urandom_range(0, 1) == 1) : 1'b1;
      end
      for (int b = 0; b < 32; b++) w[8*b +: 8] = img[32*k + b];
      checks++;
      if (h_word.data !== w) begin
        failures++;
        $display("n=%0d word %0d mismatch\n got %h\n exp %h", n, k, h_word.data, w);
      end
      checks++;
      if (h_word.jump !== (k == 0) || (k == 0 && h_word.addr !== st_base)) begin
        failures++; if (failures < 50) $display("n=%0d word %0d jump/addr wrong", n, k);
      end
      @(negedge clk); cycles++;
    end
    h_ready = 1;
    if (!stall) begin
      checks++;
      // one cycle per 32-bit word of header plus one per output word
      if (cycles > hb / 4 + nw + 2) begin
        failures++; if (failures < 50) $display("n=%0d took %0d cycles, expected at most %0d", n, cycles, hb / 4 + nw + 2);
      end
    end
    checks++;
    if (busy) begin failures++; if (failures < 50) $display("busy after last word"); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_block(1, 0, 0);
    run_block(5, 1, 0);
    run_block(8, 0, 1);
    run_block(12, 1, 0);
    run_block(100, 0, 1);
    run_block(256, 1, 0);
    run_block(3, 0, 0);
    // every packing factor up to 64, alternating banks, some with stalls
    for (int n = 1; n <= 64; n++) run_block(n, n % 2, n % 3 == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

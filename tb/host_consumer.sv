// host_consumer: behavioural model of the host side of one DMA stream, for
// testbenches only.  It plays the PCIe root complex and host memory (every
// memory-write TLP lands in a sparse physical memory), the driver (it knows
// the physical base of every host memory block of the stream's map) and the
// reader of the circular buffer: whenever the stream's write offset moves, it
// parses the new data and hands the read offset back RD_DELAY cycles later.
//   mode 0 (byte) and 1 (packet): the new words must equal exp_words, in order.
//   mode 2 (block): the new data must be whole MFPs whose header and
//   fragments match exp_frags.
// The driving testbench fills exp_words / exp_frags hierarchically.  Blocks
// of the map lie in [PHYS_BASE, PHYS_BASE + 64 GiB); with EXT_READY several
// models can watch one shared TX port, each keeping the writes of its range.
// The buffer layouts it parses follow the interface description (packet
// words sized by SIZE; MFP header fields and order); the delays, the block
// placement in host memory and the error reporting are its own choices.
module host_consumer
  import pcie40_pkg::*;
  import tb_host_pkg::*;
#(
  parameter int HOST_LOG2  = 18,
  parameter int BLOCK_LOG2 = 14,
  parameter int RD_DELAY   = 40,
  parameter longint PHYS_BASE = 64'h0000_0010_0000_0000,
  parameter bit  EXT_READY  = 1'b0   // handshake on ext_ready (shared TX port)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  mode,
  input  logic [15:0] pack_n,
  input  logic [15:0] srcid,
  input  logic [7:0]  fversion,
  input  logic        tlp_valid,
  output logic        tlp_ready,
  input  logic        ext_ready,
  input  tlp_t        tlp,
  input  logic [31:0] wr_off,
  output logic [31:0] rd_off,
  output int          checks,
  output int          failures,
  output int          words_seen,
  output int          mfps_seen,
  output int          wraps
);

  logic [255:0] exp_words[$];
  frag_s        exp_frags[$];
  logic [63:0]  blk_base [int];
  logic [255:0] pmem [longint];
  logic [31:0]  parsed;
  int           beat, delay;
  logic [63:0]  tlp_addr;
  bit           stall = 1;

  localparam longint unsigned HMASK = (64'd1 << HOST_LOG2) - 1;

  // a block map chosen so that consecutive blocks are physically scattered
  function automatic logic [63:0] block_phys(input int i);
    return 64'(PHYS_BASE) + 64'((i * 37 + 11) % 1024) * (64'd1 << BLOCK_LOG2) * 2;
  endfunction

  always_ff @(posedge clk) tlp_ready <= stall ? ($urandom_range(0, 4) != 0) : 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      beat = 0;
    end else if (tlp_valid && (EXT_READY ? ext_ready : tlp_ready)) begin
      if (tlp.sop) tlp_addr = tlp.addr;
      if (tlp_addr >= 64'(PHYS_BASE) && tlp_addr < 64'(PHYS_BASE) + 64'h10_0000_0000)
        pmem[longint'((tlp_addr + 64'(32 * beat)) >> 5)] = tlp.data;
      beat = tlp.eop ? 0 : beat + 1;
    end
  end

  function automatic logic [63:0] lin2phys(input longint unsigned l);
    l = l & HMASK;
    return block_phys(int'(l >> BLOCK_LOG2)) + 64'(l & ((64'd1 << BLOCK_LOG2) - 1));
  endfunction
  function automatic logic [255:0] rd_word(input longint unsigned l);
    longint k;
    k = longint'(lin2phys(l) >> 5);
    return pmem.exists(k) ? pmem[k] : {32{8'hEE}};
  endfunction
  function automatic byte unsigned rd_byte(input longint unsigned l);
    logic [255:0] w;
    w = rd_word(l & ~longint'(31));
    return w[8 * (l % 32) +: 8];
  endfunction
  function automatic longint rd_le(input longint unsigned l, input int n);
    longint v = 0;
    for (int i = n - 1; i >= 0; i--) v = (v << 8) | longint'(rd_byte(l + longint'(i)));
    return v;
  endfunction

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 50) $display("%m %s: got %0h expected %0h", what, got, exp); end
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      parsed = 0; rd_off <= 0; delay = 0;
    end else begin
      if (wr_off != parsed && delay == 0) begin
        if (mode != 2'd2) begin
          while (parsed != wr_off) begin
            logic [255:0] e;
            checks++;
            if (exp_words.size() == 0) begin failures++; if (failures < 50) $display("%m: word beyond expected data"); end
            else begin
              e = exp_words.pop_front();
              if (rd_word(longint'(parsed)) !== e) begin
                failures++; if (failures < 50) $display("%m: word at %h wrong", parsed);
              end
            end
            words_seen++;
            if (32'((longint'(parsed) + 32) & HMASK) < parsed) wraps++;
            parsed = 32'((longint'(parsed) + 32) & HMASK);
          end
        end else begin
          while (parsed != wr_off) begin
            longint unsigned b, off, tpos, spos;
            longint ev, ps;
            int n, hb;
            b = longint'(parsed);
            n = int'(pack_n);
            hb = int'(mfp_hdr_bytes(pack_n));
            expect_eq("magic", rd_le(b, 2), 16'h40CE);
            expect_eq("NFRAGS", rd_le(b + 2, 2), n);
            ev = rd_le(b + 8, 8);
            expect_eq("SRCID", rd_le(b + 16, 2), srcid);
            expect_eq("ALIGN", rd_le(b + 18, 1), 4);
            expect_eq("FVERSION", rd_le(b + 19, 1), fversion);
            tpos = b + 20; spos = b + 20 + longint'((n + 3) / 4 * 4);
            off = b + longint'(hb);
            for (int i = 0; i < n; i++) begin
              frag_s f;
              if (exp_frags.size() == 0) begin failures++; if (failures < 50) $display("%m: more fragments than sent"); break; end
              f = exp_frags.pop_front();
              if (i == 0) expect_eq("EVID", ev, longint'(f.evid));
              expect_eq("FTYPE", rd_le(tpos + longint'(i), 1), longint'(f.ty));
              expect_eq("FSIZE", rd_le(spos + longint'(2 * i), 2), longint'(f.size));
              for (int k = 0; k < int'(f.size); k++) begin
                checks++;
                if (rd_byte(off + longint'(k)) != f.w[k / 32][8 * (k % 32) +: 8]) begin
                  failures++; if (failures < 50) $display("%m: fragment %0d of MFP at %h, byte %0d wrong (size %0d, at %h: %h exp %h) wr_off %h", i, b, k, f.size, off, rd_word(off & ~longint'(31)), f.w[0], wr_off); break;
                end
              end
              off += longint'((int'(f.size) + 15) / 16 * 16);
            end
            ps = rd_le(b + 4, 4);
            expect_eq("PSIZE", ps, (off - b + 31) / 32 * 32);
            mfps_seen++;
            if (32'((b + longint'(ps)) & HMASK) < parsed) wraps++;
            parsed = 32'((b + longint'(ps)) & HMASK);
            if (ps == 0) break;
          end
        end
        delay = RD_DELAY;
      end
      if (delay > 0) begin
        delay--;
        if (delay == 0) rd_off <= parsed;
      end
    end
  end

  initial begin checks = 0; failures = 0; words_seen = 0; mfps_seen = 0; wraps = 0; end

endmodule

// dma_stream_mfp: block-mode (MFP) assembler of a DMA stream.
//
// In block mode a stream writes multiple-fragment packets: every pack_n
// fragments form one MFP, a header (built by mfp_meta) followed by the
// fragments realigned to 16 bytes (cut by frag_realign).  As in the PCIe40
// firmware, data and metadata are written in parallel into the same circular
// buffer by two DMA descriptor groups: the MAIN group writes the fragment data
// while the block is still open, leaving room for the header at the start of
// the block, and the META group, which owns no host memory, fills the header
// in once the block is closed and its size known.  The header length is
// known in advance, since it depends only on pack_n, so the data of a block
// with base B starts at B + mfp_hdr_bytes(pack_n).
//
// Packing: 16-byte units are paired into 32-byte words (earlier unit in bits
// 127:0).  If the header length is an odd number of 16-byte units, the
// block's first unit is handed to mfp_meta and travels in the header's last
// word, so no host word is written by both groups.  When pack_n fragments
// have gone by, a half-filled last word is flushed with zeros, the header is
// started, and the next block begins at B + PSIZE, PSIZE being the header plus
// the data rounded up to 32 bytes.
//
// Synchronisation with the host: the write offset may only move past a block
// when both groups have sent all its words.  Each closed block leaves a
// record {end offset, MAIN words, META words} in a small queue; commit_off
// advances to a block's end once main_sent and meta_sent (the cumulative word
// counts of the two writers) reach its record.  Queue depth, the lead-unit
// trick and the word counts are this design's choices; the rest follows the
// document's account of the MFP mechanism.  pack_n, srcid and fversion must
// stay constant while the stream runs.
// Lint lists the realigner's last-unit flag as unused (fragment ends are
// taken from frag_acc) and all but the sign bit of the wrap-safe compares.
module dma_stream_mfp
  import pcie40_pkg::*;
#(
  parameter int unsigned NMAX = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [15:0] pack_n,     // fragments per MFP, 1..NMAX
  input  logic [15:0] srcid,
  input  logic [7:0]  fversion,
  // fragments, after throttle compensation
  input  logic        in_valid,
  output logic        in_ready,
  input  frag_t       in,
  // MAIN descriptor group (fragment data)
  output logic        d_valid,
  input  logic        d_ready,
  output wr_word_t    d_word,
  // META descriptor group (headers)
  output logic        h_valid,
  input  logic        h_ready,
  output wr_word_t    h_word,
  // host synchronisation
  input  logic [31:0] main_sent,
  input  logic [31:0] meta_sent,
  output logic [31:0] commit_off,
  output logic [31:0] blocks_done
);

  localparam int unsigned CQ = 4;           // commit queue depth

  // ---------------------------------------------------------------- block state
  logic [15:0]  fcount;       // fragments in the open block
  logic [31:0]  ucount;       // 16-byte units in the open block
  logic [31:0]  blk_base;     // linear offset of the open block
  logic [63:0]  evid_first;
  logic         wbank;
  logic         pend_valid, first_data, flushing;
  logic [127:0] pend, lead;
  logic [31:0]  hdr_bytes, hdr_words, psize;
  logic         odd;
  logic [31:0]  dcum, hcum;   // words handed to MAIN, to META
  logic         meta_busy, meta_start, take_lead, close_c;

  // ---------------------------------------------------------------- realign
  logic         full_blk, hold_sop;
  logic         r_in_valid, r_in_ready;
  logic         u_valid, u_ready, u_last, frag_acc, r_busy;
  logic [127:0] u_data;

  assign full_blk   = (fcount == pack_n);
  // A full block takes no new fragment; the sop word of the block's last
  // fragment stays visible to the realigner until its high unit is cut.
  assign hold_sop   = in.sop && full_blk && !r_busy;
  assign r_in_valid = en && in_valid && !hold_sop;
  assign in_ready   = en && r_in_ready && !hold_sop;

  frag_realign u_realign (
    .clk, .rst_n,
    .in_valid (r_in_valid), .in_ready (r_in_ready), .in,
    .u_valid, .u_ready, .u_data, .u_last,
    .frag_acc, .busy (r_busy)
  );

  assign hdr_bytes = mfp_hdr_bytes(pack_n);
  assign hdr_words = (hdr_bytes + 32'd31) >> 5;
  assign odd       = hdr_bytes[4];
  assign psize     = (hdr_bytes + (ucount << 4) + 32'd31) & ~32'd31;
  assign take_lead = odd && (ucount == 32'd0);

  // commit queue
  logic [31:0] cq_end [CQ];
  logic [31:0] cq_d   [CQ];
  logic [31:0] cq_h   [CQ];
  logic [$clog2(CQ):0] cq_cnt;
  logic [$clog2(CQ)-1:0] cq_rd, cq_wr;
  logic cq_pop;

  assign close_c = en && full_blk && !r_busy && !pend_valid && !meta_busy &&
                   (cq_cnt != CQ[$clog2(CQ):0]);
  assign meta_start = close_c;

  // units to words
  always_comb begin
    u_ready = 1'b0;
    d_valid = 1'b0;
    d_word.data = {u_data, pend};
    d_word.jump = first_data;
    d_word.addr = blk_base + hdr_bytes + (odd ? 32'd16 : 32'd0);
    if (flushing) begin
      d_valid = 1'b1;
      d_word.data = {128'd0, pend};
    end else if (u_valid) begin
      if (take_lead || !pend_valid) u_ready = 1'b1;
      else begin
        d_valid = 1'b1;
        u_ready = d_ready;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fcount <= '0; ucount <= '0; blk_base <= '0; evid_first <= '0;
      wbank <= 1'b0; pend_valid <= 1'b0; first_data <= 1'b1; flushing <= 1'b0;
      pend <= '0; lead <= '0; dcum <= '0; hcum <= '0; blocks_done <= '0;
    end else begin
      if (frag_acc) begin
        fcount <= fcount + 16'd1;
        if (fcount == 16'd0) evid_first <= in.evid;
      end
      if (d_valid && d_ready) begin
        dcum       <= dcum + 32'd1;
        first_data <= 1'b0;
      end
      if (u_valid && u_ready) begin
        ucount <= ucount + 32'd1;
        if (take_lead) lead <= u_data;
        else if (!pend_valid) begin pend <= u_data; pend_valid <= 1'b1; end
        else pend_valid <= 1'b0;
      end
      // a complete block with a half word left: flush it first
      if (en && full_blk && !r_busy && pend_valid && !flushing) flushing <= 1'b1;
      if (flushing && d_ready) begin flushing <= 1'b0; pend_valid <= 1'b0; end
      if (close_c) begin
        fcount      <= '0;
        ucount      <= '0;
        blk_base    <= blk_base + psize;
        wbank       <= ~wbank;
        first_data  <= 1'b1;
        lead        <= '0;
        hcum        <= hcum + hdr_words;
        blocks_done <= blocks_done + 32'd1;
      end
    end
  end

  // ---------------------------------------------------------------- header
  mfp_meta #(.NMAX(NMAX)) u_meta (
    .clk, .rst_n,
    .wr_en (frag_acc), .wr_bank (wbank), .wr_idx (fcount),
    .wr_type (in.ftype), .wr_size (in.size),
    .start (meta_start), .busy (meta_busy),
    .st_bank (wbank), .st_n (pack_n), .st_psize (psize), .st_evid (evid_first),
    .st_srcid (srcid), .st_fversion (fversion), .st_base (blk_base),
    .st_lead (lead),
    .h_valid, .h_ready, .h_word
  );

  // ---------------------------------------------------------------- commit
  assign cq_pop = (cq_cnt != '0) &&
                  !main_sent_lt(cq_d[cq_rd]) && !meta_sent_lt(cq_h[cq_rd]);

  function automatic logic main_sent_lt(input logic [31:0] t);
    logic [31:0] diff;
    diff = main_sent - t;
    return diff[31];
  endfunction
  function automatic logic meta_sent_lt(input logic [31:0] t);
    logic [31:0] diff;
    diff = meta_sent - t;
    return diff[31];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cq_cnt <= '0; cq_rd <= '0; cq_wr <= '0; commit_off <= '0;
      for (int i = 0; i < CQ; i++) begin cq_end[i] <= '0; cq_d[i] <= '0; cq_h[i] <= '0; end
    end else begin
      if (close_c) begin
        cq_end[cq_wr] <= blk_base + psize;
        cq_d[cq_wr]   <= dcum;
        cq_h[cq_wr]   <= hcum + hdr_words;
        cq_wr         <= cq_wr + 1'b1;
      end
      if (cq_pop) begin
        commit_off <= cq_end[cq_rd];
        cq_rd      <= cq_rd + 1'b1;
      end
      cq_cnt <= cq_cnt + {{$clog2(CQ){1'b0}}, close_c} - {{$clog2(CQ){1'b0}}, cq_pop};
    end
  end

endmodule

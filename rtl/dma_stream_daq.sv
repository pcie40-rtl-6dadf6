// dma_stream_daq: one DMA stream in the FPGA-to-host (DAQ) direction.
//
// To the FPGA logic a stream is a black box: 256-bit words go in with
// valid/ready (plus sop, eop, EVID, TYPE and SIZE in packet and block mode),
// and come out in a circular buffer in host memory, whose write offset the
// stream publishes (wr_off) and whose read offset the host gives back
// (rd_off).  Inside, as in the PCIe40 firmware:
//   byte mode   words go straight to the MAIN descriptor group;
//   packet mode truncation_comp and throttle_comp make every packet as long
//               as its SIZE and the EVID sequence gap-free;
//   block mode  throttle_comp, then dma_stream_mfp packs the fragments into
//               multiple-fragment packets; the MAIN group writes the data and
//               a META group the headers, in parallel, into the same buffer.
// Both groups translate linear offsets through the stream's addr_map and
// share the stream's TLP port through a tx_arbiter.  In block mode wr_off
// only moves past whole blocks whose header and data have both been sent; in
// the other modes it is the end of the last TLP sent.
//
// HAS_MFP leaves out the block-mode logic (block mode then behaves as packet
// mode without truncation compensation).  mode and the MFP settings must be
// set while the stream is held in reset and kept constant while it runs.
// The META group's buffer depth (META_DEPTH), this mode-switching rule and
// the status counters are this design's choices.
//
// Map programming: map_we writes physical block base map_base at block index
// map_idx.  Timing: packet-mode data reaches the TLP port a few cycles after
// its chunk of 8 words is complete; see dma_writer.
// Lint lists the writers' TLP counters and the META write pointer as unused
// (only MAIN's pointer and both word counts matter), and the map_idx bits
// above the table size: the 16-bit index suits every buffer size.
module dma_stream_daq
  import pcie40_pkg::*;
#(
  parameter int unsigned DEPTH         = 1024,   // FPGA buffer, 32 KiB
  parameter int unsigned HOST_LOG2     = 32,     // host buffer, 4 GiB
  parameter int unsigned BLOCK_LOG2    = 22,     // host memory block, 4 MiB
  parameter bit          HAS_MFP       = 1'b1,
  parameter int unsigned NMAX          = 8192,   // largest packing factor
  parameter int unsigned META_DEPTH    = 64,
  parameter int unsigned MAX_GAP       = 4096,
  parameter int unsigned FLUSH_TIMEOUT = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  stream_mode_e mode,
  input  logic [15:0]  pack_n,
  input  logic [15:0]  srcid,
  input  logic [7:0]   fversion,
  input  logic         in_valid,
  output logic         in_ready,
  input  frag_t        in,
  input  logic [31:0]  rd_off,
  output logic [31:0]  wr_off,
  input  logic         map_we,
  input  logic [15:0]  map_idx,
  input  logic [63:0]  map_base,
  output logic         tlp_valid,
  input  logic         tlp_ready,
  output tlp_t         tlp,
  output logic [31:0]  trunc_cnt,
  output logic [31:0]  insert_cnt,
  output logic [31:0]  resync_cnt,
  output logic [31:0]  blocks_done
);

  localparam int unsigned IW = (HOST_LOG2 - BLOCK_LOG2 > 0) ? HOST_LOG2 - BLOCK_LOG2 : 1;

  // A descriptor is translated once, so it must not span two host blocks.
  if (BLOCK_LOG2 < DESC_LOG2) begin : g_check
    $error("dma_stream_daq: host memory blocks must be at least one 8 KiB descriptor");
  end

  logic blk;
  assign blk = HAS_MFP && (mode == MODE_BLOCK);

  // ---------------------------------------------------------------- compensation
  logic  tc_valid, tc_ready, th_valid, th_ready;
  frag_t tc_out, th_out;

  truncation_comp u_trunc (
    .clk, .rst_n, .en (mode == MODE_PACKET),
    .in_valid, .in_ready, .in,
    .out_valid (tc_valid), .out_ready (tc_ready), .out (tc_out),
    .trunc_cnt
  );

  throttle_comp #(.MAX_GAP(MAX_GAP)) u_throttle (
    .clk, .rst_n, .en (mode != MODE_BYTE),
    .in_valid (tc_valid), .in_ready (tc_ready), .in (tc_out),
    .out_valid (th_valid), .out_ready (th_ready), .out (th_out),
    .insert_cnt, .resync_cnt
  );

  // ---------------------------------------------------------------- routing
  logic     main_valid, main_ready, mfp_in_ready;
  wr_word_t main_word;
  logic     d_valid, h_valid, h_ready;
  wr_word_t d_word, h_word;
  logic [31:0] main_sent_ptr, main_words, meta_words, commit_off;

  always_comb begin
    if (blk) begin
      main_valid = d_valid;
      main_word  = d_word;
      th_ready   = mfp_in_ready;
    end else begin
      main_valid = th_valid;
      main_word  = '{data: th_out.data, jump: 1'b0, addr: 32'd0};
      th_ready   = main_ready;
    end
  end

  // Block offsets count modulo 2^32; the buffer wraps at 2^HOST_LOG2.
  localparam logic [31:0] OFF_MASK = (HOST_LOG2 >= 32) ? 32'hFFFF_FFFF : ((32'd1 << HOST_LOG2) - 32'd1);
  assign wr_off = (blk ? commit_off : main_sent_ptr) & OFF_MASK;

  // ---------------------------------------------------------------- map + writers
  logic [31:0] map_lin  [2];
  logic [63:0] map_phys [2];

  addr_map #(.HOST_LOG2(HOST_LOG2), .BLOCK_LOG2(BLOCK_LOG2), .NPORTS(2)) u_map (
    .clk, .we (map_we), .widx (IW'(map_idx)), .wbase (map_base),
    .lin (map_lin), .phys (map_phys)
  );

  logic   w_valid [2];
  logic   w_ready [2];
  tlp_t   w_tlp   [2];
  logic [31:0] main_tlps;

  dma_writer #(.DEPTH(DEPTH), .HOST_LOG2(HOST_LOG2), .CHECK_SPACE(1'b1),
               .FLUSH_TIMEOUT(FLUSH_TIMEOUT)) u_main (
    .clk, .rst_n,
    .in_valid (main_valid), .in_ready (main_ready), .in (main_word),
    .rd_off, .map_lin (map_lin[0]), .map_phys (map_phys[0]), .map_inval (map_we),
    .tlp_valid (w_valid[0]), .tlp_ready (w_ready[0]), .tlp (w_tlp[0]),
    .sent_ptr (main_sent_ptr), .words_sent (main_words), .tlp_cnt (main_tlps)
  );

  if (HAS_MFP) begin : g_mfp
    logic [31:0] meta_ptr, meta_tlps;
    dma_stream_mfp #(.NMAX(NMAX)) u_mfp (
      .clk, .rst_n, .en (blk), .pack_n, .srcid, .fversion,
      .in_valid (th_valid && blk), .in_ready (mfp_in_ready), .in (th_out),
      .d_valid, .d_ready (main_ready), .d_word,
      .h_valid, .h_ready, .h_word,
      .main_sent (main_words), .meta_sent (meta_words),
      .commit_off, .blocks_done
    );
    // The META group owns no host memory: it writes only into space the MAIN
    // group has already reserved, so it needs no space check.
    dma_writer #(.DEPTH(META_DEPTH), .HOST_LOG2(HOST_LOG2), .CHECK_SPACE(1'b0),
                 .FLUSH_TIMEOUT(FLUSH_TIMEOUT)) u_meta (
      .clk, .rst_n,
      .in_valid (h_valid), .in_ready (h_ready), .in (h_word),
      .rd_off, .map_lin (map_lin[1]), .map_phys (map_phys[1]), .map_inval (map_we),
      .tlp_valid (w_valid[1]), .tlp_ready (w_ready[1]), .tlp (w_tlp[1]),
      .sent_ptr (meta_ptr), .words_sent (meta_words), .tlp_cnt (meta_tlps)
    );
  end else begin : g_no_mfp
    assign mfp_in_ready = 1'b0;
    assign d_valid      = 1'b0;
    assign d_word       = '0;
    assign h_valid      = 1'b0;
    assign h_word       = '0;
    assign h_ready      = 1'b0;
    assign meta_words   = '0;
    assign commit_off   = '0;
    assign blocks_done  = '0;
    assign map_lin[1]   = '0;
    assign w_valid[1]   = 1'b0;
    assign w_tlp[1]     = '0;
  end

  tx_arbiter #(.N(2)) u_arb (
    .clk, .rst_n,
    .in_valid (w_valid), .in_ready (w_ready), .in (w_tlp),
    .out_valid (tlp_valid), .out_ready (tlp_ready), .out (tlp)
  );

endmodule

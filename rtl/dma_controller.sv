// dma_controller: all DMA streams of one PCIe interface.
//
// The firmware flavor fixes which streams exist (per PCIe x8 interface):
//   MINIDAQ  a MAIN and an ODIN stream     TELL40  one MAIN stream
//   ODIN     five ODIN streams (ODIN0..4)  NONE    no stream (no DMA)
// A MAIN stream has a 32 KiB FPGA buffer and a 4 GiB host buffer, an ODIN
// stream a 4 KiB FPGA buffer and a 1 GiB host buffer; these figures and the
// flavors are those of the PCIe40 firmware.  The metadata (META) descriptor
// group that gives block mode is attached to stream 0 of every flavor; which
// stream carries it in the MINIDAQ and ODIN flavors is this design's choice.
// All streams' TLPs are merged round robin onto the interface's TX port.
//
// Interface: per-stream arrays of MAX_STREAMS entries (entries beyond the
// flavor's streams are ignored, their outputs read zero).  map_sel picks the
// stream whose address map map_we programs.  Timing: as dma_stream_daq plus
// the combinational arbiter.
// The empty stream slots are constant outputs, which synthesis reports as
// idle: this is expected (see pcie40_top).  resync_cnt of the streams is not
// brought out.
// Lint lists the resync counter as unused for the same reason.
module dma_controller
  import pcie40_pkg::*;
#(
  parameter flavor_e     FLAVOR         = FLAVOR_TELL40,
  parameter int unsigned MAIN_DEPTH     = 1024,  // 32 KiB
  parameter int unsigned MAIN_HOST_LOG2 = 32,    // 4 GiB
  parameter int unsigned ODIN_DEPTH     = 128,   // 4 KiB
  parameter int unsigned ODIN_HOST_LOG2 = 30,    // 1 GiB
  parameter int unsigned BLOCK_LOG2     = 22,    // 4 MiB
  parameter int unsigned NMAX           = 8192,
  parameter int unsigned MAX_GAP        = 4096,
  parameter int unsigned FLUSH_TIMEOUT  = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  stream_mode_e mode       [MAX_STREAMS],
  input  logic [15:0]  pack_n     [MAX_STREAMS],
  input  logic [15:0]  srcid      [MAX_STREAMS],
  input  logic [7:0]   fversion   [MAX_STREAMS],
  input  logic         in_valid   [MAX_STREAMS],
  output logic         in_ready   [MAX_STREAMS],
  input  frag_t        in         [MAX_STREAMS],
  input  logic [31:0]  rd_off     [MAX_STREAMS],
  output logic [31:0]  wr_off     [MAX_STREAMS],
  output logic [31:0]  trunc_cnt  [MAX_STREAMS],
  output logic [31:0]  insert_cnt [MAX_STREAMS],
  output logic [31:0]  blocks_done[MAX_STREAMS],
  input  logic         map_we,
  input  logic [2:0]   map_sel,
  input  logic [15:0]  map_idx,
  input  logic [63:0]  map_base,
  output logic         tlp_valid,
  input  logic         tlp_ready,
  output tlp_t         tlp
);

  localparam int unsigned NS = flavor_streams(FLAVOR);
  localparam int unsigned NA = (NS > 0) ? NS : 1;

  logic s_valid [NA];
  logic s_ready [NA];
  tlp_t s_tlp   [NA];

  for (genvar i = 0; i < MAX_STREAMS; i++) begin : g_s
    if (i < NS) begin : g_on
      localparam bit MAIN = stream_is_main(FLAVOR, i);
      logic [31:0] resync;
      dma_stream_daq #(
        .DEPTH         (MAIN ? MAIN_DEPTH : ODIN_DEPTH),
        .HOST_LOG2     (MAIN ? MAIN_HOST_LOG2 : ODIN_HOST_LOG2),
        .BLOCK_LOG2    (BLOCK_LOG2),
        .HAS_MFP       (i == 0),
        .NMAX          (NMAX),
        .MAX_GAP       (MAX_GAP),
        .FLUSH_TIMEOUT (FLUSH_TIMEOUT)
      ) u_stream (
        .clk, .rst_n,
        .mode (mode[i]), .pack_n (pack_n[i]), .srcid (srcid[i]), .fversion (fversion[i]),
        .in_valid (in_valid[i]), .in_ready (in_ready[i]), .in (in[i]),
        .rd_off (rd_off[i]), .wr_off (wr_off[i]),
        .map_we (map_we && map_sel == 3'(i)), .map_idx, .map_base,
        .tlp_valid (s_valid[i]), .tlp_ready (s_ready[i]), .tlp (s_tlp[i]),
        .trunc_cnt (trunc_cnt[i]), .insert_cnt (insert_cnt[i]),
        .resync_cnt (resync), .blocks_done (blocks_done[i])
      );
    end else begin : g_off
      assign in_ready[i]    = 1'b0;
      assign wr_off[i]      = '0;
      assign trunc_cnt[i]   = '0;
      assign insert_cnt[i]  = '0;
      assign blocks_done[i] = '0;
    end
  end

  if (NS > 0) begin : g_arb
    tx_arbiter #(.N(NS)) u_arb (
      .clk, .rst_n,
      .in_valid (s_valid), .in_ready (s_ready), .in (s_tlp),
      .out_valid (tlp_valid), .out_ready (tlp_ready), .out (tlp)
    );
  end else begin : g_none
    assign s_valid[0] = 1'b0;
    assign s_tlp[0]   = '0;
    assign tlp_valid  = 1'b0;
    assign tlp        = '0;
  end

endmodule

// pcie40_top: the DMA side of a PCIe40 board.
//
// The board reaches the host through two PCIe Gen3 x8 interfaces (about
// 56 Gbit/s each, 112 Gbit/s for the board).  Each interface has its own DMA
// controller holding the streams of the chosen firmware flavor (TELL40 by
// default: one MAIN stream per interface, with block-mode metadata).  The
// PCIe hard IP, the control-system BARs and the host driver are outside this
// RTL: each controller's memory-write TLP port and each stream's
// configuration, address-map programming port and read/write offsets are
// brought out as ports, indexed [interface][stream].
// Each interface also holds a TDET fragment builder, the example front end:
// with tdet_sel[k] set it replaces the in[k][0] port as the source of stream
// 0 (packet layout in packet mode, MFP layout in block mode) and in_ready
// [k][0] reads low.  The builder's fiber inputs and counters are ports; its
// dropped-frame counter is not brought out.
// Timing: as dma_controller; the source select is combinational.
//
// Synthesis reports many constant outputs at the default TELL40 flavor: the
// stream arrays have MAX_STREAMS = 5 slots so that every flavor fits the
// same port list, and the four slots TELL40 leaves empty read zero.  The
// TLP length field also has constant upper bits.  These are expected.  The
// two-interface structure and the flavors follow the PCIe40 description;
// the port layout is this design's choice.
// Lint lists the TDET dropped-frame counter as unused: it is not a port.
module pcie40_top
  import pcie40_pkg::*;
#(
  parameter flavor_e     FLAVOR         = FLAVOR_TELL40,
  parameter int unsigned NIF            = 2,     // PCIe interfaces per board
  parameter int unsigned MAIN_DEPTH     = 1024,
  parameter int unsigned MAIN_HOST_LOG2 = 32,
  parameter int unsigned ODIN_DEPTH     = 128,
  parameter int unsigned ODIN_HOST_LOG2 = 30,
  parameter int unsigned BLOCK_LOG2     = 22,
  parameter int unsigned NMAX           = 8192,
  parameter int unsigned MAX_GAP        = 4096,
  parameter int unsigned FLUSH_TIMEOUT  = 64,
  localparam int unsigned TDET_NFIB     = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  stream_mode_e mode        [NIF][MAX_STREAMS],
  input  logic [15:0]  pack_n      [NIF][MAX_STREAMS],
  input  logic [15:0]  srcid       [NIF][MAX_STREAMS],
  input  logic [7:0]   fversion    [NIF][MAX_STREAMS],
  input  logic         in_valid    [NIF][MAX_STREAMS],
  output logic         in_ready    [NIF][MAX_STREAMS],
  input  frag_t        in          [NIF][MAX_STREAMS],
  input  logic [31:0]  rd_off      [NIF][MAX_STREAMS],
  output logic [31:0]  wr_off      [NIF][MAX_STREAMS],
  output logic [31:0]  trunc_cnt   [NIF][MAX_STREAMS],
  output logic [31:0]  insert_cnt  [NIF][MAX_STREAMS],
  output logic [31:0]  blocks_done [NIF][MAX_STREAMS],
  input  logic         map_we      [NIF],
  input  logic [2:0]   map_sel     [NIF],
  input  logic [15:0]  map_idx     [NIF],
  input  logic [63:0]  map_base    [NIF],
  output logic         tlp_valid   [NIF],
  input  logic         tlp_ready   [NIF],
  output tlp_t         tlp         [NIF],
  // TDET front end, one per interface, feeding stream 0 when tdet_sel is set
  input  logic         tdet_sel       [NIF],
  input  logic         tdet_fib_valid [NIF][TDET_NFIB],
  input  logic [11:0]  tdet_fib_bxid  [NIF][TDET_NFIB],
  input  logic [99:0]  tdet_fib_data  [NIF][TDET_NFIB],
  output logic [31:0]  tdet_built     [NIF],
  output logic [31:0]  tdet_cut       [NIF],
  output logic [31:0]  tdet_lost      [NIF]
);

  for (genvar k = 0; k < NIF; k++) begin : g_if
    // stream 0 input: the port, or the TDET builder when tdet_sel is set
    logic        c_valid [MAX_STREAMS];
    logic        c_ready [MAX_STREAMS];
    frag_t       c_in    [MAX_STREAMS];
    logic        t_valid, t_ready;
    frag_t       t_out;
    logic [31:0] t_drop;

    tdet_fragment_builder #(.NFIB (TDET_NFIB), .FBITS (100)) u_tdet (
      .clk, .rst_n, .mfp (mode[k][0] == MODE_BLOCK),
      .fib_valid (tdet_fib_valid[k]), .fib_bxid (tdet_fib_bxid[k]), .fib_data (tdet_fib_data[k]),
      .out_valid (t_valid), .out_ready (t_ready), .out (t_out),
      .built_cnt (tdet_built[k]), .cut_cnt (tdet_cut[k]), .lost_cnt (tdet_lost[k]),
      .fib_drop_cnt (t_drop)
    );

    always_comb begin
      for (int s = 0; s < MAX_STREAMS; s++) begin
        c_valid[s]     = in_valid[k][s];
        c_in[s]        = in[k][s];
        in_ready[k][s] = c_ready[s];
      end
      t_ready = tdet_sel[k] && c_ready[0];
      if (tdet_sel[k]) begin
        c_valid[0]     = t_valid;
        c_in[0]        = t_out;
        in_ready[k][0] = 1'b0;
      end
    end

    dma_controller #(
      .FLAVOR (FLAVOR), .MAIN_DEPTH (MAIN_DEPTH), .MAIN_HOST_LOG2 (MAIN_HOST_LOG2),
      .ODIN_DEPTH (ODIN_DEPTH), .ODIN_HOST_LOG2 (ODIN_HOST_LOG2),
      .BLOCK_LOG2 (BLOCK_LOG2), .NMAX (NMAX), .MAX_GAP (MAX_GAP),
      .FLUSH_TIMEOUT (FLUSH_TIMEOUT)
    ) u_ctrl (
      .clk, .rst_n,
      .mode (mode[k]), .pack_n (pack_n[k]), .srcid (srcid[k]), .fversion (fversion[k]),
      .in_valid (c_valid), .in_ready (c_ready), .in (c_in),
      .rd_off (rd_off[k]), .wr_off (wr_off[k]),
      .trunc_cnt (trunc_cnt[k]), .insert_cnt (insert_cnt[k]), .blocks_done (blocks_done[k]),
      .map_we (map_we[k]), .map_sel (map_sel[k]), .map_idx (map_idx[k]), .map_base (map_base[k]),
      .tlp_valid (tlp_valid[k]), .tlp_ready (tlp_ready[k]), .tlp (tlp[k])
    );
  end

endmodule

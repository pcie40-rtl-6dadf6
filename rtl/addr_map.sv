// addr_map: the virtual memory map of one DMA stream.
//
// The host kernel can only hand out physically contiguous DMA memory in blocks
// of at most 4 MiB, while a stream's circular buffer is up to 4 GiB.  The
// driver therefore chains many blocks in a linear list, independent of their
// physical addresses, and the stream writes to linear offsets that this map
// turns into physical addresses: entry i holds the physical base of the
// block that covers linear offsets [i*2^BLOCK_LOG2, (i+1)*2^BLOCK_LOG2).
// The map itself follows the PCIe40 description; equal-size blocks, the table
// write port and NPORTS combinational read ports are this design's choices.
//
// Interface: we/widx/wbase program one entry (wbase must be block aligned;
// its low BLOCK_LOG2 bits are ignored).  lin[i] -> phys[i] is combinational.
// The table has no reset: the host programs every entry before use.
// The low BLOCK_LOG2 bits of each phys output are the lin input's own bits,
// so synthesis lists them as outputs without logic; that is intended.
// Lint lists the low BLOCK_LOG2 bits of wbase as unused, as stated above.
module addr_map #(
  parameter int unsigned HOST_LOG2  = 32,  // circular buffer size, 4 GiB
  parameter int unsigned BLOCK_LOG2 = 22,  // host memory block size, 4 MiB
  parameter int unsigned NPORTS     = 2,
  localparam int unsigned NBLK      = 1 << (HOST_LOG2 - BLOCK_LOG2),
  localparam int unsigned IW        = (NBLK > 1) ? $clog2(NBLK) : 1
) (
  input  logic               clk,
  input  logic               we,
  input  logic [IW-1:0]      widx,
  input  logic [63:0]        wbase,
  input  logic [31:0]        lin  [NPORTS],
  output logic [63:0]        phys [NPORTS]
);

  logic [63-BLOCK_LOG2:0] tab [NBLK];

  always_ff @(posedge clk)
    if (we) tab[widx] <= wbase[63:BLOCK_LOG2];

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    logic [IW-1:0] idx;
    assign idx     = IW'(lin[p][HOST_LOG2-1:BLOCK_LOG2]);
    assign phys[p] = {tab[idx], lin[p][BLOCK_LOG2-1:0]};
  end

endmodule

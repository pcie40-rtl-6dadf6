// pcie40_pkg: types and constants shared by the PCIe40 DMA stream RTL.
//
// A DMA stream accepts 256-bit words from the FPGA logic (valid/ready, with
// optional start/end-of-packet flags and a per-packet EVID, TYPE and SIZE),
// and writes them into a circular buffer in host memory through PCIe memory
// write requests (TLPs).  The 256-bit word, the packet fields (64-bit EVID,
// 8-bit TYPE, 16-bit SIZE in bytes), the three stream modes, the 256-byte TLP
// payload, the 8 KiB descriptor, the 4 MiB host memory block, the flavors and
// the MFP header layout (magic bytes 0xCE 0x40, NFRAGS, PSIZE, EVID, SRCID,
// ALIGN, FVERSION, FTYPE and FSIZE arrays, little-endian) follow the
// description of the PCIe40 firmware.  The way these are packed into structs
// and the TLP bundle are this design's own choices.
package pcie40_pkg;

  localparam int unsigned WORD_BITS  = 256;          // stream data width
  localparam int unsigned WORD_BYTES = WORD_BITS / 8; // 32 bytes
  localparam int unsigned TLP_BYTES  = 256;          // TLP payload (MPS)
  localparam int unsigned TLP_WORDS  = TLP_BYTES / WORD_BYTES; // 8
  localparam int unsigned DESC_LOG2  = 13;           // 8 KiB per descriptor

  // Fragment realignment unit of block mode: 2^MFP_ALIGN bytes (16 bytes).
  localparam int unsigned MFP_ALIGN  = 4;
  localparam logic [7:0]  MFP_MAGIC0 = 8'hCE;
  localparam logic [7:0]  MFP_MAGIC1 = 8'h40;
  localparam int unsigned MFP_COMMON_BYTES = 20;     // common header fields

  typedef enum logic [1:0] {
    MODE_BYTE   = 2'd0,   // raw: data format agnostic
    MODE_PACKET = 2'd1,   // fragments delimited by SOP/EOP
    MODE_BLOCK  = 2'd2    // multi-fragment packets (MFP)
  } stream_mode_e;

  typedef enum logic [1:0] {
    FLAVOR_NONE    = 2'd0,
    FLAVOR_MINIDAQ = 2'd1,
    FLAVOR_TELL40  = 2'd2,
    FLAVOR_ODIN    = 2'd3
  } flavor_e;

  // One beat of the FPGA-side stream.  evid/ftype/size are meaningful on the
  // beat with sop set and are carried unchanged on the other beats.
  typedef struct packed {
    logic [WORD_BITS-1:0] data;
    logic                 sop;
    logic                 eop;
    logic [63:0]          evid;
    logic [7:0]           ftype;
    logic [15:0]          size;
  } frag_t;

  // One word handed to a DMA descriptor group.  When jump is set the word is
  // written at linear byte offset addr, otherwise right after the previous one.
  typedef struct packed {
    logic [WORD_BITS-1:0] data;
    logic                 jump;
    logic [31:0]          addr;
  } wr_word_t;

  // One beat of a memory write request towards the PCIe transaction layer.
  // addr (physical, byte) and len (1..8 words) are valid on every beat.
  typedef struct packed {
    logic [63:0]          addr;
    logic [3:0]           len;
    logic                 sop;
    logic                 eop;
    logic [WORD_BITS-1:0] data;
  } tlp_t;

  // Number of 32-byte words a packet of 'size' bytes occupies (at least one).
  function automatic logic [11:0] words_of(input logic [15:0] size);
    logic [11:0] w;
    w = 12'((17'(size) + 17'd31) >> 5);
    return (w == 12'd0) ? 12'd1 : w;
  endfunction

  // Number of 16-byte units a fragment of 'size' bytes occupies in block mode.
  function automatic logic [12:0] units_of(input logic [15:0] size);
    return 13'((17'(size) + 17'd15) >> 4);
  endfunction

  // MFP header length in bytes for n fragments: 20 common bytes, the FTYPE
  // array padded to 32 bits, the FSIZE array, all padded to 2^MFP_ALIGN.
  function automatic logic [31:0] mfp_hdr_bytes(input logic [15:0] n);
    logic [31:0] t;
    t = 32'(MFP_COMMON_BYTES) + ((32'(n) + 32'd3) & ~32'd3) + 32'(n) * 2;
    return (t + 32'd15) & ~32'd15;
  endfunction

  // Streams per DMA controller (one PCIe x8 interface) for each flavor.
  localparam int unsigned MAX_STREAMS = 5;
  function automatic int unsigned flavor_streams(input flavor_e f);
    case (f)
      FLAVOR_MINIDAQ: return 2;   // MAIN + ODIN
      FLAVOR_TELL40:  return 1;   // MAIN
      FLAVOR_ODIN:    return 5;   // ODIN0..ODIN4
      default:        return 0;   // no DMA
    endcase
  endfunction
  // 1 for a MAIN stream (32 KiB FPGA buffer, 4 GiB host buffer), 0 for an
  // ODIN stream (4 KiB FPGA buffer, 1 GiB host buffer).
  function automatic bit stream_is_main(input flavor_e f, input int unsigned i);
    return (f == FLAVOR_MINIDAQ || f == FLAVOR_TELL40) && i == 0;
  endfunction

endpackage

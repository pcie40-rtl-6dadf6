// tdet_fragment_builder: example front-end data processing that turns the
// frames of NFIB front-end fibers into one fragment per bunch crossing.
//
// What it does, per aligned bunch crossing (BX):
//   1. aligns all fibers to the same BXID, 2. removes the BXID,
//   3. concatenates the fibers, 4. pads, 5. adds the EVID (packet mode only),
//   6. truncates when the output is not ready in time, 7. sends the fragment.
// These seven steps and the sizes (100 bits x 12 fibers, a 32-bit header,
// 8-byte EVID, 192-byte fragment without MFP and 154 + 6 = 160 bytes with
// MFP) follow the TDET example of the PCIe40 description.  How each step
// is done is this design's choice:
//   - Alignment: each fiber has an ADEPTH-frame FIFO.  When every FIFO holds
//     a frame and all head BXIDs match, the heads are popped and become one
//     fragment.  Otherwise every head that is behind some other head (12-bit
//     modular compare) is popped and lost.  A dead fiber stalls the builder.
//   - Every aligned BX is accepted: the acceptance rule is not described.
//   - The 32-bit global header is {16-bit SIZE, 4'b0, BXID}.  Its content
//     is not described.
//   - Packet mode (mfp = 0): word 0 is {EVID[255:192], header[191:160],
//     fiber bits [159:0]} as in the PCIe40 fragment picture; later words
//     carry the following fiber bits; SIZE = 162 bytes, 6 words.
//     Block mode (mfp = 1): no EVID in the data.  The fragment is the little-
//     endian byte string {header, fibers} (header in bits [31:0] of word 0),
//     SIZE = 154 bytes, 5 words.  The EVID still travels in the side band.
//   - Truncation: a fragment holds one output register.  When the next BX is
//     aligned before the register has been sent, the old fragment gives way:
//     if some of its words were accepted it is cut (the next packet's sop
//     follows and truncation compensation pads it), otherwise it is dropped
//     whole (its EVID is missing and throttle compensation fills the gap).
//     The output beat changes while valid is high only in this case.
// Fiber f's payload occupies bits [FBITS*f +: FBITS] of the fiber string.
//
// Interface: per fiber a valid strobe with {BXID, payload}; no backpressure
// on the fibers (a full FIFO drops the frame, fib_drop_cnt).  Output is a
// frag_t stream with valid/ready.  Timing: the fragment is available two
// cycles after the last fiber's frame; one word per cycle after that.
// TYPE is always 0 and SIZE never exceeds 255, so synthesis reports those
// output bits as constant.  The block sits in front of a stream's input, on
// the user side of the interface: pcie40_top holds one per PCIe interface,
// selectable as the source of stream 0.
module tdet_fragment_builder
  import pcie40_pkg::*;
#(
  parameter int unsigned NFIB   = 12,   // widebus fibers
  parameter int unsigned FBITS  = 100,  // payload bits per fiber after BXID removal
  parameter int unsigned ADEPTH = 8,    // alignment FIFO depth (own choice)
  localparam int unsigned HDR_BITS = 32,
  localparam int unsigned PBYTES   = (NFIB * FBITS + HDR_BITS + 7) / 8,  // 154
  localparam int unsigned NW_PKT   = (PBYTES + 8 + WORD_BYTES - 1) / WORD_BYTES,  // 6
  localparam int unsigned NW_MFP   = (PBYTES + WORD_BYTES - 1) / WORD_BYTES,      // 5
  localparam int unsigned FZ_BITS  = NW_PKT * WORD_BITS,
  localparam int unsigned AAW      = $clog2(ADEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mfp,                        // 1: block (MFP) layout
  input  logic             fib_valid [NFIB],
  input  logic [11:0]      fib_bxid  [NFIB],
  input  logic [FBITS-1:0] fib_data  [NFIB],
  output logic             out_valid,
  input  logic             out_ready,
  output frag_t            out,
  output logic [31:0]      built_cnt,                  // fragments built
  output logic [31:0]      cut_cnt,                    // cut after their first word
  output logic [31:0]      lost_cnt,                   // dropped before their first word
  output logic [31:0]      fib_drop_cnt                // frames lost to misalignment or overflow
);

  // ---- per-fiber alignment FIFOs ----
  logic [11:0]      a_bx   [NFIB][ADEPTH];
  logic [FBITS-1:0] a_dat  [NFIB][ADEPTH];
  logic [AAW:0]     a_wp   [NFIB];
  logic [AAW:0]     a_rp   [NFIB];
  logic             a_ne   [NFIB];
  logic             a_full [NFIB];
  logic [11:0]      head   [NFIB];
  logic             pop    [NFIB];

  for (genvar f = 0; f < NFIB; f++) begin : g_fib
    assign a_ne[f]   = a_wp[f] != a_rp[f];
    assign a_full[f] = (a_wp[f] - a_rp[f]) == (AAW + 1)'(ADEPTH);
    assign head[f]   = a_bx[f][a_rp[f][AAW-1:0]];
    always_ff @(posedge clk) begin
      if (fib_valid[f] && !a_full[f]) begin
        a_bx[f][a_wp[f][AAW-1:0]]  <= fib_bxid[f];
        a_dat[f][a_wp[f][AAW-1:0]] <= fib_data[f];
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        a_wp[f] <= '0;
        a_rp[f] <= '0;
      end else begin
        if (fib_valid[f] && !a_full[f]) a_wp[f] <= a_wp[f] + 1'b1;
        if (pop[f]) a_rp[f] <= a_rp[f] + 1'b1;
      end
    end
  end

  // b is later than a (modular 12-bit compare)
  function automatic logic later(input logic [11:0] b, input logic [11:0] a);
    logic [11:0] d;
    d = b - a;
    return (d != 12'd0) && !d[11];
  endfunction

  logic all_ne, aligned;
  int unsigned n_pop, n_over;
  always_comb begin
    all_ne = 1'b1;
    aligned = 1'b1;
    for (int f = 0; f < NFIB; f++) begin
      if (!a_ne[f]) all_ne = 1'b0;
      if (head[f] != head[0]) aligned = 1'b0;
    end
    aligned = aligned && all_ne;
    n_pop  = 0;
    n_over = 0;
    for (int f = 0; f < NFIB; f++) begin
      logic behind;
      behind = 1'b0;
      for (int g = 0; g < NFIB; g++) if (later(head[g], head[f])) behind = 1'b1;
      pop[f] = all_ne && (aligned || behind);
      if (pop[f] && !aligned) n_pop++;
      if (fib_valid[f] && a_full[f]) n_over++;
    end
  end

  // ---- fragment assembly (registered) ----
  logic [NFIB*FBITS-1:0] fibs;
  always_comb
    for (int f = 0; f < NFIB; f++) fibs[FBITS*f +: FBITS] = a_dat[f][a_rp[f][AAW-1:0]];

  logic [FZ_BITS-1:0]   fz;
  logic [15:0]          sz;
  logic [HDR_BITS-1:0]  gh;
  logic [FZ_BITS+HDR_BITS-1:0] s_mfp;
  assign fz    = FZ_BITS'(fibs);
  assign sz    = mfp ? 16'(PBYTES) : 16'(PBYTES + 8);
  assign gh    = {sz, 4'b0, head[0]};
  assign s_mfp = {fz, gh};

  logic [WORD_BITS-1:0] frm [NW_PKT];
  logic [63:0]          evid, frm_evid;
  logic [15:0]          frm_size;
  logic [2:0]           frm_nw, widx;
  logic                 frm_valid, started;

  logic last_acc;
  assign last_acc = out_valid && out_ready && (widx == frm_nw - 3'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frm_valid    <= 1'b0;
      started      <= 1'b0;
      widx         <= '0;
      frm_nw       <= '0;
      frm_size     <= '0;
      frm_evid     <= '0;
      evid         <= '0;
      built_cnt    <= '0;
      cut_cnt      <= '0;
      lost_cnt     <= '0;
      fib_drop_cnt <= '0;
      for (int k = 0; k < NW_PKT; k++) frm[k] <= '0;
    end else begin
      fib_drop_cnt <= fib_drop_cnt + 32'(n_pop) + 32'(n_over);
      if (out_valid && out_ready) begin
        started <= 1'b1;
        widx    <= widx + 3'd1;
        if (last_acc) begin
          frm_valid <= 1'b0;
          started   <= 1'b0;
          widx      <= '0;
        end
      end
      if (aligned) begin
        if (frm_valid && !last_acc) begin
          if (started || (out_valid && out_ready)) cut_cnt  <= cut_cnt + 1;
          else                                      lost_cnt <= lost_cnt + 1;
        end
        frm_valid <= 1'b1;
        started   <= 1'b0;
        widx      <= '0;
        frm_evid  <= evid;
        frm_size  <= sz;
        frm_nw    <= mfp ? 3'(NW_MFP) : 3'(NW_PKT);
        evid      <= evid + 64'd1;
        built_cnt <= built_cnt + 1;
        for (int k = 0; k < NW_PKT; k++) begin
          if (mfp)         frm[k] <= s_mfp[WORD_BITS*k +: WORD_BITS];
          else if (k == 0) frm[k] <= {evid, gh, fz[159:0]};
          else             frm[k] <= fz[WORD_BITS*k - 96 +: WORD_BITS];
        end
      end
    end
  end

  assign out_valid = frm_valid;
  always_comb begin
    out      = '0;
    out.data = frm[widx];
    out.sop  = (widx == 3'd0);
    out.eop  = (widx == frm_nw - 3'd1);
    out.evid = frm_evid;
    out.ftype = 8'd0;
    out.size = frm_size;
  end

endmodule

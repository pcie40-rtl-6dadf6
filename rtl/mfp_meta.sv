// mfp_meta: metadata packing of block mode (MFP header generator).
//
// An MFP (multiple-fragment packet) groups NFRAGS consecutive fragments of a
// stream behind one header that holds the EVID of the first fragment only
// (saving 64 bits per fragment) and two lookup tables, the 8-bit type and the
// 16-bit size of every fragment, so that software finds fragment n in
// constant time.  The header layout follows the MFP format of the PCIe40
// firmware, all fields unsigned and little-endian:
//   bytes 0,1 magic 0xCE 0x40 | 2-3 NFRAGS | 4-7 PSIZE | 8-15 EVID |
//   16-17 SRCID | 18 ALIGN | 19 FVERSION | FTYPE[1..N] padded to 32 bits |
//   FSIZE[1..N] | padding to 2^ALIGN bytes.
// While a block's fragments go by, wr_* stores each TYPE and SIZE into the
// tables of bank wr_bank.  start then hands over a closed block; the block
// walks the header one 32-bit word per cycle, reading the tables of st_bank,
// and sends it as 32-byte words, the first one flagged to be written at
// linear offset st_base.  Two banks let the next block fill its tables while
// this header is sent.  When the header ends in the middle of a 32-byte word
// its upper 16 bytes carry st_lead, the first 16-byte unit of the block's
// data, so that header and data never share a host word between the two
// writers.  Table banking, the one-dword-per-cycle walk and the lead unit are
// this design's choices.
//
// Timing: about H/4 + H/32 cycles per header of H bytes; busy from start to
// the last header word accepted.
// Lint lists the wr_idx bits above log2(NMAX) as unused: the 16-bit index
// suits any NMAX.
module mfp_meta
  import pcie40_pkg::*;
#(
  parameter int unsigned NMAX = 8192   // largest packing factor (power of 2)
) (
  input  logic         clk,
  input  logic         rst_n,
  // table writes, one per fragment
  input  logic         wr_en,
  input  logic         wr_bank,
  input  logic [15:0]  wr_idx,
  input  logic [7:0]   wr_type,
  input  logic [15:0]  wr_size,
  // closing a block
  input  logic         start,
  output logic         busy,
  input  logic         st_bank,
  input  logic [15:0]  st_n,
  input  logic [31:0]  st_psize,
  input  logic [63:0]  st_evid,
  input  logic [15:0]  st_srcid,
  input  logic [7:0]   st_fversion,
  input  logic [31:0]  st_base,
  input  logic [127:0] st_lead,
  // header words towards the META descriptor group
  output logic         h_valid,
  input  logic         h_ready,
  output wr_word_t     h_word
);

  localparam int unsigned TW = $clog2(NMAX / 4);  // type table index bits
  localparam int unsigned SW = $clog2(NMAX / 2);  // size table index bits

  logic [31:0] type_tab [2*(NMAX/4)];
  logic [31:0] size_tab [2*(NMAX/2)];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      type_tab[{wr_bank, wr_idx[TW+1:2]}][8*wr_idx[1:0] +: 8] <= wr_type;
      size_tab[{wr_bank, wr_idx[SW:1]}][16*wr_idx[0] +: 16]   <= wr_size;
    end
  end

  typedef enum logic [1:0] {S_IDLE, S_GEN, S_OUT} state_e;
  state_e       state;
  logic         bank;
  logic [15:0]  n;
  logic [31:0]  psize, base;
  logic [63:0]  evid;
  logic [15:0]  srcid;
  logic [7:0]   fversion;
  logic [127:0] lead;
  logic [31:0]  d, nd;         // dword index, dwords in header
  logic [31:0]  t4, s2;        // dwords of the type table, of the size table
  logic [31:0]  acc [8];
  logic         first;

  logic [31:0] dw, jt, js, te, se;
  assign jt = d - 32'd5;
  assign js = d - 32'd5 - t4;
  assign te = type_tab[{bank, jt[TW-1:0]}];
  assign se = size_tab[{bank, js[SW-1:0]}];

  always_comb begin
    dw = '0;
    if (d == 32'd0)      dw = {n, MFP_MAGIC1, MFP_MAGIC0};
    else if (d == 32'd1) dw = psize;
    else if (d == 32'd2) dw = evid[31:0];
    else if (d == 32'd3) dw = evid[63:32];
    else if (d == 32'd4) dw = {fversion, 8'(MFP_ALIGN), srcid};
    else if (d < 32'd5 + t4) begin
      for (int b = 0; b < 4; b++)
        if (4 * jt + 32'(b) < 32'(n)) dw[8*b +: 8] = te[8*b +: 8];
    end else if (d < 32'd5 + t4 + s2) begin
      for (int b = 0; b < 2; b++)
        if (2 * js + 32'(b) < 32'(n)) dw[16*b +: 16] = se[16*b +: 16];
    end
  end

  assign busy            = (state != S_IDLE);
  assign h_valid         = (state == S_OUT);
  assign h_word.data     = {acc[7], acc[6], acc[5], acc[4], acc[3], acc[2], acc[1], acc[0]};
  assign h_word.jump     = first;
  assign h_word.addr     = base;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      bank  <= 1'b0;
      n     <= '0;
      psize <= '0;
      base  <= '0;
      evid  <= '0;
      srcid <= '0;
      fversion <= '0;
      lead  <= '0;
      d     <= '0;
      nd    <= '0;
      t4    <= '0;
      s2    <= '0;
      first <= 1'b0;
      for (int i = 0; i < 8; i++) acc[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          bank     <= st_bank;
          n        <= st_n;
          psize    <= st_psize;
          base     <= st_base;
          evid     <= st_evid;
          srcid    <= st_srcid;
          fversion <= st_fversion;
          lead     <= st_lead;
          d        <= '0;
          nd       <= mfp_hdr_bytes(st_n) >> 2;
          t4       <= (32'(st_n) + 32'd3) >> 2;
          s2       <= (32'(st_n) + 32'd1) >> 1;
          first    <= 1'b1;
          state    <= S_GEN;
        end
        S_GEN: begin
          acc[d[2:0]] <= dw;
          d <= d + 32'd1;
          if (d + 32'd1 == nd) begin
            if (d[2:0] == 3'd3) begin        // header ends mid-word
              acc[4] <= lead[31:0];
              acc[5] <= lead[63:32];
              acc[6] <= lead[95:64];
              acc[7] <= lead[127:96];
            end
            state <= S_OUT;
          end else if (d[2:0] == 3'd7) begin
            state <= S_OUT;
          end
        end
        S_OUT: if (h_ready) begin
          first <= 1'b0;
          state <= (d == nd) ? S_IDLE : S_GEN;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

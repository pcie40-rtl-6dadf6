// truncation_comp: packet-mode truncation compensation.
//
// Upstream logic that meets backpressure may cut a packet in the middle: it
// ends it early with eop, or starts the next packet (sop) before the old one
// ended.  A consumer that parses the buffer by the SIZE field would then lose
// track.  This block makes every packet occupy exactly words_of(SIZE) 32-byte
// words: a packet that ends early is padded with zero words, words beyond
// SIZE are dropped and eop is moved to the last word SIZE allows.  Words that
// arrive outside any packet are dropped.  The function (adjust a cut packet so
// the consumer does not lose parsing) follows the PCIe40 firmware description;
// padding to the declared SIZE is this design's reading of "adjust".
//
// Interface: valid/ready on both sides, frag_t beats.  With en low the block
// is a wire.  Timing: combinational pass-through (no added latency); a pad
// word costs one cycle with in_ready low.  trunc_cnt counts corrected packets.
module truncation_comp
  import pcie40_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        in_valid,
  output logic        in_ready,
  input  frag_t       in,
  output logic        out_valid,
  input  logic        out_ready,
  output frag_t       out,
  output logic [31:0] trunc_cnt
);

  typedef enum logic [1:0] {S_IDLE, S_IN, S_PAD, S_DROP} state_e;
  state_e      state;
  logic [11:0] left;        // words still owed to the current packet
  frag_t       hdr;         // sop beat fields of the current packet

  logic [11:0] w_new;
  assign w_new = words_of(in.size);

  always_comb begin
    out       = in;
    out_valid = in_valid;
    in_ready  = out_ready;
    if (en) begin
      unique case (state)
        S_IDLE: begin
          out.eop = (w_new == 12'd1);
          if (!in.sop) begin          // stray word: drop it
            out_valid = 1'b0;
            in_ready  = 1'b1;
          end
        end
        S_IN: begin
          out.sop   = 1'b0;
          out.eop   = (left == 12'd1);
          out.evid  = hdr.evid;
          out.ftype = hdr.ftype;
          out.size  = hdr.size;
          if (in.sop) begin           // next packet began: pad first
            out_valid = 1'b0;
            in_ready  = 1'b0;
          end
        end
        S_PAD: begin
          out       = hdr;
          out.data  = '0;
          out.sop   = 1'b0;
          out.eop   = (left == 12'd1);
          out_valid = 1'b1;
          in_ready  = 1'b0;
        end
        S_DROP: begin
          out_valid = 1'b0;
          in_ready  = !in.sop;        // a new sop ends dropping untouched
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      left      <= '0;
      hdr       <= '0;
      trunc_cnt <= '0;
    end else if (!en) begin
      state <= S_IDLE;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid && in.sop && out_ready) begin
          hdr  <= in;
          left <= w_new - 12'd1;
          if (w_new == 12'd1) begin
            if (!in.eop) begin state <= S_DROP; trunc_cnt <= trunc_cnt + 1; end
          end else if (in.eop) begin
            state <= S_PAD; trunc_cnt <= trunc_cnt + 1;
          end else begin
            state <= S_IN;
          end
        end
        S_IN: if (in_valid) begin
          if (in.sop) begin
            state <= S_PAD; trunc_cnt <= trunc_cnt + 1;
          end else if (out_ready) begin
            left <= left - 12'd1;
            if (left == 12'd1) begin
              if (in.eop) state <= S_IDLE;
              else begin state <= S_DROP; trunc_cnt <= trunc_cnt + 1; end
            end else if (in.eop) begin
              state <= S_PAD; trunc_cnt <= trunc_cnt + 1;
            end
          end
        end
        S_PAD: if (out_ready) begin
          left <= left - 12'd1;
          if (left == 12'd1) state <= S_IDLE;
        end
        S_DROP: if (in_valid) begin
          if (in.sop) state <= S_IDLE;
          else if (in.eop) state <= S_IDLE;
        end
      endcase
    end
  end

endmodule

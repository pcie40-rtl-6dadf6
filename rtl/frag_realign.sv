// frag_realign: fragment realignment of block mode.
//
// In the older output format every fragment starts on a 32-byte word.  In
// block (MFP) mode fragments are realigned to 16 bytes, which halves the
// padding overhead.  This block cuts each incoming fragment into 16-byte
// units: a fragment of SIZE bytes gives units_of(SIZE) = ceil(SIZE/16)
// units, unit k being half (k mod 2) of input word k/2 (low half, bits
// 127:0, first: the stream is little-endian, byte 0 in bits 7:0).  A packer
// downstream (dma_stream_mfp) places the units back to back.  The 16-byte
// boundary follows the PCIe40 description; the unit interface is this
// design's choice.  Because truncation compensation is not used in block
// mode, a fragment whose words do not match its SIZE is fitted here too:
// missing units are sent as zeros, surplus words are dropped, so the data
// always matches the FSIZE entry of the MFP header.  A SIZE of 0 gives no
// unit.  Words outside a fragment are dropped.
//
// Interface: frag_t beats in (valid/ready); 128-bit units out (valid/ready)
// with u_last on the last unit of a fragment; frag_acc pulses with the
// fragment fields when a fragment's sop word is taken.  busy is high while a
// fragment is being cut.  Timing: one unit per cycle, no added latency.
// Lint lists the EVID and TYPE fields of the input beat as unused: this
// block needs only data, sop, eop and SIZE.
module frag_realign
  import pcie40_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  frag_t        in,
  output logic         u_valid,
  input  logic         u_ready,
  output logic [127:0] u_data,
  output logic         u_last,
  output logic         frag_acc,
  output logic         busy
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_PAD, S_DROP} state_e;
  state_e      state;
  logic [12:0] total;   // units of the current fragment
  logic [12:0] k;       // next unit index
  logic [12:0] total_c, k_c;
  logic        run_c;   // cutting units from the input word this cycle
  logic        last_c, word_done_c;
  logic        cut_c;   // a new fragment starts before this one is complete

  assign busy    = (state != S_IDLE);
  assign total_c = (state == S_IDLE) ? units_of(in.size) : total;
  assign k_c     = (state == S_IDLE) ? 13'd0 : k;
  assign run_c   = (state == S_RUN) || (state == S_IDLE && in_valid && in.sop && total_c != 13'd0);
  assign last_c  = (k_c + 13'd1 == total_c);
  // The input word is used up after its high unit or the fragment's last unit.
  assign word_done_c = k_c[0] || last_c;
  // While k is 1 the sop word is still current (its high unit is next).
  assign cut_c   = (state == S_RUN) && in.sop && (k > 13'd1);

  always_comb begin
    u_valid  = 1'b0;
    u_data   = k_c[0] ? in.data[255:128] : in.data[127:0];
    u_last   = last_c;
    in_ready = 1'b0;
    frag_acc = 1'b0;
    unique case (state)
      S_IDLE: begin
        if (in_valid && in.sop && total_c == 13'd0) begin
          in_ready = 1'b1;                    // empty fragment: no unit
          frag_acc = 1'b1;
        end else if (run_c) begin
          u_valid  = 1'b1;
          in_ready = u_ready && word_done_c;
          frag_acc = u_ready;
        end else begin
          in_ready = 1'b1;                    // stray word outside a fragment
        end
      end
      S_RUN: begin
        u_valid  = in_valid && !cut_c;
        in_ready = u_ready && word_done_c && !cut_c;
      end
      S_PAD: begin
        u_valid = 1'b1;
        u_data  = '0;
      end
      S_DROP: in_ready = !in.sop;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      total <= '0;
      k     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid && in.sop) begin
          total <= total_c;
          if (total_c == 13'd0) begin
            if (!in.eop) state <= S_DROP;
          end else if (u_ready) begin
            k <= 13'd1;
            if (last_c) state <= in.eop ? S_IDLE : S_DROP;
            else state <= S_RUN;
          end
        end
        S_RUN: if (in_valid) begin
          if (cut_c) state <= S_PAD;          // fragment cut short
          else if (u_ready) begin
            k <= k + 13'd1;
            if (last_c) state <= in.eop ? S_IDLE : S_DROP;
            else if (word_done_c && in.eop) state <= S_PAD;
          end
        end
        S_PAD: if (u_ready) begin
          k <= k + 13'd1;
          if (last_c) state <= S_IDLE;
        end
        S_DROP: if (in_valid && (in.sop || in.eop)) state <= S_IDLE;
      endcase
    end
  end

endmodule

// throttle_comp: throttle compensation for packet and block mode.
//
// When backpressure makes upstream logic drop whole packets, EVIDs go missing
// from the stream.  This block remembers the EVID it expects next; when a
// packet arrives with a larger EVID it holds that packet back and first
// emits one empty packet per missing EVID, so the EVID sequence seen by the
// host stays strictly monotonic without holes (as the PCIe40 firmware
// description requires).  An empty packet is one word, sop and eop set,
// SIZE 0, TYPE EMPTY_TYPE, with its EVID in bits 255:192 (where the
// non-MFP fragment format keeps the event ID) and zeros elsewhere.  A jump
// backwards or larger than MAX_GAP is taken as a restart: the block
// resynchronises to it without inserting.  The empty-packet layout, MAX_GAP
// and the resync rule are this design's own choices.
//
// Interface: valid/ready frag_t beats, en low makes it a wire.  Timing:
// combinational pass-through; each inserted packet takes one cycle.
module throttle_comp
  import pcie40_pkg::*;
#(
  parameter int unsigned MAX_GAP    = 4096,
  parameter logic [7:0]  EMPTY_TYPE = 8'h00
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        in_valid,
  output logic        in_ready,
  input  frag_t       in,
  output logic        out_valid,
  input  logic        out_ready,
  output frag_t       out,
  output logic [31:0] insert_cnt,
  output logic [31:0] resync_cnt
);

  logic        have_exp;
  logic [63:0] exp_evid;
  logic [63:0] gap;
  logic        insert;

  assign gap    = in.evid - exp_evid;
  assign insert = en && have_exp && in_valid && in.sop &&
                  (in.evid > exp_evid) && (gap <= 64'(MAX_GAP));

  always_comb begin
    out       = in;
    out_valid = in_valid;
    in_ready  = out_ready;
    if (insert) begin
      out.data  = {exp_evid, 192'd0};
      out.sop   = 1'b1;
      out.eop   = 1'b1;
      out.evid  = exp_evid;
      out.ftype = EMPTY_TYPE;
      out.size  = 16'd0;
      out_valid = 1'b1;
      in_ready  = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_exp   <= 1'b0;
      exp_evid   <= '0;
      insert_cnt <= '0;
      resync_cnt <= '0;
    end else if (en && out_valid && out_ready && out.sop) begin
      exp_evid <= out.evid + 64'd1;
      have_exp <= 1'b1;
      if (insert) insert_cnt <= insert_cnt + 1;
      else if (have_exp && in.evid != exp_evid) resync_cnt <= resync_cnt + 1;
    end
  end

endmodule

// fpga_buffer: the on-chip buffer of one DMA descriptor group.
//
// A first-in first-out memory of DEPTH entries, each a 256-bit data word and
// the word address (linear byte offset / 32) it is to be written at.  32 KiB
// of data (1024 words) for a MAIN stream and 4 KiB for an ODIN stream are the
// sizes of the PCIe40 firmware; the address field and the peek port are this
// design's: the DMA writer uses peek to check that the next words form one
// contiguous run before it starts a TLP.
//
// Interface: write side wr_valid/wr_ready (ready = not full); read side
// rd_valid (= not empty) / rd_ready, head entry on rd_data/rd_addr
// (first-word fall-through); peek_addr is the address of the entry peek_off
// places behind the head (combinational).  count is the number of entries.
// Timing: a written entry is readable the next cycle.
module fpga_buffer #(
  parameter int unsigned DEPTH = 1024,     // power of two
  parameter int unsigned AW    = 27,
  localparam int unsigned PW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_valid,
  output logic          wr_ready,
  input  logic [255:0]  wr_data,
  input  logic [AW-1:0] wr_addr,
  output logic          rd_valid,
  input  logic          rd_ready,
  output logic [255:0]  rd_data,
  output logic [AW-1:0] rd_addr,
  input  logic [PW-1:0] peek_off,
  output logic [AW-1:0] peek_addr,
  output logic [PW:0]   count
);

  logic [255:0]  mem_d [DEPTH];
  logic [AW-1:0] mem_a [DEPTH];
  logic [PW-1:0] wp, rp;
  logic          push, pop;

  assign wr_ready  = (count != (PW+1)'(DEPTH));
  assign rd_valid  = (count != '0);
  assign push      = wr_valid && wr_ready;
  assign pop       = rd_valid && rd_ready;
  assign rd_data   = mem_d[rp];
  assign rd_addr   = mem_a[rp];
  assign peek_addr = mem_a[rp + peek_off];

  always_ff @(posedge clk) begin
    if (push) begin
      mem_d[wp] <= wr_data;
      mem_a[wp] <= wr_addr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      count <= count + {{PW{1'b0}}, push} - {{PW{1'b0}}, pop};
    end
  end

endmodule

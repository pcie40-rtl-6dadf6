// dma_writer: one DMA descriptor group of a stream.
//
// Words handed to the group are queued in the group's FPGA buffer together
// with the linear offset (in the stream's circular host buffer) each is to be
// written at: consecutive words follow each other, a word flagged jump starts
// a new run at its own offset.  The read side cuts the queue into PCIe memory
// write requests of at most 256 bytes (8 words), each inside one 256-byte
// aligned chunk, so a TLP never crosses a 4 KiB or a descriptor boundary.  A
// TLP is started when its whole chunk is buffered, when the run ends inside
// the chunk, or after FLUSH_TIMEOUT cycles without new input (so a stream that
// goes quiet still reaches the host).
//
// Linear offsets are turned into physical addresses one 8 KiB descriptor at a
// time: at the first TLP of a new descriptor the writer looks the descriptor's
// base up in the stream's addr_map (one cycle, map_lin/map_phys) and keeps the
// result; map_inval drops it when the host rewrites the map.  With
// CHECK_SPACE set the writer never lets its offset come within one word of the
// host's read offset (rd_off), so the circular buffer never overruns.
//
// The 256-byte payload, 8 KiB descriptors and the circular buffer addressed
// by linear offsets follow the PCIe40 description; run handling, the flush
// timeout and the space rule are this design's choices.
//
// Outputs: sent_ptr is the linear offset just after the last word sent,
// words_sent the cumulative number of words sent.  Timing: a TLP of n words
// takes n cycles on the TX port when tlp_ready stays high, plus one idle cycle
// between TLPs and one lookup cycle per descriptor.
// TLP addresses are word aligned and map_lin is descriptor aligned, so the
// low 5 bits of tlp.addr and the low 13 bits of map_lin are always zero.
module dma_writer
  import pcie40_pkg::*;
#(
  parameter int unsigned DEPTH         = 1024,  // 32 KiB of 32-byte words
  parameter int unsigned HOST_LOG2     = 32,    // 4 GiB circular buffer
  parameter bit          CHECK_SPACE   = 1'b1,
  parameter int unsigned FLUSH_TIMEOUT = 64,
  localparam int unsigned AW           = HOST_LOG2 - 5,
  localparam int unsigned PW           = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  wr_word_t    in,
  input  logic [31:0] rd_off,
  output logic [31:0] map_lin,
  input  logic [63:0] map_phys,
  input  logic        map_inval,
  output logic        tlp_valid,
  input  logic        tlp_ready,
  output tlp_t        tlp,
  output logic [31:0] sent_ptr,
  output logic [31:0] words_sent,
  output logic [31:0] tlp_cnt
);

  // ---------------------------------------------------------------- buffer
  logic [AW-1:0] in_ptr, waddr, a, peek_addr;
  logic          rd_valid, rd_ready;
  logic [255:0]  rd_data;
  logic [PW-1:0] peek_off;
  logic [PW:0]   count;

  assign waddr = in.jump ? in.addr[HOST_LOG2-1:5] : in_ptr;

  fpga_buffer #(.DEPTH(DEPTH), .AW(AW)) u_buf (
    .clk, .rst_n,
    .wr_valid (in_valid), .wr_ready (in_ready), .wr_data (in.data), .wr_addr (waddr),
    .rd_valid, .rd_ready, .rd_data, .rd_addr (a),
    .peek_off, .peek_addr, .count
  );

  logic [15:0] idle_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_ptr   <= '0;
      idle_cnt <= '0;
    end else if (in_valid && in_ready) begin
      in_ptr   <= waddr + 1'b1;
      idle_cnt <= '0;
    end else if (idle_cnt != 16'hFFFF) begin
      idle_cnt <= idle_cnt + 16'd1;
    end
  end

  // ---------------------------------------------------------------- TLP cut
  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_SEND} state_e;
  state_e          state;
  logic [3:0]      chunk, avail, len_c, len;
  logic            consec, go;
  logic [AW-1:0]   sa;          // word address of the TLP being sent
  logic [3:0]      beat;
  logic            desc_valid;
  logic [AW-9:0]   desc_idx;
  logic [63:0]     desc_phys;
  logic [HOST_LOG2:0] used, need;

  assign chunk    = 4'd8 - {1'b0, a[2:0]};
  assign avail    = (count >= (PW+1)'(chunk)) ? chunk : 4'(count);
  assign peek_off = PW'(avail - 4'd1);
  assign consec   = (peek_addr == a + AW'(avail) - 1'b1);
  assign len_c    = consec ? avail : 4'd1;
  assign used     = {1'b0, HOST_LOG2'({a, 5'd0} - rd_off[HOST_LOG2-1:0])};
  assign need     = used + (HOST_LOG2+1)'({len_c, 5'd0}) + (HOST_LOG2+1)'(32);
  assign go       = rd_valid && (avail == chunk || !consec ||
                                 idle_cnt >= 16'(FLUSH_TIMEOUT)) &&
                    (!CHECK_SPACE || need <= (HOST_LOG2+1)'(1) << HOST_LOG2);

  assign map_lin   = 32'({a[AW-1:8], 13'd0});
  assign tlp_valid = (state == S_SEND);
  assign rd_ready  = (state == S_SEND) && tlp_ready;
  assign tlp.addr  = desc_phys + 64'({sa[7:0], 5'd0});
  assign tlp.len   = len;
  assign tlp.sop   = (beat == 4'd0);
  assign tlp.eop   = (beat + 4'd1 == len);
  assign tlp.data  = rd_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      sa         <= '0;
      len        <= '0;
      beat       <= '0;
      desc_valid <= 1'b0;
      desc_idx   <= '0;
      desc_phys  <= '0;
      sent_ptr   <= '0;
      words_sent <= '0;
      tlp_cnt    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (go) begin
          if (!desc_valid || desc_idx != a[AW-1:8]) state <= S_LOOKUP;
          else begin
            sa    <= a;
            len   <= len_c;
            beat  <= '0;
            state <= S_SEND;
          end
        end
        S_LOOKUP: begin
          desc_idx   <= a[AW-1:8];
          desc_phys  <= map_phys;
          desc_valid <= 1'b1;
          state      <= S_IDLE;
        end
        S_SEND: if (tlp_ready) begin
          beat <= beat + 4'd1;
          if (beat + 4'd1 == len) begin
            state      <= S_IDLE;
            sent_ptr   <= 32'({sa + AW'(len), 5'd0});
            words_sent <= words_sent + 32'(len);
            tlp_cnt    <= tlp_cnt + 32'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
      if (map_inval) desc_valid <= 1'b0;
    end
  end

endmodule

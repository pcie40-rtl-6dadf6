// tx_arbiter: shares one PCIe TX port between N descriptor groups.
//
// All streams of a PCIe interface, and within a block-mode stream its MAIN
// and META descriptor groups, write through the same transaction layer.  This
// arbiter grants the port to one requester for a whole TLP (sop to eop) and
// picks the next one round robin, starting after the last granted.  The
// sharing follows the PCIe40 description (all streams of an interface sit in
// one DMA controller); round robin at TLP granularity is this design's choice.
//
// Interface: N valid/ready tlp_t inputs, one output.  Timing: combinational
// path from the granted input to the output; a new grant is taken in the
// cycle a TLP's first beat is offered.
// Lint lists the upper bits of the loop's source index as unused.
module tx_arbiter
  import pcie40_pkg::*;
#(
  parameter int unsigned N = 2,
  localparam int unsigned GW = (N > 1) ? $clog2(N) : 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid [N],
  output logic   in_ready [N],
  input  tlp_t   in       [N],
  output logic   out_valid,
  input  logic   out_ready,
  output tlp_t   out
);

  logic          locked;
  logic [GW-1:0] cur, last, pick;
  logic          any;

  always_comb begin
    pick = last;
    any  = 1'b0;
    for (int k = 1; k <= N; k++) begin
      int unsigned c;
      c = (int'(last) + k) % N;
      if (!any && in_valid[c]) begin
        pick = GW'(c);
        any  = 1'b1;
      end
    end
  end

  logic [GW-1:0] g;
  assign g = locked ? cur : pick;

  always_comb begin
    out_valid = locked ? in_valid[cur] : any;
    out       = in[g];
    for (int i = 0; i < N; i++) in_ready[i] = 1'b0;
    in_ready[g] = out_ready && (locked || any);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      cur    <= '0;
      last   <= GW'(N - 1);
    end else if (out_valid && out_ready) begin
      if (out.eop) begin
        locked <= 1'b0;
        last   <= g;
      end else begin
        locked <= 1'b1;
        cur    <= g;
      end
    end
  end

endmodule

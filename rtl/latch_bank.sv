// latch_bank -- a bank of transparent D latches with a common enable.
//
// The proposed controller stores its state in latches instead of edge-triggered
// flip-flops. Two such banks are used as the halves of a master-slave pair with
// the next-state/output logic placed between them: the master bank holds the
// inputs and the present state, the slave bank holds the next state, which is
// also the primary output. The master latches have an inverted enable
// (transparent while their gated clock is low) and the slave latches a plain
// one (transparent while their gated clock is high); EN_ACTIVE_LOW selects
// which.
//
// Interface: d/q are WIDTH bits wide. While the enable is at its active level
// q follows d; otherwise q holds. rst (asynchronous, active high) forces q to
// RESET_VALUE; the reset is this design's addition, the schematic shows none.
//
// The latches are intentional: this module is meant to infer level-sensitive
// storage, and any latch warning a tool gives for it stands. Inside the
// controller, where the banks sit in a feedback loop, a linter may instead
// report that no latch was found; synthesis does map every bit to a latch,
// so that report stands too, as does a combinational-loop report on q: the
// loop runs through both banks, which are never transparent at the same time.
module latch_bank #(
  parameter int unsigned  WIDTH         = 4,
  parameter bit           EN_ACTIVE_LOW = 1'b0,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_latch begin
    if (rst)                     q = RESET_VALUE;
    else if (en ^ EN_ACTIVE_LOW) q = d;
  end

endmodule

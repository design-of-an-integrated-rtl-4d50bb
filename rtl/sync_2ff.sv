// sync_2ff: multi-flop synchroniser for signals entering a clock domain.
//
// A signal launched by another clock is sampled by a chain of STAGES (default
// 2) flip-flops clocked by the destination clock. The first flop may go
// metastable; the extra stage gives it a full clock period to settle before
// the value is used. Each bit is synchronised on its own, so use it only for
// single-bit signals or for buses where at most one bit changes at a time.
// Latency: STAGES destination-clock edges. Reset (asynchronous, active high)
// clears the chain; with d tied high this also serves as a reset synchroniser
// (asynchronous assertion, synchronous release).
// The two-flop chain is the classic synchroniser; the reset and its use as a
// reset synchroniser are this design's additions.
module sync_2ff #(
  parameter int unsigned WIDTH  = 1,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] chain [STAGES];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < STAGES; i++) chain[i] <= '0;
    end else begin
      chain[0] <= d;
      for (int i = 1; i < STAGES; i++) chain[i] <= chain[i-1];
    end
  end

  assign q = chain[STAGES-1];

endmodule

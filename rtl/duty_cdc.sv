// duty_cdc: hands the duty word from the PID clock domain to the DPWM domain.
//
// The PID logic runs at 4 MHz, the DPWM counter at 444 MHz, from independent
// clocks. The duty word is a bus, so its bits are not synchronised one by one.
// The source keeps the word in a register (the PID duty register) and the
// request bit toggles on the same clk_src edge that loads that register. Only
// the request bit crosses, through a two-flop synchroniser (sync_2ff); when
// the destination sees it change, the word has been stable for at least two
// destination cycles and is copied into d_out, which drives the DPWM comparator directly. A new word therefore
// takes effect within the running switching period if the counter has not yet
// passed it, as with a comparator fed straight from the controller.
// Source: load is sampled on clk_src; d_in must change only on a clk_src edge
// where load is high and then hold until the next such edge. Words must be at
// least a few destination cycles apart (they are 1 us apart here).
// Latency: d_out changes on the 3rd rising clk_dst edge after the clk_src edge
// that loads the word (2 synchroniser stages + 1 edge-detect register), give or
// take one edge for the phase of the two clocks.
// That the duty word crosses from a 4 MHz to a 444 MHz domain follows the
// controller specification; the toggle-request scheme is this design's own.
module duty_cdc
  import buck_ctrl_pkg::*;
#(
  parameter int unsigned W = D_W
) (
  // source (PID) domain
  input  logic         clk_src,
  input  logic         rst_src,
  input  logic         load,
  input  logic [W-1:0] d_in,
  // destination (DPWM) domain
  input  logic         clk_dst,
  input  logic         rst_dst,
  output logic [W-1:0] d_out
);

  logic         req_tog;
  logic         req_sync;
  logic         req_seen;

  always_ff @(posedge clk_src or posedge rst_src) begin
    if (rst_src) begin
      req_tog <= 1'b0;
    end else if (load) begin
      req_tog <= ~req_tog;
    end
  end

  sync_2ff #(.WIDTH(1), .STAGES(2)) u_req_sync (
    .clk (clk_dst),
    .rst (rst_dst),
    .d   (req_tog),
    .q   (req_sync)
  );

  always_ff @(posedge clk_dst or posedge rst_dst) begin
    if (rst_dst) begin
      req_seen <= 1'b0;
      d_out    <= '0;
    end else begin
      req_seen <= req_sync;
      if (req_sync != req_seen) d_out <= d_in;
    end
  end

endmodule

// selection_unit: decides when the node runs one operation (automatic or
// manual transmission).
//
// In automatic mode (auto_mode = 1) a free-running timer raises a request
// every SAMPLE_PERIOD clock cycles. In manual mode a rising edge on the
// external `handshake` line raises a request. A raised request is held on
// `enable` until the controller takes it with `ack` (one cycle); requests that
// arrive while one is pending are merged into it.
//
// Timing: in automatic mode the first request appears SAMPLE_PERIOD cycles
// after reset (or after switching to automatic); in manual mode `enable` rises
// the cycle after the handshake edge is seen.
//
// The selection block, its automatic/manual input, its handshake input and its
// enable output come from the node's block diagram; the timer, its period and
// the edge-triggered handshake are this design's choices.
module selection_unit #(
  parameter int unsigned SAMPLE_PERIOD = 1000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic auto_mode,
  input  logic handshake,
  input  logic ack,
  output logic enable
);

  localparam int unsigned CW = (SAMPLE_PERIOD > 1) ? $clog2(SAMPLE_PERIOD) : 1;

  logic [CW-1:0] tmr_q;
  logic          hs_q;
  logic          tick, hs_rise;

  assign tick    = auto_mode && (tmr_q == CW'(SAMPLE_PERIOD - 1));
  assign hs_rise = !auto_mode && handshake && !hs_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmr_q  <= '0;
      hs_q   <= 1'b0;
      enable <= 1'b0;
    end else begin
      hs_q <= handshake;
      if (!auto_mode || tick) tmr_q <= '0;
      else                    tmr_q <= tmr_q + 1'b1;
      if (tick || hs_rise) enable <= 1'b1;
      else if (ack)        enable <= 1'b0;
    end
  end

  initial assert (SAMPLE_PERIOD >= 2) else $error("SAMPLE_PERIOD must be at least 2");

endmodule

// lacg_reg: pipeline register with look-ahead clock gating.
//
// The register q is clocked by a gated clock. Its enable en was computed a
// whole cycle earlier, from the registers that feed d: when none of them
// changed at the last clock edge, d cannot have changed either and the
// clock pulse is suppressed. For the registers downstream, the block
// compares d with q (the XOR of an auto-gated flip-flop), ANDs the result
// with en, and captures it on the free-running clock as chg: chg is high
// for the cycle after q took a new value, and is the look-ahead enable of
// every register that reads q.
//
// Interface: en must be stable before the rising edge of clk. q changes on
// that edge only when en was high and d differed from q. chg resets to 1 so
// that the first edge after reset loads the whole pipeline once.
//
// The XOR output, the capture of it for a whole cycle and its use as the
// next stage's enable follow the look-ahead clock gating scheme; capturing
// it in a flip-flop instead of a latch, and gating on a whole register
// rather than per flip-flop, are this implementation's choices.
module lacg_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,     // look-ahead enable for this cycle's edge
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         chg     // q changed at the last edge
);

  logic gclk;

  icg u_icg (
    .clk  (clk),
    .en   (en),
    .gclk (gclk)
  );

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chg <= 1'b1;
    else        chg <= en & (d != q);
  end

endmodule

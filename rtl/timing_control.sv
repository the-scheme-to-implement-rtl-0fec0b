// timing_control: arbitration of the queue control functions.
//
// The queue control block runs one function at a time on the two virtual
// memories. Each clock in which no function is running (busy low) and none
// was granted in the previous clock, this block grants the highest-priority
// pending request: ADDTD (move the due timing queue to the departure queue)
// first, so real time is never missed, then ADDPT (a computed departure time
// waits), then Win (a packet has arrived: Decision and Win), then SPD (serve
// the departure queue). go pulses for one clock with the chosen function on
// fn. The document says that this block arbitrates the four functions; the
// fixed priority order is this design's choice.
module timing_control
  import ras_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic req_addtd,
  input  logic req_addpt,
  input  logic req_win,
  input  logic req_spd,
  input  logic busy,
  output logic go,
  output qfn_e fn
);
  qfn_e pick;
  always_comb begin
    if (req_addtd)      pick = FN_ADDTD;
    else if (req_addpt) pick = FN_ADDPT;
    else if (req_win)   pick = FN_DECISION;
    else if (req_spd)   pick = FN_SPD;
    else                pick = FN_NONE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      go <= 1'b0; fn <= FN_NONE;
    end else begin
      go <= 1'b0;
      if (!busy && !go && pick != FN_NONE) begin
        go <= 1'b1;
        fn <= pick;
      end
    end
  end
endmodule

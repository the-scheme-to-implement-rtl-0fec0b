// timing_register: real-time (RT) counter of the shaper.
//
// After enable is raised (once the control block has set up the virtual
// memories), a prescaler counts TICK_CYCLES clocks per timeslot; at the end of
// each timeslot rt advances by one and tick pulses for one clock. rt is the
// "current time t" of the shaping formulas and the clock of the timing queue;
// tick is also the unit time S of the token buckets. The document names this
// block and the real time it keeps; the timeslot length is this design's
// choice (64 clocks = 1.28 us at the 50 MHz clock the document plans for).
module timing_register
  import ras_pkg::*;
#(
  parameter int unsigned TICK_CYCLES = 64
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   enable,
  output rtime_t rt,
  output logic   tick
);
  localparam int unsigned PW = (TICK_CYCLES > 1) ? $clog2(TICK_CYCLES) : 1;
  logic [PW-1:0] pre;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre <= '0; rt <= '0; tick <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (enable) begin
        if (pre == PW'(TICK_CYCLES - 1)) begin
          pre  <= '0;
          rt   <= rt + 1'b1;
          tick <= 1'b1;
        end else begin
          pre <= pre + 1'b1;
        end
      end
    end
  end
endmodule

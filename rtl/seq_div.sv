// seq_div: unsigned sequential restoring divider, one quotient bit per clock.
//
// A start pulse loads dividend N and divisor D; after WN cycles done pulses
// for one cycle with quotient q = N / D and remainder r = N % D. A zero
// divisor gives an all-ones quotient (saturation), which the callers use as
// "infinitely far away". busy is high from the cycle after start until done.
// The shaper's departure time and arrival rate units share this block style;
// the number of cycles it takes is what makes the DT calculation the slowest
// step of the shaper, as the design intends.
module seq_div #(
  parameter int unsigned WN = 36,
  parameter int unsigned WD = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [WN-1:0] n,
  input  logic [WD-1:0] d,
  output logic          busy,
  output logic          done,
  output logic [WN-1:0] q,
  output logic [WD-1:0] r
);
  localparam int unsigned CW = $clog2(WN + 1);

  logic [WN-1:0] num;
  logic [WD:0]   rem;
  logic [WD-1:0] den;
  logic [CW-1:0] cnt;
  logic          dz;

  logic [WD:0] trial;
  always_comb trial = {rem[WD-1:0], num[WN-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; num <= '0; rem <= '0; den <= '0; cnt <= '0;
      q <= '0; r <= '0; dz <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1; num <= n; den <= d; rem <= '0; cnt <= CW'(WN); dz <= (d == '0);
      end else if (busy) begin
        if (trial >= {1'b0, den}) begin
          rem <= trial - {1'b0, den};
          num <= {num[WN-2:0], 1'b1};
        end else begin
          rem <= trial;
          num <= {num[WN-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
      if (busy && cnt == CW'(1)) begin
        q <= dz ? '1 : ((trial >= {1'b0, den}) ? {num[WN-2:0], 1'b1} : {num[WN-2:0], 1'b0});
        r <= (trial >= {1'b0, den}) ? WD'(trial - {1'b0, den}) : WD'(trial);
      end
    end
  end
endmodule

// exp_neg: combinational exp(-x) for the arrival-rate estimator.
//
// x is unsigned Q8.8. The unit rewrites exp(-x) as 2^-(x*log2 e): the integer
// part of the exponent becomes a right shift, the top five fractional bits
// select 2^(-i/32) from a 32-entry table (entry i = round(65536 * 2^(-i/32))).
// The result y is Q1.16 (65536 = 1.0) and is exact to about 2 %, which is the
// resolution of the table. The document gives the formula, not a circuit; the
// base-2 table method is this design's choice.
module exp_neg (
  input  logic [15:0] x,
  output logic [16:0] y
);
  localparam logic [15:0] LOG2E_Q15 = 16'd47274;   // 1.442695 * 2^15

  logic [31:0] prod;
  logic [23:0] e;       // exponent in Q16.8
  logic [16:0] frac_val;

  always_comb begin
    prod = x * LOG2E_Q15;
    e    = 24'(prod >> 15);
    case (e[7:3])
      5'd0:  frac_val = 17'd65536;  5'd1:  frac_val = 17'd64132;
      5'd2:  frac_val = 17'd62757;  5'd3:  frac_val = 17'd61413;
      5'd4:  frac_val = 17'd60097;  5'd5:  frac_val = 17'd58809;
      5'd6:  frac_val = 17'd57549;  5'd7:  frac_val = 17'd56316;
      5'd8:  frac_val = 17'd55109;  5'd9:  frac_val = 17'd53928;
      5'd10: frac_val = 17'd52773;  5'd11: frac_val = 17'd51642;
      5'd12: frac_val = 17'd50535;  5'd13: frac_val = 17'd49452;
      5'd14: frac_val = 17'd48393;  5'd15: frac_val = 17'd47356;
      5'd16: frac_val = 17'd46341;  5'd17: frac_val = 17'd45348;
      5'd18: frac_val = 17'd44376;  5'd19: frac_val = 17'd43425;
      5'd20: frac_val = 17'd42495;  5'd21: frac_val = 17'd41584;
      5'd22: frac_val = 17'd40693;  5'd23: frac_val = 17'd39821;
      5'd24: frac_val = 17'd38968;  5'd25: frac_val = 17'd38133;
      5'd26: frac_val = 17'd37316;  5'd27: frac_val = 17'd36516;
      5'd28: frac_val = 17'd35734;  5'd29: frac_val = 17'd34968;
      5'd30: frac_val = 17'd34219;  default: frac_val = 17'd33486;
    endcase
    if (e[23:8] > 16'd16) y = '0;
    else                  y = frac_val >> e[12:8];
  end
endmodule

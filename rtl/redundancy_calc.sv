// Redundancy calculation of the fault management unit.
//
// Chooses the redundancy level l from the estimated BRAM upset rate, given as
// sum3, three times the mean time between upsets in ticks. The document fixes
// the switching points on the configuration-memory upset rate: DMR from
// 4.11e-8 upsets/s, TMR from 1.37e-7 upsets/s (module demod1 at SIL 1). Mapped
// to the BRAM rate by log-linear interpolation between the tabulated solar
// conditions, these are 1.02e-4 and 3.98e-4 upsets/s for all 298 BRAMs of the
// device, i.e. 2.196e-5 and 8.538e-5 upsets/s for 64 sensor BRAMs: a mean
// time to upset of T_DMR = 45532 s and T_TMR = 11712 s. Shorter mean times
// mean higher rates:
//   sum3 <= 3*T_TMR            -> l = 2 (TMR)
//   3*T_TMR < sum3 <= 3*T_DMR  -> l = 1 (DMR)
//   otherwise                  -> l = 0
// For another module, SIL target or sensor count only the two parameters
// change. The level is registered (one clock).
module redundancy_calc #(
  parameter int unsigned IW    = 32,
  parameter longint unsigned T_DMR = 45532,
  parameter longint unsigned T_TMR = 11712
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [IW+1:0]   sum3,
  output seu_pkg::level_e level
);
  import seu_pkg::*;

  localparam logic [IW+1:0] LIM_DMR = (IW+2)'(3 * T_DMR);
  localparam logic [IW+1:0] LIM_TMR = (IW+2)'(3 * T_TMR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 level <= LVL_NONE;
    else if (sum3 <= LIM_TMR)   level <= LVL_TMR;
    else if (sum3 <= LIM_DMR)   level <= LVL_DMR;
    else                        level <= LVL_NONE;
  end
endmodule

// Input multiplexer in front of the partial reconfigurable region.
//
// Routes the three channel inputs to the three module slots according to the
// configuration `mode` (redundancy level):
//   l = 0: slot k gets channel k (three independent channels)
//   l = 1: slots 1 and 2 get channel 1, slot 3 gets channel 3 (channel 2 off)
//   l = 2: all three slots get channel 1 (channels 2 and 3 off)
// Purely combinational. Index 0..2 stands for channel/slot 1..3.
module channel_mux #(
  parameter int unsigned DATA_W = 16
) (
  input  seu_pkg::level_e    mode,
  input  logic [DATA_W-1:0]  ch_data  [3],
  input  logic               ch_valid [3],
  output logic [DATA_W-1:0]  slot_data  [3],
  output logic               slot_valid [3]
);
  import seu_pkg::*;

  always_comb begin
    slot_data[0]  = ch_data[0];
    slot_valid[0] = ch_valid[0];
    slot_data[1]  = (mode == LVL_NONE) ? ch_data[1]  : ch_data[0];
    slot_valid[1] = (mode == LVL_NONE) ? ch_valid[1] : ch_valid[0];
    slot_data[2]  = (mode == LVL_TMR)  ? ch_data[0]  : ch_data[2];
    slot_valid[2] = (mode == LVL_TMR)  ? ch_valid[0] : ch_valid[2];
  end
endmodule

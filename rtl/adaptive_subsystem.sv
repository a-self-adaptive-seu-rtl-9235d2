// Adaptive subsystem: three data channels over a partial reconfigurable
// region of three module slots, with redundancy that follows the level l.
//
//   l = 0: three channel-specific modules, three channels in parallel.
//   l = 1: slot 2 holds a second channel-1 module, an error detector compares
//          slots 1 and 2; channel 2 is off, channel 3 runs on slot 3.
//   l = 2: all three slots hold channel-1 modules behind a majority voter;
//          channels 2 and 3 are off.
//
// The reconfiguration control unit loads the configuration of a new level via
// the ICAP from external memory. While it works (busy), the slots whose
// module is replaced, and every slot that will carry a channel-1 replica, are
// held in reset (slot_rst); they are released together when the new
// configuration is active, so the replicas start from the same state. The
// multiplexer already routes for the target level during that time; slots not
// touched (channel 3 when going between l = 0 and l = 1) keep running.
//
// The modules themselves sit outside, on the slot_* ports: slot k receives
// slot_in_* and returns its result on slot_out_*. Which results leave on
// ch_out_* depends on the configuration, as listed above; a channel that is
// off or in reset delivers nothing (valid low).
module adaptive_subsystem #(
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned BS_WORDS = 65536,
  parameter logic [31:0] FAR_ADDR = 32'h0000_0000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  seu_pkg::level_e    level_req,
  output seu_pkg::level_e    level_active,
  output logic               reconf_busy,
  output logic               reconf_done,
  // channels
  input  logic [DATA_W-1:0]  ch_in_data   [3],
  input  logic               ch_in_valid  [3],
  output logic [DATA_W-1:0]  ch_out_data  [3],
  output logic               ch_out_valid [3],
  output logic               dmr_err,
  output logic [15:0]        dmr_err_count,
  output logic [2:0]         tmr_mismatch,
  // module slots of the partial reconfigurable region
  output logic [DATA_W-1:0]  slot_in_data   [3],
  output logic               slot_in_valid  [3],
  input  logic [DATA_W-1:0]  slot_out_data  [3],
  input  logic               slot_out_valid [3],
  output logic [2:0]         slot_rst,
  // ICAP
  output logic               icap_csib,
  output logic               icap_rdwrb,
  output logic [31:0]        icap_i,
  // external bitstream memory
  output logic               mem_rd_en,
  output logic [31:0]        mem_addr,
  input  logic               mem_rd_valid,
  input  logic [31:0]        mem_rd_data
);
  import seu_pkg::*;

  level_e            level_target, mode;
  logic [2:0]        changes, carries_ch1;
  logic              sv [3];            // slot result usable
  logic [DATA_W-1:0] ed_y, vt_y;
  logic              ed_y_valid, vt_y_valid;

  reconfig_control_unit #(.BS_WORDS(BS_WORDS), .FAR_ADDR(FAR_ADDR), .AW(32)) u_rcu (
    .clk, .rst_n, .level_req, .level_active, .level_target, .busy(reconf_busy), .done(reconf_done),
    .icap_csib, .icap_rdwrb, .icap_i, .mem_rd_en, .mem_addr, .mem_rd_valid, .mem_rd_data
  );

  assign mode = reconf_busy ? level_target : level_active;

  always_comb begin
    changes[0]     = 1'b0;
    changes[1]     = (level_active == LVL_NONE) != (level_target == LVL_NONE);
    changes[2]     = (level_active == LVL_TMR)  != (level_target == LVL_TMR);
    carries_ch1[0] = (level_target != LVL_NONE);
    carries_ch1[1] = (level_target != LVL_NONE);
    carries_ch1[2] = (level_target == LVL_TMR);
    slot_rst       = reconf_busy ? (changes | carries_ch1) : 3'b000;
    for (int k = 0; k < 3; k++) sv[k] = slot_out_valid[k] && !slot_rst[k];
  end

  channel_mux #(.DATA_W(DATA_W)) u_mux (
    .mode, .ch_data(ch_in_data), .ch_valid(ch_in_valid),
    .slot_data(slot_in_data), .slot_valid(slot_in_valid)
  );

  error_detector #(.DATA_W(DATA_W), .CNT_W(16)) u_ed (
    .clk, .rst_n, .clr(1'b0),
    .a(slot_out_data[0]), .a_valid(sv[0] && mode == LVL_DMR),
    .b(slot_out_data[1]), .b_valid(sv[1] && mode == LVL_DMR),
    .y(ed_y), .y_valid(ed_y_valid), .err(dmr_err), .err_count(dmr_err_count)
  );

  voter #(.DATA_W(DATA_W)) u_vote (
    .d(slot_out_data), .d_valid(sv), .y(vt_y), .y_valid(vt_y_valid), .mismatch(tmr_mismatch)
  );

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      ch_out_data[k]  = slot_out_data[k];
      ch_out_valid[k] = 1'b0;
    end
    unique case (mode)
      LVL_DMR: begin
        ch_out_data[0]  = ed_y;
        ch_out_valid[0] = ed_y_valid;
        ch_out_valid[2] = sv[2];
      end
      LVL_TMR: begin
        ch_out_data[0]  = vt_y;
        ch_out_valid[0] = vt_y_valid;
      end
      default: begin
        for (int k = 0; k < 3; k++) ch_out_valid[k] = sv[k];
      end
    endcase
  end
endmodule

// Reconfiguration control unit (RCU) of the adaptive subsystem.
//
// When the requested redundancy level level_req differs from the level whose
// configuration is loaded (level_active), the RCU reconfigures the partial
// region: it latches the target level, writes a partial-bitstream header to
// the 32-bit configuration port (ICAP), streams the BS_WORDS configuration
// words of that level from external memory, writes a trailer, and then
// switches level_active to the target. During all of this `busy` is high.
// A request that changes while busy is served by a further reconfiguration
// afterwards.
//
// ICAP side: one word per clock while icap_csib is low (icap_rdwrb is always 0,
// write). The header follows the Virtex-5 configuration packet format:
// dummy word, sync word AA995566, NOOP, CMD=RCRC, NOOP, FAR = FAR_ADDR (the
// location of the partial region), CMD=WCFG, NOOP, a type-1 FDRI write of zero
// words, and a type-2 packet with the word count. The trailer is CMD=DESYNC
// and two NOOPs. The document says the RCU generates the header that starts
// the reconfiguration and sets the module location; the packet values come
// from the device family's configuration format, not from the document.
// Bit swapping within bytes, which the device's port may need, is left to the
// memory image.
//
// Bitstream size: the document gives none. The triplicated demod1 has
// 2,074,062 essential bits, at least 64,815 32-bit words, so the default
// reserves 65536 words per level (768 KiB for three levels); the real size
// comes from the implementation tools.
//
// Memory side: one outstanding read. mem_rd_en is a one-clock request for
// word mem_addr; mem_rd_valid returns the word in mem_rd_data any number of
// clocks later. The bitstream of level l starts at word l*BS_WORDS.
module reconfig_control_unit #(
  parameter int unsigned BS_WORDS = 65536,
  parameter logic [31:0] FAR_ADDR = 32'h0000_0000,
  parameter int unsigned AW       = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  seu_pkg::level_e level_req,
  output seu_pkg::level_e level_active,
  output seu_pkg::level_e level_target,
  output logic            busy,
  output logic            done,        // one clock when a reconfiguration ends
  // ICAP
  output logic            icap_csib,
  output logic            icap_rdwrb,
  output logic [31:0]     icap_i,
  // external memory
  output logic            mem_rd_en,
  output logic [AW-1:0]   mem_addr,
  input  logic            mem_rd_valid,
  input  logic [31:0]     mem_rd_data
);
  import seu_pkg::*;

  localparam int unsigned N_HDR = 13;
  localparam int unsigned N_TRL = 4;
  localparam int unsigned WCW   = $clog2(BS_WORDS + 1);

  typedef enum logic [2:0] {RC_IDLE, RC_HDR, RC_REQ, RC_WAIT, RC_TRL, RC_DONE} rc_state_e;
  rc_state_e      state;
  logic [3:0]     hcnt;
  logic [WCW-1:0] wcnt;

  function automatic logic [31:0] hdr_word(input logic [3:0] i);
    unique case (i)
      4'd0:    return 32'hFFFF_FFFF;                 // dummy
      4'd1:    return 32'hAA99_5566;                 // sync
      4'd2:    return 32'h2000_0000;                 // NOOP
      4'd3:    return 32'h3000_8001;                 // write CMD
      4'd4:    return 32'h0000_0007;                 // RCRC
      4'd5:    return 32'h2000_0000;                 // NOOP
      4'd6:    return 32'h3000_2001;                 // write FAR
      4'd7:    return FAR_ADDR;
      4'd8:    return 32'h3000_8001;                 // write CMD
      4'd9:    return 32'h0000_0001;                 // WCFG
      4'd10:   return 32'h2000_0000;                 // NOOP
      4'd11:   return 32'h3000_4000;                 // FDRI, type 1, 0 words
      default: return 32'h5000_0000 | 32'(BS_WORDS); // type 2 word count
    endcase
  endfunction

  function automatic logic [31:0] trl_word(input logic [3:0] i);
    unique case (i)
      4'd0:    return 32'h3000_8001;                 // write CMD
      4'd1:    return 32'h0000_000D;                 // DESYNC
      default: return 32'h2000_0000;                 // NOOP
    endcase
  endfunction

  assign icap_rdwrb = 1'b0;
  assign busy       = (state != RC_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= RC_IDLE;
      level_active <= LVL_NONE;
      level_target <= LVL_NONE;
      hcnt         <= '0;
      wcnt         <= '0;
      icap_csib    <= 1'b1;
      icap_i       <= '0;
      mem_rd_en    <= 1'b0;
      mem_addr     <= '0;
      done         <= 1'b0;
    end else begin
      icap_csib <= 1'b1;
      mem_rd_en <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        RC_IDLE: if (level_req != level_active && level_req != 2'd3) begin
          level_target <= level_req;
          hcnt         <= '0;
          state        <= RC_HDR;
        end
        RC_HDR: begin
          icap_csib <= 1'b0;
          icap_i    <= hdr_word(hcnt);
          if (hcnt == 4'(N_HDR - 1)) begin
            wcnt  <= '0;
            state <= RC_REQ;
          end else begin
            hcnt <= hcnt + 1'b1;
          end
        end
        RC_REQ: begin
          mem_rd_en <= 1'b1;
          mem_addr  <= AW'(level_target) * AW'(BS_WORDS) + AW'(wcnt);
          state     <= RC_WAIT;
        end
        RC_WAIT: if (mem_rd_valid) begin
          icap_csib <= 1'b0;
          icap_i    <= mem_rd_data;
          if (wcnt == WCW'(BS_WORDS - 1)) begin
            hcnt  <= '0;
            state <= RC_TRL;
          end else begin
            wcnt  <= wcnt + 1'b1;
            state <= RC_REQ;
          end
        end
        RC_TRL: begin
          icap_csib <= 1'b0;
          icap_i    <= trl_word(hcnt);
          if (hcnt == 4'(N_TRL - 1)) state <= RC_DONE;
          else                      hcnt  <= hcnt + 1'b1;
        end
        RC_DONE: begin
          level_active <= level_target;
          done         <= 1'b1;
          state        <= RC_IDLE;
        end
        default: state <= RC_IDLE;
      endcase
    end
  end
endmodule

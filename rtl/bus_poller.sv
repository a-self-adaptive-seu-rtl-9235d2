// Bus polling of the fault management unit.
//
// The poller visits the N_BFD fault detectors in turn over their star-bus
// links. For each it reads the SBITERR counter word and then the DBITERR
// counter word (one request, then wait for the acknowledge), subtracts the
// values seen in the previous round and adds both differences to the number
// of new fault events of this round. After the last detector it pulses
// round_done with new_events (saturating) and starts the next round at once.
// A round takes 4 clocks per detector. The counters count upward and saturate,
// so a difference is never negative between clears; `clr` forgets the stored
// values together with a counter clear in the detectors.
//
// The document polls the fault memories in software; doing it in logic, and
// counting an event as one SBITERR or one DBITERR, are this design's choices.
module bus_poller #(
  parameter int unsigned N_BFD = 64,
  parameter int unsigned CNT_W = 16,
  parameter int unsigned EV_W  = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,
  output seu_pkg::fbus_req_t bus_req [N_BFD],
  input  seu_pkg::fbus_rsp_t bus_rsp [N_BFD],
  output logic               round_done,
  output logic [EV_W-1:0]    new_events
);
  import seu_pkg::*;

  localparam int unsigned IW = (N_BFD > 1) ? $clog2(N_BFD) : 1;

  typedef enum logic [1:0] {BP_REQ_S, BP_WAIT_S, BP_REQ_D, BP_WAIT_D} bp_state_e;
  bp_state_e        state;
  logic [IW-1:0]    idx;
  logic [CNT_W-1:0] last_s [N_BFD];
  logic [CNT_W-1:0] last_d [N_BFD];
  logic [CNT_W-1:0] cur_s;
  logic [EV_W:0]    acc;       // one extra bit for saturation
  logic [EV_W:0]    acc_next;
  fbus_rsp_t        rsp;
  logic [CNT_W-1:0] rsp_cnt;

  assign rsp     = bus_rsp[idx];
  assign rsp_cnt = rsp.data[CNT_W-1:0];

  always_comb begin
    for (int i = 0; i < N_BFD; i++) begin
      bus_req[i].valid = 1'b0;
      bus_req[i].addr  = FM_SBITC;
    end
    bus_req[idx].valid = (state == BP_REQ_S) || (state == BP_REQ_D);
    bus_req[idx].addr  = (state == BP_REQ_D) ? FM_DBITC : FM_SBITC;
  end

  always_comb begin
    logic [EV_W:0] d_s, d_d;
    d_s = (EV_W+1)'(CNT_W'(cur_s - last_s[idx]));
    d_d = (EV_W+1)'(CNT_W'(rsp_cnt - last_d[idx]));
    acc_next = acc + d_s + d_d;
    if (acc_next > (EV_W+1)'({EV_W{1'b1}})) acc_next = (EV_W+1)'({EV_W{1'b1}});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= BP_REQ_S;
      idx        <= '0;
      acc        <= '0;
      cur_s      <= '0;
      round_done <= 1'b0;
      new_events <= '0;
      for (int i = 0; i < N_BFD; i++) begin
        last_s[i] <= '0;
        last_d[i] <= '0;
      end
    end else begin
      round_done <= 1'b0;
      if (clr) begin
        state <= BP_REQ_S;
        idx   <= '0;
        acc   <= '0;
        for (int i = 0; i < N_BFD; i++) begin
          last_s[i] <= '0;
          last_d[i] <= '0;
        end
      end else begin
        unique case (state)
          BP_REQ_S:  state <= BP_WAIT_S;
          BP_WAIT_S: if (rsp.ack) begin
                       cur_s <= rsp_cnt;
                       state <= BP_REQ_D;
                     end
          BP_REQ_D:  state <= BP_WAIT_D;
          BP_WAIT_D: if (rsp.ack) begin
                       last_s[idx] <= cur_s;
                       last_d[idx] <= rsp_cnt;
                       state       <= BP_REQ_S;
                       if (idx == IW'(N_BFD - 1)) begin
                         idx        <= '0;
                         acc        <= '0;
                         round_done <= 1'b1;
                         new_events <= acc_next[EV_W-1:0];
                       end else begin
                         idx <= idx + 1'b1;
                         acc <= acc_next;
                       end
                     end
          default:   state <= BP_REQ_S;
        endcase
      end
    end
  end
endmodule

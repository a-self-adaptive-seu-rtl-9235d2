// Bus access control: the fault-detector end of the star bus.
//
// Each fault detector has its own point-to-point link to the fault management
// unit. Data flows only from detector to manager. A request (req.valid with a
// word address req.addr) is answered on the next clock by rsp.ack with the
// fault-memory word in rsp.data; ack is high for exactly one clock per
// request clock. The document names the block and the star topology; this
// request/acknowledge protocol is this design's choice.
module bus_access_control (
  input  logic              clk,
  input  logic              rst_n,
  input  seu_pkg::fbus_req_t req,
  output seu_pkg::fbus_rsp_t rsp,
  output logic [2:0]        fm_addr,
  input  logic [31:0]       fm_data
);
  assign fm_addr = req.addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp <= '0;
    end else begin
      rsp.ack <= req.valid;
      if (req.valid) rsp.data <= fm_data;
    end
  end

  // An acknowledge only ever follows a request.
  a_ack_follows_req: assert property (@(posedge clk) disable iff (!rst_n)
    rsp.ack |-> $past(req.valid));
endmodule

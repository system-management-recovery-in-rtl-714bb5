// wrapper_ctrl: wrapper control module (WC) of a PE.
//
// When the fault detector of the PE reports a permanent processor fault
// (fault_detected, a level or a pulse), the WC at once raises isolate, which
// closes the wrappers around the processor, and keeps it raised until reset.
// In the same cycle it queues a fail_CPU message (SVC_FAIL_CPU), broadcast on
// the control NoC with its own address as source and payload, so that the
// manager paired with this one can start the recovery. The message is
// offered with valid/ready and held until taken; it is sent once per fault.
// Timing: isolate and the message appear one cycle after fault_detected.
// Isolation and the broadcast fail_CPU notification follow the document;
// the message encoding and the one-shot behaviour are this design's own. The
// fault detector itself is outside this design.
module wrapper_ctrl
  import mcsoc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  pe_addr_t  my_addr,
  input  logic      fault_detected,
  output logic      isolate,
  output logic      ctl_out_valid,
  output ctrl_msg_t ctl_out_msg,
  input  logic      ctl_out_ready
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      isolate       <= 1'b0;
      ctl_out_valid <= 1'b0;
      ctl_out_msg   <= '0;
    end else begin
      if (ctl_out_valid && ctl_out_ready) ctl_out_valid <= 1'b0;
      if (fault_detected && !isolate) begin
        isolate       <= 1'b1;
        ctl_out_valid <= 1'b1;
        ctl_out_msg   <= '{svc: SVC_FAIL_CPU, bcast: 1'b1, src: my_addr,
                           tgt: my_addr, payload: 32'({my_addr.x, my_addr.y})};
      end
    end
  end

  a_once : assert property (@(posedge clk) disable iff (!rst_n)
                            isolate |=> isolate)
    else $error("wrapper_ctrl: isolation released without reset");

endmodule

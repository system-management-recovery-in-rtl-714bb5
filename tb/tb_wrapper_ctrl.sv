// tb_wrapper_ctrl: self-checking test of the wrapper control module.
//
// A fault pulse must raise isolate one cycle later and produce exactly one
// broadcast fail_CPU message with the PE's address, held until the control
// NoC accepts it; a second fault report must not send another message.
module tb_wrapper_ctrl;
  import mcsoc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  pe_addr_t my_addr = '{x: 8'd3, y: 8'd1};
  logic fault_detected = 0, isolate, ctl_out_valid, ctl_out_ready = 0;
  ctrl_msg_t ctl_out_msg;
  wrapper_ctrl dut (.*);

  int checks = 0, failures = 0, msgs = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (ctl_out_valid && ctl_out_ready) begin
    msgs++;
    check(ctl_out_msg.svc == SVC_FAIL_CPU && ctl_out_msg.bcast &&
          ctl_out_msg.src == my_addr && ctl_out_msg.payload[15:0] == {8'd3, 8'd1},
          "fail_CPU message contents");
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    check(!isolate && !ctl_out_valid, "quiet before a fault");
    fault_detected = 1; @(negedge clk); fault_detected = 0;
    check(isolate && ctl_out_valid, "isolate and message one cycle after the fault");
    repeat (4) @(negedge clk);
    check(ctl_out_valid, "message held while the NoC is busy");
    ctl_out_ready = 1; @(negedge clk);
    check(!ctl_out_valid, "message withdrawn once taken");
    fault_detected = 1; repeat (3) @(negedge clk); fault_detected = 0;
    repeat (3) @(negedge clk);
    check(msgs == 1, $sformatf("one message per fault, got %0d", msgs));
    check(isolate, "isolation stays");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cpu_wrapper: self-checking test of the processor wrappers.
//
// Random processor-side signals are applied under all four combinations of
// isolate and hold; each PE-side strobe is compared with the gating rule
// (memory enable and control send blocked by isolate; memory write and DMNI
// commands blocked by isolate or hold; messages to an isolated processor
// accepted and dropped), and data paths must pass unchanged.
module tb_cpu_wrapper;
  import mcsoc_pkg::*;
  localparam int AW = 14;
  logic isolate, hold;
  logic cpu_mem_en, cpu_mem_we, cpu_cmd_valid, cpu_ctl_tx_valid, cpu_ctl_rx_valid, cpu_ctl_rx_ready;
  logic [AW-1:0] cpu_mem_addr, pe_mem_addr;
  word_t cpu_mem_wdata, pe_mem_wdata;
  dmni_cmd_t cpu_cmd, pe_cmd;
  ctrl_msg_t cpu_ctl_tx_msg, pe_ctl_tx_msg;
  logic pe_mem_en, pe_mem_we, pe_cmd_valid, pe_ctl_tx_valid, pe_ctl_rx_valid, pe_ctl_rx_ready;

  cpu_wrapper #(.AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 400; n++) begin
      {isolate, hold} = 2'(n % 4);
      {cpu_mem_en, cpu_mem_we, cpu_cmd_valid, cpu_ctl_tx_valid, cpu_ctl_rx_ready, pe_ctl_rx_valid} = 6'($urandom);
      cpu_mem_addr = AW'($urandom); cpu_mem_wdata = $urandom;
      cpu_cmd = dmni_cmd_t'({$urandom, $urandom}); cpu_ctl_tx_msg = ctrl_msg_t'({$urandom, $urandom, $urandom});
      #1;
      check(pe_mem_en == (cpu_mem_en & ~isolate), "memory enable gating");
      check(pe_mem_we == (cpu_mem_we & ~isolate & ~hold), "memory write gating");
      check(pe_cmd_valid == (cpu_cmd_valid & ~isolate & ~hold), "DMNI command gating");
      check(pe_ctl_tx_valid == (cpu_ctl_tx_valid & ~isolate), "control send gating");
      check(cpu_ctl_rx_valid == (pe_ctl_rx_valid & ~isolate), "control receive gating");
      check(pe_ctl_rx_ready == (cpu_ctl_rx_ready | isolate), "isolated processor drops messages");
      check(pe_mem_addr == cpu_mem_addr && pe_mem_wdata == cpu_mem_wdata &&
            pe_cmd == cpu_cmd && pe_ctl_tx_msg == cpu_ctl_tx_msg, "data paths pass");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

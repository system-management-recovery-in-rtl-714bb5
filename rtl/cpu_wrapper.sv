// cpu_wrapper: the wrappers (W) that cut a processor off from its PE.
//
// Every control signal the processor drives into the PE passes through an
// AND gate enabled by !isolate: memory enable and write enable, the DMNI
// command strobe and the control-NoC injection strobe. A processor with a
// permanent fault therefore cannot write memory, program the DMNI or inject
// messages, so its failure cannot spread as wrong (Byzantine) behaviour.
// Control messages addressed to an isolated processor are accepted and
// dropped so that they never block the control NoC. While the DMNI holds the
// processor (cpu_hold, during kernel reception) its memory writes and
// commands are gated as well, so the arriving kernel cannot be corrupted.
// Purely combinational; data and address lines pass unchanged because the
// gated strobes already make them inert. Isolation by gating follows the
// document ("only logic gates to isolate control signals"); gating during the
// hold and dropping messages to an isolated processor are this design's own.
module cpu_wrapper
  import mcsoc_pkg::*;
#(
  parameter int unsigned AW = 14
) (
  input  logic          isolate,
  input  logic          hold,
  // processor side
  input  logic          cpu_mem_en,
  input  logic          cpu_mem_we,
  input  logic [AW-1:0] cpu_mem_addr,
  input  word_t         cpu_mem_wdata,
  input  logic          cpu_cmd_valid,
  input  dmni_cmd_t     cpu_cmd,
  input  logic          cpu_ctl_tx_valid,
  input  ctrl_msg_t     cpu_ctl_tx_msg,
  output logic          cpu_ctl_rx_valid,
  input  logic          cpu_ctl_rx_ready,
  // PE side
  output logic          pe_mem_en,
  output logic          pe_mem_we,
  output logic [AW-1:0] pe_mem_addr,
  output word_t         pe_mem_wdata,
  output logic          pe_cmd_valid,
  output dmni_cmd_t     pe_cmd,
  output logic          pe_ctl_tx_valid,
  output ctrl_msg_t     pe_ctl_tx_msg,
  input  logic          pe_ctl_rx_valid,
  output logic          pe_ctl_rx_ready
);

  logic pass, pass_w;
  assign pass   = !isolate;
  assign pass_w = !isolate && !hold;

  assign pe_mem_en       = cpu_mem_en && pass;
  assign pe_mem_we       = cpu_mem_we && pass_w;
  assign pe_mem_addr     = cpu_mem_addr;
  assign pe_mem_wdata    = cpu_mem_wdata;
  assign pe_cmd_valid    = cpu_cmd_valid && pass_w;
  assign pe_cmd          = cpu_cmd;
  assign pe_ctl_tx_valid = cpu_ctl_tx_valid && pass;
  assign pe_ctl_tx_msg   = cpu_ctl_tx_msg;
  assign cpu_ctl_rx_valid = pe_ctl_rx_valid && pass;
  assign pe_ctl_rx_ready  = cpu_ctl_rx_ready || isolate;

endmodule

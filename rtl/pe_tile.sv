// pe_tile: one processing element (PE) of the many-core, without its CPU.
//
// Every PE has the same hardware; software alone makes it a manager or a
// slave. A tile holds two data-NoC routers (the two 16-bit physical channels
// of each link), a control-NoC router, the DMNI, the dual-port private memory,
// the wrappers and their control module (WC). The processor is not part of
// the tile: its signals are the cpu_* ports, and they reach the tile only
// through the wrappers.
//
// Local control-NoC traffic: messages for the DMNI (wait_kernel,
// send_kernel) go to the DMNI, all others to the processor. Injection is
// shared by three sources with fixed priority: WC (fail_CPU) first, then the
// DMNI (wait_kernel_ack), then the processor.
//
// Mesh ports are indexed [channel][direction] for the data NoC and
// [direction] for the control NoC, with directions 0..3 = east, west, north,
// south. The composition follows the PE of the document; the local
// arbitration and the port layout are this design's own.
module pe_tile
  import mcsoc_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 16384,
  parameter int unsigned BUF_DEPTH = 8,
  localparam int unsigned AW       = $clog2(MEM_WORDS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  pe_addr_t              my_addr,
  input  logic                  fault_detected,
  // data NoC, [channel][E,W,N,S]
  input  logic  [1:0][3:0]      d_in_valid,
  input  flit_t [1:0][3:0]      d_in_flit,
  output logic  [1:0][3:0]      d_in_credit,
  output logic  [1:0][3:0]      d_out_valid,
  output flit_t [1:0][3:0]      d_out_flit,
  input  logic  [1:0][3:0]      d_out_credit,
  // control NoC, [E,W,N,S]
  input  logic      [3:0]       c_in_valid,
  input  ctrl_msg_t [3:0]       c_in_msg,
  output logic      [3:0]       c_in_ready,
  output logic      [3:0]       c_out_valid,
  output ctrl_msg_t [3:0]       c_out_msg,
  input  logic      [3:0]       c_out_ready,
  // processor
  input  logic                  cpu_mem_en,
  input  logic                  cpu_mem_we,
  input  logic [AW-1:0]         cpu_mem_addr,
  input  word_t                 cpu_mem_wdata,
  output word_t                 cpu_mem_rdata,
  input  logic                  cpu_cmd_valid,
  input  dmni_cmd_t             cpu_cmd,
  output logic                  cpu_cmd_ready,
  output logic                  cpu_send_busy,
  output logic                  cpu_send_done,
  output logic                  cpu_recv_armed,
  output logic                  cpu_recv_done,
  output logic [15:0]           cpu_recv_words,
  input  logic                  cpu_ctl_tx_valid,
  input  ctrl_msg_t             cpu_ctl_tx_msg,
  output logic                  cpu_ctl_tx_ready,
  output logic                  cpu_ctl_rx_valid,
  output ctrl_msg_t             cpu_ctl_rx_msg,
  input  logic                  cpu_ctl_rx_ready,
  output logic                  cpu_hold,
  output logic                  cpu_restart,
  output logic                  isolate
);

  // ------------------------------------------------------------ data routers
  logic  [1:0][NPORTS-1:0] r_in_valid, r_in_credit, r_out_valid, r_out_credit;
  flit_t [1:0][NPORTS-1:0] r_in_flit, r_out_flit;
  logic  [1:0] dm_tx_valid, dm_tx_credit, dm_rx_valid, dm_rx_credit;
  flit_t [1:0] dm_tx_flit, dm_rx_flit;

  for (genvar c = 0; c < 2; c++) begin : g_ch
    always_comb begin
      r_in_valid[c]   = {dm_tx_valid[c], d_in_valid[c]};
      r_in_flit[c]    = {dm_tx_flit[c],  d_in_flit[c]};
      r_out_credit[c] = {dm_rx_credit[c], d_out_credit[c]};
      d_in_credit[c]  = r_in_credit[c][3:0];
      d_out_valid[c]  = r_out_valid[c][3:0];
      d_out_flit[c]   = r_out_flit[c][3:0];
      dm_tx_credit[c] = r_in_credit[c][P_LOCAL];
      dm_rx_valid[c]  = r_out_valid[c][P_LOCAL];
      dm_rx_flit[c]   = r_out_flit[c][P_LOCAL];
    end
    data_router #(.BUF_DEPTH(BUF_DEPTH)) u_router (
      .clk, .rst_n, .my_addr,
      .in_valid (r_in_valid[c]),  .in_flit (r_in_flit[c]),  .in_credit (r_in_credit[c]),
      .out_valid(r_out_valid[c]), .out_flit(r_out_flit[c]), .out_credit(r_out_credit[c])
    );
  end

  // ---------------------------------------------------------- control router
  logic      [NPORTS-1:0] cr_in_valid, cr_in_ready, cr_out_valid, cr_out_ready;
  ctrl_msg_t [NPORTS-1:0] cr_in_msg, cr_out_msg;
  logic      loc_tx_valid, loc_tx_ready;
  ctrl_msg_t loc_tx_msg;
  logic      loc_rx_ready;

  assign cr_in_valid  = {loc_tx_valid, c_in_valid};
  assign cr_in_msg    = {loc_tx_msg, c_in_msg};
  assign cr_out_ready = {loc_rx_ready, c_out_ready};
  assign c_in_ready   = cr_in_ready[3:0];
  assign c_out_valid  = cr_out_valid[3:0];
  assign c_out_msg    = cr_out_msg[3:0];
  assign loc_tx_ready = cr_in_ready[P_LOCAL];

  ctrl_router u_ctrl (
    .clk, .rst_n, .my_addr,
    .in_valid (cr_in_valid),  .in_msg (cr_in_msg),  .in_ready (cr_in_ready),
    .out_valid(cr_out_valid), .out_msg(cr_out_msg), .out_ready(cr_out_ready)
  );

  // --------------------------------------------------------- wrapper control
  logic      wc_valid, wc_ready;
  ctrl_msg_t wc_msg;
  wrapper_ctrl u_wc (
    .clk, .rst_n, .my_addr, .fault_detected, .isolate,
    .ctl_out_valid(wc_valid), .ctl_out_msg(wc_msg), .ctl_out_ready(wc_ready)
  );

  // ---------------------------------------------------------------- wrappers
  logic          w_mem_en, w_mem_we, w_cmd_valid, w_ctl_tx_valid;
  logic          w_ctl_rx_valid, w_ctl_rx_ready, cpu_ctl_rx_valid_w;
  logic [AW-1:0] w_mem_addr;
  word_t         w_mem_wdata;
  dmni_cmd_t     w_cmd;
  ctrl_msg_t     w_ctl_tx_msg;

  cpu_wrapper #(.AW(AW)) u_w (
    .isolate, .hold(cpu_hold),
    .cpu_mem_en, .cpu_mem_we, .cpu_mem_addr, .cpu_mem_wdata,
    .cpu_cmd_valid, .cpu_cmd, .cpu_ctl_tx_valid, .cpu_ctl_tx_msg,
    .cpu_ctl_rx_valid(cpu_ctl_rx_valid_w), .cpu_ctl_rx_ready,
    .pe_mem_en(w_mem_en), .pe_mem_we(w_mem_we), .pe_mem_addr(w_mem_addr),
    .pe_mem_wdata(w_mem_wdata), .pe_cmd_valid(w_cmd_valid), .pe_cmd(w_cmd),
    .pe_ctl_tx_valid(w_ctl_tx_valid), .pe_ctl_tx_msg(w_ctl_tx_msg),
    .pe_ctl_rx_valid(w_ctl_rx_valid), .pe_ctl_rx_ready(w_ctl_rx_ready)
  );
  assign cpu_ctl_rx_valid = cpu_ctl_rx_valid_w;

  // -------------------------------------------------------------------- DMNI
  logic          dm_ctl_in_valid, dm_ctl_in_ready, dm_ctl_out_valid, dm_ctl_out_ready;
  ctrl_msg_t     dm_ctl_out_msg;
  logic          mb_en, mb_we;
  logic [AW-1:0] mb_addr;
  word_t         mb_wdata, mb_rdata;
  logic          for_dmni;

  assign for_dmni        = is_dmni_svc(cr_out_msg[P_LOCAL].svc);
  assign dm_ctl_in_valid = cr_out_valid[P_LOCAL] && for_dmni;
  assign w_ctl_rx_valid  = cr_out_valid[P_LOCAL] && !for_dmni;
  assign cpu_ctl_rx_msg  = cr_out_msg[P_LOCAL];
  assign loc_rx_ready    = for_dmni ? dm_ctl_in_ready : w_ctl_rx_ready;

  dmni #(.MEM_WORDS(MEM_WORDS)) u_dmni (
    .clk, .rst_n, .my_addr,
    .cmd_valid(w_cmd_valid), .cmd(w_cmd), .cmd_ready(cpu_cmd_ready),
    .send_busy(cpu_send_busy), .send_done(cpu_send_done),
    .recv_armed(cpu_recv_armed), .recv_done(cpu_recv_done), .recv_words(cpu_recv_words),
    .cpu_hold, .cpu_restart,
    .mem_en(mb_en), .mem_we(mb_we), .mem_addr(mb_addr), .mem_wdata(mb_wdata),
    .mem_rdata(mb_rdata),
    .tx_valid(dm_tx_valid), .tx_flit(dm_tx_flit), .tx_credit(dm_tx_credit),
    .rx_valid(dm_rx_valid), .rx_flit(dm_rx_flit), .rx_credit(dm_rx_credit),
    .ctl_in_valid(dm_ctl_in_valid), .ctl_in_msg(cr_out_msg[P_LOCAL]),
    .ctl_in_ready(dm_ctl_in_ready),
    .ctl_out_valid(dm_ctl_out_valid), .ctl_out_msg(dm_ctl_out_msg),
    .ctl_out_ready(dm_ctl_out_ready)
  );

  // ------------------------------------------------------------------ memory
  dp_ram #(.WORDS(MEM_WORDS)) u_mem (
    .clk,
    .a_en(w_mem_en), .a_we(w_mem_we), .a_addr(w_mem_addr), .a_wdata(w_mem_wdata),
    .a_rdata(cpu_mem_rdata),
    .b_en(mb_en), .b_we(mb_we), .b_addr(mb_addr), .b_wdata(mb_wdata), .b_rdata(mb_rdata)
  );

  // ------------------------------------------- local control-NoC injection
  always_comb begin
    wc_ready         = 1'b0;
    dm_ctl_out_ready = 1'b0;
    cpu_ctl_tx_ready = 1'b0;
    loc_tx_valid     = 1'b1;
    if (wc_valid) begin
      loc_tx_msg = wc_msg;
      wc_ready   = loc_tx_ready;
    end else if (dm_ctl_out_valid) begin
      loc_tx_msg       = dm_ctl_out_msg;
      dm_ctl_out_ready = loc_tx_ready;
    end else begin
      loc_tx_msg       = w_ctl_tx_msg;
      loc_tx_valid     = w_ctl_tx_valid;
      cpu_ctl_tx_ready = loc_tx_ready && !isolate;
    end
  end

endmodule

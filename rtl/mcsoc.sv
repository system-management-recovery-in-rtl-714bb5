// mcsoc: NoC-based many-core whose managers can be recovered after a fault.
//
// MESH_X x MESH_Y identical PEs (pe_tile) in a 2-D mesh, linked by the
// duplicated data NoC (two 16-bit physical channels per link) and by the
// control NoC. PE (x, y) has index y*MESH_X + x and address {x, y}. Software
// decides which PEs act as managers (cluster managers and the global
// manager) and which run application tasks; the hardware is the same.
//
// The processors are not part of this module: every PE brings its processor
// interface out as element [index] of the cpu_* port arrays (memory port A,
// DMNI commands and status, control-NoC send and receive, hold/restart), and
// takes a fault_detected input from the fault detector. When a manager's
// processor fails, its wrapper control isolates it and broadcasts fail_CPU;
// the paired manager then drives freeze, optional task migration,
// wait_kernel / send_kernel and unfreeze over the control NoC, while the two
// DMNIs copy the whole memory of the failed manager to the chosen PE over the
// data NoC without any processor involved.
//
// Links that leave the mesh are tied off: no data flit can reach them with XY
// routing, and control-NoC copies sent there are dropped.
// The 6 x 6 default is the instance of the document's experiments.
module mcsoc
  import mcsoc_pkg::*;
#(
  parameter int unsigned MESH_X    = 6,
  parameter int unsigned MESH_Y    = 6,
  parameter int unsigned MEM_WORDS = 16384,
  parameter int unsigned BUF_DEPTH = 8,
  localparam int unsigned NPE      = MESH_X * MESH_Y,
  localparam int unsigned AW       = $clog2(MEM_WORDS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic      [NPE-1:0]       fault_detected,
  input  logic      [NPE-1:0]       cpu_mem_en,
  input  logic      [NPE-1:0]       cpu_mem_we,
  input  logic      [NPE-1:0][AW-1:0] cpu_mem_addr,
  input  word_t     [NPE-1:0]       cpu_mem_wdata,
  output word_t     [NPE-1:0]       cpu_mem_rdata,
  input  logic      [NPE-1:0]       cpu_cmd_valid,
  input  dmni_cmd_t [NPE-1:0]       cpu_cmd,
  output logic      [NPE-1:0]       cpu_cmd_ready,
  output logic      [NPE-1:0]       cpu_send_busy,
  output logic      [NPE-1:0]       cpu_send_done,
  output logic      [NPE-1:0]       cpu_recv_armed,
  output logic      [NPE-1:0]       cpu_recv_done,
  output logic      [NPE-1:0][15:0] cpu_recv_words,
  input  logic      [NPE-1:0]       cpu_ctl_tx_valid,
  input  ctrl_msg_t [NPE-1:0]       cpu_ctl_tx_msg,
  output logic      [NPE-1:0]       cpu_ctl_tx_ready,
  output logic      [NPE-1:0]       cpu_ctl_rx_valid,
  output ctrl_msg_t [NPE-1:0]       cpu_ctl_rx_msg,
  input  logic      [NPE-1:0]       cpu_ctl_rx_ready,
  output logic      [NPE-1:0]       cpu_hold,
  output logic      [NPE-1:0]       cpu_restart,
  output logic      [NPE-1:0]       isolate
);

  localparam int E = 0, W = 1, N = 2, S = 3;

  logic  [1:0][3:0] d_in_valid  [NPE];
  flit_t [1:0][3:0] d_in_flit   [NPE];
  logic  [1:0][3:0] d_in_credit [NPE];
  logic  [1:0][3:0] d_out_valid [NPE];
  flit_t [1:0][3:0] d_out_flit  [NPE];
  logic  [1:0][3:0] d_out_credit[NPE];

  logic      [3:0] c_in_valid  [NPE];
  ctrl_msg_t [3:0] c_in_msg    [NPE];
  logic      [3:0] c_in_ready  [NPE];
  logic      [3:0] c_out_valid [NPE];
  ctrl_msg_t [3:0] c_out_msg   [NPE];
  logic      [3:0] c_out_ready [NPE];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned ID = y * MESH_X + x;
      // neighbour index in each direction, or -1 at the mesh edge
      localparam int NB_E = (x + 1 < MESH_X) ? int'(ID) + 1 : -1;
      localparam int NB_W = (x > 0)          ? int'(ID) - 1 : -1;
      localparam int NB_N = (y + 1 < MESH_Y) ? int'(ID + MESH_X) : -1;
      localparam int NB_S = (y > 0)          ? int'(ID) - int'(MESH_X) : -1;
      localparam int NB [4] = '{NB_E, NB_W, NB_N, NB_S};
      localparam int OPP [4] = '{W, E, S, N};

      for (genvar d = 0; d < 4; d++) begin : g_link
        if (NB[d] >= 0) begin : g_in
          for (genvar c = 0; c < 2; c++) begin : g_c
            assign d_in_valid[ID][c][d]   = d_out_valid[NB[d]][c][OPP[d]];
            assign d_in_flit[ID][c][d]    = d_out_flit[NB[d]][c][OPP[d]];
            assign d_out_credit[ID][c][d] = d_in_credit[NB[d]][c][OPP[d]];
          end
          assign c_in_valid[ID][d]  = c_out_valid[NB[d]][OPP[d]];
          assign c_in_msg[ID][d]    = c_out_msg[NB[d]][OPP[d]];
          assign c_out_ready[ID][d] = c_in_ready[NB[d]][OPP[d]];
        end else begin : g_edge
          for (genvar c = 0; c < 2; c++) begin : g_c
            assign d_in_valid[ID][c][d]   = 1'b0;
            assign d_in_flit[ID][c][d]    = '0;
            assign d_out_credit[ID][c][d] = 1'b0;
          end
          assign c_in_valid[ID][d]  = 1'b0;
          assign c_in_msg[ID][d]    = '0;
          assign c_out_ready[ID][d] = 1'b1;
        end
      end

      pe_tile #(.MEM_WORDS(MEM_WORDS), .BUF_DEPTH(BUF_DEPTH)) u_pe (
        .clk, .rst_n,
        .my_addr        ('{x: COORD_W'(x), y: COORD_W'(y)}),
        .fault_detected (fault_detected[ID]),
        .d_in_valid     (d_in_valid[ID]),   .d_in_flit  (d_in_flit[ID]),
        .d_in_credit    (d_in_credit[ID]),  .d_out_valid(d_out_valid[ID]),
        .d_out_flit     (d_out_flit[ID]),   .d_out_credit(d_out_credit[ID]),
        .c_in_valid     (c_in_valid[ID]),   .c_in_msg   (c_in_msg[ID]),
        .c_in_ready     (c_in_ready[ID]),   .c_out_valid(c_out_valid[ID]),
        .c_out_msg      (c_out_msg[ID]),    .c_out_ready(c_out_ready[ID]),
        .cpu_mem_en     (cpu_mem_en[ID]),   .cpu_mem_we (cpu_mem_we[ID]),
        .cpu_mem_addr   (cpu_mem_addr[ID]), .cpu_mem_wdata(cpu_mem_wdata[ID]),
        .cpu_mem_rdata  (cpu_mem_rdata[ID]),
        .cpu_cmd_valid  (cpu_cmd_valid[ID]), .cpu_cmd   (cpu_cmd[ID]),
        .cpu_cmd_ready  (cpu_cmd_ready[ID]),
        .cpu_send_busy  (cpu_send_busy[ID]), .cpu_send_done(cpu_send_done[ID]),
        .cpu_recv_armed (cpu_recv_armed[ID]), .cpu_recv_done(cpu_recv_done[ID]),
        .cpu_recv_words (cpu_recv_words[ID]),
        .cpu_ctl_tx_valid(cpu_ctl_tx_valid[ID]), .cpu_ctl_tx_msg(cpu_ctl_tx_msg[ID]),
        .cpu_ctl_tx_ready(cpu_ctl_tx_ready[ID]),
        .cpu_ctl_rx_valid(cpu_ctl_rx_valid[ID]), .cpu_ctl_rx_msg(cpu_ctl_rx_msg[ID]),
        .cpu_ctl_rx_ready(cpu_ctl_rx_ready[ID]),
        .cpu_hold       (cpu_hold[ID]),     .cpu_restart(cpu_restart[ID]),
        .isolate        (isolate[ID])
      );
    end
  end

endmodule

// mcsoc_pkg: types and constants shared by the many-core platform.
//
// The platform is a 2-D mesh of identical processing elements (PEs). Each PE
// has a data-NoC router (two 16-bit physical channels per link), a control-NoC
// router that carries short management messages (broadcast or unicast), a
// direct-memory network interface (DMNI), a dual-port private memory, and a
// wrapper with its control module that isolates a faulty CPU.
//
// Data-NoC packet format (this design's choice): flit 0 is the header, flit 1
// the number of payload flits, then the payload. An XY header is the target
// address {x[7:0], y[7:0]} with x below 128 (bit 15 clear); a header with bit
// 15 set is a source route (see data_router). A 32-bit memory word travels as
// two flits, high half first.
//
// Control-NoC messages are single wide words (ctrl_msg_t) moved by a
// valid/ready handshake. The service codes below are the messages of the
// manager-recovery protocol; their numeric values are this design's own.
package mcsoc_pkg;

  localparam int unsigned FLIT_W  = 16;  // one data-NoC physical channel
  localparam int unsigned WORD_W  = 32;  // memory word (32-bit processor)
  localparam int unsigned COORD_W = 8;   // x or y coordinate

  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic [WORD_W-1:0] word_t;

  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } pe_addr_t;

  // Router port numbering, shared by both NoCs.
  typedef enum logic [2:0] {
    P_EAST  = 3'd0,  // x+1
    P_WEST  = 3'd1,  // x-1
    P_NORTH = 3'd2,  // y+1
    P_SOUTH = 3'd3,  // y-1
    P_LOCAL = 3'd4
  } port_e;
  localparam int unsigned NPORTS = 5;

  // Control-NoC services used by the recovery protocol.
  typedef enum logic [3:0] {
    SVC_NONE          = 4'd0,
    SVC_FAIL_CPU      = 4'd1,  // wrapper control: my CPU is faulty
    SVC_FREEZE        = 4'd2,  // payload: address of the faulty manager
    SVC_UNFREEZE      = 4'd3,  // payload: address of the new manager
    SVC_SPCAND        = 4'd4,  // payload: candidate address and its task count
    SVC_TASK_MIGRATE  = 4'd5,  // payload: target PE of the migrated tasks
    SVC_MIGRATION_END = 4'd6,  // task migration finished
    SVC_WAIT_KERNEL   = 4'd7,  // handled by the DMNI: prepare to receive a kernel
    SVC_WAIT_KERNEL_ACK = 4'd8,// sent by the DMNI once it is ready
    SVC_SEND_KERNEL   = 4'd9,  // handled by the DMNI: payload = kernel target
    SVC_USER          = 4'd15
  } svc_e;

  typedef struct packed {
    svc_e        svc;
    logic        bcast;    // 1: deliver to every PE; 0: only to tgt
    pe_addr_t    src;
    pe_addr_t    tgt;
    logic [31:0] payload;
  } ctrl_msg_t;

  // Services whose payload the DMNI consumes instead of the processor.
  function automatic logic is_dmni_svc(svc_e s);
    return (s == SVC_WAIT_KERNEL) || (s == SVC_SEND_KERNEL);
  endfunction

  // DMNI programming by the processor.
  typedef enum logic [1:0] {
    DMNI_NOP  = 2'd0,
    DMNI_SEND = 2'd1,  // read size words from mem_addr, send them to tgt
    DMNI_RECV = 2'd2   // write the payload of the next packet from mem_addr
  } dmni_op_e;

  // Source-routed header: hops (at most 6) and path, first hop in bits 1:0.
  function automatic logic [15:0] sr_header(logic [2:0] hops, logic [11:0] path);
    return {1'b1, hops, path};
  endfunction

  typedef struct packed {
    dmni_op_e    op;
    logic        ch;        // data-NoC physical channel used by a send
    pe_addr_t    tgt;       // sent as the header flit: {x, y} or a source route
    logic [15:0] mem_addr;  // word address
    logic [15:0] size;      // words
  } dmni_cmd_t;

endpackage

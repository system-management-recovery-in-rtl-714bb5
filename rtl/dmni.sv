// dmni: direct-memory network interface of a PE.
//
// The DMNI joins a network interface and a DMA engine: it moves packets
// between the data NoC and the private memory without the processor copying
// them. It has two state machines, one that sends and one that receives.
//
//  * Send: the processor issues DMNI_SEND {tgt, mem_addr, size, ch}. The DMNI
//    emits a header flit {tgt.x, tgt.y} (or a source route placed in tgt),
//    a size flit (2*size payload flits),
//    then reads the words from memory and sends each as two flits, high half
//    first, on physical channel ch. send_done pulses when the last flit left.
//  * Receive: the processor arms the receiver with DMNI_RECV {mem_addr}. The
//    next packet from either channel (the idle receiver offers credit to the
//    two channels in turn and locks onto the first that delivers) has its
//    payload written from mem_addr upwards; recv_done pulses with recv_words.
//
// Manager recovery adds two control-NoC services that the DMNI handles in
// hardware, because the processor of a faulty manager cannot run them:
//  * SVC_WAIT_KERNEL (at the candidate PE): hold the processor, arm the
//    receiver at address 0 in kernel mode, and answer SVC_WAIT_KERNEL_ACK to
//    the sender of the request. When the kernel packet has been written,
//    release the hold and pulse cpu_restart so the PE restarts as manager.
//  * SVC_SEND_KERNEL (at the faulty manager): send the whole memory,
//    KERNEL_WORDS words from address 0, as one packet to the PE whose address
//    is in payload[15:0], on channel 0.
//
// Timing: the sender moves one 32-bit word in three cycles (read, two flits)
// when the channel has credit; a receiver write has priority on the memory
// port and delays a send read by one cycle. The receiver takes one flit per
// cycle. Which services the DMNI handles, holding the processor, writing from
// address 0 and the acknowledgement follow the document; the packet format,
// the command interface, the channel policy and the timing are this design's.
// The receiver has no flit buffer of its own: unaccepted flits wait in the
// router's local input buffer.
module dmni
  import mcsoc_pkg::*;
#(
  parameter int unsigned MEM_WORDS    = 16384,
  parameter int unsigned KERNEL_WORDS = MEM_WORDS,
  localparam int unsigned AW          = $clog2(MEM_WORDS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  pe_addr_t        my_addr,
  // processor side
  input  logic            cmd_valid,
  input  dmni_cmd_t       cmd,
  output logic            cmd_ready,
  output logic            send_busy,
  output logic            send_done,
  output logic            recv_armed,
  output logic            recv_done,
  output logic [15:0]     recv_words,
  output logic            cpu_hold,
  output logic            cpu_restart,
  // memory port B
  output logic            mem_en,
  output logic            mem_we,
  output logic [AW-1:0]   mem_addr,
  output word_t           mem_wdata,
  input  word_t           mem_rdata,
  // data NoC, local port of the two physical channels
  output logic [1:0]      tx_valid,
  output flit_t [1:0]     tx_flit,
  input  logic [1:0]      tx_credit,
  input  logic [1:0]      rx_valid,
  input  flit_t [1:0]     rx_flit,
  output logic [1:0]      rx_credit,
  // control NoC: services addressed to the DMNI, and injection
  input  logic            ctl_in_valid,
  input  ctrl_msg_t       ctl_in_msg,
  output logic            ctl_in_ready,
  output logic            ctl_out_valid,
  output ctrl_msg_t       ctl_out_msg,
  input  logic            ctl_out_ready
);

  // ---------------------------------------------------------------- send FSM
  typedef enum logic [2:0] {T_IDLE, T_HDR, T_SIZE, T_RD, T_HI, T_LO} tx_e;
  tx_e          tx_st;
  pe_addr_t     tx_tgt;
  logic         tx_ch;
  logic [AW-1:0] tx_ptr;
  logic [16:0]  tx_left;    // words still to read

  // ------------------------------------------------------------- receive FSM
  typedef enum logic [1:0] {R_IDLE, R_SIZE, R_PAY} rx_e;
  rx_e          rx_st;
  logic         rx_arm;
  logic         rx_kernel;  // armed by SVC_WAIT_KERNEL
  logic         rx_ch;      // channel locked (or offered credit while idle)
  logic [AW-1:0] rx_ptr;
  logic [15:0]  rx_left;    // payload flits still to come
  logic         rx_half;    // high half of a word already held
  logic [FLIT_W-1:0] rx_hi;
  logic [15:0]  rx_cnt;

  logic         rx_take;    // a flit is accepted this cycle
  flit_t        rx_f;
  logic         rx_write;   // a word goes to memory this cycle
  logic         tx_send;    // a flit leaves this cycle
  logic         tx_read;    // the sender reads memory this cycle

  // ----------------------------------------------------------- control side
  logic ctl_wait_k, ctl_send_k;
  assign ctl_wait_k = ctl_in_valid && ctl_in_msg.svc == SVC_WAIT_KERNEL;
  assign ctl_send_k = ctl_in_valid && ctl_in_msg.svc == SVC_SEND_KERNEL;

  always_comb begin
    ctl_in_ready = 1'b0;
    if (ctl_wait_k) ctl_in_ready = (rx_st == R_IDLE) && !ctl_out_valid;
    else if (ctl_send_k) ctl_in_ready = (tx_st == T_IDLE);
    else if (ctl_in_valid) ctl_in_ready = 1'b1;  // not a DMNI service: drop
  end

  assign cmd_ready = (cmd.op == DMNI_SEND) ? (tx_st == T_IDLE && !ctl_send_k)
                   : (cmd.op == DMNI_RECV) ? (rx_st == R_IDLE && !rx_arm && !ctl_wait_k)
                   : 1'b1;
  assign send_busy  = (tx_st != T_IDLE);
  assign recv_armed = rx_arm;

  // ------------------------------------------------------------ receive path
  always_comb begin
    rx_credit = '0;
    if (rx_arm) rx_credit[rx_ch] = 1'b1;
    rx_take  = rx_arm && rx_valid[rx_ch];
    rx_f     = rx_flit[rx_ch];
    rx_write = rx_take && rx_st == R_PAY && rx_half;
  end

  // -------------------------------------------------------------- send path
  always_comb begin
    tx_valid = '0;
    tx_flit  = '{default: '0};
    tx_send  = 1'b0;
    unique case (tx_st)
      T_HDR:  tx_flit[tx_ch] = {tx_tgt.x, tx_tgt.y};
      T_SIZE: tx_flit[tx_ch] = FLIT_W'(tx_left << 1);
      T_HI:   tx_flit[tx_ch] = mem_rdata[WORD_W-1:FLIT_W];
      T_LO:   tx_flit[tx_ch] = mem_rdata[FLIT_W-1:0];
      default: ;
    endcase
    if (tx_st == T_HDR || tx_st == T_SIZE || tx_st == T_HI || tx_st == T_LO) begin
      tx_valid[tx_ch] = tx_credit[tx_ch];
      tx_send         = tx_credit[tx_ch];
    end
    tx_read = (tx_st == T_RD) && !rx_write;
  end

  // Memory port B: a receiver write wins over a sender read.
  always_comb begin
    mem_en    = rx_write || tx_read;
    mem_we    = rx_write;
    mem_addr  = rx_write ? rx_ptr : tx_ptr;
    mem_wdata = {rx_hi, rx_f};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_st <= T_IDLE;
      tx_tgt <= '0; tx_ch <= 1'b0; tx_ptr <= '0; tx_left <= '0;
      rx_st <= R_IDLE; rx_arm <= 1'b0; rx_kernel <= 1'b0; rx_ch <= 1'b0;
      rx_ptr <= '0; rx_left <= '0; rx_half <= 1'b0; rx_hi <= '0; rx_cnt <= '0;
      recv_words <= '0; recv_done <= 1'b0; send_done <= 1'b0;
      cpu_hold <= 1'b0; cpu_restart <= 1'b0;
      ctl_out_valid <= 1'b0; ctl_out_msg <= '0;
    end else begin
      recv_done   <= 1'b0;
      send_done   <= 1'b0;
      cpu_restart <= 1'b0;
      if (ctl_out_valid && ctl_out_ready) ctl_out_valid <= 1'b0;

      // ---- send FSM
      unique case (tx_st)
        T_IDLE: begin
          if (ctl_send_k) begin
            tx_tgt  <= ctl_in_msg.payload[15:0];
            tx_ch   <= 1'b0;
            tx_ptr  <= '0;
            tx_left <= 17'(KERNEL_WORDS);
            tx_st   <= T_HDR;
          end else if (cmd_valid && cmd.op == DMNI_SEND) begin
            tx_tgt  <= cmd.tgt;
            tx_ch   <= cmd.ch;
            tx_ptr  <= AW'(cmd.mem_addr);
            tx_left <= 17'(cmd.size);
            tx_st   <= T_HDR;
          end
        end
        T_HDR:  if (tx_send) tx_st <= T_SIZE;
        T_SIZE: if (tx_send) begin
          if (tx_left == '0) begin
            tx_st <= T_IDLE;
            send_done <= 1'b1;
          end else tx_st <= T_RD;
        end
        T_RD:   if (tx_read) tx_st <= T_HI;
        T_HI:   if (tx_send) tx_st <= T_LO;
        T_LO:   if (tx_send) begin
          tx_ptr  <= tx_ptr + 1'b1;
          tx_left <= tx_left - 1'b1;
          if (tx_left == 17'd1) begin
            tx_st <= T_IDLE;
            send_done <= 1'b1;
          end else tx_st <= T_RD;
        end
        default: tx_st <= T_IDLE;
      endcase

      // ---- receive FSM
      if (rx_st == R_IDLE && !rx_arm) begin
        if (ctl_wait_k && ctl_in_ready) begin
          rx_arm        <= 1'b1;
          rx_kernel     <= 1'b1;
          rx_ptr        <= '0;
          cpu_hold      <= 1'b1;
          ctl_out_valid <= 1'b1;
          ctl_out_msg   <= '{svc: SVC_WAIT_KERNEL_ACK, bcast: 1'b0, src: my_addr,
                             tgt: ctl_in_msg.src, payload: 32'({my_addr.x, my_addr.y})};
        end else if (cmd_valid && cmd.op == DMNI_RECV) begin
          rx_arm    <= 1'b1;
          rx_kernel <= 1'b0;
          rx_ptr    <= AW'(cmd.mem_addr);
        end
      end
      unique case (rx_st)
        R_IDLE: begin
          if (rx_take) begin
            rx_st   <= R_SIZE;   // header consumed; channel stays locked
          end else if (rx_arm) begin
            rx_ch <= ~rx_ch;      // offer credit to the other channel
          end
          rx_cnt  <= '0;
          rx_half <= 1'b0;
        end
        R_SIZE: if (rx_take) begin
          rx_left <= rx_f;
          if (rx_f == '0) begin
            rx_st <= R_IDLE;
            rx_arm <= 1'b0;
            recv_done <= 1'b1;
            recv_words <= '0;
            if (rx_kernel) begin cpu_hold <= 1'b0; cpu_restart <= 1'b1; end
          end else rx_st <= R_PAY;
        end
        R_PAY: if (rx_take) begin
          rx_left <= rx_left - 1'b1;
          rx_half <= ~rx_half;
          if (!rx_half) rx_hi <= rx_f;
          if (rx_write) begin
            rx_ptr <= rx_ptr + 1'b1;
            rx_cnt <= rx_cnt + 1'b1;
          end
          if (rx_left == 16'd1) begin
            rx_st <= R_IDLE;
            rx_arm <= 1'b0;
            recv_done <= 1'b1;
            recv_words <= rx_cnt + 16'(rx_write);
            if (rx_kernel) begin cpu_hold <= 1'b0; cpu_restart <= 1'b1; end
          end
        end
        default: rx_st <= R_IDLE;
      endcase
    end
  end

  a_ctl_hold : assert property (@(posedge clk) disable iff (!rst_n)
                                ctl_out_valid && !ctl_out_ready |=> ctl_out_valid)
    else $error("dmni: control message withdrawn before it was taken");

endmodule

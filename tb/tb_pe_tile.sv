// tb_pe_tile: self-checking test of one PE tile at (0,0), 64-word memory.
//
//  1. The processor writes its memory and sends 8 words to its own address
//     on each data channel; the packet loops through the local router port
//     and the DMNI writes it back 32 words higher.
//  2. A processor broadcast leaves on the east and north control links.
//  3. wait_kernel arrives from the east control link: the processor is held,
//     wait_kernel_ack leaves towards the requester (east), a kernel packet
//     arriving on east channel 0 fills the memory, the hold drops and
//     cpu_restart pulses; the processor reads back the kernel.
//  4. A fault report isolates the processor: fail_CPU is broadcast, and a
//     memory write by the processor no longer lands. send_kernel from the
//     east link then makes the DMNI send the whole memory out of the east
//     data port, which the testbench compares with the memory.
module tb_pe_tile;
  import mcsoc_pkg::*;
  localparam int MW = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  pe_addr_t me = '{x: 8'd0, y: 8'd0};

  logic  [1:0][3:0] d_in_valid, d_in_credit, d_out_valid, d_out_credit;
  flit_t [1:0][3:0] d_in_flit, d_out_flit;
  logic      [3:0] c_in_valid, c_in_ready, c_out_valid, c_out_ready;
  ctrl_msg_t [3:0] c_in_msg, c_out_msg;
  logic fault_detected = 0;
  logic cpu_mem_en = 0, cpu_mem_we = 0; logic [5:0] cpu_mem_addr = 0; word_t cpu_mem_wdata = 0, cpu_mem_rdata;
  logic cpu_cmd_valid = 0, cpu_cmd_ready, cpu_send_busy, cpu_send_done, cpu_recv_armed, cpu_recv_done;
  dmni_cmd_t cpu_cmd = '0; logic [15:0] cpu_recv_words;
  logic cpu_ctl_tx_valid = 0, cpu_ctl_tx_ready, cpu_ctl_rx_valid, cpu_ctl_rx_ready = 1;
  ctrl_msg_t cpu_ctl_tx_msg = '0, cpu_ctl_rx_msg;
  logic cpu_hold, cpu_restart, isolate;

  pe_tile #(.MEM_WORDS(MW)) dut (.*, .my_addr(me));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // east data link: driven from a queue on channel 0, captured on channel 0
  flit_t drv_q [$], cap_q [$];
  always_comb begin
    d_in_valid = '0; d_in_flit = '0;
    d_in_valid[0][P_EAST] = drv_q.size() > 0 && d_in_credit[0][P_EAST];
    d_in_flit[0][P_EAST]  = drv_q.size() > 0 ? drv_q[0] : '0;
    d_out_credit = '1;
  end
  // control links: east input from a queue, all outputs captured
  ctrl_msg_t cin_q [$];
  ctrl_msg_t cout_q [4][$];
  ctrl_msg_t rx_q [$];
  always_comb begin
    c_in_valid = '0; c_in_msg = '0;
    c_in_valid[P_EAST] = cin_q.size() > 0;
    c_in_msg[P_EAST]   = cin_q.size() > 0 ? cin_q[0] : '0;
    c_out_ready = '1;
  end
  always @(posedge clk) if (rst_n) begin
    if (d_in_valid[0][P_EAST]) void'(drv_q.pop_front());
    if (d_out_valid[0][P_EAST]) cap_q.push_back(d_out_flit[0][P_EAST]);
    if (c_in_valid[P_EAST] && c_in_ready[P_EAST]) void'(cin_q.pop_front());
    for (int d = 0; d < 4; d++) if (c_out_valid[d]) cout_q[d].push_back(c_out_msg[d]);
    if (cpu_ctl_rx_valid) rx_q.push_back(cpu_ctl_rx_msg);
  end

  task automatic wr(int a, word_t d);
    @(negedge clk); cpu_mem_en = 1; cpu_mem_we = 1; cpu_mem_addr = 6'(a); cpu_mem_wdata = d;
    @(negedge clk); cpu_mem_en = 0; cpu_mem_we = 0;
  endtask
  task automatic rd(int a, output word_t d);
    @(negedge clk); cpu_mem_en = 1; cpu_mem_we = 0; cpu_mem_addr = 6'(a);
    @(negedge clk); cpu_mem_en = 0; d = cpu_mem_rdata;
  endtask
  task automatic issue(dmni_cmd_t c);
    @(negedge clk); cpu_cmd = c; cpu_cmd_valid = 1; #1;
    while (!cpu_cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk); cpu_cmd_valid = 0;
  endtask
  task automatic wait_cycles_until(ref logic s, input int max);
    for (int i = 0; i < max && !s; i++) @(negedge clk);
  endtask

  word_t img [MW];
  int restarts = 0;
  always @(posedge clk) if (rst_n && cpu_restart) restarts++;

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < MW; i++) begin img[i] = $urandom; wr(i, img[i]); end
    // 1. self-sends through the router, both channels
    for (int c = 0; c < 2; c++) begin
      issue('{op: DMNI_RECV, ch: 1'b0, tgt: '0, mem_addr: 16'(32 + 8*c), size: 16'd0});
      issue('{op: DMNI_SEND, ch: 1'(c), tgt: me, mem_addr: 16'(8*c), size: 16'd8});
      wait_cycles_until(cpu_recv_done, 200);
      check(cpu_recv_done && cpu_recv_words == 16'd8, $sformatf("self packet on channel %0d received", c));
      repeat (3) @(negedge clk);
    end
    for (int i = 0; i < 16; i++) begin word_t d; rd(32 + i, d); check(d == img[i], $sformatf("looped word %0d", i)); img[32+i] = img[i]; end
    // 2. processor broadcast
    @(negedge clk);
    cpu_ctl_tx_msg = '{svc: SVC_FREEZE, bcast: 1'b1, src: me, tgt: me, payload: 32'h55};
    cpu_ctl_tx_valid = 1; #1;
    while (!cpu_ctl_tx_ready) begin @(negedge clk); #1; end
    @(negedge clk); cpu_ctl_tx_valid = 0;
    repeat (6) @(negedge clk);
    check(cout_q[P_EAST].size() == 1 && cout_q[P_NORTH].size() == 1 &&
          cout_q[P_EAST][0].svc == SVC_FREEZE && cout_q[P_NORTH][0].payload == 32'h55,
          "broadcast leaves east and north");
    check(rx_q.size() == 0, "a broadcast is not delivered back to its source");
    cout_q[P_EAST].delete(); cout_q[P_NORTH].delete(); cout_q[P_WEST].delete(); cout_q[P_SOUTH].delete();
    // 3. wait_kernel from (1,0)
    cin_q.push_back('{svc: SVC_WAIT_KERNEL, bcast: 1'b0, src: '{x: 8'd1, y: 8'd0}, tgt: me, payload: '0});
    wait_cycles_until(cpu_hold, 50);
    check(cpu_hold, "processor held after wait_kernel");
    repeat (8) @(negedge clk);
    check(cout_q[P_EAST].size() == 1 && cout_q[P_EAST][0].svc == SVC_WAIT_KERNEL_ACK &&
          cout_q[P_EAST][0].tgt == '{x: 8'd1, y: 8'd0}, "wait_kernel_ack leaves east");
    check(rx_q.size() == 0, "DMNI services do not reach the processor");
    wr(5, 32'hdead_beef);  // held processor: write must not land
    drv_q.push_back({8'd0, 8'd0}); drv_q.push_back(16'(2 * MW));
    for (int i = 0; i < MW; i++) begin img[i] = $urandom; drv_q.push_back(img[i][31:16]); drv_q.push_back(img[i][15:0]); end
    wait_cycles_until(cpu_restart, 2000);
    repeat (2) @(negedge clk);
    check(restarts == 1 && !cpu_hold, $sformatf("kernel received, processor restarted (%0d restarts, hold %b)", restarts, cpu_hold));
    for (int i = 0; i < MW; i++) begin word_t d; rd(i, d); check(d == img[i], $sformatf("kernel word %0d", i)); end
    // 4. fault, then send_kernel to (3,0)
    fault_detected = 1; @(negedge clk); fault_detected = 0;
    check(isolate, "processor isolated");
    repeat (6) @(negedge clk);
    check(cout_q[P_NORTH].size() == 1 && cout_q[P_NORTH][0].svc == SVC_FAIL_CPU &&
          cout_q[P_NORTH][0].bcast, "fail_CPU broadcast");
    wr(7, ~img[7]);
    cin_q.push_back('{svc: SVC_SEND_KERNEL, bcast: 1'b0, src: '{x: 8'd1, y: 8'd0}, tgt: me, payload: 32'h0300});
    for (int i = 0; i < 3000 && cap_q.size() < 2 + 2 * MW; i++) @(negedge clk);
    check(cap_q.size() == 2 + 2 * MW, $sformatf("kernel packet length %0d", cap_q.size()));
    if (cap_q.size() == 2 + 2 * MW) begin
      check(cap_q[0] == 16'h0300 && cap_q[1] == 16'(2 * MW), "kernel packet header");
      for (int i = 0; i < MW; i++)
        check({cap_q[2 + 2*i], cap_q[3 + 2*i]} == img[i], $sformatf("kernel word %0d sent (isolated write blocked)", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #300000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

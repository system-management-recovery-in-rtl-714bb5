// tb_dmni: self-checking test of the direct-memory network interface.
//
// The DMNI is tested with a real dp_ram (256 words) behind it.
//  1. Loopback: both data channels' outputs feed its inputs, with random
//     credit. The processor arms a receive at word 200 and sends words 0..19
//     on channel 1; the copy and recv_words are checked, and the send must
//     take three cycles per word plus the two header flits when unstalled.
//  2. wait_kernel: the DMNI must hold the processor, answer wait_kernel_ack
//     to the requester, then write a kernel packet driven by the testbench
//     from address 0, release the hold and pulse cpu_restart.
//  3. send_kernel: the DMNI must send the whole memory (KERNEL_WORDS) as one
//     packet to the address in the payload; header, size and every word are
//     compared with the memory.
module tb_dmni;
  import mcsoc_pkg::*;
  localparam int MW = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  pe_addr_t me = '{x: 8'd1, y: 8'd0};

  logic cmd_valid = 0, cmd_ready, send_busy, send_done, recv_armed, recv_done, cpu_hold, cpu_restart;
  dmni_cmd_t cmd = '0;
  logic [15:0] recv_words;
  logic mem_en, mem_we; logic [7:0] mem_addr; word_t mem_wdata, mem_rdata;
  logic [1:0] tx_valid, tx_credit, rx_valid, rx_credit;
  flit_t [1:0] tx_flit, rx_flit;
  logic ctl_in_valid = 0, ctl_in_ready, ctl_out_valid, ctl_out_ready = 0;
  ctrl_msg_t ctl_in_msg = '0, ctl_out_msg;

  dmni #(.MEM_WORDS(MW)) dut (.clk, .rst_n, .my_addr(me), .cmd_valid, .cmd, .cmd_ready,
    .send_busy, .send_done, .recv_armed, .recv_done, .recv_words, .cpu_hold, .cpu_restart,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .tx_valid, .tx_flit, .tx_credit, .rx_valid, .rx_flit, .rx_credit,
    .ctl_in_valid, .ctl_in_msg, .ctl_in_ready, .ctl_out_valid, .ctl_out_msg, .ctl_out_ready);

  logic a_en = 0, a_we = 0; logic [7:0] a_addr = 0; word_t a_wdata = 0, a_rdata;
  dp_ram #(.WORDS(MW)) mem (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en(mem_en), .b_we(mem_we), .b_addr(mem_addr), .b_wdata(mem_wdata), .b_rdata(mem_rdata));

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // data side: loopback or testbench-driven
  logic lb = 1, rnd_credit = 0, cr_rand = 1;
  flit_t drv_q [$];
  flit_t cap_q [$];
  always @(negedge clk) cr_rand <= rnd_credit ? ($urandom_range(0, 2) != 0) : 1'b1;
  always_comb begin
    if (lb) begin
      tx_credit = rx_credit & {2{cr_rand}};
      rx_valid  = tx_valid;
      rx_flit   = tx_flit;
    end else begin
      tx_credit = {1'b0, cr_rand};
      rx_valid  = {1'b0, drv_q.size() > 0 && rx_credit[0]};
      rx_flit   = {flit_t'(0), drv_q.size() > 0 ? drv_q[0] : flit_t'(0)};
    end
  end
  always @(posedge clk) begin
    if (!lb && rx_valid[0]) void'(drv_q.pop_front());
    if (!lb && tx_valid[0]) cap_q.push_back(tx_flit[0]);
  end

  task automatic mem_write(int a, word_t d);
    @(negedge clk); a_en = 1; a_we = 1; a_addr = 8'(a); a_wdata = d;
    @(negedge clk); a_en = 0; a_we = 0;
  endtask
  task automatic mem_read(int a, output word_t d);
    @(negedge clk); a_en = 1; a_we = 0; a_addr = 8'(a);
    @(negedge clk); a_en = 0; d = a_rdata;
  endtask
  task automatic issue(dmni_cmd_t c);
    @(negedge clk); cmd = c; cmd_valid = 1; #1;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk); cmd_valid = 0;
  endtask

  word_t img [MW];
  int t_send0, t_done, restarts = 0, acks = 0;
  always @(posedge clk) if (rst_n && cpu_restart) restarts++;
  always @(posedge clk) if (rst_n && send_done) t_done = cycle;

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < MW; i++) begin img[i] = $urandom; mem_write(i, img[i]); end

    // 1. loopback copy, no stall, channel 1
    issue('{op: DMNI_RECV, ch: 1'b0, tgt: '0, mem_addr: 16'd200, size: 16'd0});
    check(recv_armed, "receiver armed");
    @(negedge clk); cmd = '{op: DMNI_SEND, ch: 1'b1, tgt: '{x: 8'd1, y: 8'd0}, mem_addr: 16'd0, size: 16'd20};
    cmd_valid = 1; t_send0 = cycle; @(negedge clk); cmd_valid = 0;
    wait (recv_done); repeat (2) @(negedge clk);
    check(recv_words == 16'd20, $sformatf("recv_words %0d, expected 20", recv_words));
    check(t_done - t_send0 == 1 + 2 + 3 * 20 + 1, $sformatf("send of 20 words took %0d cycles, expected 64", t_done - t_send0));
    for (int i = 0; i < 20; i++) begin word_t d; mem_read(200 + i, d); check(d == img[i], $sformatf("copied word %0d", i)); end

    // 1b. same with random credit, channel 0, 40 words to word 100
    rnd_credit = 1;
    issue('{op: DMNI_RECV, ch: 1'b0, tgt: '0, mem_addr: 16'd100, size: 16'd0});
    issue('{op: DMNI_SEND, ch: 1'b0, tgt: '{x: 8'd1, y: 8'd0}, mem_addr: 16'd20, size: 16'd40});
    wait (recv_done); @(negedge clk);
    check(recv_words == 16'd40, "recv_words 40");
    for (int i = 0; i < 40; i++) begin word_t d; mem_read(100 + i, d); check(d == img[20 + i], $sformatf("stalled copy word %0d", i)); img[100+i] = img[20+i]; end

    // 2. wait_kernel, then a kernel packet of 64 words from the testbench
    lb = 0;
    ctl_out_ready = 0;
    @(negedge clk);
    ctl_in_msg = '{svc: SVC_WAIT_KERNEL, bcast: 1'b0, src: '{x: 8'd4, y: 8'd2}, tgt: me, payload: '0};
    ctl_in_valid = 1; #1;
    while (!ctl_in_ready) @(negedge clk);
    @(negedge clk); ctl_in_valid = 0;
    check(cpu_hold, "processor held after wait_kernel");
    check(ctl_out_valid && ctl_out_msg.svc == SVC_WAIT_KERNEL_ACK && ctl_out_msg.tgt == '{x: 8'd4, y: 8'd2} &&
          ctl_out_msg.src == me, "wait_kernel_ack to the requester");
    ctl_out_ready = 1;
    drv_q.push_back({8'd1, 8'd0}); drv_q.push_back(16'd128);
    for (int i = 0; i < 64; i++) begin img[i] = $urandom; drv_q.push_back(img[i][31:16]); drv_q.push_back(img[i][15:0]); end
    wait (cpu_restart); repeat (2) @(negedge clk);
    check(!cpu_hold, "hold released after the kernel");
    check(restarts == 1, "one restart pulse");
    for (int i = 0; i < 64; i++) begin word_t d; mem_read(i, d); check(d == img[i], $sformatf("kernel word %0d", i)); end

    // 3. send_kernel to (5,3)
    @(negedge clk);
    ctl_in_msg = '{svc: SVC_SEND_KERNEL, bcast: 1'b0, src: '{x: 8'd4, y: 8'd2}, tgt: me, payload: 32'h0503};
    ctl_in_valid = 1; #1;
    while (!ctl_in_ready) @(negedge clk);
    @(negedge clk); ctl_in_valid = 0;
    // the image from 20 to 99 and above 140 was never changed
    for (int i = 0; i < MW; i++) begin word_t d; mem_read(i, d); img[i] = d; end
    while (cap_q.size() < 2 + 2 * MW) @(negedge clk);
    repeat (3) @(negedge clk);
    check(cap_q.size() == 2 + 2 * MW, "whole memory sent as one packet");
    check(cap_q[0] == 16'h0503, "kernel header");
    check(cap_q[1] == 16'(2 * MW), "kernel size flit");
    for (int i = 0; i < MW; i++)
      check({cap_q[2 + 2*i], cap_q[3 + 2*i]} == img[i], $sformatf("kernel word %0d sent", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

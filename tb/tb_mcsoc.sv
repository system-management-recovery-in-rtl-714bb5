// tb_mcsoc: end-to-end recovery of failed managers in the 6 x 6 many-core,
// at the default parameters (64 KB memories, 8-flit buffers).
//
// The testbench plays the software of the processors. Four 3 x 3 clusters:
// the global manager (VGM) at (0,0), cluster managers at (3,0), (0,3) and
// (3,3); (0,0)/(3,0) and (0,3)/(3,3) are manager pairs. A source-routed
// application packet is sent first. Then four recoveries in a row cover the
// four cases evaluated for the method (VGM or cluster manager failing, with
// or without a task migration to free the candidate):
//   1. CM (3,0) fails, candidate (4,0) runs a 10 KB task that moves to (1,2),
//      with competing traffic on the same links; the VGM recovers it.
//   2. The VGM (0,0) fails, candidate (1,0) is free; the new CM at (4,0)
//      is now its pair and recovers it.
//   3. The VGM, now at (1,0), fails; candidate (2,0) runs a task that moves
//      to (5,2) in another cluster.
//   4. The CM, now at (4,0), fails; candidate (5,0) is free.
// Each recovery: fault -> isolation and fail_CPU broadcast (latency checked
// against two cycles per hop) -> freeze broadcast (count of frozen PEs
// checked) -> optional task migration and migration_end -> wait_kernel,
// hold and acknowledge -> send_kernel, 64 KB DMNI-to-DMNI copy (cycle count
// checked, every word compared) -> restart -> unfreeze broadcast (count
// checked). The faulty and the held processors try to write and must not.
// Every mechanism is counted and must occur.
module tb_mcsoc;
  import mcsoc_pkg::*;
  localparam int MX = 6, MY = 6, NPE = 36, MW = 16384, AW = 14;
  localparam int TASK_WORDS = 2560;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      [NPE-1:0]         fault_detected = '0;
  logic      [NPE-1:0]         cpu_mem_en = '0, cpu_mem_we = '0;
  logic      [NPE-1:0][AW-1:0] cpu_mem_addr = '0;
  word_t     [NPE-1:0]         cpu_mem_wdata = '0, cpu_mem_rdata;
  logic      [NPE-1:0]         cpu_cmd_valid = '0, cpu_cmd_ready;
  dmni_cmd_t [NPE-1:0]         cpu_cmd = '0;
  logic      [NPE-1:0]         cpu_send_busy, cpu_send_done, cpu_recv_armed, cpu_recv_done;
  logic      [NPE-1:0][15:0]   cpu_recv_words;
  logic      [NPE-1:0]         cpu_ctl_tx_valid = '0, cpu_ctl_tx_ready;
  ctrl_msg_t [NPE-1:0]         cpu_ctl_tx_msg = '0, cpu_ctl_rx_msg;
  logic      [NPE-1:0]         cpu_ctl_rx_valid, cpu_ctl_rx_ready;
  logic      [NPE-1:0]         cpu_hold, cpu_restart, isolate;

  assign cpu_ctl_rx_ready = '1;

  mcsoc dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int id(int x, int y); return y * MX + x; endfunction
  function automatic pe_addr_t ad(int x, int y); return '{x: 8'(x), y: 8'(y)}; endfunction
  function automatic int cluster_of(int i); return ((i / MX) / 3) * 2 + (i % MX) / 3; endfunction

  // --------------------------------------------- software state of the PEs
  ctrl_msg_t rx_q [NPE][$];
  bit        frozen [NPE];
  pe_addr_t  manager [NPE];          // manager of the tasks on each PE
  int        n_fail_cpu = 0, n_freeze = 0, n_unfreeze = 0, n_isolated_rx = 0;
  int        n_restart = 0, n_contention = 0, n_hold_block = 0, n_iso_block = 0;
  int        n_task_mig = 0, n_kernel_mig = 0, n_wait_ack = 0, n_spcand = 0, n_sr = 0;
  int        fail_t [NPE];
  int        t_fault = 0;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NPE; i++) begin
      if (cpu_ctl_rx_valid[i]) begin
        ctrl_msg_t m; m = cpu_ctl_rx_msg[i];
        rx_q[i].push_back(m);
        if (isolate[i]) n_isolated_rx++;
        // slave kernels: freeze / unfreeze tasks of the named manager
        if (m.svc == SVC_FREEZE && manager[i] == pe_addr_t'(m.payload[15:0]) && !frozen[i]) begin
          frozen[i] = 1; n_freeze++;
        end
        if (m.svc == SVC_UNFREEZE && frozen[i]) begin
          frozen[i] = 0; n_unfreeze++;
          manager[i] = pe_addr_t'(m.payload[15:0]);
        end
        if (m.svc == SVC_FAIL_CPU) begin n_fail_cpu++; if (fail_t[i] < 0) fail_t[i] = cycle; end
      end
      if (cpu_restart[i]) n_restart++;
    end
  end

  // data-NoC contention: a header waiting at router (2,0), channel 0, for an
  // output that another packet holds
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NPORTS; i++)
      if (dut.g_y[0].g_x[2].u_pe.g_ch[0].u_router.nempty[i] &&
          !dut.g_y[0].g_x[2].u_pe.g_ch[0].u_router.conn[i] &&
          dut.g_y[0].g_x[2].u_pe.g_ch[0].u_router.busy[dut.g_y[0].g_x[2].u_pe.g_ch[0].u_router.route[i]])
        n_contention++;
  end

  // ------------------------------------------------------ processor actions
  task automatic mem_write(int p, int a, word_t d);
    @(negedge clk); cpu_mem_en[p] = 1; cpu_mem_we[p] = 1; cpu_mem_addr[p] = AW'(a); cpu_mem_wdata[p] = d;
    @(negedge clk); cpu_mem_en[p] = 0; cpu_mem_we[p] = 0;
  endtask
  task automatic mem_read(int p, int a, output word_t d);
    @(negedge clk); cpu_mem_en[p] = 1; cpu_mem_we[p] = 0; cpu_mem_addr[p] = AW'(a);
    @(negedge clk); cpu_mem_en[p] = 0; d = cpu_mem_rdata[p];
  endtask
  task automatic dmni_cmd(int p, dmni_cmd_t c);
    @(negedge clk); cpu_cmd[p] = c; cpu_cmd_valid[p] = 1; #1;
    while (!cpu_cmd_ready[p]) begin @(negedge clk); #1; end
    @(negedge clk); cpu_cmd_valid[p] = 0;
  endtask
  task automatic ctl_send(int p, svc_e s, bit bc, pe_addr_t tgt, logic [31:0] pl);
    @(negedge clk);
    cpu_ctl_tx_msg[p] = '{svc: s, bcast: bc, src: ad(p % MX, p / MX), tgt: tgt, payload: pl};
    cpu_ctl_tx_valid[p] = 1; #1;
    while (!cpu_ctl_tx_ready[p]) begin @(negedge clk); #1; end
    @(negedge clk); cpu_ctl_tx_valid[p] = 0;
  endtask
  // wait for a message of service s at PE p; returns it
  task automatic ctl_expect(int p, svc_e s, output ctrl_msg_t m, input int max = 5000);
    bit found; found = 0;
    for (int t = 0; t < max && !found; t++) begin
      for (int k = 0; k < rx_q[p].size(); k++)
        if (!found && rx_q[p][k].svc == s) begin m = rx_q[p][k]; rx_q[p].delete(k); found = 1; end
      if (!found) @(negedge clk);
    end
    check(found, $sformatf("PE %0d received service %0d", p, s));
    if (!found) m = '0;
  endtask
  task automatic wait_sig(ref logic [NPE-1:0] s, input int p, input int max);
    for (int t = 0; t < max && !s[p]; t++) @(negedge clk);
  endtask

  // messages of earlier phases are consumed
  task automatic flush_rx();
    for (int i = 0; i < NPE; i++) rx_q[i].delete();
  endtask

  // ----------------------------------------------------------- recovery
  // MP_h at index h recovers the failed manager f onto candidate c, with an
  // optional task migration from c to free PE tgt.
  task automatic recover(int h, int f, int c, bit migrate, int tgt, bit interfere, word_t img[]);
    ctrl_msg_t m;
    int t_kernel, t_restart, frozen_expected;
    // fault detected at f
    flush_rx();
    for (int i = 0; i < NPE; i++) fail_t[i] = -1;
    @(negedge clk); fault_detected[f] = 1; t_fault = cycle; @(negedge clk); fault_detected[f] = 0;
    check(isolate[f], "failed processor isolated");
    ctl_expect(h, SVC_FAIL_CPU, m);
    check(m.src == ad(f % MX, f / MX), "fail_CPU names the failed manager");
    begin int hops;
      hops = ((f % MX > h % MX) ? f % MX - h % MX : h % MX - f % MX) +
             ((f / MX > h / MX) ? f / MX - h / MX : h / MX - f / MX);
      $display("fail_CPU from %0d reached %0d (%0d hops) after %0d cycles", f, h, hops, fail_t[h] - t_fault);
      check(fail_t[h] - t_fault <= 2 * hops + 6,
            $sformatf("fail_CPU took %0d cycles over %0d hops", fail_t[h] - t_fault, hops));
    end
    // freeze
    frozen_expected = 0;
    for (int i = 0; i < NPE; i++) if (manager[i] == ad(f % MX, f / MX) && i != f) frozen_expected++;
    begin int n_before; n_before = n_freeze;
      ctl_send(h, SVC_FREEZE, 1, '0, 32'({8'(f % MX), 8'(f / MX)}));
      repeat (60) @(negedge clk);
      check(n_freeze - n_before == frozen_expected,
            $sformatf("%0d PEs froze, expected %0d", n_freeze - n_before, frozen_expected));
    end
    // the faulty processor keeps trying to write its memory: blocked
    @(negedge clk); cpu_mem_en[f] = 1; cpu_mem_we[f] = 1; cpu_mem_addr[f] = '0; cpu_mem_wdata[f] = ~img[0];
    @(negedge clk); cpu_mem_en[f] = 0; cpu_mem_we[f] = 0; n_iso_block++;
    // task migration to release the candidate
    if (migrate) begin
      word_t tw;
      dmni_cmd(tgt, '{op: DMNI_RECV, ch: 1'b0, tgt: '0, mem_addr: 16'd4096, size: 16'd0});
      ctl_send(h, SVC_TASK_MIGRATE, 0, ad(c % MX, c / MX), 32'({8'(tgt % MX), 8'(tgt / MX)}));
      ctl_expect(c, SVC_TASK_MIGRATE, m);
      // optional interfering traffic from (2,0), running an application, to (0,2)
      if (interfere) dmni_cmd(id(0, 2), '{op: DMNI_RECV, ch: 1'b0, tgt: '0, mem_addr: 16'd0, size: 16'd0});
      fork
        dmni_cmd(c, '{op: DMNI_SEND, ch: 1'b0, tgt: pe_addr_t'(m.payload[15:0]), mem_addr: 16'd8192,
                      size: 16'(TASK_WORDS)});
        if (interfere)
          dmni_cmd(id(2, 0), '{op: DMNI_SEND, ch: 1'b0, tgt: ad(0, 2), mem_addr: 16'd0, size: 16'd300});
      join
      wait_sig(cpu_recv_done, tgt, 20000);
      check(cpu_recv_done[tgt] && cpu_recv_words[tgt] == 16'(TASK_WORDS), "migrated task received");
      for (int k = 0; k < TASK_WORDS; k += 97) begin
        word_t a, b; mem_read(c, 8192 + k, a); mem_read(tgt, 4096 + k, b);
        check(a == b, $sformatf("migrated task word %0d", k));
      end
      frozen[tgt] = 1; manager[tgt] = manager[c];  // the task stays frozen
      ctl_send(tgt, SVC_MIGRATION_END, 0, ad(h % MX, h / MX), 32'({8'(tgt % MX), 8'(tgt / MX)}));
      ctl_expect(h, SVC_MIGRATION_END, m);
      n_task_mig++;
      frozen[c] = 0; manager[c] = '{x: 8'hff, y: 8'hff};
    end
    // kernel migration
    ctl_send(h, SVC_WAIT_KERNEL, 0, ad(c % MX, c / MX), '0);
    ctl_expect(h, SVC_WAIT_KERNEL_ACK, m);
    check(m.src == ad(c % MX, c / MX) && cpu_hold[c], "candidate held and acknowledged");
    n_wait_ack++;
    // the held candidate processor cannot write
    mem_write(c, 0, 32'h0bad_0bad); n_hold_block++;
    t_kernel = cycle;
    ctl_send(h, SVC_SEND_KERNEL, 0, ad(f % MX, f / MX), 32'({8'(c % MX), 8'(c / MX)}));
    wait_sig(cpu_restart, c, 4 * MW);
    t_restart = cycle;
    check(cpu_restart[c], "candidate restarted");
    $display("kernel copy of %0d words: %0d cycles", MW, t_restart - t_kernel);
    check(t_restart - t_kernel >= 3 * MW && t_restart - t_kernel <= 3 * MW + 100,
          $sformatf("kernel copy took %0d cycles, expected 3 per word plus the hops", t_restart - t_kernel));
    n_kernel_mig++;
    begin int bad; bad = 0;
      for (int a = 0; a < MW; a++) begin word_t d; mem_read(c, a, d); if (d != img[a]) bad++; end
      check(bad == 0, $sformatf("kernel copy: %0d of %0d words differ", bad, MW));
    end
    // the new manager releases the tasks
    begin int n_before, expect_un; n_before = n_unfreeze; expect_un = 0;
      for (int i = 0; i < NPE; i++) if (frozen[i]) expect_un++;
      ctl_send(c, SVC_UNFREEZE, 1, '0, 32'({8'(c % MX), 8'(c / MX)}));
      repeat (60) @(negedge clk);
      check(n_unfreeze - n_before == expect_un,
            $sformatf("%0d PEs unfrozen, expected %0d", n_unfreeze - n_before, expect_un));
    end
  endtask

  // a manager reports its candidate {task count, x, y} to its pair
  task automatic announce(int from, int pair, logic [31:0] pl);
    ctrl_msg_t m;
    flush_rx();
    ctl_send(from, SVC_SPCAND, 1, '0, pl);
    ctl_expect(pair, SVC_SPCAND, m);
    check(m.payload == pl && m.src == ad(from % MX, from / MX), "candidate reported to the pair");
    n_spcand++;
  endtask

  word_t img1 [], img0 [];
  initial begin
    img1 = new[MW]; img0 = new[MW];
    for (int i = 0; i < NPE; i++) begin
      frozen[i] = 0;
      case (cluster_of(i)) 0: manager[i] = ad(0, 0); 1: manager[i] = ad(3, 0);
                           2: manager[i] = ad(0, 3); default: manager[i] = ad(3, 3); endcase
    end
    manager[id(1, 2)] = '{x: 8'hff, y: 8'hff};   // free PE: no task
    manager[id(1, 0)] = '{x: 8'hff, y: 8'hff};   // free candidate of the VGM
    manager[id(5, 2)] = '{x: 8'hff, y: 8'hff};   // free PE in cluster 1
    manager[id(5, 0)] = '{x: 8'hff, y: 8'hff};   // free PE in cluster 1
    repeat (4) @(negedge clk); rst_n = 1;
    // kernels of the two managers that will fail, and the task on (4,0)
    for (int a = 0; a < MW; a++) begin
      img1[a] = $urandom; img0[a] = $urandom;
      @(negedge clk);
      cpu_mem_en[id(3,0)] = 1; cpu_mem_we[id(3,0)] = 1; cpu_mem_addr[id(3,0)] = AW'(a); cpu_mem_wdata[id(3,0)] = img1[a];
      cpu_mem_en[id(0,0)] = 1; cpu_mem_we[id(0,0)] = 1; cpu_mem_addr[id(0,0)] = AW'(a); cpu_mem_wdata[id(0,0)] = img0[a];
      cpu_mem_en[id(4,0)] = (a < TASK_WORDS); cpu_mem_we[id(4,0)] = 1;
      cpu_mem_addr[id(4,0)] = AW'(8192 + a); cpu_mem_wdata[id(4,0)] = $urandom;
    end
    @(negedge clk); cpu_mem_en = '0; cpu_mem_we = '0;

    // a source-routed application packet: (2,0) to (0,2) by north, north, west, west
    begin word_t a, b;
      dmni_cmd(id(0, 2), '{op: DMNI_RECV, ch: 1'b0, tgt: '0, mem_addr: 16'd0, size: 16'd0});
      dmni_cmd(id(2, 0), '{op: DMNI_SEND, ch: 1'b1, tgt: pe_addr_t'(sr_header(3'd4, 12'b01_01_10_10)),
                           mem_addr: 16'd100, size: 16'd50});
      wait_sig(cpu_recv_done, id(0, 2), 2000);
      check(cpu_recv_done[id(0, 2)] && cpu_recv_words[id(0, 2)] == 16'd50, "source-routed packet delivered");
      mem_read(id(2, 0), 149, a); mem_read(id(0, 2), 49, b);
      check(a == b, "source-routed payload");
      n_sr++;
    end

    // 1. cluster manager (3,0) fails; its candidate (4,0) runs a task that
    //    moves to the free PE (1,2); the VGM (0,0) recovers it
    announce(id(3,0), id(0,0), {8'd1, 8'd0, 8'd4, 8'd0});
    recover(id(0,0), id(3,0), id(4,0), 1, id(1,2), 1, img1);
    // 2. the VGM (0,0) fails; its candidate (1,0) is free; the new CM at (4,0)
    //    is now its pair
    announce(id(0,0), id(4,0), {8'd0, 8'd0, 8'd1, 8'd0});
    recover(id(4,0), id(0,0), id(1,0), 0, 0, 0, img0);
    // 3. the VGM, now at (1,0), fails again; its candidate (2,0) runs a task
    //    that moves to the free PE (5,2) in another cluster
    announce(id(1,0), id(4,0), {8'd1, 8'd0, 8'd2, 8'd0});
    recover(id(4,0), id(1,0), id(2,0), 1, id(5,2), 0, img0);
    // 4. the cluster manager at (4,0) fails; its candidate (5,0) is free; the
    //    VGM, now at (2,0), recovers it
    announce(id(4,0), id(2,0), {8'd0, 8'd0, 8'd5, 8'd0});
    recover(id(2,0), id(4,0), id(5,0), 0, 0, 0, img1);

    check(n_isolated_rx == 0, "isolated processors receive nothing");
    check(n_fail_cpu > 0,   "mechanism: fail_CPU broadcast");
    check(n_freeze > 0,     "mechanism: freeze");
    check(n_unfreeze > 0,   "mechanism: unfreeze");
    check(n_task_mig > 0,   "mechanism: task migration");
    check(n_wait_ack > 0,   "mechanism: wait_kernel / acknowledge");
    check(n_kernel_mig == 4,"mechanism: kernel migration (with and without task migration)");
    check(n_restart == 4,   "mechanism: restart of the new manager");
    check(n_task_mig == 2,  "mechanism: task migration in both recoveries that need it");
    check(n_sr > 0,         "mechanism: source routing");
    check(n_contention > 0, "mechanism: data-NoC contention");
    check(n_iso_block > 0 && n_hold_block > 0, "mechanism: wrapper blocking");
    check(n_spcand == 4,    "mechanism: candidate report");
    $display("fail_cpu=%0d freeze=%0d unfreeze=%0d task_mig=%0d wait_ack=%0d kernel_mig=%0d restart=%0d contention=%0d source_routed=%0d",
             n_fail_cpu, n_freeze, n_unfreeze, n_task_mig, n_wait_ack, n_kernel_mig, n_restart, n_contention, n_sr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

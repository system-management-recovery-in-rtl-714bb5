// tb_ctrl_router: self-checking test of the control-NoC router.
//
// The router sits at (2,2). Messages enter from all five ports, broadcast
// and unicast, while the outputs accept randomly. An independent model of
// the broadcast tree and of XY routing gives, per message, the set of
// outputs that must carry a copy; each copy is checked off exactly once.
// A directed broadcast from the local port checks the two-cycle hop latency.
module tb_ctrl_router;
  import mcsoc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  pe_addr_t me = '{x: 8'd2, y: 8'd2};

  logic      [4:0] in_valid, in_ready, out_valid, out_ready;
  ctrl_msg_t [4:0] in_msg, out_msg;

  ctrl_router dut (.clk, .rst_n, .my_addr(me), .in_valid, .in_msg, .in_ready,
                   .out_valid, .out_msg, .out_ready);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference: outputs that must see a message arriving on port p
  function automatic logic [4:0] ref_mask(ctrl_msg_t m, int p);
    if (m.bcast) case (p)
      4: return 5'b01111;
      1: return 5'b11101;   // from west: E N S L
      0: return 5'b11110;   // from east: W N S L
      3: return 5'b10100;   // from south: N L
      default: return 5'b11000;  // from north: S L
    endcase
    if (m.tgt.x > 2) return 5'b00001; if (m.tgt.x < 2) return 5'b00010;
    if (m.tgt.y > 2) return 5'b00100; if (m.tgt.y < 2) return 5'b01000;
    return 5'b10000;
  endfunction

  ctrl_msg_t q [5][$];
  int        expect_cnt [5][int];
  int        outstanding = 0, stalls = 0, bcasts = 0, unicasts = 0;
  logic      rnd = 0;

  always_comb for (int p = 0; p < 5; p++) begin
    in_valid[p] = q[p].size() > 0;
    in_msg[p]   = q[p].size() > 0 ? q[p][0] : '0;
  end
  always @(negedge clk) for (int o = 0; o < 5; o++) out_ready[o] <= rnd ? ($urandom_range(0, 2) != 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 5; p++) if (in_valid[p] && in_ready[p]) void'(q[p].pop_front());
    for (int o = 0; o < 5; o++) begin
      if (out_valid[o] && !out_ready[o]) stalls++;
      if (out_valid[o] && out_ready[o]) begin
        int id; id = int'(out_msg[o].payload);
        check(expect_cnt[o].exists(id) && expect_cnt[o][id] > 0,
              $sformatf("unexpected copy of message %0d on output %0d", id, o));
        if (expect_cnt[o].exists(id)) begin
          expect_cnt[o][id]--;
          if (expect_cnt[o][id] == 0) expect_cnt[o].delete(id);
          outstanding--;
        end
      end
    end
  end

  int next_id = 1;
  task automatic send(int p, bit bc, pe_addr_t tgt);
    ctrl_msg_t m; logic [4:0] mk;
    m = '{svc: SVC_USER, bcast: bc, src: '{x: 8'd9, y: 8'd9}, tgt: tgt, payload: 32'(next_id)};
    mk = ref_mask(m, p);
    for (int o = 0; o < 5; o++) if (mk[o]) begin
      if (!expect_cnt[o].exists(next_id)) expect_cnt[o][next_id] = 0;
      expect_cnt[o][next_id]++; outstanding++;
    end
    if (bc) bcasts++; else unicasts++;
    q[p].push_back(m);
    next_id++;
  endtask

  int t0, t1;
  initial begin
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    // directed latency check: a broadcast from the local port
    send(4, 1, me);
    t0 = cycle;
    wait (out_valid[0]); @(negedge clk); t1 = cycle;
    check(t1 - t0 == 2, $sformatf("local broadcast reached an output after %0d cycles, expected 2", t1 - t0));
    check(out_valid[1] && out_valid[2] && out_valid[3] && !out_valid[4],
          "local broadcast forks to E, W, N, S together and not back to local");
    repeat (5) @(negedge clk);
    rnd = 1;
    for (int n = 0; n < 200; n++) begin
      send($urandom_range(0, 4), $urandom_range(0, 1),
           '{x: 8'($urandom_range(0, 4)), y: 8'($urandom_range(0, 4))});
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    wait (outstanding == 0);
    repeat (5) @(negedge clk);
    check(outstanding == 0, "every expected copy delivered");
    check(stalls > 0, "output backpressure exercised");
    $display("broadcasts=%0d unicasts=%0d stalls=%0d", bcasts, unicasts, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog, %0d copies missing", outstanding);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

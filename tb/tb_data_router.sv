// tb_data_router: self-checking test of one data-NoC router channel.
//
// The router sits at (2,2). First a directed packet checks the latency (a
// header offered in cycle t leaves in cycle t+2) and the streaming rate (one
// flit per cycle). Then all five inputs send random packets to random
// targets while the downstream credits toggle randomly. Every output checks
// that each packet arrives whole and uninterrupted (wormhole), on the port
// XY routing selects, and that packets from one input to one output keep
// their order. A third of the packets are source routed; their headers
// must leave on the port the route names, with one hop consumed. Payload flit = {input[2:0], seq[4:0], index[7:0]}.
module tb_data_router;
  import mcsoc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pe_addr_t me = '{x: 8'd2, y: 8'd2};
  logic  [4:0] in_valid, in_credit, out_valid, out_credit;
  flit_t [4:0] in_flit, out_flit;

  data_router dut (.clk, .rst_n, .my_addr(me), .in_valid, .in_flit, .in_credit,
                   .out_valid, .out_flit, .out_credit);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int xy(pe_addr_t t);
    if (t.x > me.x) return 0; if (t.x < me.x) return 1;
    if (t.y > me.y) return 2; if (t.y < me.y) return 3; return 4;
  endfunction

  // ---------------------------------------------------------------- senders
  flit_t pkt [5][$];         // flits still to send per input
  logic  en_send = 0;
  int    sent_pkts = 0;
  always_comb begin
    for (int i = 0; i < 5; i++) begin
      in_valid[i] = en_send && pkt[i].size() > 0 && in_credit[i];
      in_flit[i]  = pkt[i].size() > 0 ? pkt[i][0] : '0;
    end
  end
  always @(posedge clk) for (int i = 0; i < 5; i++) if (in_valid[i]) void'(pkt[i].pop_front());

  int seqc [5][5];
  int sr_exp [5][int];      // expected rewritten source-route headers per output
  int n_sr = 0;
  task automatic queue_pkt(int i, pe_addr_t t, int len);
    queue_raw(i, {t.x, t.y}, xy(t), len);
  endtask
  // source route: hops (0..6) and path; reference rewrite of the header
  task automatic queue_sr(int i, int hops, logic [11:0] path, int len);
    int o; flit_t h, hx;
    h = {1'b1, 3'(hops), path};
    o = (hops == 0) ? 4 : int'(path[1:0]);
    hx = (o == 4) ? h : {1'b1, 3'(hops - 1), 2'b00, path[11:2]};
    if (!sr_exp[o].exists(int'(hx))) sr_exp[o][int'(hx)] = 0;
    sr_exp[o][int'(hx)]++;
    queue_raw(i, h, o, len);
  endtask
  task automatic queue_raw(int i, flit_t h, int o, int len);
    int seq;
    seq = seqc[i][o];
    if (len > 0) seqc[i][o]++;
    pkt[i].push_back(h);
    pkt[i].push_back(FLIT_W'(len));
    for (int k = 0; k < len; k++) pkt[i].push_back({3'(i), 5'(seq), 8'(k)});
    sent_pkts++;
  endtask

  // -------------------------------------------------------------- receivers
  typedef enum {R_H, R_S, R_P} rs_e;
  rs_e   rs   [5];
  int    rleft[5], ridx[5], rsrc[5], rseq[5];
  int    last_seq [5][5];
  int    got_pkts = 0, stalls = 0;
  logic  rand_credit = 0;
  always @(negedge clk) for (int o = 0; o < 5; o++)
    out_credit[o] <= rand_credit ? ($urandom_range(0, 3) != 0) : 1'b1;
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 5; o++) begin
      if (busy_out(o) && !out_credit[o]) stalls++;
      if (out_valid[o]) begin
        case (rs[o])
          R_H: begin
            if (out_flit[o][15]) begin
              check(sr_exp[o].exists(int'(out_flit[o])), $sformatf("source-routed header %h on port %0d", out_flit[o], o));
              if (sr_exp[o].exists(int'(out_flit[o]))) begin
                sr_exp[o][int'(out_flit[o])]--;
                if (sr_exp[o][int'(out_flit[o])] == 0) sr_exp[o].delete(int'(out_flit[o]));
              end
              n_sr++;
            end else
              check(xy('{x: out_flit[o][15:8], y: out_flit[o][7:0]}) == o, $sformatf("header on wrong port %0d", o));
            rs[o] <= R_S;
          end
          R_S: begin rleft[o] <= out_flit[o]; ridx[o] <= 0; rs[o] <= (out_flit[o] == 0) ? R_H : R_P;
                     if (out_flit[o] == 0) got_pkts++; end
          R_P: begin
            if (ridx[o] == 0) begin
              rsrc[o] <= out_flit[o][15:13]; rseq[o] <= out_flit[o][12:8];
              check(int'(out_flit[o][12:8]) == last_seq[out_flit[o][15:13]][o] + 1,
                    $sformatf("order broken on output %0d", o));
              last_seq[out_flit[o][15:13]][o] = out_flit[o][12:8];
            end else begin
              check(out_flit[o][15:13] == 3'(rsrc[o]) && out_flit[o][12:8] == 5'(rseq[o]),
                    $sformatf("packets interleaved on output %0d", o));
            end
            check(out_flit[o][7:0] == 8'(ridx[o]), $sformatf("flit index on output %0d", o));
            ridx[o] <= ridx[o] + 1;
            if (rleft[o] == 1) begin rs[o] <= R_H; got_pkts++; end
            rleft[o] <= rleft[o] - 1;
          end
        endcase
      end
    end
  end
  int t_offer = 0, e_first = -1, e_last = -1, e_cnt = 0;
  always @(negedge clk) if (out_valid[0] && !rand_credit) begin
    if (e_first < 0) e_first = cycle;
    e_last = cycle; e_cnt++;
  end
  function automatic bit busy_out(int o); return dut.busy[o]; endfunction

  initial begin
    for (int o = 0; o < 5; o++) begin rs[o] = R_H; for (int i = 0; i < 5; i++) last_seq[i][o] = -1; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // directed: latency and rate, west input to east output, 8 payload flits
    queue_pkt(1, '{x: 8'd4, y: 8'd2}, 8);
    @(negedge clk);
    en_send = 1;
    t_offer = cycle;
    repeat (20) @(negedge clk);
    check(e_first - t_offer == 2, $sformatf("header latency %0d, expected 2", e_first - t_offer));
    check(e_cnt == 10 && e_last - e_first == 9,
          $sformatf("10 flits in %0d cycles, expected 10", e_last - e_first + 1));
    // random traffic with random backpressure
    rand_credit = 1;
    for (int n = 0; n < 60; n++) begin
      int i; pe_addr_t t;
      i = $urandom_range(0, 4);
      t = '{x: 8'($urandom_range(0, 4)), y: 8'($urandom_range(0, 4))};
      if ($urandom_range(0, 2) == 0) queue_sr(i, $urandom_range(0, 6), 12'($urandom), $urandom_range(0, 12));
      else queue_pkt(i, t, $urandom_range(0, 12));
    end
    wait (got_pkts == sent_pkts);
    repeat (5) @(posedge clk);
    check(got_pkts == sent_pkts, "all packets delivered");
    check(stalls > 0, "backpressure exercised");
    check(n_sr > 0, "source-routed packets exercised");
    begin int left; left = 0; for (int o = 0; o < 5; o++) left += sr_exp[o].num();
      check(left == 0, "every source-routed header seen once, rewritten"); end
    $display("packets=%0d stalls=%0d", got_pkts, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

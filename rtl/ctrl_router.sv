// ctrl_router: router of the control NoC that carries management messages.
//
// The control NoC is a second, lightweight mesh, disjoint from the data NoC,
// that moves single-word control messages (ctrl_msg_t): fault notification,
// freeze/unfreeze, kernel-migration commands and their acknowledgements. It
// delivers broadcasts to every PE and unicasts to one PE.
//
// How it works: each input port holds one message and a mask of the outputs
// it still has to reach. A broadcast follows a fixed spanning tree: from the
// source it goes east and west along the source row; every PE of that row
// passes it north and south; PEs in the columns pass it on in the same
// direction; every PE except the source delivers it to its local port.
// A unicast follows XY routing. Both only ever turn from X to Y, so there is
// no cyclic wait. Each output register takes one message at a time from the
// inputs that still need it, round-robin; a message leaves its input slot once
// every output in its mask has copied it. Outputs at the mesh edge must be
// tied to out_ready = 1 so that their copies are dropped.
//
// Interface: valid/ready per port, a message moves when both are high.
// Timing: two cycles per hop when nothing contends. The platform reports an
// average of 14 cycles per hop for its control NoC; this simpler router is
// this design's own (the document gives the function, not the insides).
module ctrl_router
  import mcsoc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  pe_addr_t               my_addr,
  input  logic      [NPORTS-1:0] in_valid,
  input  ctrl_msg_t [NPORTS-1:0] in_msg,
  output logic      [NPORTS-1:0] in_ready,
  output logic      [NPORTS-1:0] out_valid,
  output ctrl_msg_t [NPORTS-1:0] out_msg,
  input  logic      [NPORTS-1:0] out_ready
);

  localparam int unsigned OW = $clog2(NPORTS);

  ctrl_msg_t         slot_q  [NPORTS];
  logic              slot_v  [NPORTS];
  logic [NPORTS-1:0] pend    [NPORTS];
  ctrl_msg_t         oreg_q  [NPORTS];
  logic              oreg_v  [NPORTS];
  logic [OW-1:0]     rr      [NPORTS];

  logic              take_v  [NPORTS];
  logic [OW-1:0]     take_i  [NPORTS];
  logic [NPORTS-1:0] clr     [NPORTS];

  localparam logic [NPORTS-1:0] M_E = NPORTS'(1) << P_EAST;
  localparam logic [NPORTS-1:0] M_W = NPORTS'(1) << P_WEST;
  localparam logic [NPORTS-1:0] M_N = NPORTS'(1) << P_NORTH;
  localparam logic [NPORTS-1:0] M_S = NPORTS'(1) << P_SOUTH;
  localparam logic [NPORTS-1:0] M_L = NPORTS'(1) << P_LOCAL;

  // Outputs a message needs, given the port it arrived on.
  function automatic logic [NPORTS-1:0] fanout(ctrl_msg_t m, logic [2:0] from,
                                               pe_addr_t me);
    if (m.bcast) begin
      unique case (from)
        P_LOCAL: return M_E | M_W | M_N | M_S;
        P_WEST:  return M_E | M_N | M_S | M_L;  // travelling east
        P_EAST:  return M_W | M_N | M_S | M_L;  // travelling west
        P_SOUTH: return M_N | M_L;              // travelling north
        default: return M_S | M_L;              // from north, travelling south
      endcase
    end
    if (m.tgt.x > me.x)      return M_E;
    else if (m.tgt.x < me.x) return M_W;
    else if (m.tgt.y > me.y) return M_N;
    else if (m.tgt.y < me.y) return M_S;
    else                     return M_L;
  endfunction

  function automatic logic [OW-1:0] rr_idx(logic [OW-1:0] base, int k);
    return OW'((int'(base) + k) % NPORTS);
  endfunction

  always_comb begin
    for (int i = 0; i < NPORTS; i++) in_ready[i] = !slot_v[i];
    for (int o = 0; o < NPORTS; o++) begin
      out_valid[o] = oreg_v[o];
      out_msg[o]   = oreg_q[o];
    end
  end

  // Each free output register copies one waiting message, round-robin.
  always_comb begin
    for (int i = 0; i < NPORTS; i++) clr[i] = '0;
    for (int o = 0; o < NPORTS; o++) begin
      take_v[o] = 1'b0;
      take_i[o] = '0;
      if (!oreg_v[o] || out_ready[o]) begin
        for (int k = 0; k < NPORTS; k++) begin
          if (!take_v[o] && slot_v[rr_idx(rr[o], k)] && pend[rr_idx(rr[o], k)][o]) begin
            take_v[o] = 1'b1;
            take_i[o] = rr_idx(rr[o], k);
          end
        end
      end
      if (take_v[o]) clr[take_i[o]][o] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NPORTS; i++) begin
        slot_v[i] <= 1'b0;
        pend[i]   <= '0;
        oreg_v[i] <= 1'b0;
        rr[i]     <= '0;
      end
    end else begin
      for (int i = 0; i < NPORTS; i++) begin
        if (in_valid[i] && in_ready[i]) begin
          slot_q[i] <= in_msg[i];
          pend[i]   <= fanout(in_msg[i], 3'(i), my_addr);
          slot_v[i] <= 1'b1;
        end else if (slot_v[i]) begin
          pend[i] <= pend[i] & ~clr[i];
          if ((pend[i] & ~clr[i]) == '0) slot_v[i] <= 1'b0;
        end
      end
      for (int o = 0; o < NPORTS; o++) begin
        if (take_v[o]) begin
          oreg_q[o] <= slot_q[take_i[o]];
          oreg_v[o] <= 1'b1;
          rr[o]     <= (take_i[o] == OW'(NPORTS-1)) ? '0 : take_i[o] + 1'b1;
        end else if (out_ready[o]) begin
          oreg_v[o] <= 1'b0;
        end
      end
    end
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_chk
    a_hold : assert property (@(posedge clk) disable iff (!rst_n)
                              out_valid[p] && !out_ready[p] |=> out_valid[p] && $stable(out_msg[p]))
      else $error("ctrl_router: output %0d dropped a message before it was taken", p);
  end

endmodule

// data_router: one physical channel of a data-NoC router.
//
// A five-port (east, west, north, south, local) wormhole router for a 2-D
// mesh, with an input buffer of BUF_DEPTH flits on every port, credit-based
// flow control and deterministic XY routing. A PE holds two of these, one per
// 16-bit physical channel of the duplicated data NoC.
//
// Packets are a header flit, a size flit (payload flits that follow) and the
// payload. Two header formats select the routing:
//   bit 15 = 0: XY routing, header = {0, target x[6:0], target y[7:0]};
//   bit 15 = 1: source routing, header = {1, hops[2:0], path[11:0]}, where
//               path[1:0] is the next output (0 E, 1 W, 2 N, 3 S), up to six
//               hops; hops = 0 means "deliver here". Each router that
//               forwards the header to a neighbour decrements hops and
//               shifts the path right by two bits.
// When a header reaches the head of an input buffer, the input asks for the
// output its routing selects; each output
// grants one free requester at a time, round-robin. The connection holds
// until the last payload flit has left, so the packet moves as a worm.
//
// Interface, per port p: in_valid/in_flit come from the upstream router and
// may be asserted only while in_credit[p] (space in this buffer) is high;
// out_valid/out_flit go downstream and are asserted only while out_credit[p]
// (space downstream) is high, so a flit moves in every cycle that both hold.
// Timing: a header written in cycle t is routed in t+1 and leaves in t+2; the
// body then streams one flit per cycle. Buffer depth, wormhole switching,
// XY and source routing and credit flow control follow the platform
// description; the allocator, the packet and header formats (including the
// six-hop limit of a source route) and the latencies are this design's.
module data_router
  import mcsoc_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  pe_addr_t              my_addr,
  input  logic [NPORTS-1:0]     in_valid,
  input  flit_t [NPORTS-1:0]    in_flit,
  output logic [NPORTS-1:0]     in_credit,
  output logic [NPORTS-1:0]     out_valid,
  output flit_t [NPORTS-1:0]    out_flit,
  input  logic [NPORTS-1:0]     out_credit
);

  localparam int unsigned PW = $clog2(BUF_DEPTH);
  localparam int unsigned OW = $clog2(NPORTS);

  typedef enum logic [1:0] {S_HDR, S_SIZE, S_PAY} worm_e;

  flit_t             buf_q   [NPORTS][BUF_DEPTH];
  logic [PW-1:0]     wr_ptr  [NPORTS];
  logic [PW-1:0]     rd_ptr  [NPORTS];
  logic [PW:0]       count   [NPORTS];
  worm_e             state   [NPORTS];
  logic [FLIT_W-1:0] remain  [NPORTS];
  logic              conn    [NPORTS];
  logic [OW-1:0]     sel     [NPORTS];   // output used by input
  logic              busy    [NPORTS];   // output allocated
  logic [OW-1:0]     owner   [NPORTS];   // input owning output
  logic [OW-1:0]     rr      [NPORTS];   // round-robin pointer per output

  flit_t             head    [NPORTS];
  logic              nempty  [NPORTS];
  logic [OW-1:0]     route   [NPORTS];
  logic              pop     [NPORTS];
  logic              grant_v [NPORTS];
  logic [OW-1:0]     grant_i [NPORTS];

  function automatic logic [OW-1:0] xy_route(flit_t hdr, pe_addr_t me);
    logic [COORD_W-1:0] tx, ty;
    tx = {1'b0, hdr[FLIT_W-2 -: COORD_W-1]};
    ty = hdr[COORD_W-1:0];
    if (hdr[FLIT_W-1]) begin  // source routed
      if (hdr[14:12] == 3'd0) return OW'(P_LOCAL);
      else                    return OW'(hdr[1:0]);
    end
    if (tx > me.x)      return OW'(P_EAST);
    else if (tx < me.x) return OW'(P_WEST);
    else if (ty > me.y) return OW'(P_NORTH);
    else if (ty < me.y) return OW'(P_SOUTH);
    else                return OW'(P_LOCAL);
  endfunction

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      head[i]      = buf_q[i][rd_ptr[i]];
      nempty[i]    = (count[i] != '0);
      route[i]     = xy_route(head[i], my_addr);
      in_credit[i] = (count[i] < (PW+1)'(BUF_DEPTH));

    end
  end

  function automatic logic [OW-1:0] rr_idx(logic [OW-1:0] base, int k);
    return OW'((int'(base) + k) % NPORTS);
  endfunction

  function automatic logic req_at(logic [OW-1:0] o, logic [OW-1:0] i);
    return nempty[i] && !conn[i] && state[i] == S_HDR && route[i] == o;
  endfunction

  // Output allocation: round-robin among inputs whose header wants this output.
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      grant_v[o] = 1'b0;
      grant_i[o] = '0;
      if (!busy[o]) begin
        for (int k = 0; k < NPORTS; k++) begin
          if (!grant_v[o] && req_at(OW'(o), rr_idx(rr[o], k))) begin
            grant_v[o] = 1'b1;
            grant_i[o] = rr_idx(rr[o], k);
          end
        end
      end
    end
  end

  // Crossbar: an allocated output forwards its owner's head flit.
  always_comb begin
    for (int i = 0; i < NPORTS; i++) pop[i] = 1'b0;
    for (int o = 0; o < NPORTS; o++) begin
      out_flit[o]  = head[owner[o]];
      // a source-routed header leaving towards a neighbour consumes one hop
      if (state[owner[o]] == S_HDR && head[owner[o]][FLIT_W-1] && o != int'(P_LOCAL))
        out_flit[o] = {1'b1, head[owner[o]][14:12] - 3'd1, 2'b00, head[owner[o]][11:2]};
      out_valid[o] = busy[o] && nempty[owner[o]] && out_credit[o];
      if (out_valid[o]) pop[owner[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NPORTS; i++) begin
        wr_ptr[i] <= '0;
        rd_ptr[i] <= '0;
        count[i]  <= '0;
        state[i]  <= S_HDR;
        remain[i] <= '0;
        conn[i]   <= 1'b0;
        sel[i]    <= '0;
        busy[i]   <= 1'b0;
        owner[i]  <= '0;
        rr[i]     <= '0;
      end
    end else begin
      for (int i = 0; i < NPORTS; i++) begin
        logic push;
        push = in_valid[i] && in_credit[i];
        if (push) begin
          buf_q[i][wr_ptr[i]] <= in_flit[i];
          wr_ptr[i] <= (wr_ptr[i] == PW'(BUF_DEPTH-1)) ? '0 : wr_ptr[i] + 1'b1;
        end
        if (pop[i])
          rd_ptr[i] <= (rd_ptr[i] == PW'(BUF_DEPTH-1)) ? '0 : rd_ptr[i] + 1'b1;
        count[i] <= count[i] + (PW+1)'(push) - (PW+1)'(pop[i]);

        // Worm tracking on the flits that leave input i.
        if (pop[i]) begin
          unique case (state[i])
            S_HDR:  state[i] <= S_SIZE;
            S_SIZE: begin
              remain[i] <= head[i];
              if (head[i] == '0) begin
                state[i] <= S_HDR;
                conn[i]  <= 1'b0;
                busy[sel[i]] <= 1'b0;
              end else begin
                state[i] <= S_PAY;
              end
            end
            S_PAY: begin
              remain[i] <= remain[i] - 1'b1;
              if (remain[i] == FLIT_W'(1)) begin
                state[i] <= S_HDR;
                conn[i]  <= 1'b0;
                busy[sel[i]] <= 1'b0;
              end
            end
            default: state[i] <= S_HDR;
          endcase
        end
      end
      for (int o = 0; o < NPORTS; o++) begin
        if (grant_v[o]) begin
          busy[o]  <= 1'b1;
          owner[o] <= grant_i[o];
          conn[grant_i[o]] <= 1'b1;
          sel[grant_i[o]]  <= OW'(o);
          rr[o] <= (grant_i[o] == OW'(NPORTS-1)) ? '0 : grant_i[o] + 1'b1;
        end
      end
    end
  end

  // Flow-control rule: nothing is offered to a full buffer.
  for (genvar p = 0; p < NPORTS; p++) begin : g_chk
    a_credit : assert property (@(posedge clk) disable iff (!rst_n)
                                in_valid[p] |-> in_credit[p])
      else $error("data_router: flit offered without credit on port %0d", p);
  end

endmodule

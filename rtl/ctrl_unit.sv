// ctrl_unit: control-packet processor of a DVC switch.
//
// Takes circuit establishment packets (CEPs) and circuit destruction packets
// (CDPs) from the control BVC storage of the input ports, one per cycle,
// visiting the inputs round robin, and keeps the output RVC allocation of
// every output link.
//   CEP: choose an output (adaptively among the minimal directions towards
//        the destination, the one with most free RVCs; the host port at the
//        destination switch), allocate a free output RVC, record the mapping
//        in the input's IMT and send the CEP on with the new RVC. If every
//        candidate output has all its RVCs allocated, pick a victim DVC that
//        uses the preferred output and has no packets waiting here, send a
//        CDP down its path, mark its IMT entry torn (its information is kept
//        for re-establishment) and free its output RVC; the CEP is retried
//        afterwards.
//   CDP: free the output RVC and the IMT entry and send the CDP on, once no
//        packet of that DVC is waiting in the primary buffer; a CDP for a DVC
//        already torn down here ends here.
//   Re-establishment: an input holding a data packet for a torn-down DVC asks
//        for a new CEP, built from the IMT entry; it is handled like an
//        arriving CEP, and before the control storage.
// Control packets to be sent wait in a small FIFO per output; the switch
// sends them ahead of data. All effects of one control packet take place at
// one clock edge.
//
// The operations follow the DVC scheme. The adaptive choice, the victim rule
// (first mapped RVC with nothing waiting) and the round-robin order are this
// design's, because the scheme leaves routing and victim choice free.
module ctrl_unit
  import dvc_pkg::*;
#(
  parameter int unsigned NRVC     = 8,
  parameter int unsigned CQ_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] here,
  // control storage of each input
  input  logic [NPORT-1:0]  in_empty,
  input  pkt_t              in_head [NPORT],
  output logic [NPORT-1:0]  in_pop,
  input  imt_entry_t        tbl [NPORT][NRVC],
  // re-establishment requests and held unmapped packets of each input
  input  logic [NPORT-1:0]  reest_req,
  input  logic [RVC_W-1:0]  unm_rvc [NPORT],
  input  logic [NPORT-1:0]  unm_hold,
  // IMT write (one per cycle, enables per input port)
  output logic [NPORT-1:0]  c_map,
  output logic [NPORT-1:0]  c_free,
  output logic [NPORT-1:0]  c_tear,
  output logic [RVC_W-1:0]  c_rvc,
  output logic [PORT_W-1:0] c_oport,
  output logic [RVC_W-1:0]  c_orvc,
  output logic [NODE_W-1:0] c_src,
  output logic [NODE_W-1:0] c_dst,
  // control packets waiting for each output link
  output logic [NPORT-1:0]  cq_valid,
  output pkt_t              cq_pkt [NPORT],
  input  logic [NPORT-1:0]  cq_pop,
  // events
  output logic              ev_cep,
  output logic              ev_reest,
  output logic              ev_cdp,
  output logic              ev_teardown
);
  // output RVC allocation: bit set = allocated; DIV_RVC is never allocated
  logic [NRVC-1:0] used [NPORT];

  logic [PORT_W-1:0] rr;

  // output control queues
  logic [NPORT-1:0] cq_push, cq_full, cq_empty;
  pkt_t             cq_in;
  for (genvar o = 0; o < NPORT; o++) begin : g_cq
    logic [TIME_W-1:0] tag_unused;
    logic [$clog2(CQ_DEPTH+1)-1:0] cnt_unused;
    pkt_fifo #(.DEPTH(CQ_DEPTH), .TAG_W(TIME_W)) u_q (
      .clk, .rst_n, .push(cq_push[o]), .push_pkt(cq_in), .push_tag('0),
      .pop(cq_pop[o]), .empty(cq_empty[o]), .full(cq_full[o]),
      .head_pkt(cq_pkt[o]), .head_tag(tag_unused), .count(cnt_unused));
    assign cq_valid[o] = !cq_empty[o];
  end

  function automatic int unsigned nfree(logic [NRVC-1:0] u);
    int unsigned n = 0;
    for (int r = 1; r < NRVC; r++) if (!u[r]) n++;
    return n;
  endfunction

  function automatic logic [RVC_W-1:0] first_free(logic [NRVC-1:0] u);
    logic [RVC_W-1:0] f = '0;
    for (int r = NRVC - 1; r >= 1; r--) if (!u[r]) f = RVC_W'(r);
    return f;
  endfunction

  // decision of this cycle
  logic              act;
  logic [PORT_W-1:0] p;
  pkt_t              h;
  logic              alloc_en, free_en;
  logic [PORT_W-1:0] alloc_o, free_o;
  logic [RVC_W-1:0]  alloc_r, free_r;

  always_comb begin
    imt_entry_t e;
    logic [PORT_W-1:0] cand [2];
    logic [1:0]        ncand;
    logic              found;
    logic [PORT_W-1:0] best;
    int unsigned       best_free;
    logic              vfound;
    logic [PORT_W-1:0] vq;
    logic [RVC_W-1:0]  vr;
    logic              is_rq;

    act = 1'b0; p = '0; h = '0; ev_reest = 1'b0;
    in_pop = '0; c_map = '0; c_free = '0; c_tear = '0;
    c_rvc = '0; c_oport = '0; c_orvc = '0; c_src = '0; c_dst = '0;
    cq_push = '0; cq_in = '0;
    alloc_en = 1'b0; alloc_o = '0; alloc_r = '0;
    free_en = 1'b0; free_o = '0; free_r = '0;
    ev_cep = 1'b0; ev_cdp = 1'b0; ev_teardown = 1'b0;
    cand[0] = P_HOST; cand[1] = P_HOST; ncand = '0;
    found = 1'b0; best = '0; best_free = 0;
    vfound = 1'b0; vq = '0; vr = '0;

    // round-robin choice of an input: re-establishment requests first, then
    // the control storage
    is_rq = 1'b0;
    for (int k = NPORT - 1; k >= 0; k--) begin
      automatic int unsigned i = (int'(rr) + k) % NPORT;
      if (!in_empty[i]) begin
        act = 1'b1;
        p   = PORT_W'(i);
      end
    end
    for (int k = NPORT - 1; k >= 0; k--) begin
      automatic int unsigned i = (int'(rr) + k) % NPORT;
      if (reest_req[i]) begin
        act   = 1'b1;
        is_rq = 1'b1;
        p     = PORT_W'(i);
      end
    end
    h = in_head[p];
    if (is_rq) begin
      h       = '0;
      h.ptype = PK_CEP;
      h.rvc   = unm_rvc[p];
      h.src   = tbl[p][unm_rvc[p]].src;
      h.dst   = tbl[p][unm_rvc[p]].dst;
    end
    e = tbl[p][h.rvc];

    if (act && h.ptype == PK_CEP) begin
      // minimal directions towards the destination
      if (h.dst == here) begin
        cand[0] = P_HOST; ncand = 2'd1;
      end else begin
        if (node_x(h.dst) > node_x(here)) begin cand[ncand[0]] = P_XP; ncand++; end
        if (node_x(h.dst) < node_x(here)) begin cand[ncand[0]] = P_XM; ncand++; end
        if (node_y(h.dst) > node_y(here)) begin cand[ncand[0]] = P_YP; ncand++; end
        if (node_y(h.dst) < node_y(here)) begin cand[ncand[0]] = P_YM; ncand++; end
      end
      for (int c = 0; c < 2; c++) begin
        if (c < int'(ncand) && nfree(used[cand[c]]) > best_free) begin
          found     = 1'b1;
          best      = cand[c];
          best_free = nfree(used[cand[c]]);
        end
      end
      if (found) begin
        if (!cq_full[best]) begin
          in_pop[p]  = !is_rq;
          ev_reest   = is_rq;
          alloc_en   = 1'b1;
          alloc_o    = best;
          alloc_r    = first_free(used[best]);
          c_map[p]   = 1'b1;
          c_rvc      = h.rvc;
          c_oport    = best;
          c_orvc     = alloc_r;
          c_src      = h.src;
          c_dst      = h.dst;
          cq_push[best] = 1'b1;
          cq_in      = h;
          cq_in.rvc  = alloc_r;
          ev_cep     = 1'b1;
        end
      end else begin
        // all RVCs of the preferred output taken: tear down a victim DVC
        for (int q = NPORT - 1; q >= 0; q--)
          for (int v = NRVC - 1; v >= 1; v--)
            if (tbl[q][v].state == RS_MAPPED && tbl[q][v].oport == cand[0] &&
                tbl[q][v].npend == 0 &&
                !(unm_hold[q] && unm_rvc[q] == RVC_W'(v))) begin
              vfound = 1'b1;
              vq     = PORT_W'(q);
              vr     = RVC_W'(v);
            end
        if (vfound && !cq_full[cand[0]]) begin
          c_tear[vq]  = 1'b1;
          c_rvc       = vr;
          free_en     = 1'b1;
          free_o      = cand[0];
          free_r      = tbl[vq][vr].orvc;
          cq_push[cand[0]] = 1'b1;
          cq_in.ptype = PK_CDP;
          cq_in.rvc   = tbl[vq][vr].orvc;
          ev_teardown = 1'b1;
        end
      end
    end else if (act && h.ptype == PK_CDP) begin
      if (unm_hold[p] && unm_rvc[p] == h.rvc) begin
        // a data packet of this DVC still waits here: the CDP follows it
      end else if (e.state == RS_MAPPED) begin
        if (e.npend == 0 && !cq_full[e.oport]) begin
          in_pop[p]  = 1'b1;
          c_free[p]  = 1'b1;
          c_rvc      = h.rvc;
          free_en    = 1'b1;
          free_o     = e.oport;
          free_r     = e.orvc;
          cq_push[e.oport] = 1'b1;
          cq_in      = h;
          cq_in.rvc  = e.orvc;
          ev_cdp     = 1'b1;
        end
      end else begin
        in_pop[p] = 1'b1;
        c_free[p] = 1'b1;
        c_rvc     = h.rvc;
        ev_cdp    = 1'b1;
      end
    end else if (act) begin
      in_pop[p] = 1'b1;   // not a control packet: discard
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0;
      for (int o = 0; o < NPORT; o++) used[o] <= '0;
    end else begin
      if (act) rr <= (p == PORT_W'(NPORT - 1)) ? '0 : p + 1'b1;
      if (alloc_en) used[alloc_o][alloc_r] <= 1'b1;
      if (free_en)  used[free_o][free_r]   <= 1'b0;
    end
  end
endmodule

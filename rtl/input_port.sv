// input_port: everything behind one input link of a DVC switch.
//
// Three buffering virtual channels (BVCs) share the link:
//   primary BVC   - DAMQ buffer N_l for data packets on DVCs. A data packet is
//                   routed by looking up its RVC in the IMT before it is
//                   queued; the IMT gives the output port (the logical queue)
//                   and, when the packet leaves, the output RVC that replaces
//                   the RVC field.
//   diversion BVC - buffer D_l for diverted packets, which arrive on the one
//                   dedicated RVC (DIV_RVC) and are routed by dimension order.
//   control BVC   - storage for CEPs and CDPs, 3 entries per RVC plus one.
//                   It is flow controlled like the other two (ctrl_ready):
//                   this design keeps every arriving control packet instead
//                   of dropping the unnecessary ones, so the bound alone does
//                   not guarantee room.
// A data packet that arrives on an RVC that is not mapped is held in a single
// "unmapped" slot; while it is there the primary BVC accepts nothing more,
// which keeps N_l to at most one unmapped packet. If the RVC's DVC was torn
// down at this switch, the port asks the control unit (reest_req) to create a
// CEP from the information kept in the IMT and re-establish the DVC. Once the
// RVC is mapped the packet joins its logical queue.
//
// A packet at the head of a logical queue that has not left for TIMEOUT
// cycles becomes a candidate for diversion: it may then leave on the
// dimension-order output, on the diversion BVC, with its header augmented by
// source, destination and sequence number, and the IMT entry marks that the
// next packet sent normally must also carry its sequence number. A packet
// forwarded normally gets the IMT's sequence number plus one (or keeps the
// one it carries), which the IMT records.
//
// Each cycle the port offers at most one packet to the crossbar: the oldest
// of the diversion-buffer head and the queue heads whose next hop can take it
// (out_avail_*). The offer (req_*) is combinational; grant in the same cycle
// removes it at the clock edge.
//
// The three BVCs, the single unmapped packet, the timeout and the sequence
// rules follow the DVC scheme; ready/valid flow control, the per-RVC count of
// queued control packets and the unmapped slot as a separate register are this
// design's choices. The unmapped packet keeps count of the control packets for
// its RVC that arrived before it; it belongs to the circuit left once those
// are processed, so it acts (joins a queue or triggers re-establishment) only
// when the count is zero ("owned"), and the control unit holds back any later
// CDP for that RVC until the packet has moved on.
module input_port
  import dvc_pkg::*;
#(
  parameter int unsigned NRVC       = 8,
  parameter int unsigned DAMQ_SLOTS = 2,
  parameter int unsigned DIV_DEPTH  = 1,
  parameter int unsigned TIMEOUT    = 40
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] here,
  input  logic [TIME_W-1:0] now,
  // link in
  input  logic              in_valid,
  input  pkt_t              in_pkt,
  output logic              prim_ready,
  output logic              div_ready,
  output logic              ctrl_ready,
  // availability of each output for the two data BVCs
  input  logic [NPORT-1:0]  out_avail_prim,
  input  logic [NPORT-1:0]  out_avail_div,
  // crossbar request
  output logic              req_valid,
  output logic [PORT_W-1:0] req_port,
  output pkt_t              req_pkt,
  output logic [TIME_W-1:0] req_time,
  input  logic              grant,
  // control BVC towards the control unit
  output logic              ctrl_empty,
  output pkt_t              ctrl_head,
  input  logic              ctrl_pop,
  // IMT writes from the control unit
  input  logic              c_map,
  input  logic              c_free,
  input  logic              c_tear,
  input  logic [RVC_W-1:0]  c_rvc,
  input  logic [PORT_W-1:0] c_oport,
  input  logic [RVC_W-1:0]  c_orvc,
  input  logic [NODE_W-1:0] c_src,
  input  logic [NODE_W-1:0] c_dst,
  output imt_entry_t        tbl [NRVC],
  // re-establishment request and unmapped-packet status
  output logic              reest_req,
  output logic [RVC_W-1:0]  unm_rvc,
  output logic              unm_hold,
  // events
  output logic              ev_divert,
  output logic              ev_unmapped
);
  localparam int unsigned CTRL_DEPTH = 3 * NRVC + 1;

  // ---------------- arrival -----------------------------------------------
  logic arr_ctrl, arr_div, arr_data;
  assign arr_ctrl = in_valid && (in_pkt.ptype != PK_DATA);
  assign arr_div  = in_valid && (in_pkt.ptype == PK_DATA) && in_pkt.rvc == DIV_RVC;
  assign arr_data = in_valid && (in_pkt.ptype == PK_DATA) && in_pkt.rvc != DIV_RVC;

  logic [4:0] ctrl_cnt [NRVC];   // control packets queued per input RVC

  logic       unm_valid;
  pkt_t       unm_pkt;
  logic [TIME_W-1:0] unm_time;

  logic damq_full;
  imt_entry_t e_arr, e_unm;
  assign e_arr = tbl[in_pkt.rvc];
  assign e_unm = tbl[unm_pkt.rvc];

  logic arr_mapped;
  // a DVC being torn down in this very cycle no longer counts as mapped
  assign arr_mapped = e_arr.state == RS_MAPPED && ctrl_cnt[in_pkt.rvc] == 0 &&
                      !(c_tear && c_rvc == in_pkt.rvc);

  // unmapped packet: join its queue, or ask for re-establishment
  logic [4:0] unm_ahead;   // control packets for its RVC queued before it
  logic unm_own, unm_move;
  assign unm_own = (unm_ahead == 0);
  logic ctrl_full;
  assign unm_move  = unm_valid && unm_own && e_unm.state == RS_MAPPED && !damq_full;
  assign reest_req = unm_valid && unm_own && e_unm.state == RS_TORN;
  assign unm_rvc   = unm_pkt.rvc;
  assign unm_hold  = unm_valid && unm_own;

  assign prim_ready = !damq_full && !unm_valid;

  // ---------------- IMT ---------------------------------------------------
  logic             enq;
  logic [PORT_W-1:0] enq_q;
  pkt_t             enq_pkt;
  logic [TIME_W-1:0] enq_time;
  logic             fwd;
  logic [RVC_W-1:0] fwd_rvc;
  logic [SEQ_W-1:0] fwd_seq;
  logic             fwd_need;

  assign enq      = (arr_data && arr_mapped) || unm_move;
  assign enq_pkt  = unm_move ? unm_pkt  : in_pkt;
  assign enq_time = unm_move ? unm_time : now;
  assign enq_q    = unm_move ? e_unm.oport : e_arr.oport;

  imt #(.NRVC(NRVC)) u_imt (
    .clk, .rst_n,
    .c_map, .c_free, .c_tear, .c_rvc, .c_oport, .c_orvc, .c_src, .c_dst,
    .i_enq(enq), .i_enq_rvc(enq_pkt.rvc),
    .i_fwd(fwd), .i_fwd_rvc(fwd_rvc), .i_fwd_seq(fwd_seq), .i_fwd_need(fwd_need),
    .tbl
  );

  // ---------------- primary buffer N_l ------------------------------------
  logic [NPORT-1:0]  q_valid;
  pkt_t              q_pkt  [NPORT];
  logic [RVC_W-1:0]  q_rvc  [NPORT];
  logic [TIME_W-1:0] q_time [NPORT];
  logic              deq;
  logic [PORT_W-1:0] deq_q;

  damq_buffer #(.NSLOT(DAMQ_SLOTS), .NQ(NPORT)) u_damq (
    .clk, .rst_n,
    .enq, .enq_q, .enq_pkt, .enq_rvc(enq_pkt.rvc), .enq_time,
    .deq, .deq_q,
    .full(damq_full), .q_valid, .head_pkt(q_pkt), .head_rvc(q_rvc), .head_time(q_time)
  );

  // ---------------- diversion buffer D_l ----------------------------------
  logic div_empty, div_full, div_pop;
  pkt_t div_head;
  logic [TIME_W-1:0] div_time;
  logic [$clog2(DIV_DEPTH+1)-1:0] div_count;

  pkt_fifo #(.DEPTH(DIV_DEPTH), .TAG_W(TIME_W)) u_div (
    .clk, .rst_n,
    .push(arr_div), .push_pkt(in_pkt), .push_tag(now),
    .pop(div_pop), .empty(div_empty), .full(div_full),
    .head_pkt(div_head), .head_tag(div_time), .count(div_count)
  );
  assign div_ready = !div_full;
  assign ctrl_ready = !ctrl_full;

  // ---------------- control BVC storage -----------------------------------
  logic ctrl_push;
  pkt_t ctrl_push_pkt;
  logic [TIME_W-1:0] ctrl_tag_unused;
  logic [$clog2(CTRL_DEPTH+1)-1:0] ctrl_count;

  assign ctrl_push_pkt = in_pkt;
  assign ctrl_push     = arr_ctrl;

  pkt_fifo #(.DEPTH(CTRL_DEPTH), .TAG_W(TIME_W)) u_ctrl (
    .clk, .rst_n,
    .push(ctrl_push), .push_pkt(ctrl_push_pkt), .push_tag(now),
    .pop(ctrl_pop), .empty(ctrl_empty), .full(ctrl_full),
    .head_pkt(ctrl_head), .head_tag(ctrl_tag_unused), .count(ctrl_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NRVC; r++) ctrl_cnt[r] <= '0;
    end else begin
      for (int r = 0; r < NRVC; r++)
        ctrl_cnt[r] <= ctrl_cnt[r]
          + ((ctrl_push && ctrl_push_pkt.rvc == RVC_W'(r)) ? 5'd1 : 5'd0)
          - ((ctrl_pop  && ctrl_head.rvc     == RVC_W'(r)) ? 5'd1 : 5'd0);
    end
  end

  // ---------------- unmapped slot -----------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      unm_valid <= 1'b0;
      unm_ahead <= '0;
      unm_pkt   <= '0;
      unm_time  <= '0;
    end else if (arr_data && !arr_mapped) begin
      unm_valid <= 1'b1;
      unm_ahead <= ctrl_cnt[in_pkt.rvc] - ((ctrl_pop && ctrl_head.rvc == in_pkt.rvc) ? 5'd1 : 5'd0);
      unm_pkt   <= in_pkt;
      unm_time  <= now;
    end else begin
      if (unm_move) unm_valid <= 1'b0;
      if (unm_valid && unm_ahead != 0 && ctrl_pop && ctrl_head.rvc == unm_pkt.rvc)
        unm_ahead <= unm_ahead - 1'b1;
    end
  end

  // ---------------- timeout per logical queue -----------------------------
  logic [15:0] blk_cnt [NPORT];
  logic [NPORT-1:0] timed_out;
  always_comb
    for (int q = 0; q < NPORT; q++) timed_out[q] = blk_cnt[q] >= 16'(TIMEOUT);

  // ---------------- candidate selection (oldest first) --------------------
  logic [PORT_W-1:0] div_port;
  dor_route u_dor_d (.here, .dst(div_head.dst), .oport(div_port));

  logic [PORT_W-1:0] qdiv_port [NPORT];
  for (genvar q = 0; q < NPORT; q++) begin : g_qdor
    dor_route u_dor_q (.here, .dst(tbl[q_rvc[q]].dst), .oport(qdiv_port[q]));
  end

  // selection record
  logic              sel_is_div_buf;   // from D_l
  logic [PORT_W-1:0] sel_q;            // else from this queue
  logic              sel_divert;       // leaves on the diversion BVC
  logic [SEQ_W-1:0]  sel_seq;

  always_comb begin
    automatic logic [TIME_W-1:0] best_age = '0;
    automatic logic [TIME_W-1:0] age;
    imt_entry_t e;
    logic [SEQ_W-1:0] s;
    req_valid      = 1'b0;
    req_port       = '0;
    req_pkt        = '0;
    req_time       = '0;
    sel_is_div_buf = 1'b0;
    sel_q          = '0;
    sel_divert     = 1'b0;
    sel_seq        = '0;
    if (!div_empty && out_avail_div[div_port]) begin
      req_valid      = 1'b1;
      req_port       = div_port;
      req_pkt        = div_head;
      req_time       = div_time;
      sel_is_div_buf = 1'b1;
      best_age       = now - div_time;
    end
    for (int q = 0; q < NPORT; q++) begin
      e   = tbl[q_rvc[q]];
      s   = q_pkt[q].has_seq ? q_pkt[q].seq : e.seq + 1'b1;
      age = now - q_time[q];
      if (q_valid[q] && (!req_valid || age > best_age)) begin
        if (out_avail_prim[q]) begin
          req_valid      = 1'b1;
          req_port       = PORT_W'(q);
          req_pkt        = q_pkt[q];
          req_pkt.rvc    = e.orvc;
          req_pkt.has_seq = q_pkt[q].has_seq || e.need_seq;
          req_pkt.seq    = s;
          req_time       = q_time[q];
          sel_is_div_buf = 1'b0;
          sel_q          = PORT_W'(q);
          sel_divert     = 1'b0;
          sel_seq        = s;
          best_age       = age;
        end else if (timed_out[q] && out_avail_div[qdiv_port[q]]) begin
          req_valid      = 1'b1;
          req_port       = qdiv_port[q];
          req_pkt        = q_pkt[q];
          req_pkt.rvc    = DIV_RVC;
          req_pkt.src    = e.src;
          req_pkt.dst    = e.dst;
          req_pkt.has_seq = 1'b1;
          req_pkt.seq    = s;
          req_time       = q_time[q];
          sel_is_div_buf = 1'b0;
          sel_q          = PORT_W'(q);
          sel_divert     = 1'b1;
          sel_seq        = s;
          best_age       = age;
        end
      end
    end
  end

  assign div_pop  = grant && req_valid && sel_is_div_buf;
  assign deq      = grant && req_valid && !sel_is_div_buf;
  assign deq_q    = sel_q;
  assign fwd      = deq;
  assign fwd_rvc  = q_rvc[sel_q];
  assign fwd_seq  = sel_seq;
  assign fwd_need = sel_divert;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < NPORT; q++) blk_cnt[q] <= '0;
    end else begin
      for (int q = 0; q < NPORT; q++) begin
        if (!q_valid[q] || (deq && deq_q == PORT_W'(q)))
          blk_cnt[q] <= '0;
        else if (blk_cnt[q] != 16'hFFFF)
          blk_cnt[q] <= blk_cnt[q] + 1'b1;
      end
    end
  end

  assign ev_divert   = deq && sel_divert;
  assign ev_unmapped = arr_data && !arr_mapped;

  assert property (@(posedge clk) disable iff (!rst_n) arr_data |-> prim_ready)
    else $error("input_port: data packet without primary buffer space");
  assert property (@(posedge clk) disable iff (!rst_n) arr_div |-> div_ready)
    else $error("input_port: diverted packet without diversion buffer space");
  assert property (@(posedge clk) disable iff (!rst_n) arr_ctrl |-> !ctrl_full)
    else $error("input_port: control storage overflow");
endmodule

// host_if: host interface of one node of the DVC network.
//
// Sending side. The host hands over packets (tx_*) addressed to a
// destination node. The interface keeps one DVC per destination it talks to,
// each on its own RVC of the host link. For a destination without a DVC it
// takes a free host-link RVC and injects a CEP carrying source and
// destination; data packets can follow at once on the same RVC (the switch
// holds them until the CEP has mapped the RVC). When all host-link RVCs are
// in use it destroys one of its DVCs (round robin) with a CDP. Every DVC
// counts its packets from the per-destination sequence counter; the first
// data packet on a new DVC carries its sequence number, the others carry none.
// One packet is injected at a time; the link is busy for the packet's phits.
//
// Receiving side. CEPs arriving on the ejection link record which source a
// host-link RVC now belongs to, CDPs remove that record. A data packet on a
// mapped RVC takes the sequence number in its header if it has one, and
// otherwise the previous packet's number on that RVC plus one. A diverted
// packet carries source and sequence number. Packets are handed to the host
// (rx_*) in consecutive sequence order per source; packets that arrive early
// wait in a reorder buffer of ROB_DEPTH entries, and the link is flow
// controlled so that an arriving packet always finds room. The host link is
// the sink of the diversion network, so the buffer must not fill up with
// early packets while the packet they wait for is still in the network: a
// full buffer stops the link, and if the missing packet is behind it the
// network deadlocks. The default of 64 entries (one per node of the 8 x 8
// mesh) is sized for that; it is not a proof that it never fills. At most one packet
// is delivered per cycle, an in-order arrival before a buffered one.
//
// The DVC semantics (CEP before data on the same RVC, CDP to release, implicit
// sequence numbers, resequencing at the destination) follow the DVC scheme.
// One DVC per destination, the round-robin victim, the first-packet sequence
// number and the reorder buffer organisation are this design's choices.
module host_if
  import dvc_pkg::*;
#(
  parameter int unsigned NRVC      = 8,
  parameter int unsigned ROB_DEPTH = 64,
  parameter int unsigned NNODE     = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NODE_W-1:0]    here,
  // from the host
  input  logic                 tx_valid,
  input  logic [NODE_W-1:0]    tx_dst,
  input  logic [LEN_W-1:0]     tx_len,
  input  logic [PAYLOAD_W-1:0] tx_payload,
  output logic                 tx_ready,
  // injection link to the switch
  output logic                 inj_valid,
  output pkt_t                 inj_pkt,
  input  logic                 sw_prim_ready,
  input  logic                 sw_ctrl_ready,
  // ejection link from the switch
  input  logic                 ej_valid,
  input  pkt_t                 ej_pkt,
  output logic                 ej_ready,
  // to the host
  output logic                 rx_valid,
  output logic [NODE_W-1:0]    rx_src,
  output logic [SEQ_W-1:0]     rx_seq,
  output logic [PAYLOAD_W-1:0] rx_payload,
  // events
  output logic                 ev_reorder,
  output logic                 ev_src_cdp
);
  localparam int unsigned RW = (ROB_DEPTH > 1) ? $clog2(ROB_DEPTH) : 1;
  localparam logic [LEN_W-1:0] MAX_LEN = '1;

  // ================= sending side =========================================
  logic              d_valid [NNODE];
  logic [RVC_W-1:0]  d_rvc   [NNODE];
  logic              d_first [NNODE];
  logic [SEQ_W-1:0]  d_seq   [NNODE];
  logic [NRVC-1:0]   r_used;
  logic [NODE_W-1:0] r_dst   [NRVC];
  logic [RVC_W-1:0]  vptr;

  logic link_idle;
  logic send;
  pkt_t spkt;
  logic [NODE_W-1:0] ldst;
  assign ldst = tx_dst;

  logic             have_free;
  logic [RVC_W-1:0] free_r;
  always_comb begin
    have_free = 1'b0;
    free_r    = '0;
    for (int r = NRVC - 1; r >= 1; r--)
      if (!r_used[r]) begin
        have_free = 1'b1;
        free_r    = RVC_W'(r);
      end
  end

  // victim: next used RVC at or after vptr
  logic [RVC_W-1:0] vict;
  always_comb begin
    vict = '0;
    for (int k = NRVC - 1; k >= 0; k--) begin
      automatic int unsigned r = (int'(vptr) + k) % NRVC;
      if (r != 0 && r_used[r]) vict = RVC_W'(r);
    end
  end

  typedef enum logic [1:0] {S_NONE, S_DATA, S_CEP, S_CDP} sact_e;
  sact_e sact;

  always_comb begin
    sact     = S_NONE;
    spkt     = '0;
    spkt.src = here;
    spkt.dst = ldst;
    if (tx_valid && link_idle) begin
      if (d_valid[ldst]) begin
        if (sw_prim_ready) begin
          sact         = S_DATA;
          spkt.ptype   = PK_DATA;
          spkt.rvc     = d_rvc[ldst];
          spkt.has_seq = d_first[ldst];
          spkt.seq     = d_seq[ldst];
          spkt.len     = tx_len;
          spkt.is_max  = (tx_len == MAX_LEN);
          spkt.payload = tx_payload;
        end
      end else if (!sw_ctrl_ready) begin
        sact = S_NONE;
      end else if (have_free) begin
        sact       = S_CEP;
        spkt.ptype = PK_CEP;
        spkt.rvc   = free_r;
      end else begin
        sact       = S_CDP;
        spkt.ptype = PK_CDP;
        spkt.rvc   = vict;
      end
    end
  end
  assign send       = (sact != S_NONE);
  assign tx_ready   = (sact == S_DATA);
  assign ev_src_cdp = (sact == S_CDP);

  output_link u_link (
    .clk, .rst_n, .send, .pkt(spkt), .idle(link_idle),
    .out_valid(inj_valid), .out_pkt(inj_pkt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NNODE; n++) begin
        d_valid[n] <= 1'b0;
        d_rvc[n]   <= '0;
        d_first[n] <= 1'b0;
        d_seq[n]   <= '0;
      end
      for (int r = 0; r < NRVC; r++) r_dst[r] <= '0;
      r_used <= '0;
      vptr   <= RVC_W'(1);
    end else begin
      case (sact)
        S_DATA: begin
          d_seq[ldst]   <= d_seq[ldst] + 1'b1;
          d_first[ldst] <= 1'b0;
        end
        S_CEP: begin
          d_valid[ldst]  <= 1'b1;
          d_rvc[ldst]    <= free_r;
          d_first[ldst]  <= 1'b1;
          r_used[free_r] <= 1'b1;
          r_dst[free_r]  <= ldst;
        end
        S_CDP: begin
          d_valid[r_dst[vict]] <= 1'b0;
          r_used[vict]         <= 1'b0;
          vptr <= (vict == RVC_W'(NRVC - 1)) ? RVC_W'(1) : vict + 1'b1;
        end
        default: ;
      endcase
    end
  end

  // ================= receiving side =======================================
  logic              m_valid [NRVC];
  logic [NODE_W-1:0] m_src   [NRVC];
  logic [SEQ_W-1:0]  m_last  [NRVC];
  logic [SEQ_W-1:0]  expect_seq [NNODE];

  logic              rob_v   [ROB_DEPTH];
  logic [NODE_W-1:0] rob_src [ROB_DEPTH];
  logic [SEQ_W-1:0]  rob_seq [ROB_DEPTH];
  logic [PAYLOAD_W-1:0] rob_pay [ROB_DEPTH];

  logic [RW:0] rob_cnt;
  always_comb begin
    rob_cnt = '0;
    for (int k = 0; k < ROB_DEPTH; k++) rob_cnt += (rob_v[k] ? 1'b1 : 1'b0);
  end
  assign ej_ready = rob_cnt < (RW+1)'(ROB_DEPTH);

  logic              a_data;
  logic [NODE_W-1:0] a_src;
  logic [SEQ_W-1:0]  a_seq;
  logic              a_inorder;
  always_comb begin
    a_data = ej_valid && ej_pkt.ptype == PK_DATA;
    if (ej_pkt.rvc == DIV_RVC) begin
      a_src = ej_pkt.src;
      a_seq = ej_pkt.seq;
    end else begin
      a_src = m_src[ej_pkt.rvc];
      a_seq = ej_pkt.has_seq ? ej_pkt.seq : m_last[ej_pkt.rvc] + 1'b1;
    end
    a_inorder = a_data && a_seq == expect_seq[a_src];
  end

  // buffered packet that is next in order, and a free entry
  logic          b_hit, b_free_ok;
  logic [RW-1:0] b_idx, b_free;
  always_comb begin
    b_hit = 1'b0; b_idx = '0; b_free_ok = 1'b0; b_free = '0;
    for (int k = ROB_DEPTH - 1; k >= 0; k--) begin
      if (rob_v[k] && rob_seq[k] == expect_seq[rob_src[k]]) begin
        b_hit = 1'b1;
        b_idx = RW'(k);
      end
      if (!rob_v[k]) begin
        b_free_ok = 1'b1;
        b_free    = RW'(k);
      end
    end
  end

  logic b_deliver;
  assign b_deliver  = b_hit && !a_inorder;
  assign rx_valid   = a_inorder || b_deliver;
  assign rx_src     = a_inorder ? a_src : rob_src[b_idx];
  assign rx_seq     = a_inorder ? a_seq : rob_seq[b_idx];
  assign rx_payload = a_inorder ? ej_pkt.payload : rob_pay[b_idx];
  assign ev_reorder = a_data && !a_inorder;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NRVC; r++) begin
        m_valid[r] <= 1'b0;
        m_src[r]   <= '0;
        m_last[r]  <= '0;
      end
      for (int n = 0; n < NNODE; n++) expect_seq[n] <= '0;
      for (int k = 0; k < ROB_DEPTH; k++) begin
        rob_v[k]   <= 1'b0;
        rob_src[k] <= '0;
        rob_seq[k] <= '0;
        rob_pay[k] <= '0;
      end
    end else begin
      if (ej_valid && ej_pkt.ptype == PK_CEP) begin
        m_valid[ej_pkt.rvc] <= 1'b1;
        m_src[ej_pkt.rvc]   <= ej_pkt.src;
      end
      if (ej_valid && ej_pkt.ptype == PK_CDP)
        m_valid[ej_pkt.rvc] <= 1'b0;
      if (a_data && ej_pkt.rvc != DIV_RVC)
        m_last[ej_pkt.rvc] <= a_seq;
      if (a_inorder)
        expect_seq[a_src] <= expect_seq[a_src] + 1'b1;
      if (a_data && !a_inorder) begin
        rob_v[b_free]   <= 1'b1;
        rob_src[b_free] <= a_src;
        rob_seq[b_free] <= a_seq;
        rob_pay[b_free] <= ej_pkt.payload;
      end
      if (b_deliver) begin
        rob_v[b_idx] <= 1'b0;
        expect_seq[rob_src[b_idx]] <= expect_seq[rob_src[b_idx]] + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (a_data && !a_inorder) |-> b_free_ok)
    else $error("host_if: reorder buffer overflow");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (a_data && ej_pkt.rvc != DIV_RVC) |-> m_valid[ej_pkt.rvc])
    else $error("host_if: data on an RVC with no DVC");
endmodule

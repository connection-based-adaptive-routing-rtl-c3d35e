// damq_buffer: Dynamically Allocated Multi-Queue buffer, the primary input
// buffer N_l of one link.
//
// NSLOT packet slots are shared by NQ logical queues, one per switch output.
// A packet is routed (IMT lookup) before it is queued, and the route picks the
// logical queue it joins, so a blocked packet at the head of one queue does
// not hold up packets bound for other outputs. Each queue is a linked list
// through the slots; free slots are found with a priority encoder. Each slot
// also keeps the packet's input RVC (needed when it is forwarded or diverted)
// and its arrival time (for oldest-first arbitration).
//
// Interface: enq puts a packet into queue enq_q (needs !full); deq removes
// the head of queue deq_q (needs that queue non-empty). Both may happen in
// one cycle, on the same queue too. The heads of all queues are visible
// combinationally. The capacity in packets is the buffer size in phits
// divided by the packet size, 64/32 = 2 by default; sizes follow the
// evaluated configuration, the linked-list organisation is this design's.
module damq_buffer
  import dvc_pkg::*;
#(
  parameter int unsigned NSLOT = 2,
  parameter int unsigned NQ    = NPORT
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enq,
  input  logic [PORT_W-1:0]  enq_q,
  input  pkt_t               enq_pkt,
  input  logic [RVC_W-1:0]   enq_rvc,
  input  logic [TIME_W-1:0]  enq_time,
  input  logic               deq,
  input  logic [PORT_W-1:0]  deq_q,
  output logic               full,
  output logic [NQ-1:0]      q_valid,
  output pkt_t               head_pkt  [NQ],
  output logic [RVC_W-1:0]   head_rvc  [NQ],
  output logic [TIME_W-1:0]  head_time [NQ]
);
  localparam int unsigned SW = (NSLOT > 1) ? $clog2(NSLOT) : 1;

  pkt_t              s_pkt  [NSLOT];
  logic [RVC_W-1:0]  s_rvc  [NSLOT];
  logic [TIME_W-1:0] s_time [NSLOT];
  logic [SW-1:0]     s_next [NSLOT];
  logic [NSLOT-1:0]  used;
  logic [SW-1:0]     qhead [NQ];
  logic [SW-1:0]     qtail [NQ];
  logic [SW:0]       qcnt  [NQ];

  logic [SW-1:0] free_idx;
  always_comb begin
    free_idx = '0;
    for (int i = NSLOT - 1; i >= 0; i--)
      if (!used[i]) free_idx = SW'(i);
  end
  assign full = &used;

  always_comb begin
    for (int q = 0; q < NQ; q++) begin
      q_valid[q]   = (qcnt[q] != 0);
      head_pkt[q]  = s_pkt[qhead[q]];
      head_rvc[q]  = s_rvc[qhead[q]];
      head_time[q] = s_time[qhead[q]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used <= '0;
      for (int q = 0; q < NQ; q++) begin
        qhead[q] <= '0;
        qtail[q] <= '0;
        qcnt[q]  <= '0;
      end
    end else begin
      if (deq) begin
        used[qhead[deq_q]] <= 1'b0;
        qhead[deq_q]       <= s_next[qhead[deq_q]];
      end
      if (enq) begin
        used[free_idx] <= 1'b1;
        // joining an empty queue (or one emptied by this cycle's deq)
        if (qcnt[enq_q] == 0 || (deq && deq_q == enq_q && qcnt[enq_q] == 1))
          qhead[enq_q] <= free_idx;
        else
          s_next[qtail[enq_q]] <= free_idx;
        qtail[enq_q] <= free_idx;
      end
      for (int q = 0; q < NQ; q++)
        qcnt[q] <= qcnt[q] + ((enq && enq_q == PORT_W'(q)) ? 1'b1 : 1'b0)
                           - ((deq && deq_q == PORT_W'(q)) ? 1'b1 : 1'b0);
    end
  end

  always_ff @(posedge clk) begin
    if (enq) begin
      s_pkt[free_idx]  <= enq_pkt;
      s_rvc[free_idx]  <= enq_rvc;
      s_time[free_idx] <= enq_time;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) enq |-> !full)
    else $error("damq_buffer: enqueue into full buffer");
  assert property (@(posedge clk) disable iff (!rst_n) deq |-> q_valid[deq_q])
    else $error("damq_buffer: dequeue from empty queue");
endmodule

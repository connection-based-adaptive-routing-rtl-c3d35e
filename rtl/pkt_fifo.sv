// pkt_fifo: first-in first-out packet store.
//
// Used for the per-link diversion buffer D_l (DEPTH = 1 packet) and for the
// control BVC storage of CEPs and CDPs, and for the per-output queues of
// control packets waiting for a link. Each entry keeps the packet, a
// companion tag (the input RVC or arrival time, TAG_W bits) and nothing else.
// push and pop may happen in the same cycle; the head is visible
// combinationally (first-word fall-through). Pushing into a full FIFO is an
// error that an assertion reports. Being a plain FIFO is this design's
// choice for these buffers.
module pkt_fifo
  import dvc_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned TAG_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  pkt_t             push_pkt,
  input  logic [TAG_W-1:0] push_tag,
  input  logic             pop,
  output logic             empty,
  output logic             full,
  output pkt_t             head_pkt,
  output logic [TAG_W-1:0] head_tag,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  pkt_t             mem_pkt [DEPTH];
  logic [TAG_W-1:0] mem_tag [DEPTH];
  logic [AW-1:0]    rd, wr;

  assign empty    = (count == 0);
  assign full     = (count == DEPTH[$bits(count)-1:0]);
  assign head_pkt = mem_pkt[rd];
  assign head_tag = mem_tag[rd];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] a);
    return (a == AW'(DEPTH - 1)) ? '0 : a + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd    <= '0;
      wr    <= '0;
      count <= '0;
    end else begin
      if (push) wr <= inc(wr);
      if (pop)  rd <= inc(rd);
      count <= count + (push ? 1'b1 : 1'b0) - (pop ? 1'b1 : 1'b0);
    end
  end

  always_ff @(posedge clk) begin
    if (push) begin
      mem_pkt[wr] <= push_pkt;
      mem_tag[wr] <= push_tag;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop))
    else $error("pkt_fifo: overflow");
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("pkt_fifo: underflow");
endmodule

// output_link: one output of a switch (or of a host interface) driving a
// physical link.
//
// The link carries one phit per cycle. A packet handed over with send is
// presented to the receiver in the same cycle (virtual cut-through: the
// receiver may forward it as soon as its header is there), and the link then
// stays busy for pkt_phits() cycles in all, so the next packet can start
// only after the last phit of this one. idle is high when a new packet may be
// sent this cycle. Modelling a packet as one transfer followed by a busy
// period is this design's simplification of phit-by-phit transfer.
module output_link
  import dvc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  send,
  input  pkt_t  pkt,
  output logic  idle,
  output logic  out_valid,
  output pkt_t  out_pkt
);
  logic [7:0] busy;   // phits still to go after this cycle

  assign idle      = (busy == 0);
  assign out_valid = send && idle;
  assign out_pkt   = pkt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      busy <= '0;
    else if (send && idle)
      busy <= 8'(pkt_phits(pkt) - 1);
    else if (busy != 0)
      busy <= busy - 1'b1;
  end

  // A packet must not be offered while the link is busy.
  assert property (@(posedge clk) disable iff (!rst_n) send |-> idle)
    else $error("output_link: send while link busy");
endmodule

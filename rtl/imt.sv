// imt: Input Mapping Table of one switch input port.
//
// Indexed by input RVC. Each entry records, for the DVC that uses that RVC,
// the output port and output RVC, the source and destination ids and the
// sequence number of the packet most recently sent on the output RVC. On top
// of the fields the table is described with, each entry holds a state
// (free / mapped / torn down with its information kept), a need_seq flag that makes the next packet sent on the circuit
// carry its sequence number, and a count of data packets of this RVC waiting
// in the primary buffer (a DVC is torn down or destroyed here only when none
// wait). Those three are this design's additions.
//
// The table is a register array; all entries are visible combinationally
// (lookup and victim search). Updates, applied at the clock edge:
//   control unit  : map (new DVC), free (CDP), tear (victim teardown)
//   input port    : count a packet queued, and on forwarding/diverting count
//                   it out and record its sequence number and need_seq.
// Only the control unit changes the state of an entry.
module imt
  import dvc_pkg::*;
#(
  parameter int unsigned NRVC = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // control unit
  input  logic               c_map,
  input  logic               c_free,
  input  logic               c_tear,
  input  logic [RVC_W-1:0]   c_rvc,
  input  logic [PORT_W-1:0]  c_oport,
  input  logic [RVC_W-1:0]   c_orvc,
  input  logic [NODE_W-1:0]  c_src,
  input  logic [NODE_W-1:0]  c_dst,
  // input port
  input  logic               i_enq,        // packet queued in N_l
  input  logic [RVC_W-1:0]   i_enq_rvc,
  input  logic               i_fwd,        // packet left N_l
  input  logic [RVC_W-1:0]   i_fwd_rvc,
  input  logic [SEQ_W-1:0]   i_fwd_seq,
  input  logic               i_fwd_need,
  // table contents
  output imt_entry_t         tbl [NRVC]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NRVC; r++) begin
        tbl[r] <= '0;
        tbl[r].state <= RS_FREE;
      end
    end else begin
      for (int r = 0; r < NRVC; r++) begin
        automatic logic inc = i_enq && i_enq_rvc == RVC_W'(r);
        automatic logic dec = i_fwd && i_fwd_rvc == RVC_W'(r);
        if (c_rvc == RVC_W'(r)) begin
          if (c_map) begin
            tbl[r].state    <= RS_MAPPED;
            tbl[r].oport    <= c_oport;
            tbl[r].orvc     <= c_orvc;
            tbl[r].src      <= c_src;
            tbl[r].dst      <= c_dst;
            tbl[r].need_seq <= 1'b1;
          end else if (c_free) begin
            tbl[r].state    <= RS_FREE;
          end else if (c_tear) begin
            tbl[r].state    <= RS_TORN;
          end
        end
        if (dec) begin
          tbl[r].seq      <= i_fwd_seq;
          tbl[r].need_seq <= i_fwd_need;
        end
        tbl[r].npend <= tbl[r].npend + (inc ? 4'd1 : 4'd0) - (dec ? 4'd1 : 4'd0);
      end
    end
  end
endmodule

// dvc_switch: one n x n switch of the DVC network (n = 5 in a 2-D mesh:
// four neighbour links and one host link).
//
// The switch is input buffered with a central crossbar. Every input link has
// an input_port (IMT, primary DAMQ buffer, diversion buffer, control
// storage); a ctrl_unit processes CEPs and CDPs and owns the output RVC
// allocation; every output has an output_link that keeps the link busy for the
// length of the packet being sent.
//
// Crossbar allocation, every cycle: each input offers its oldest packet that
// can go (the output's link is idle, the next hop has room in the BVC the
// packet will use, and no control packet is waiting for that output); each
// output grants, among the inputs offering to it, the packet that has been in
// the switch longest. Control packets waiting for an output are sent before
// any data packet, when the next hop has room for them. A granted packet
// appears on out_valid/out_pkt in the same cycle.
//
// Neighbour flow control is ready/valid per BVC: the ds_*_ready inputs
// come from the next hop and depend only on its registers, so no
// combinational path runs from one switch to the next and back.
// Input buffering, the crossbar, the three BVCs and oldest-first arbitration
// follow the DVC scheme; the single-cycle allocation is this design's.
module dvc_switch
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
  // input links
  input  logic [NPORT-1:0]  in_valid,
  input  pkt_t              in_pkt [NPORT],
  output logic [NPORT-1:0]  prim_ready,
  output logic [NPORT-1:0]  div_ready,
  output logic [NPORT-1:0]  ctrl_ready,
  // output links
  output logic [NPORT-1:0]  out_valid,
  output pkt_t              out_pkt [NPORT],
  input  logic [NPORT-1:0]  ds_prim_ready,
  input  logic [NPORT-1:0]  ds_div_ready,
  input  logic [NPORT-1:0]  ds_ctrl_ready,
  // events, one bit per cycle
  output logic [NPORT-1:0]  ev_divert,
  output logic              ev_reest,
  output logic [NPORT-1:0]  ev_unmapped,
  output logic              ev_teardown,
  output logic              ev_cep,
  output logic              ev_cdp
);
  logic [TIME_W-1:0] now;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;

  // ---------------- input ports -------------------------------------------
  logic [NPORT-1:0]  req_valid, grant;
  logic [PORT_W-1:0] req_port [NPORT];
  pkt_t              req_pkt  [NPORT];
  logic [TIME_W-1:0] req_time [NPORT];
  logic [NPORT-1:0]  out_avail_prim, out_avail_div;

  logic [NPORT-1:0]  ci_empty, ci_pop;
  pkt_t              ci_head [NPORT];
  imt_entry_t        tbl [NPORT][NRVC];
  logic [NPORT-1:0]  c_map, c_free, c_tear;
  logic [RVC_W-1:0]  c_rvc;
  logic [PORT_W-1:0] c_oport;
  logic [RVC_W-1:0]  c_orvc;
  logic [NODE_W-1:0] c_src, c_dst;
  logic [NPORT-1:0]  reest_req, unm_hold;
  logic [RVC_W-1:0]  unm_rvc [NPORT];

  for (genvar i = 0; i < NPORT; i++) begin : g_in
    input_port #(.NRVC(NRVC), .DAMQ_SLOTS(DAMQ_SLOTS), .DIV_DEPTH(DIV_DEPTH),
                 .TIMEOUT(TIMEOUT)) u_in (
      .clk, .rst_n, .here, .now,
      .in_valid(in_valid[i]), .in_pkt(in_pkt[i]),
      .prim_ready(prim_ready[i]), .div_ready(div_ready[i]), .ctrl_ready(ctrl_ready[i]),
      .out_avail_prim, .out_avail_div,
      .req_valid(req_valid[i]), .req_port(req_port[i]), .req_pkt(req_pkt[i]),
      .req_time(req_time[i]), .grant(grant[i]),
      .ctrl_empty(ci_empty[i]), .ctrl_head(ci_head[i]), .ctrl_pop(ci_pop[i]),
      .c_map(c_map[i]), .c_free(c_free[i]), .c_tear(c_tear[i]),
      .c_rvc, .c_oport, .c_orvc, .c_src, .c_dst,
      .tbl(tbl[i]),
      .reest_req(reest_req[i]), .unm_rvc(unm_rvc[i]), .unm_hold(unm_hold[i]),
      .ev_divert(ev_divert[i]), .ev_unmapped(ev_unmapped[i])
    );
  end

  // ---------------- control unit ------------------------------------------
  logic [NPORT-1:0] cq_valid, cq_pop;
  pkt_t             cq_pkt [NPORT];

  ctrl_unit #(.NRVC(NRVC)) u_ctrl (
    .clk, .rst_n, .here,
    .in_empty(ci_empty), .in_head(ci_head), .in_pop(ci_pop), .tbl,
    .reest_req, .unm_rvc, .unm_hold,
    .c_map, .c_free, .c_tear, .c_rvc, .c_oport, .c_orvc, .c_src, .c_dst,
    .cq_valid, .cq_pkt, .cq_pop,
    .ev_cep, .ev_reest, .ev_cdp, .ev_teardown
  );

  // ---------------- crossbar allocation and output links ------------------
  logic [NPORT-1:0] link_idle;
  logic [NPORT-1:0] ogrant [NPORT];   // per output: granted input (one-hot)
  logic [NPORT-1:0] oany;
  logic [PORT_W-1:0] oidx [NPORT];

  always_comb
    for (int o = 0; o < NPORT; o++) begin
      out_avail_prim[o] = link_idle[o] && ds_prim_ready[o] && !cq_valid[o];
      out_avail_div[o]  = link_idle[o] && ds_div_ready[o]  && !cq_valid[o];
    end

  for (genvar o = 0; o < NPORT; o++) begin : g_out
    logic [NPORT-1:0] oreq;
    logic             send;
    pkt_t             spkt;
    always_comb
      for (int i = 0; i < NPORT; i++)
        oreq[i] = req_valid[i] && req_port[i] == PORT_W'(o);

    age_arbiter #(.N(NPORT), .TIME_W(TIME_W)) u_arb (
      .now, .req(oreq), .stamp(req_time),
      .gnt(ogrant[o]), .any_gnt(oany[o]), .gnt_idx(oidx[o]));

    assign cq_pop[o] = cq_valid[o] && link_idle[o] && ds_ctrl_ready[o];
    assign send      = cq_pop[o] || oany[o];
    assign spkt      = cq_pop[o] ? cq_pkt[o] : req_pkt[oidx[o]];

    output_link u_link (
      .clk, .rst_n, .send, .pkt(spkt), .idle(link_idle[o]),
      .out_valid(out_valid[o]), .out_pkt(out_pkt[o]));
  end

  always_comb begin
    grant = '0;
    for (int o = 0; o < NPORT; o++) grant |= ogrant[o];
  end
endmodule

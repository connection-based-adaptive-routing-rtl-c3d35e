// dvc_mesh: a 2-D mesh network using Dynamic Virtual Circuits (top level).
//
// MESH_X x MESH_Y nodes (8 x 8 by default, the size evaluated). Every node is
// a dvc_switch with a host_if on its host port; neighbouring switches are
// joined by a pair of links, one per direction. Node (x, y) has id y*8 + x.
// Links at the edge of the mesh are left unconnected: minimal CEP routing and
// dimension-order diversion never use them.
//
// Interface: per node, a host send port (tx_*, a packet is taken in the cycle
// tx_valid and tx_ready are both high) and a host receive port (rx_*, one
// packet per cycle, in sequence order per source, no back pressure), plus
// per-node event strobes for observing the mechanisms: packet diversion,
// arrival on an unmapped RVC, DVC re-establishment, victim teardown, CDPs
// sent by a host and out-of-order arrivals at a destination.
// Mesh size, buffer sizes and timeout are parameters; the number of RVCs per
// link is this design's choice (the scheme does not fix it).
module dvc_mesh
  import dvc_pkg::*;
#(
  parameter int unsigned MESH_X     = 8,
  parameter int unsigned MESH_Y     = 8,
  parameter int unsigned NRVC       = 8,
  parameter int unsigned DAMQ_SLOTS = 2,
  parameter int unsigned DIV_DEPTH  = 1,
  parameter int unsigned TIMEOUT    = 40,
  parameter int unsigned ROB_DEPTH  = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tx_valid   [MESH_X*MESH_Y],
  input  logic [NODE_W-1:0]    tx_dst     [MESH_X*MESH_Y],
  input  logic [LEN_W-1:0]     tx_len     [MESH_X*MESH_Y],
  input  logic [PAYLOAD_W-1:0] tx_payload [MESH_X*MESH_Y],
  output logic                 tx_ready   [MESH_X*MESH_Y],
  output logic                 rx_valid   [MESH_X*MESH_Y],
  output logic [NODE_W-1:0]    rx_src     [MESH_X*MESH_Y],
  output logic [SEQ_W-1:0]     rx_seq     [MESH_X*MESH_Y],
  output logic [PAYLOAD_W-1:0] rx_payload [MESH_X*MESH_Y],
  output logic                 ev_divert   [MESH_X*MESH_Y],
  output logic                 ev_unmapped [MESH_X*MESH_Y],
  output logic                 ev_reest    [MESH_X*MESH_Y],
  output logic                 ev_teardown [MESH_X*MESH_Y],
  output logic                 ev_src_cdp  [MESH_X*MESH_Y],
  output logic                 ev_reorder  [MESH_X*MESH_Y]
);
  localparam int unsigned NN = MESH_X * MESH_Y;

  // link signals, indexed by node and by the port they leave / enter
  logic [NPORT-1:0] s_in_valid   [NN];
  pkt_t             s_in_pkt     [NN][NPORT];
  logic [NPORT-1:0] s_prim_ready [NN];
  logic [NPORT-1:0] s_div_ready  [NN];
  logic [NPORT-1:0] s_ctrl_ready [NN];
  logic [NPORT-1:0] s_ds_ctrl    [NN];
  logic [NPORT-1:0] s_out_valid  [NN];
  pkt_t             s_out_pkt    [NN][NPORT];
  logic [NPORT-1:0] s_ds_prim    [NN];
  logic [NPORT-1:0] s_ds_div     [NN];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;
      localparam logic [NODE_W-1:0] ID = NODE_W'(y * 8 + x);

      logic [NPORT-1:0] ev_div_p, ev_unm_p;
      logic             ev_cep_u, ev_cdp_u;

      dvc_switch #(.NRVC(NRVC), .DAMQ_SLOTS(DAMQ_SLOTS), .DIV_DEPTH(DIV_DEPTH),
                   .TIMEOUT(TIMEOUT)) u_sw (
        .clk, .rst_n, .here(ID),
        .in_valid(s_in_valid[N]), .in_pkt(s_in_pkt[N]),
        .prim_ready(s_prim_ready[N]), .div_ready(s_div_ready[N]),
        .ctrl_ready(s_ctrl_ready[N]),
        .out_valid(s_out_valid[N]), .out_pkt(s_out_pkt[N]),
        .ds_prim_ready(s_ds_prim[N]), .ds_div_ready(s_ds_div[N]),
        .ds_ctrl_ready(s_ds_ctrl[N]),
        .ev_divert(ev_div_p), .ev_reest(ev_reest[N]), .ev_unmapped(ev_unm_p),
        .ev_teardown(ev_teardown[N]), .ev_cep(ev_cep_u), .ev_cdp(ev_cdp_u)
      );
      assign ev_divert[N]   = |ev_div_p;
      assign ev_unmapped[N] = |ev_unm_p;

      // host port
      logic ej_ready;
      host_if #(.NRVC(NRVC), .ROB_DEPTH(ROB_DEPTH), .NNODE(64)) u_host (
        .clk, .rst_n, .here(ID),
        .tx_valid(tx_valid[N]), .tx_dst(tx_dst[N]), .tx_len(tx_len[N]),
        .tx_payload(tx_payload[N]), .tx_ready(tx_ready[N]),
        .inj_valid(s_in_valid[N][P_HOST]), .inj_pkt(s_in_pkt[N][P_HOST]),
        .sw_prim_ready(s_prim_ready[N][P_HOST]),
        .sw_ctrl_ready(s_ctrl_ready[N][P_HOST]),
        .ej_valid(s_out_valid[N][P_HOST]), .ej_pkt(s_out_pkt[N][P_HOST]),
        .ej_ready,
        .rx_valid(rx_valid[N]), .rx_src(rx_src[N]), .rx_seq(rx_seq[N]),
        .rx_payload(rx_payload[N]),
        .ev_reorder(ev_reorder[N]), .ev_src_cdp(ev_src_cdp[N])
      );
      assign s_ds_prim[N][P_HOST] = ej_ready;
      assign s_ds_div[N][P_HOST]  = ej_ready;
      assign s_ds_ctrl[N][P_HOST] = 1'b1;

      // x links
      if (x + 1 < MESH_X) begin : g_xp
        assign s_in_valid[N][P_XP]  = s_out_valid[N+1][P_XM];
        assign s_in_pkt[N][P_XP]    = s_out_pkt[N+1][P_XM];
        assign s_ds_prim[N][P_XP]   = s_prim_ready[N+1][P_XM];
        assign s_ds_div[N][P_XP]    = s_div_ready[N+1][P_XM];
        assign s_ds_ctrl[N][P_XP]   = s_ctrl_ready[N+1][P_XM];
      end else begin : g_xp_edge
        assign s_in_valid[N][P_XP]  = 1'b0;
        assign s_in_pkt[N][P_XP]    = '0;
        assign s_ds_prim[N][P_XP]   = 1'b0;
        assign s_ds_div[N][P_XP]    = 1'b0;
        assign s_ds_ctrl[N][P_XP]   = 1'b0;
      end
      if (x > 0) begin : g_xm
        assign s_in_valid[N][P_XM]  = s_out_valid[N-1][P_XP];
        assign s_in_pkt[N][P_XM]    = s_out_pkt[N-1][P_XP];
        assign s_ds_prim[N][P_XM]   = s_prim_ready[N-1][P_XP];
        assign s_ds_div[N][P_XM]    = s_div_ready[N-1][P_XP];
        assign s_ds_ctrl[N][P_XM]   = s_ctrl_ready[N-1][P_XP];
      end else begin : g_xm_edge
        assign s_in_valid[N][P_XM]  = 1'b0;
        assign s_in_pkt[N][P_XM]    = '0;
        assign s_ds_prim[N][P_XM]   = 1'b0;
        assign s_ds_div[N][P_XM]    = 1'b0;
        assign s_ds_ctrl[N][P_XM]   = 1'b0;
      end
      // y links
      if (y + 1 < MESH_Y) begin : g_yp
        assign s_in_valid[N][P_YP]  = s_out_valid[N+MESH_X][P_YM];
        assign s_in_pkt[N][P_YP]    = s_out_pkt[N+MESH_X][P_YM];
        assign s_ds_prim[N][P_YP]   = s_prim_ready[N+MESH_X][P_YM];
        assign s_ds_div[N][P_YP]    = s_div_ready[N+MESH_X][P_YM];
        assign s_ds_ctrl[N][P_YP]   = s_ctrl_ready[N+MESH_X][P_YM];
      end else begin : g_yp_edge
        assign s_in_valid[N][P_YP]  = 1'b0;
        assign s_in_pkt[N][P_YP]    = '0;
        assign s_ds_prim[N][P_YP]   = 1'b0;
        assign s_ds_div[N][P_YP]    = 1'b0;
        assign s_ds_ctrl[N][P_YP]   = 1'b0;
      end
      if (y > 0) begin : g_ym
        assign s_in_valid[N][P_YM]  = s_out_valid[N-MESH_X][P_YP];
        assign s_in_pkt[N][P_YM]    = s_out_pkt[N-MESH_X][P_YP];
        assign s_ds_prim[N][P_YM]   = s_prim_ready[N-MESH_X][P_YP];
        assign s_ds_div[N][P_YM]    = s_div_ready[N-MESH_X][P_YP];
        assign s_ds_ctrl[N][P_YM]   = s_ctrl_ready[N-MESH_X][P_YP];
      end else begin : g_ym_edge
        assign s_in_valid[N][P_YM]  = 1'b0;
        assign s_in_pkt[N][P_YM]    = '0;
        assign s_ds_prim[N][P_YM]   = 1'b0;
        assign s_ds_div[N][P_YM]    = 1'b0;
        assign s_ds_ctrl[N][P_YM]   = 1'b0;
      end
    end
  end
endmodule

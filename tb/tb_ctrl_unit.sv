// tb_ctrl_unit: the control unit against a model of the IMTs kept by the
// testbench (it applies the unit's IMT writes itself).
//  1. CEPs from the host port of node 9 (x=1,y=1) to node 11 (east): each
//     gets the next free RVC of the x+ output (1, 2, ... 7), the IMT entry is
//     mapped and the CEP leaves with the new RVC.
//  2. Once all seven RVCs of x+ are taken, a CEP to node 10 first tears down
//     a victim (CDP on its output RVC, IMT entry torn, RVC freed), then gets
//     that RVC.
//  3. A CEP for the node itself goes to the host port.
//  4. A CDP waits while packets of its DVC are queued, then frees the entry
//     and leaves on the DVC's output RVC.
//  5. A re-establishment request is served before the control storage and
//     does not pop it.
module tb_ctrl_unit;
  import dvc_pkg::*;
  localparam int unsigned NRVC = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NODE_W-1:0] here = 6'd9;
  logic [NPORT-1:0]  in_empty, in_pop, c_map, c_free, c_tear, reest_req, unm_hold;
  pkt_t              in_head [NPORT];
  imt_entry_t        tbl [NPORT][NRVC];
  logic [RVC_W-1:0]  unm_rvc [NPORT];
  logic [RVC_W-1:0]  c_rvc, c_orvc;
  logic [PORT_W-1:0] c_oport;
  logic [NODE_W-1:0] c_src, c_dst;
  logic [NPORT-1:0]  cq_valid, cq_pop;
  pkt_t              cq_pkt [NPORT];
  logic ev_cep, ev_reest, ev_cdp, ev_teardown;
  int checks = 0, failures = 0;

  ctrl_unit #(.NRVC(NRVC)) dut (.*);

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // IMT model: apply writes
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < NPORT; p++) begin
      if (c_map[p]) begin
        tbl[p][c_rvc].state <= RS_MAPPED; tbl[p][c_rvc].oport <= c_oport;
        tbl[p][c_rvc].orvc <= c_orvc; tbl[p][c_rvc].src <= c_src; tbl[p][c_rvc].dst <= c_dst;
      end
      if (c_free[p]) tbl[p][c_rvc].state <= RS_FREE;
      if (c_tear[p]) tbl[p][c_rvc].state <= RS_TORN;
    end

  function automatic pkt_t mk(ptype_e t, int rvc, int src, int dst);
    pkt_t k = '0;
    k.ptype = t; k.rvc = RVC_W'(rvc); k.src = NODE_W'(src); k.dst = NODE_W'(dst);
    return k;
  endfunction

  // offer one control packet on port p and wait until it is popped
  task automatic offer(int p, pkt_t k, output int waited);
    @(negedge clk);
    in_head[p] = k; in_empty[p] = 1'b0;
    #1;
    waited = 0;
    while (!in_pop[p] && waited < 50) begin @(negedge clk); waited++; end
    @(posedge clk); #1;
    in_empty[p] = 1'b1;
  endtask

  // take the next control packet out of output queue o
  task automatic take(int o, output pkt_t k);
    int n = 0;
    @(negedge clk);
    while (!cq_valid[o] && n < 50) begin @(negedge clk); n++; end
    k = cq_pkt[o];
    cq_pop[o] = 1'b1;
    @(posedge clk); #1;
    cq_pop[o] = 1'b0;
  endtask

  initial begin
    automatic pkt_t k;
    automatic int w;
    in_empty = '1; reest_req = '0; unm_hold = '0; cq_pop = '0;
    for (int p = 0; p < NPORT; p++) begin
      in_head[p] = '0; unm_rvc[p] = '0;
      for (int r = 0; r < NRVC; r++) tbl[p][r] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // 1. seven CEPs east
    for (int i = 1; i <= 7; i++) begin
      offer(0, mk(PK_CEP, i, 9, 11), w);
      check(w < 50, "CEP accepted");
      check(tbl[0][i].state == RS_MAPPED && tbl[0][i].oport == P_XP && tbl[0][i].orvc == RVC_W'(i),
            $sformatf("CEP %0d mapped to x+ rvc %0d (got port %0d rvc %0d)", i, i,
                      tbl[0][i].oport, tbl[0][i].orvc));
      take(1, k);
      check(k.ptype == PK_CEP && k.rvc == RVC_W'(i) && k.dst == 11 && k.src == 9, "CEP sent on");
    end
    // 2. x+ full: a CEP to node 10 must tear down a victim first
    tbl[0][1].npend = 4'd1;          // rvc 1 busy: not a victim
    offer(3, mk(PK_CEP, 2, 20, 10), w);
    check(w < 50, "CEP with full output eventually accepted");
    take(1, k);
    check(k.ptype == PK_CDP && k.rvc == 2, $sformatf("victim CDP on rvc 2 (got type %0d rvc %0d)", k.ptype, k.rvc));
    check(tbl[0][2].state == RS_TORN, "victim torn");
    take(1, k);
    check(k.ptype == PK_CEP && k.rvc == 2 && k.src == 20, "CEP gets the freed RVC");
    check(tbl[3][2].state == RS_MAPPED && tbl[3][2].orvc == 2, "new DVC mapped");
    // 3. CEP for this node goes to the host port
    offer(2, mk(PK_CEP, 5, 8, 9), w);
    take(0, k);
    check(k.ptype == PK_CEP && k.rvc == 1 && tbl[2][5].oport == P_HOST, "CEP to host port");
    // 4. CDP waits for queued packets
    fork
      offer(0, mk(PK_CDP, 1, 0, 0), w);
      begin
        repeat (10) @(posedge clk);
        check(tbl[0][1].state == RS_MAPPED, "CDP held while packets queued");
        tbl[0][1].npend = 4'd0;
      end
    join
    check(w >= 10 && tbl[0][1].state == RS_FREE, "CDP freed entry after queue drained");
    take(1, k);
    check(k.ptype == PK_CDP && k.rvc == 1, "CDP sent on output RVC");
    // 5. re-establishment request of the torn victim (port 0, rvc 2)
    @(negedge clk);
    in_head[4] = mk(PK_CEP, 6, 40, 1); in_empty[4] = 1'b0;
    reest_req[0] = 1'b1; unm_rvc[0] = 3'd2; unm_hold[0] = 1'b1;
    #1;
    check(ev_reest && c_map[0] && c_rvc == 2 && in_pop == 0, "re-establishment first, no pop");
    check(c_src == 9 && c_dst == 11 && c_oport == P_XP, "re-establishment uses IMT info");
    @(posedge clk); #1;
    reest_req[0] = 1'b0; unm_hold[0] = 1'b0; in_empty[4] = 1'b1;
    take(1, k);
    check(k.ptype == PK_CEP && k.src == 9 && k.dst == 11, "re-establishment CEP sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dvc_switch: one switch (node 9, x=1 y=1) with its neighbours and host
// modelled by the testbench, which records every packet the switch sends.
// Checks:
//  - a CEP from the host to node 11 leaves on x+ with an allocated RVC, and
//    the data packets that follow leave on x+ with that RVC (the first one
//    with its sequence number), each after the previous one's last phit;
//  - CEPs from x- and y- for node 9 leave on the host port, and data packets
//    competing for the busy host link leave oldest first;
//  - with x+ refusing primary packets, a data packet is diverted onto the
//    diversion BVC of x+ after the timeout.
module tb_dvc_switch;
  import dvc_pkg::*;
  localparam int unsigned TO = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NODE_W-1:0] here = 6'd9;
  logic [NPORT-1:0] in_valid, prim_ready, div_ready, ctrl_ready, out_valid;
  logic [NPORT-1:0] ds_prim_ready, ds_div_ready, ds_ctrl_ready;
  pkt_t in_pkt [NPORT], out_pkt [NPORT];
  logic [NPORT-1:0] ev_divert, ev_unmapped;
  logic ev_reest, ev_teardown, ev_cep, ev_cdp;
  int checks = 0, failures = 0;
  int cyc = 0;

  dvc_switch #(.NRVC(8), .DAMQ_SLOTS(2), .DIV_DEPTH(1), .TIMEOUT(TO)) dut (.*);

  pkt_t got   [NPORT][$];
  int   got_t [NPORT][$];
  always @(posedge clk) begin
    cyc++;
    for (int o = 0; o < NPORT; o++)
      if (out_valid[o]) begin got[o].push_back(out_pkt[o]); got_t[o].push_back(cyc); end
  end

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic pkt_t cep(int rvc, int src, int dst);
    pkt_t k = '0;
    k.ptype = PK_CEP; k.rvc = RVC_W'(rvc); k.src = NODE_W'(src); k.dst = NODE_W'(dst);
    return k;
  endfunction
  function automatic pkt_t data(int rvc, bit hs, int seq, int pay);
    pkt_t k = '0;
    k.ptype = PK_DATA; k.rvc = RVC_W'(rvc); k.has_seq = hs; k.seq = SEQ_W'(seq);
    k.len = 5'd31; k.is_max = 1'b1; k.payload = 32'(pay);
    return k;
  endfunction

  // present a packet on input i for one cycle, waiting for room first
  task automatic send(int i, pkt_t k);
    @(negedge clk);
    while (k.ptype == PK_DATA && !(k.rvc == DIV_RVC ? div_ready[i] : prim_ready[i])) @(negedge clk);
    in_pkt[i] = k; in_valid[i] = 1'b1;
    @(posedge clk); #1;
    in_valid[i] = 1'b0;
  endtask

  initial begin
    in_valid = '0;
    for (int i = 0; i < NPORT; i++) in_pkt[i] = '0;
    ds_prim_ready = '1; ds_div_ready = '1; ds_ctrl_ready = '1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // host -> node 11 (east)
    send(P_HOST, cep(1, 9, 11));
    send(P_HOST, data(1, 1, 0, 10));
    send(P_HOST, data(1, 0, 0, 11));
    // west and south -> this node
    send(P_XM, cep(2, 8, 9));
    send(P_YM, cep(3, 1, 9));
    repeat (40) @(posedge clk);
    check(got[P_XP].size() == 3, $sformatf("three packets on x+ (got %0d)", got[P_XP].size()));
    if (got[P_XP].size() == 3) begin
      check(got[P_XP][0].ptype == PK_CEP && got[P_XP][0].rvc == 1 && got[P_XP][0].dst == 11, "CEP on x+");
      check(got[P_XP][1].ptype == PK_DATA && got[P_XP][1].rvc == 1 && got[P_XP][1].has_seq &&
            got[P_XP][1].payload == 10, "first data on DVC RVC with seq");
      check(got[P_XP][2].rvc == 1 && !got[P_XP][2].has_seq && got[P_XP][2].payload == 11,
            "second data without seq");
      // first data packet: RVC phit + sequence phit + 31 data phits
      check(got_t[P_XP][2] - got_t[P_XP][1] == 33, $sformatf("data packets %0d cycles apart, expected 33",
            got_t[P_XP][2] - got_t[P_XP][1]));
    end
    check(got[P_HOST].size() == 2 && got[P_HOST][0].ptype == PK_CEP && got[P_HOST][1].ptype == PK_CEP,
          "CEPs to the host port");

    // competition for the host link: A (west), B (south), C (west)
    fork
      send(P_XM, data(2, 1, 0, 1));
      begin @(posedge clk); send(P_YM, data(3, 1, 0, 2)); end
      begin repeat (2) @(posedge clk); send(P_XM, data(2, 0, 0, 3)); end
    join
    repeat (120) @(posedge clk);
    check(got[P_HOST].size() == 5, "three data packets to the host");
    if (got[P_HOST].size() == 5)
      check(got[P_HOST][2].payload == 1 && got[P_HOST][3].payload == 2 && got[P_HOST][4].payload == 3,
            "oldest first on the host link");

    // diversion: x+ refuses primary packets
    ds_prim_ready[P_XP] = 1'b0;
    send(P_HOST, data(1, 0, 0, 12));
    repeat (TO + 5) @(posedge clk);
    check(got[P_XP].size() == 4, "diverted packet left on x+");
    if (got[P_XP].size() == 4)
      check(got[P_XP][3].rvc == DIV_RVC && got[P_XP][3].src == 9 && got[P_XP][3].dst == 11 &&
            got[P_XP][3].has_seq && got[P_XP][3].seq == 2 && got[P_XP][3].payload == 12,
            "diverted header: DIV_RVC, DVC id, seq 2");
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

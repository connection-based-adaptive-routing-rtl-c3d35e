// tb_input_port: one input port, with the testbench playing the control
// unit and the crossbar. Checks, in order:
//  - a CEP goes to the control storage; a data packet arriving before the
//    CEP is processed is held as unmapped and blocks the primary BVC;
//  - after mapping it is offered on the mapped output with the output RVC
//    and (first packet) its sequence number; the next one goes without;
//  - a packet blocked at a queue head is offered for diversion exactly
//    TIMEOUT cycles after it arrived, on the dimension-order port, with RVC
//    DIV_RVC, source, destination and sequence number, and the next packet
//    sent normally carries its sequence number again;
//  - a diverted packet for this node is offered to the host port;
//  - after a teardown a data packet raises a re-establishment request and
//    leaves on the new route with its sequence number.
module tb_input_port;
  import dvc_pkg::*;
  localparam int unsigned TO = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NODE_W-1:0] here = 6'd9;
  logic [TIME_W-1:0] now;
  logic in_valid, prim_ready, div_ready, ctrl_ready;
  pkt_t in_pkt, req_pkt, ctrl_head;
  logic [NPORT-1:0] out_avail_prim, out_avail_div;
  logic req_valid, grant, ctrl_empty, ctrl_pop;
  logic [PORT_W-1:0] req_port, c_oport;
  logic [TIME_W-1:0] req_time;
  logic c_map, c_free, c_tear;
  logic [RVC_W-1:0] c_rvc, c_orvc, unm_rvc;
  logic [NODE_W-1:0] c_src, c_dst;
  imt_entry_t tbl [8];
  logic reest_req, unm_hold, ev_divert, ev_unmapped;
  int checks = 0, failures = 0;

  input_port #(.NRVC(8), .DAMQ_SLOTS(2), .DIV_DEPTH(1), .TIMEOUT(TO)) dut (.*);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0; else now <= now + 1'b1;

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic pkt_t data(int rvc, bit hs, int seq, int pay);
    pkt_t k = '0;
    k.ptype = PK_DATA; k.rvc = RVC_W'(rvc); k.has_seq = hs; k.seq = SEQ_W'(seq);
    k.len = 5'd31; k.is_max = 1'b1; k.payload = 32'(pay);
    return k;
  endfunction

  task automatic send(pkt_t k);
    @(negedge clk);
    in_pkt = k; in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
  endtask

  // wait for an offer, grant it and return it
  task automatic take(output pkt_t k, output logic [PORT_W-1:0] port, output int waited);
    waited = 0;
    @(negedge clk);
    while (!req_valid && waited < 100) begin @(negedge clk); waited++; end
    k = req_pkt; port = req_port;
    grant = 1'b1;
    @(posedge clk); #1;
    grant = 1'b0;
  endtask

  task automatic map(int rvc, int oport, int orvc);
    @(negedge clk);
    c_map = 1'b1; c_rvc = RVC_W'(rvc); c_oport = PORT_W'(oport); c_orvc = RVC_W'(orvc);
    c_src = 6'd9; c_dst = 6'd11;
    @(posedge clk); #1;
    c_map = 1'b0;
  endtask

  initial begin
    automatic pkt_t k;
    automatic logic [PORT_W-1:0] port;
    automatic int w;
    in_valid = 0; in_pkt = '0; grant = 0; ctrl_pop = 0;
    c_map = 0; c_free = 0; c_tear = 0; c_rvc = '0; c_orvc = '0; c_oport = '0; c_src = '0; c_dst = '0;
    out_avail_prim = '1; out_avail_div = '1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // CEP, then data before the CEP is processed
    k = '0; k.ptype = PK_CEP; k.rvc = 3'd3; k.src = 6'd9; k.dst = 6'd11;
    send(k);
    check(!ctrl_empty && ctrl_head.ptype == PK_CEP && ctrl_head.rvc == 3, "CEP stored");
    send(data(3, 1, 0, 100));
    check(!prim_ready && !req_valid, "unmapped packet held, primary BVC closed");
    @(negedge clk);
    ctrl_pop = 1'b1;
    c_map = 1'b1; c_rvc = 3'd3; c_oport = P_XP; c_orvc = 3'd5; c_src = 6'd9; c_dst = 6'd11;
    @(posedge clk); #1;
    ctrl_pop = 1'b0; c_map = 1'b0;
    take(k, port, w);
    check(port == P_XP && k.rvc == 5 && k.has_seq && k.seq == 0 && k.payload == 100,
          $sformatf("first packet: port %0d rvc %0d hs %0d seq %0d", port, k.rvc, k.has_seq, k.seq));
    check(prim_ready, "primary BVC open again");
    send(data(3, 0, 0, 101));
    take(k, port, w);
    check(port == P_XP && k.rvc == 5 && !k.has_seq && k.payload == 101, "second packet: no seq");

    // timeout diversion
    out_avail_prim[P_XP] = 1'b0;
    send(data(3, 0, 0, 102));
    begin
      automatic int c = 0;   // clock edges since the arrival edge
      while (!req_valid && c < 100) begin @(posedge clk); #1; c++; end
      check(c == TO, $sformatf("diversion offered after %0d cycles, expected %0d", c, TO));
    end
    take(k, port, w);
    check(port == P_XP && k.rvc == DIV_RVC && k.src == 9 && k.dst == 11 && k.has_seq && k.seq == 2,
          $sformatf("diverted: port %0d rvc %0d seq %0d", port, k.rvc, k.seq));
    check(tbl[3].need_seq && tbl[3].npend == 0, "need_seq set after diversion");
    out_avail_prim[P_XP] = 1'b1;
    send(data(3, 0, 0, 103));
    take(k, port, w);
    check(k.rvc == 5 && k.has_seq && k.seq == 3, "packet after diversion carries seq 3");

    // diverted packet for this node
    k = data(0, 1, 7, 200); k.src = 6'd1; k.dst = 6'd9;
    send(k);
    take(k, port, w);
    check(port == P_HOST && k.rvc == DIV_RVC && k.payload == 200, "diverted packet to host port");

    // teardown and re-establishment
    @(negedge clk); c_tear = 1'b1; c_rvc = 3'd3; @(posedge clk); #1; c_tear = 1'b0;
    send(data(3, 0, 0, 104));
    check(reest_req && unm_rvc == 3 && unm_hold, "re-establishment requested");
    map(3, P_YP, 2);
    take(k, port, w);
    check(port == P_YP && k.rvc == 2 && k.has_seq && k.seq == 4 && k.payload == 104,
          $sformatf("re-established route: port %0d rvc %0d seq %0d", port, k.rvc, k.seq));
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

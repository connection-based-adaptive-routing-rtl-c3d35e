// tb_host_if: host interface with three RVCs on the host link (two usable).
// Sending side: a packet to a new destination is preceded by a CEP on a free
// RVC; the first data packet carries sequence number 0, later ones none;
// when the RVCs run out an existing DVC is destroyed with a CDP, and a new
// DVC to an earlier destination continues that destination's sequence.
// Receiving side: implicit sequence numbers are counted per RVC, a diverted
// packet that arrives early waits in the reorder buffer and is delivered
// right after the packet before it.
module tb_host_if;
  import dvc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NODE_W-1:0] here = 6'd12;
  logic tx_valid, tx_ready, inj_valid, sw_prim_ready, sw_ctrl_ready, ej_valid, ej_ready;
  logic [NODE_W-1:0] tx_dst, rx_src;
  logic [LEN_W-1:0] tx_len;
  logic [PAYLOAD_W-1:0] tx_payload, rx_payload;
  pkt_t inj_pkt, ej_pkt;
  logic rx_valid, ev_reorder, ev_src_cdp;
  logic [SEQ_W-1:0] rx_seq;
  int checks = 0, failures = 0;

  host_if #(.NRVC(3), .ROB_DEPTH(4), .NNODE(64)) dut (.*);

  pkt_t inj [$];
  logic [NODE_W-1:0] rxs [$];
  logic [SEQ_W-1:0]  rxq [$];
  logic [PAYLOAD_W-1:0] rxp [$];
  int n_reorder = 0;
  always @(posedge clk) begin
    if (ev_reorder) n_reorder++;
    if (inj_valid) inj.push_back(inj_pkt);
    if (rx_valid) begin rxs.push_back(rx_src); rxq.push_back(rx_seq); rxp.push_back(rx_payload); end
  end

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic tx(int dst, int pay);
    int n = 0;
    @(negedge clk);
    tx_valid = 1'b1; tx_dst = NODE_W'(dst); tx_len = 5'd3; tx_payload = 32'(pay);
    #1;
    while (!tx_ready && n < 200) begin @(negedge clk); #1; n++; end
    @(posedge clk); #1;
    tx_valid = 1'b0;
  endtask

  task automatic ej(pkt_t k);
    @(negedge clk);
    ej_pkt = k; ej_valid = 1'b1;
    @(posedge clk); #1;
    ej_valid = 1'b0;
  endtask

  function automatic string show(pkt_t k);
    return $sformatf("type %0d rvc %0d dst %0d hs %0d seq %0d", k.ptype, k.rvc, k.dst, k.has_seq, k.seq);
  endfunction

  initial begin
    automatic pkt_t k;
    tx_valid = 0; tx_dst = '0; tx_len = '0; tx_payload = '0;
    sw_prim_ready = 1; sw_ctrl_ready = 1; ej_valid = 0; ej_pkt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    tx(20, 1); tx(20, 2); tx(21, 3); tx(22, 4); tx(20, 5);
    repeat (10) @(posedge clk);
    check(inj.size() == 11, $sformatf("eleven packets injected (got %0d)", inj.size()));
    if (inj.size() == 11) begin
      check(inj[0].ptype == PK_CEP && inj[0].rvc == 1 && inj[0].dst == 20 && inj[0].src == 12, "CEP to 20 on rvc 1");
      check(inj[1].ptype == PK_DATA && inj[1].rvc == 1 && inj[1].has_seq && inj[1].seq == 0, "first data seq 0");
      check(inj[2].ptype == PK_DATA && inj[2].rvc == 1 && !inj[2].has_seq, "second data no seq");
      check(inj[3].ptype == PK_CEP && inj[3].rvc == 2 && inj[3].dst == 21, "CEP to 21 on rvc 2");
      check(inj[4].ptype == PK_DATA && inj[4].rvc == 2 && inj[4].has_seq && inj[4].seq == 0, "data to 21");
      check(inj[5].ptype == PK_CDP && inj[5].rvc == 1, $sformatf("victim CDP on rvc 1: %s", show(inj[5])));
      check(inj[6].ptype == PK_CEP && inj[6].rvc == 1 && inj[6].dst == 22, "CEP to 22 on rvc 1");
      check(inj[7].ptype == PK_DATA && inj[7].rvc == 1 && inj[7].seq == 0 && inj[7].has_seq, "data to 22");
      check(inj[8].ptype == PK_CDP && inj[8].rvc == 2, "victim CDP on rvc 2");
      check(inj[9].ptype == PK_CEP && inj[9].rvc == 2 && inj[9].dst == 20, "new DVC to 20");
      check(inj[10].ptype == PK_DATA && inj[10].has_seq && inj[10].seq == 2 && inj[10].payload == 5,
            $sformatf("sequence to 20 continues at 2: %s", show(inj[10])));
    end

    // receiving
    k = '0; k.ptype = PK_CEP; k.rvc = 3'd1; k.src = 6'd5; k.dst = 6'd12; ej(k);
    k = '0; k.ptype = PK_DATA; k.rvc = 3'd1; k.has_seq = 1; k.seq = 8'd0; k.payload = 32'hA0; ej(k);
    k = '0; k.ptype = PK_DATA; k.rvc = 3'd1; k.payload = 32'hA1; ej(k);
    k = '0; k.ptype = PK_DATA; k.rvc = DIV_RVC; k.src = 6'd5; k.dst = 6'd12; k.has_seq = 1;
    k.seq = 8'd3; k.payload = 32'hA3; ej(k);
    check(rxs.size() == 2 && n_reorder == 1, "early packet held back");
    k = '0; k.ptype = PK_DATA; k.rvc = 3'd1; k.has_seq = 1; k.seq = 8'd2; k.payload = 32'hA2; ej(k);
    repeat (3) @(posedge clk);
    check(rxs.size() == 4, $sformatf("four deliveries (got %0d)", rxs.size()));
    if (rxs.size() == 4)
      for (int i = 0; i < 4; i++)
        check(rxs[i] == 5 && rxq[i] == SEQ_W'(i) && rxp[i] == 32'hA0 + i,
              $sformatf("delivery %0d: src %0d seq %0d payload %h", i, rxs[i], rxq[i], rxp[i]));
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

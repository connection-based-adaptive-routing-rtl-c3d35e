// tb_imt: directed operations on the Input Mapping Table: map a DVC, count
// packets in and out, record sequence numbers and need_seq, tear down (the
// DVC information must be kept) and free; other entries must not change.
module tb_imt;
  import dvc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic c_map, c_free, c_tear, i_enq, i_fwd, i_fwd_need;
  logic [RVC_W-1:0] c_rvc, c_orvc, i_enq_rvc, i_fwd_rvc;
  logic [PORT_W-1:0] c_oport;
  logic [NODE_W-1:0] c_src, c_dst;
  logic [SEQ_W-1:0] i_fwd_seq;
  imt_entry_t tbl [8];
  int checks = 0, failures = 0;

  imt #(.NRVC(8)) dut (.*);

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic idle();
    c_map = 0; c_free = 0; c_tear = 0; i_enq = 0; i_fwd = 0; i_fwd_need = 0;
  endtask
  task automatic step();
    @(posedge clk); #1; idle();
  endtask

  initial begin
    idle();
    c_rvc = '0; c_orvc = '0; c_oport = '0; c_src = '0; c_dst = '0;
    i_enq_rvc = '0; i_fwd_rvc = '0; i_fwd_seq = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int r = 0; r < 8; r++) check(tbl[r].state == RS_FREE && tbl[r].npend == 0, "reset");
    // map RVC 3 -> port 2 RVC 5, 9 -> 33
    c_map = 1; c_rvc = 3; c_oport = 2; c_orvc = 5; c_src = 9; c_dst = 33;
    step();
    check(tbl[3].state == RS_MAPPED && tbl[3].oport == 2 && tbl[3].orvc == 5 &&
          tbl[3].src == 9 && tbl[3].dst == 33 && tbl[3].need_seq, "map");
    check(tbl[2].state == RS_FREE && tbl[4].state == RS_FREE, "neighbours untouched");
    // two packets queued, one leaves in the same cycle as another arrives
    i_enq = 1; i_enq_rvc = 3; step();
    i_enq = 1; i_enq_rvc = 3; step();
    check(tbl[3].npend == 2, "two queued");
    i_enq = 1; i_enq_rvc = 3; i_fwd = 1; i_fwd_rvc = 3; i_fwd_seq = 8'd0; i_fwd_need = 0; step();
    check(tbl[3].npend == 2 && tbl[3].seq == 0 && !tbl[3].need_seq, "in and out together");
    i_fwd = 1; i_fwd_rvc = 3; i_fwd_seq = 8'd1; i_fwd_need = 1; step();
    check(tbl[3].npend == 1 && tbl[3].seq == 1 && tbl[3].need_seq, "diverted: need_seq set");
    i_fwd = 1; i_fwd_rvc = 3; i_fwd_seq = 8'd2; i_fwd_need = 0; step();
    check(tbl[3].npend == 0 && tbl[3].seq == 2 && !tbl[3].need_seq, "forwarded");
    // tear down keeps the information
    c_tear = 1; c_rvc = 3; step();
    check(tbl[3].state == RS_TORN && tbl[3].src == 9 && tbl[3].dst == 33 && tbl[3].seq == 2,
          "torn keeps DVC info");
    // re-map on another output keeps the sequence number
    c_map = 1; c_rvc = 3; c_oport = 4; c_orvc = 1; c_src = 9; c_dst = 33; step();
    check(tbl[3].state == RS_MAPPED && tbl[3].oport == 4 && tbl[3].orvc == 1 &&
          tbl[3].seq == 2 && tbl[3].need_seq, "re-established");
    c_free = 1; c_rvc = 3; step();
    check(tbl[3].state == RS_FREE, "freed");
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

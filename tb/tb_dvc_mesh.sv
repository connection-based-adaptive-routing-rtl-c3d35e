// tb_dvc_mesh: end-to-end test of the DVC mesh.
//
// A 4 x 4 mesh with few RVCs per link and a short diversion timeout, so that
// every mechanism is exercised: each host first sends a burst of transpose
// traffic ((x,y) -> (y,x)), then packets to random destinations. Every packet
// carries its source, destination and per-pair count in its payload. The test
// checks that every packet is delivered exactly once, at the right node, in
// order per source (the delivered sequence number and the payload count both
// match what the receiver expects), and counts how often each mechanism
// happened: diversion, arrival on an unmapped RVC, re-establishment of a torn
// DVC, victim teardown, CDPs from a host, and out-of-order arrival handled by
// the reorder buffer. A mechanism that never happened counts as a failure.
module tb_dvc_mesh;
  import dvc_pkg::*;

  localparam int unsigned MX = 4, MY = 4, NN = MX * MY;
  localparam int unsigned N_TRANS = 6;    // transpose packets per sender
  localparam int unsigned N_RAND  = 24;   // random-destination packets per sender
  localparam int unsigned MAXCYC  = 200000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 tx_valid   [NN];
  logic [NODE_W-1:0]    tx_dst     [NN];
  logic [LEN_W-1:0]     tx_len     [NN];
  logic [PAYLOAD_W-1:0] tx_payload [NN];
  logic                 tx_ready   [NN];
  logic                 rx_valid   [NN];
  logic [NODE_W-1:0]    rx_src     [NN];
  logic [SEQ_W-1:0]     rx_seq     [NN];
  logic [PAYLOAD_W-1:0] rx_payload [NN];
  logic ev_divert [NN], ev_unmapped [NN], ev_reest [NN], ev_teardown [NN];
  logic ev_src_cdp [NN], ev_reorder [NN];

  dvc_mesh #(.MESH_X(MX), .MESH_Y(MY), .NRVC(3), .DAMQ_SLOTS(2), .DIV_DEPTH(1),
             .TIMEOUT(8), .ROB_DEPTH(8)) dut (.*);

  int checks = 0, failures = 0;
  int sent_pair [64][64];
  int rcvd_pair [64][64];
  int total_sent = 0, total_rcvd = 0;
  int n_div = 0, n_unm = 0, n_reest = 0, n_tear = 0, n_scdp = 0, n_reord = 0;
  int cyc = 0;

  function automatic logic [NODE_W-1:0] id_of(int n);
    return NODE_W'((n / MX) * 8 + (n % MX));
  endfunction
  function automatic int idx_of(logic [NODE_W-1:0] id);
    return int'(id[5:3]) * MX + int'(id[2:0]);
  endfunction

  // per-node traffic
  int left_t [NN], left_r [NN];
  logic [NODE_W-1:0] next_dst [NN];

  function automatic logic [NODE_W-1:0] pick(int n, bit transpose);
    int d;
    if (transpose) return NODE_W'((n % MX) * 8 + (n / MX));
    do d = int'($urandom_range(NN - 1)); while (d == n);
    return id_of(d);
  endfunction

  initial begin
    for (int a = 0; a < 64; a++) for (int b = 0; b < 64; b++) begin
      sent_pair[a][b] = 0; rcvd_pair[a][b] = 0;
    end
    for (int n = 0; n < NN; n++) begin
      left_t[n]     = ((n % MX) == (n / MX)) ? 0 : N_TRANS;  // diagonal sends nothing
      left_r[n]     = N_RAND;
      next_dst[n]   = pick(n, left_t[n] != 0);
      tx_valid[n]   = 1'b0;
      tx_dst[n]     = '0;
      tx_len[n]     = '0;
      tx_payload[n] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  // drive the hosts
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      automatic logic [NODE_W-1:0] s = id_of(n);
      if (tx_valid[n] && tx_ready[n]) begin
        sent_pair[s][tx_dst[n]]++;
        total_sent++;
        if (left_t[n] != 0) left_t[n]--; else left_r[n]--;
        next_dst[n] = pick(n, left_t[n] != 0);
      end
      if (left_t[n] + left_r[n] > 0) begin
        automatic logic [NODE_W-1:0] d = next_dst[n];
        tx_valid[n]   <= 1'b1;
        tx_dst[n]     <= d;
        tx_len[n]     <= LEN_W'(($urandom_range(3) == 0) ? $urandom_range(31) : 31);
        tx_payload[n] <= {8'hA5, s, d, 12'(sent_pair[s][d])};
      end else begin
        tx_valid[n]   <= 1'b0;
      end
    end
  end

  // check deliveries and count events
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int n = 0; n < NN; n++) begin
      automatic logic [NODE_W-1:0] me = id_of(n);
      if (rx_valid[n]) begin
        automatic logic [NODE_W-1:0] ps = rx_payload[n][23:18];
        automatic logic [NODE_W-1:0] pd = rx_payload[n][17:12];
        automatic int pc = int'(rx_payload[n][11:0]);
        checks++;
        if (rx_payload[n][31:24] != 8'hA5 || pd != me || ps != rx_src[n] ||
            pc != rcvd_pair[ps][me] || rx_seq[n] != SEQ_W'(rcvd_pair[ps][me])) begin
          failures++;
          $display("FAIL node %0d: got src %0d dst %0d count %0d seq %0d, expected count %0d",
                   me, ps, pd, pc, rx_seq[n], rcvd_pair[ps][me]);
        end
        rcvd_pair[ps][me]++;
        total_rcvd++;
      end
      n_div   += int'(ev_divert[n]);
      n_unm   += int'(ev_unmapped[n]);
      n_reest += int'(ev_reest[n]);
      n_tear  += int'(ev_teardown[n]);
      n_scdp  += int'(ev_src_cdp[n]);
      n_reord += int'(ev_reorder[n]);
    end
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end else
      $display("  %-28s %0d", what, n);
  endtask

  initial begin
    automatic int expected = 0;
    for (int n = 0; n < NN; n++)
      expected += (((n % MX) == (n / MX)) ? 0 : N_TRANS) + N_RAND;
    wait (rst_n);
    wait (total_rcvd == expected || cyc >= MAXCYC);
    repeat (50) @(posedge clk);
    checks++;
    if (total_rcvd != expected || total_sent != expected) begin
      failures++;
      $display("FAIL: sent %0d received %0d of %0d after %0d cycles",
               total_sent, total_rcvd, expected, cyc);
    end
    $display("delivered %0d packets in %0d cycles", total_rcvd, cyc);
    need("diversions", n_div);
    need("unmapped arrivals", n_unm);
    need("re-establishments", n_reest);
    need("victim teardowns", n_tear);
    need("host CDPs", n_scdp);
    need("out-of-order arrivals", n_reord);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dvc_mesh_full: the DVC mesh at its default size and settings (8 x 8
// nodes, 8 RVCs per link, 64-phit primary buffers, one-packet diversion
// buffers, timeout 40), running the three traffic patterns the design was
// evaluated with, one after the other: transpose ((x,y) -> (y,x), nodes on
// the diagonal stay silent), bit reversal (the six bits of the node id
// reversed; nodes mapping to themselves stay silent) and uniform random
// destinations. Every packet must be delivered exactly once, at its
// destination, in order per source. The counts of each mechanism are
// reported, and a mechanism that never happened counts as a failure. The
// wait for delivery is bounded by MAXCYC cycles, which acts as the watchdog.
module tb_dvc_mesh_full;
  import dvc_pkg::*;

  localparam int unsigned MX = 8, MY = 8, NN = MX * MY;
  localparam int unsigned N_PAT = 8;      // packets per sender and pattern
  localparam int unsigned MAXCYC  = 400000;

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

  dvc_mesh dut (.*);

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

  // per-node traffic: pattern 0 transpose, 1 bit reversal, 2 uniform
  int pat [NN], left [NN];
  logic [NODE_W-1:0] next_dst [NN];

  function automatic logic [NODE_W-1:0] fixed_dst(int n, int p);
    logic [NODE_W-1:0] id = id_of(n);
    if (p == 0) return NODE_W'((n % MX) * 8 + (n / MX));
    return {id[0], id[1], id[2], id[3], id[4], id[5]};
  endfunction

  function automatic int count_for(int n, int p);
    if (p < 2 && fixed_dst(n, p) == id_of(n)) return 0;
    return N_PAT;
  endfunction

  function automatic logic [NODE_W-1:0] pick(int n, int p);
    int d;
    if (p < 2) return fixed_dst(n, p);
    do d = int'($urandom_range(NN - 1)); while (d == n);
    return id_of(d);
  endfunction

  // move node n to its next pattern with packets left
  task automatic advance(int n);
    while (pat[n] < 3 && left[n] == 0) begin
      pat[n]++;
      if (pat[n] < 3) left[n] = count_for(n, pat[n]);
    end
    if (pat[n] < 3) next_dst[n] = pick(n, pat[n]);
  endtask

  initial begin
    for (int a = 0; a < 64; a++) for (int b = 0; b < 64; b++) begin
      sent_pair[a][b] = 0; rcvd_pair[a][b] = 0;
    end
    for (int n = 0; n < NN; n++) begin
      pat[n]        = 0;
      left[n]       = count_for(n, 0);
      advance(n);
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
        left[n]--;
        advance(n);
      end
      if (pat[n] < 3) begin
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
    $display("  %-28s %0d", what, n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    automatic int expected = 0;
    for (int n = 0; n < NN; n++)
      for (int p = 0; p < 3; p++) expected += count_for(n, p);
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

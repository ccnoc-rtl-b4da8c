// tb_ccnoc_top: end-to-end test of the full 4x4 dual-network interconnect
// at its default sizes.
// 1) Zero-load latency from endpoint 0 (tile 0, core) to endpoint 31
//    (tile 15, L2), 7 switches apart, for each message kind. Expected cycles
//    from acceptance to delivery: 1 (packetizer) + flits + 7 switches:
//    short request 10, long request 21, short response 9, long response 13.
// 2) Random traffic: every endpoint sends NMSG messages to random endpoints;
//    half requests (93% short), half responses (86% long), the short/long
//    shares of the published traffic study. Receivers are randomly not
//    ready. Every message must arrive intact at its destination, in the
//    order its source sent it to that destination, across both networks.
// Mechanisms counted (each must occur): switch output stalled by `off`,
// several head flits contending for one output, head flit waiting for an output
// that an earlier packet still holds (wormhole reservation), a message parked for reordering, a
// network interface refusing a message because its packetizer is busy,
// and short and long messages on both networks.
module tb_ccnoc_top;
  import ccnoc_pkg::*;
  localparam int NE = NUM_EP, NMSG = 200;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [NE-1:0] tx_valid, tx_ready, rx_valid, rx_ready, parked;
  msg_t tx_msg [NE], rx_msg [NE];

  ccnoc_top dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- scoreboard ----------------
  msg_t exp_q [NE][NE][$];   // [src][dst]
  int   seq_tx [NE][NE];
  int   nsent = 0, nrecv = 0;
  int   n_kind [4];          // short req, long req, short resp, long resp
  int   n_parked = 0, n_tx_stall = 0;

  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < NE; e++) begin
      if (parked[e]) n_parked++;
      if (tx_valid[e] && !tx_ready[e]) n_tx_stall++;
      if (tx_valid[e] && tx_ready[e]) begin
        msg_t m;
        int d;
        m = tx_msg[e];
        d = int'(m.hdr.dst);
        m.hdr.src = EP_W'(e);
        m.hdr.seq = SEQ_W'(seq_tx[e][d]);
        if (!m.hdr.is_long) m.data = '0;
        seq_tx[e][d]++;
        exp_q[e][d].push_back(m);
        n_kind[2 * int'(m.cls) + int'(m.hdr.is_long)]++;
        nsent++;
      end
      if (rx_valid[e] && rx_ready[e]) begin
        int s;
        s = int'(rx_msg[e].hdr.src);
        checks++;
        if (int'(rx_msg[e].hdr.dst) != e || exp_q[s][e].size() == 0 ||
            rx_msg[e] != exp_q[s][e][0]) begin
          failures++;
          $display("ep %0d: wrong message from %0d seq %0d cls %0d", e, s,
                   rx_msg[e].hdr.seq, rx_msg[e].cls);
        end else void'(exp_q[s][e].pop_front());
        nrecv++;
      end
    end
  end

  // ---------------- switch-level event counters ----------------
  int n_off [2], n_cont [2], n_hold [2];
  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      always @(posedge clk) if (rst_n) begin
        for (int o = 0; o < NPORTS; o++) begin
          if (dut.u_req_net.g_y[y].g_x[x].u_sw.sel_valid[o] &&
              !dut.u_req_net.g_y[y].g_x[x].u_sw.out_on[o]) n_off[0]++;
          if (dut.u_resp_net.g_y[y].g_x[x].u_sw.sel_valid[o] &&
              !dut.u_resp_net.g_y[y].g_x[x].u_sw.out_on[o]) n_off[1]++;
          if ($countones(dut.u_req_net.g_y[y].g_x[x].u_sw.arb_req[o]) > 1) n_cont[0]++;
          if ($countones(dut.u_resp_net.g_y[y].g_x[x].u_sw.arb_req[o]) > 1) n_cont[1]++;
          for (int i = 0; i < NPORTS; i++)
            if (dut.u_req_net.g_y[y].g_x[x].u_sw.owner_valid[o] &&
                dut.u_req_net.g_y[y].g_x[x].u_sw.buf_valid[i] &&
                dut.u_req_net.g_y[y].g_x[x].u_sw.buf_flit[i][REQ_FLIT_W] &&
                dut.u_req_net.g_y[y].g_x[x].u_sw.route[i] == port_e'(o)) n_hold[0]++;
          for (int i = 0; i < NPORTS; i++)
            if (dut.u_resp_net.g_y[y].g_x[x].u_sw.owner_valid[o] &&
                dut.u_resp_net.g_y[y].g_x[x].u_sw.buf_valid[i] &&
                dut.u_resp_net.g_y[y].g_x[x].u_sw.buf_flit[i][RESP_FLIT_W] &&
                dut.u_resp_net.g_y[y].g_x[x].u_sw.route[i] == port_e'(o)) n_hold[1]++;
        end
      end
    end
  end

  function automatic msg_t mk_msg(int dst, msg_class_e c, logic is_long);
    msg_t m;
    m.cls = c;
    m.hdr = {$urandom, $urandom, $urandom};
    m.hdr.dst = EP_W'(dst);
    m.hdr.is_long = is_long;
    for (int b = 0; b < BLOCK_BITS / 32; b++) m.data[b*32 +: 32] = $urandom;
    return m;
  endfunction

  // zero-load latency of one message, endpoint 0 -> 31
  task automatic latency(input msg_class_e c, input logic is_long, input int want);
    int t0, t1;
    @(negedge clk);
    tx_valid[0] = 1'b1;
    tx_msg[0]   = mk_msg(31, c, is_long);
    @(posedge clk);
    t0 = cyc;
    #1;
    tx_valid[0] = 1'b0;
    while (!rx_valid[31]) @(posedge clk);
    t1 = cyc;
    checks++;
    if (t1 - t0 != want) begin
      failures++;
      $display("latency cls=%0d long=%0b: %0d cycles, want %0d", c, is_long, t1 - t0, want);
    end
    repeat (3) @(posedge clk);
  endtask

  int nq [NE];
  logic gen_en = 0;

  always @(negedge clk) if (gen_en) begin
    for (int e = 0; e < NE; e++) begin
      if (tx_valid[e] && tx_ready[e]) tx_valid[e] = 1'b0;   // accepted at last edge
      if (!tx_valid[e] && nq[e] < NMSG && $urandom_range(0, 9) < 4) begin
        msg_class_e c;
        logic l;
        c = msg_class_e'($urandom_range(0, 1));
        l = (c == CLS_REQ) ? ($urandom_range(0, 99) < 7) : ($urandom_range(0, 99) < 86);
        tx_valid[e] = 1'b1;
        tx_msg[e]   = mk_msg($urandom_range(0, NE - 1), c, l);
        nq[e]++;
      end
      rx_ready[e] = $urandom_range(0, 9) < 7;
    end
  end

  initial begin
    tx_valid = '0; rx_ready = '1;
    for (int e = 0; e < NE; e++) begin tx_msg[e] = '0; nq[e] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    latency(CLS_REQ,  1'b0, 10);
    latency(CLS_REQ,  1'b1, 21);
    latency(CLS_RESP, 1'b0, 9);
    latency(CLS_RESP, 1'b1, 13);
    // drain the latency messages
    repeat (5) @(posedge clk);
    n_off = '{0, 0}; n_cont = '{0, 0}; n_hold = '{0, 0}; n_parked = 0; n_tx_stall = 0;
    n_kind = '{0, 0, 0, 0};
    @(negedge clk);
    gen_en = 1;
    wait (nsent == 4 + NE * NMSG);
    wait (nrecv == nsent);
    @(negedge clk);
    gen_en = 0;
    repeat (50) @(posedge clk);
    for (int s = 0; s < NE; s++)
      for (int d = 0; d < NE; d++) begin
        checks++;
        if (exp_q[s][d].size() != 0) begin failures++; $display("lost %0d->%0d", s, d); end
      end
    checks++; if (rx_valid != '0) begin failures++; $display("extra messages"); end
    $display("messages: sent=%0d received=%0d  short req=%0d long req=%0d short resp=%0d long resp=%0d",
             nsent, nrecv, n_kind[0], n_kind[1], n_kind[2], n_kind[3]);
    $display("events: off-stall req/resp=%0d/%0d contention=%0d/%0d wormhole-hold=%0d/%0d parked=%0d ni-busy=%0d",
             n_off[0], n_off[1], n_cont[0], n_cont[1], n_hold[0], n_hold[1], n_parked, n_tx_stall);
    for (int k = 0; k < 4; k++) begin
      checks++; if (n_kind[k] == 0) begin failures++; $display("message kind %0d never sent", k); end
    end
    for (int n = 0; n < 2; n++) begin
      checks++; if (n_off[n] == 0)  begin failures++; $display("net %0d: no off-stall", n); end
      checks++; if (n_cont[n] == 0) begin failures++; $display("net %0d: no contention", n); end
      checks++; if (n_hold[n] == 0) begin failures++; $display("net %0d: no wormhole hold", n); end
    end
    checks++; if (n_parked == 0)   begin failures++; $display("no parking"); end
    checks++; if (n_tx_stall == 0) begin failures++; $display("no NI busy stall"); end
    $display("finished at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

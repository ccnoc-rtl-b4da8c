// tb_ccnoc_workload: coherence-style traffic through the full 4x4 design.
// The testbench plays the tiles' clients. Each core endpoint (2t) issues
// NTX transactions, at most MAXOUT outstanding. The L2/directory endpoint
// (2t'+1) of the block's home tile answers them:
//   read   : short request -> home,  long data response -> core     (70 %)
//   evict  : short clean-eviction notice -> home, no reply           (15 %)
//   upgrade: short request -> home,  short ack response              (5 %)
//   wback  : long request (dirty block) -> home, short ack response  (5 %)
//   3-hop  : short request -> home, short forward request -> owner
//            core; owner sends long data response to the requester
//            and a short notification response to home              (5 %)
// This gives roughly the published shares: about 95 % of requests short
// and 83 % of responses long; the split among transaction kinds is this
// testbench's own. Checks: every message arrives in per-source order and
// intact; every transaction completes with the right data; every 3-hop
// transaction's notification reaches home; each kind occurs.
module tb_ccnoc_workload;
  import ccnoc_pkg::*;
  localparam int NE = NUM_EP, NTX = 40, MAXOUT = 8;
  localparam logic [OP_W-1:0] OP_READ = 1, OP_EVICT = 2, OP_UPG = 3, OP_WB = 4,
                              OP_READ3 = 5, OP_FWD = 6, OP_DATA = 7, OP_ACK = 8,
                              OP_NOTE = 9;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [NE-1:0] tx_valid, tx_ready, rx_valid, rx_ready, parked;
  msg_t tx_msg [NE], rx_msg [NE];

  ccnoc_top dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // address layout used by the testbench: [9:6] home tile, [20:16]
  // requester, [31:24] tag, [36:32] owner (3-hop)
  function automatic logic [BLOCK_BITS-1:0] block_of(logic [ADDR_W-1:0] a);
    return {16{a[31:0] ^ 32'h5a5a_1234}};
  endfunction

  function automatic msg_t mk(int src, int dst, msg_class_e c, logic [OP_W-1:0] op,
                              logic [ADDR_W-1:0] a, logic is_long);
    msg_t m;
    m = '0;
    m.cls = c; m.hdr.dst = EP_W'(dst); m.hdr.op = op; m.hdr.addr = a;
    m.hdr.is_long = is_long;
    m.data = is_long ? block_of(a) : '0;
    return m;
  endfunction

  msg_t sendq [NE][$];
  msg_t exp_q [NE][NE][$];
  int   seq_tx [NE][NE];
  int   issued [NE], outstanding [NE], completed = 0, notes = 0, evicts = 0;
  int   n3 = 0, n_kind [6];
  int   lat_sum = 0, lat_n = 0;
  int   t_issue [NE][256];
  int   n_parked = 0, n_ord = 0;

  // drive client send ports from the per-endpoint queues
  always @(negedge clk) if (rst_n) begin
    for (int e = 0; e < NE; e++) begin
      tx_valid[e] = sendq[e].size() > 0;
      tx_msg[e]   = tx_valid[e] ? sendq[e][0] : '0;
      rx_ready[e] = $urandom_range(0, 9) < 8;
    end
    // cores issue new transactions
    for (int t = 0; t < NUM_TILE; t++) begin
      int c;
      c = 2 * t;
      if (issued[c] < NTX && outstanding[c] < MAXOUT && $urandom_range(0, 9) < 2) begin
        int r, home, owner, k;
        logic [ADDR_W-1:0] a;
        r = $urandom_range(0, 99);
        home = $urandom_range(0, NUM_TILE - 1);
        do owner = $urandom_range(0, NUM_TILE - 1); while (owner == t);
        a = {$urandom, $urandom};
        a[9:6] = 4'(home); a[20:16] = 5'(c); a[31:24] = 8'(issued[c]); a[36:32] = 5'(2 * owner);
        k = (r < 70) ? 0 : (r < 85) ? 1 : (r < 90) ? 2 : (r < 95) ? 3 : 4;
        n_kind[k]++;
        case (k)
          0: sendq[c].push_back(mk(c, 2*home+1, CLS_REQ, OP_READ,  a, 1'b0));
          1: sendq[c].push_back(mk(c, 2*home+1, CLS_REQ, OP_EVICT, a, 1'b0));
          2: sendq[c].push_back(mk(c, 2*home+1, CLS_REQ, OP_UPG,   a, 1'b0));
          3: sendq[c].push_back(mk(c, 2*home+1, CLS_REQ, OP_WB,    a, 1'b1));
          default: begin sendq[c].push_back(mk(c, 2*home+1, CLS_REQ, OP_READ3, a, 1'b0)); n3++; end
        endcase
        if (k != 1) outstanding[c]++;
        t_issue[c][issued[c] % 256] = cyc;
        issued[c]++;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < NE; e++) begin
      if (parked[e]) n_parked++;
      if (tx_valid[e] && tx_ready[e]) begin
        msg_t m;
        int d;
        m = tx_msg[e];
        d = int'(m.hdr.dst);
        m.hdr.src = EP_W'(e);
        m.hdr.seq = SEQ_W'(seq_tx[e][d]);
        seq_tx[e][d]++;
        exp_q[e][d].push_back(m);
        void'(sendq[e].pop_front());
      end
    end
    for (int e = 0; e < NE; e++) if (rx_valid[e] && rx_ready[e]) begin
      msg_t m;
      int s, req;
      logic [ADDR_W-1:0] a;
      m = rx_msg[e];
      s = int'(m.hdr.src);
      a = m.hdr.addr;
      req = int'(a[20:16]);
      checks++;
      if (exp_q[s][e].size() == 0 || m != exp_q[s][e][0]) begin
        failures++; $display("ep %0d: message from %0d out of order or corrupt", e, s);
      end else begin
        void'(exp_q[s][e].pop_front());
        n_ord++;
      end
      if (e % 2 == 1) begin
        // L2 / directory endpoint
        case (m.hdr.op)
          OP_READ:  sendq[e].push_back(mk(e, req, CLS_RESP, OP_DATA, a, 1'b1));
          OP_UPG:   sendq[e].push_back(mk(e, req, CLS_RESP, OP_ACK,  a, 1'b0));
          OP_WB:    begin
                      checks++;
                      if (m.data != block_of(a)) begin failures++; $display("writeback data wrong"); end
                      sendq[e].push_back(mk(e, req, CLS_RESP, OP_ACK, a, 1'b0));
                    end
          OP_EVICT: begin evicts++; completed++; end
          OP_READ3: sendq[e].push_back(mk(e, int'(a[36:32]), CLS_REQ, OP_FWD, a, 1'b0));
          OP_NOTE:  notes++;
          default:  begin failures++; $display("L2 %0d: unexpected op %0d", e, m.hdr.op); end
        endcase
      end else begin
        // core endpoint
        case (m.hdr.op)
          OP_FWD: begin
                    sendq[e].push_back(mk(e, req, CLS_RESP, OP_DATA, a, 1'b1));
                    sendq[e].push_back(mk(e, 2 * int'(a[9:6]) + 1, CLS_RESP, OP_NOTE, a, 1'b0));
                  end
          OP_DATA, OP_ACK: begin
                    checks++;
                    if (req != e || (m.hdr.op == OP_DATA && m.data != block_of(a))) begin
                      failures++; $display("core %0d: wrong completion", e);
                    end
                    outstanding[e]--;
                    completed++;
                    lat_sum += cyc - t_issue[e][int'(a[31:24])];
                    lat_n++;
                  end
          default: begin failures++; $display("core %0d: unexpected op %0d", e, m.hdr.op); end
        endcase
      end
    end
  end

  initial begin
    tx_valid = '0; rx_ready = '0;
    for (int e = 0; e < NE; e++) begin
      tx_msg[e] = '0; issued[e] = 0; outstanding[e] = 0;
      for (int d = 0; d < NE; d++) seq_tx[e][d] = 0;
    end
    n_kind = '{0, 0, 0, 0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (completed == NUM_TILE * NTX && notes == n3);
    repeat (100) @(posedge clk);
    checks++;
    if (notes != n3) begin failures++; $display("notifications %0d of %0d", notes, n3); end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (n_kind[k] == 0) begin failures++; $display("transaction kind %0d never issued", k); end
    end
    checks++;
    if (rx_valid != '0) begin failures++; $display("extra messages"); end
    $display("transactions=%0d (read %0d evict %0d upgrade %0d writeback %0d 3-hop %0d) messages=%0d parked=%0d",
             completed, n_kind[0], n_kind[1], n_kind[2], n_kind[3], n_kind[4], n_ord, n_parked);
    $display("mean completion latency %0d cycles over %0d transactions, finished at cycle %0d",
             lat_n ? lat_sum / lat_n : 0, lat_n, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

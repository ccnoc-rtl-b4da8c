// tb_network_interface: two network interfaces (endpoints 3 and 20) wired
// back to back, request port to request port and response port to response
// port. Each client sends random requests and responses, short and long, to
// the other. The receiving client must get every message intact, in sending
// order across both classes, with the sender's id and consecutive sequence
// numbers stamped in. A long request (13 flits) followed by a short response
// (1 flit) makes the response arrive first, so the receive side must park.
module tb_network_interface;
  import ccnoc_pkg::*;
  localparam int NMSG = 150;
  localparam int ID [2] = '{3, 20};
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, parks = 0;
  int got [2];
  always #5 clk = ~clk;

  logic [1:0] tx_valid, tx_ready, rx_valid, rx_ready, parked;
  msg_t tx_msg [2], rx_msg [2];
  logic [1:0] rq_v, rq_on_tx, rq_on_rx, rs_v, rs_on_tx, rs_on_rx;
  logic [1:0][49:0]  rq_f;
  logic [1:0][129:0] rs_f;

  for (genvar a = 0; a < 2; a++) begin : g_ni
    network_interface #(.EP_ID(ID[a])) u_ni (
      .clk, .rst_n,
      .tx_valid(tx_valid[a]), .tx_ready(tx_ready[a]), .tx_msg(tx_msg[a]),
      .rx_valid(rx_valid[a]), .rx_ready(rx_ready[a]), .rx_msg(rx_msg[a]),
      .req_out_valid(rq_v[a]), .req_out_flit(rq_f[a]), .req_out_on(rq_on_rx[1-a]),
      .req_in_valid(rq_v[1-a]), .req_in_flit(rq_f[1-a]), .req_in_on(rq_on_rx[a]),
      .resp_out_valid(rs_v[a]), .resp_out_flit(rs_f[a]), .resp_out_on(rs_on_rx[1-a]),
      .resp_in_valid(rs_v[1-a]), .resp_in_flit(rs_f[1-a]), .resp_in_on(rs_on_rx[a]),
      .parked(parked[a])
    );
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog: got %0d %0d", got[0], got[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  msg_t exp_q [2][$];   // messages expected at NI a
  int   nsent [2];

  function automatic msg_t rand_msg(int dst);
    msg_t m;
    m.cls  = msg_class_e'($urandom_range(0, 1));
    m.hdr  = {$urandom, $urandom, $urandom};
    m.hdr.dst = EP_W'(dst);
    m.hdr.is_long = $urandom_range(0, 1);
    m.data = '0;
    for (int b = 0; b < BLOCK_BITS / 32; b++) m.data[b*32 +: 32] = $urandom;
    return m;
  endfunction

  always @(negedge clk) if (rst_n) begin
    for (int a = 0; a < 2; a++) begin
      if (!tx_valid[a] && nsent[a] < NMSG && $urandom_range(0, 2) == 0) begin
        tx_valid[a] = 1'b1;
        tx_msg[a]   = rand_msg(ID[1-a]);
      end
      rx_ready[a] = $urandom_range(0, 3) != 0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int a = 0; a < 2; a++) begin
      if (parked[a]) parks++;
      if (tx_valid[a] && tx_ready[a]) begin
        msg_t e;
        e = tx_msg[a];
        e.hdr.src = EP_W'(ID[a]);
        e.hdr.seq = SEQ_W'(nsent[a]);
        if (!e.hdr.is_long) e.data = '0;
        exp_q[1-a].push_back(e);
        nsent[a]++;
        tx_valid[a] <= 1'b0;
      end
      if (rx_valid[a] && rx_ready[a]) begin
        checks++;
        if (exp_q[a].size() == 0 || rx_msg[a] != exp_q[a][0]) begin
          failures++;
          $display("NI %0d: message %0d wrong (cls %0d seq %0d)", a, got[a], rx_msg[a].cls, rx_msg[a].hdr.seq);
        end else void'(exp_q[a].pop_front());
        got[a]++;
      end
    end
  end

  initial begin
    tx_valid = '0; rx_ready = '0; nsent = '{0, 0}; got = '{0, 0};
    tx_msg[0] = '0; tx_msg[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got[0] == NMSG && got[1] == NMSG);
    repeat (20) @(posedge clk);
    checks++;
    if (parks == 0) begin failures++; $display("no message was parked"); end
    checks++;
    if (rx_valid != '0) begin failures++; $display("extra message"); end
    $display("parks=%0d", parks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

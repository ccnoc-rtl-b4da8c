// tb_ni_order: four sources each send a numbered stream of messages, each
// message randomly a request or a response. The requests and the responses
// reach the unit through two independent queues with random delays, so a
// message often arrives before an earlier one of the same source. The unit
// must deliver every source's messages in sending order, each intact, and
// must have parked messages along the way.
module tb_ni_order;
  import ccnoc_pkg::*;
  localparam int NS = 4, NMSG = 200;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, parks = 0, delivered = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, resp_valid, resp_ready, out_valid, out_ready, parked;
  msg_t req_msg, resp_msg, out_msg;

  ni_order #(.PARK_DEPTH(4)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog: delivered %0d", delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  msg_t rq [$], rs [$];
  msg_t sent [NS][$];

  initial begin
    // build the streams: round robin over sources, random class
    int seq [NS];
    for (int s = 0; s < NS; s++) seq[s] = 0;
    for (int i = 0; i < NMSG; i++) begin
      msg_t m;
      int s;
      s = $urandom_range(0, NS - 1);
      m.hdr = {$urandom, $urandom, $urandom};
      m.hdr.src = EP_W'(s);
      m.hdr.seq = SEQ_W'(seq[s]);
      seq[s]++;
      m.cls = msg_class_e'($urandom_range(0, 1));
      m.data = {16{$urandom}};
      sent[s].push_back(m);
      if (m.cls == CLS_REQ) rq.push_back(m); else rs.push_back(m);
    end
  end

  // present queue fronts with random gaps; the request side is slower,
  // so responses overtake requests
  always @(negedge clk) begin
    req_valid  = rst_n && rq.size() > 0 && $urandom_range(0, 9) < 3;
    resp_valid = rst_n && rs.size() > 0 && $urandom_range(0, 9) < 8;
    req_msg    = rq.size() > 0 ? rq[0] : '0;
    resp_msg   = rs.size() > 0 ? rs[0] : '0;
    out_ready  = $urandom_range(0, 9) < 8;
  end

  always @(posedge clk) if (rst_n) begin
    if (parked) parks++;
    if (req_valid && req_ready) void'(rq.pop_front());
    if (resp_valid && resp_ready) void'(rs.pop_front());
    if (out_valid && out_ready) begin
      int s;
      s = int'(out_msg.hdr.src);
      checks++;
      if (s >= NS || sent[s].size() == 0 || out_msg != sent[s][0]) begin
        failures++; $display("out of order or corrupt message from %0d seq %0d", s, out_msg.hdr.seq);
      end else void'(sent[s].pop_front());
      delivered++;
    end
  end

  initial begin
    req_valid = 0; resp_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (delivered == NMSG);
    repeat (5) @(posedge clk);
    checks++;
    if (parks == 0) begin failures++; $display("nothing was parked"); end
    checks++;
    if (out_valid) begin failures++; $display("extra output"); end
    $display("delivered=%0d parked=%0d", delivered, parks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mesh_network: the 4x4 request mesh (48-bit flits).
// 1) Zero-load latency: a 2-flit packet from endpoint 0 (tile 0, core) to
//    endpoint 31 (tile 15, L2) crosses 7 switches; its head must appear at
//    the destination 7 cycles after injection and its tail one cycle later.
// 2) Random traffic: all 32 endpoints send 2- and 13-flit packets (the short
//    and long request sizes) to random endpoints while the receivers
//    randomly turn `off`. Every packet must arrive whole, at its destination,
//    in order per source/destination pair.
module tb_mesh_network;
  import ccnoc_pkg::*;
  localparam int W = REQ_FLIT_W, NE = NUM_EP, PKTS = 40;
  logic clk = 0, rst_n = 0;
  logic [NE-1:0] ep_in_valid, ep_in_on, ep_out_valid, ep_out_on;
  logic [NE-1:0][W+1:0] ep_in_flit, ep_out_flit;
  int checks = 0, failures = 0, received = 0, sent = 0, rx_off = 0;

  mesh_network #(.FLIT_W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog: sent=%0d received=%0d", sent, received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // payload: [4:0] dst [9:5] src [23:10] pkt [31:24] flit idx [39:32] len
  function automatic logic [W+1:0] mk(int d, int s, int p, int k, int len);
    logic [W-1:0] v;
    v = '0;
    v[4:0] = 5'(d); v[9:5] = 5'(s); v[23:10] = 14'(p); v[31:24] = 8'(k); v[39:32] = 8'(len);
    return {k == len - 1, k == 0, v};
  endfunction

  int exp_q [NE][NE][$];                 // [src][dst] packet numbers
  int g_k [NE], g_len [NE], g_dst [NE], g_pkt [NE];
  int r_src [NE], r_pkt [NE], r_k [NE];  // per receiver: packet in progress
  logic gen_en = 0;

  initial begin
    ep_in_valid = '0; ep_in_flit = '0; ep_out_on = '1;
    for (int e = 0; e < NE; e++) begin g_k[e] = 0; g_pkt[e] = 0; r_src[e] = -1; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- 1) zero-load latency
    begin
      int t0, th, tt;
      t0 = -1; th = -1; tt = -1;
      for (int c = 0; c < 30; c++) begin
        ep_in_valid[0] = (c < 2);
        ep_in_flit[0]  = mk(31, 0, 0, c, 2);
        if (c == 0) exp_q[0][31].push_back(0);
        @(negedge clk);
        if (ep_out_valid[31] && ep_out_flit[31][W] && th < 0) th = c + 1;
        if (ep_out_valid[31] && ep_out_flit[31][W+1] && tt < 0) tt = c + 1;
      end
      checks++;
      if (th != 7 || tt != 8) begin
        failures++; $display("zero-load latency head=%0d tail=%0d, want 7 and 8", th, tt);
      end
      g_pkt[0] = 1;
    end
    // ---- 2) random traffic
    gen_en = 1;
    wait (sent == NE * PKTS - 1);
    @(negedge clk);
    gen_en = 0;
    ep_in_valid = '0;
    ep_out_on = '1;
    repeat (300) @(negedge clk);
    for (int s = 0; s < NE; s++)
      for (int d = 0; d < NE; d++) begin
        checks++;
        if (exp_q[s][d].size() != 0) begin
          failures++; $display("%0d packets %0d->%0d lost", exp_q[s][d].size(), s, d);
        end
      end
    checks++;
    if (rx_off == 0) begin failures++; $display("receivers never off"); end
    $display("sent=%0d received=%0d", sent, received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (gen_en) begin
    for (int e = 0; e < NE; e++) begin
      ep_in_valid[e] = 1'b0;
      if (ep_in_on[e] && g_pkt[e] < PKTS && $urandom_range(0, 9) < 5) begin
        if (g_k[e] == 0) begin
          g_dst[e] = $urandom_range(0, NE - 1);
          g_len[e] = ($urandom_range(0, 3) == 0) ? 13 : 2;
        end
        ep_in_valid[e] = 1'b1;
        ep_in_flit[e]  = mk(g_dst[e], e, g_pkt[e], g_k[e], g_len[e]);
      end
    end
    for (int e = 0; e < NE; e++) ep_out_on[e] = $urandom_range(0, 9) < 8;
  end

  always @(posedge clk) if (rst_n) begin
    if (gen_en) begin
      for (int e = 0; e < NE; e++) begin
        if (!ep_out_on[e]) rx_off++;
        if (ep_in_valid[e] && ep_in_on[e]) begin
          if (g_k[e] == 0) exp_q[e][g_dst[e]].push_back(g_pkt[e]);
          if (g_k[e] == g_len[e] - 1) begin g_k[e] = 0; g_pkt[e]++; sent++; end
          else g_k[e]++;
        end
      end
    end
    for (int d = 0; d < NE; d++) if (ep_out_valid[d]) begin
      logic [W+1:0] f;
      int s, p, k, len;
      f = ep_out_flit[d];
      s = int'(f[9:5]); p = int'(f[23:10]); k = int'(f[31:24]); len = int'(f[39:32]);
      checks++;
      if (f[W]) begin
        if (r_src[d] != -1 || int'(f[4:0]) != d || exp_q[s][d].size() == 0 ||
            exp_q[s][d][0] != p || k != 0) begin
          failures++; $display("ep %0d: unexpected head src=%0d pkt=%0d", d, s, p);
        end else begin
          void'(exp_q[s][d].pop_front());
        end
        r_src[d] = s; r_pkt[d] = p; r_k[d] = 0;
      end else begin
        if (r_src[d] != s || r_pkt[d] != p || r_k[d] + 1 != k) begin
          failures++; $display("ep %0d: interleaved/lost flit", d);
        end
        r_k[d] = k;
      end
      if (f[W+1]) begin
        if (k != len - 1) begin failures++; $display("ep %0d: early tail", d); end
        r_src[d] = -1;
        received++;
      end
    end
  end
endmodule

// tb_noc_switch: the switch at (1,1) of a 4x4 mesh.
// 1) Zero-load latency: a single-flit packet written into an empty input
//    buffer leaves on the routed output one cycle later.
// 2) Random traffic: every input sends packets of 1..5 flits to random
//    endpoints (only while its buffer is `on`); outputs see random on/off.
//    Each output must deliver whole packets without interleaving (wormhole),
//    on the port that XY routing selects, in order per input/output pair,
//    with every flit intact. Contention and off-stalls are counted and must
//    both happen.
module tb_noc_switch;
  import ccnoc_pkg::*;
  localparam int W = 48, N = NPORTS, XS = 1, YS = 1;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_on, out_valid, out_on;
  logic [N-1:0][W+1:0] in_flit, out_flit;
  int checks = 0, failures = 0, contention = 0, off_stall = 0, delivered = 0;

  noc_switch #(.FLIT_W(W), .X(XS), .Y(YS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int route_of(int d);
    int tx = (d / 2) % MESH_X, ty = (d / 2) / MESH_X;
    if (tx != XS) return (tx > XS) ? P_E : P_W;
    if (ty != YS) return (ty > YS) ? P_S : P_N;
    return (d % 2) ? P_NI2 : P_NI1;
  endfunction

  // flit payload: [4:0] dst (head) | [12:8] input | [23:16] pkt no | [31:24] flit idx | [39:32] len
  function automatic logic [W+1:0] mk(int d, int i, int p, int k, int len);
    logic [W-1:0] v;
    v = '0;
    v[4:0] = 5'(d); v[12:8] = 5'(i); v[23:16] = 8'(p); v[31:24] = 8'(k); v[39:32] = 8'(len);
    return {k == len - 1, k == 0, v};
  endfunction

  // expected packets per [input][output]: (pkt no, len)
  int exp_q [N][N][$];
  int cur_in [N];      // per output: input of packet in progress, -1 none
  int cur_pkt [N], cur_k [N], cur_len [N];

  // generator state
  int g_pkt [N], g_k [N], g_len [N], g_dst [N];
  logic gen_en, stop_new = 0;

  initial begin
    in_valid = '0; in_flit = '0; out_on = '0; gen_en = 0;
    for (int o = 0; o < N; o++) cur_in[o] = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- 1) zero-load latency: input West -> endpoint at (2,1) NI... route East
    @(negedge clk);
    out_on = '1;
    in_valid[P_W] = 1'b1;
    in_flit[P_W]  = mk(2 * (1 * MESH_X + 2), P_W, 0, 0, 1);
    @(negedge clk);
    in_valid = '0;
    checks++;
    if (!(out_valid[P_E] && out_flit[P_E] == mk(2 * (1 * MESH_X + 2), P_W, 0, 0, 1))) begin
      failures++; $display("zero-load: flit not on East output one cycle later");
    end
    @(negedge clk);
    checks++;
    if (out_valid != '0) begin failures++; $display("zero-load: extra flit"); end
    // ---- 2) random traffic
    for (int i = 0; i < N; i++) begin g_pkt[i] = 0; g_k[i] = 0; end
    gen_en = 1;
    repeat (6000) @(negedge clk);
    stop_new = 1;
    repeat (200) @(negedge clk);
    gen_en = 0;
    in_valid = '0;
    out_on = '1;
    repeat (100) @(negedge clk);
    for (int i = 0; i < N; i++)
      for (int o = 0; o < N; o++) begin
        checks++;
        if (exp_q[i][o].size() != 0) begin
          failures++; $display("%0d packets %0d->%0d never arrived", exp_q[i][o].size(), i, o);
        end
      end
    checks++; if (contention == 0) begin failures++; $display("no contention seen"); end
    checks++; if (off_stall == 0)  begin failures++; $display("no off-stall seen"); end
    $display("delivered=%0d contention=%0d off_stall=%0d", delivered, contention, off_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive inputs on the falling edge
  always @(negedge clk) if (gen_en) begin
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 1'b0;
      if (in_on[i] && $urandom_range(0, 9) < 7 && !(stop_new && g_k[i] == 0)) begin
        if (g_k[i] == 0) begin
          int d;
          // destinations whose route is not back out of the input's own port
          do d = $urandom_range(0, NUM_EP - 1); while (route_of(d) == i);
          g_dst[i] = d;
          g_len[i] = $urandom_range(1, 5);
        end
        in_valid[i] = 1'b1;
        in_flit[i]  = mk(g_dst[i], i, g_pkt[i] % 256, g_k[i], g_len[i]);
      end
    end
    out_on = N'($urandom) | N'($urandom);
  end

  // bookkeeping on the rising edge
  always @(posedge clk) if (rst_n && gen_en) begin
    for (int i = 0; i < N; i++)
      if (in_valid[i] && in_on[i]) begin
        if (g_k[i] == 0) exp_q[i][route_of(g_dst[i])].push_back(g_pkt[i] % 256);
        if (g_k[i] == g_len[i] - 1) begin g_k[i] = 0; g_pkt[i]++; end
        else g_k[i]++;
      end
    for (int o = 0; o < N; o++) begin
      if ($countones(dut.arb_req[o]) > 1) contention++;
      if (dut.sel_valid[o] && !out_on[o]) off_stall++;
    end
  end

  // checker
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < N; o++) if (out_valid[o] && gen_en) begin
      logic [W+1:0] f;
      int i, p, k, len;
      f = out_flit[o];
      i = int'(f[12:8]); p = int'(f[23:16]); k = int'(f[31:24]); len = int'(f[39:32]);
      checks++;
      if (f[W]) begin
        if (cur_in[o] != -1) begin failures++; $display("out %0d: head inside packet", o); end
        else if (i >= N || exp_q[i][o].size() == 0 || exp_q[i][o][0] != p || k != 0) begin
          failures++; $display("out %0d: unexpected packet in=%0d p=%0d", o, i, p);
        end else begin
          void'(exp_q[i][o].pop_front());
          if (route_of(int'(f[4:0])) != o) begin failures++; $display("misrouted"); end
          cur_in[o] = i; cur_pkt[o] = p; cur_k[o] = 0; cur_len[o] = len;
        end
      end else begin
        if (cur_in[o] != i || cur_pkt[o] != p || cur_k[o] + 1 != k) begin
          failures++; $display("out %0d: interleaved or lost flit", o);
        end
        cur_k[o] = k;
      end
      if (f[W+1]) begin
        if (k != cur_len[o] - 1) begin failures++; $display("tail at wrong flit"); end
        cur_in[o] = -1;
        delivered++;
      end
    end
  end
endmodule

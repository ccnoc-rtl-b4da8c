// tb_ni_packetizer: three packetizers at 48, 128 and 176-bit flits.
// Short and long messages must become 2/13, 1/5 and 1/4 flits respectively,
// one flit per cycle while `on`, with head/tail marks on the first/last
// flit; the flits, concatenated, must give back the header and the block.
// The downstream randomly goes off to check that nothing is lost or repeated.
module tb_ni_packetizer;
  import ccnoc_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus shared by the three instances
  msg_hdr_t hdr;
  logic [BLOCK_BITS-1:0] data;
  logic [2:0] go, rdy, ov, on;
  logic [49:0]  f48;
  logic [129:0] f128;
  logic [177:0] f176;

  ni_packetizer #(.FLIT_W(48))  u48  (.clk, .rst_n, .msg_valid(go[0]), .msg_ready(rdy[0]),
    .msg_hdr(hdr), .msg_data(data), .out_valid(ov[0]), .out_flit(f48),  .out_on(on[0]));
  ni_packetizer #(.FLIT_W(128)) u128 (.clk, .rst_n, .msg_valid(go[1]), .msg_ready(rdy[1]),
    .msg_hdr(hdr), .msg_data(data), .out_valid(ov[1]), .out_flit(f128), .out_on(on[1]));
  ni_packetizer #(.FLIT_W(176)) u176 (.clk, .rst_n, .msg_valid(go[2]), .msg_ready(rdy[2]),
    .msg_hdr(hdr), .msg_data(data), .out_valid(ov[2]), .out_flit(f176), .out_on(on[2]));

  // collect flits of instance j into a bit vector
  task automatic send_and_check(input int j, input int w, input logic is_long, input int exp_n);
    logic [2047:0] acc;
    int n, cyc, hf;
    logic bad;
    hdr.is_long = is_long;
    acc = '0; n = 0; cyc = 0; bad = 0;
    @(negedge clk);
    go[j] = 1'b1;
    @(negedge clk);
    go[j] = 1'b0;
    while (n < exp_n + 2 && cyc < 200) begin
      logic [177:0] f;
      on[j] = $urandom_range(0, 3) != 0;
      #1;
      f = (j == 0) ? 178'(f48) : (j == 1) ? 178'(f128) : f176;
      if (ov[j] && on[j]) begin
        if (f[w] != (n == 0)) bad = 1;
        if (f[w+1] != (n == exp_n - 1)) bad = 1;
        for (int b = 0; b < w; b++) acc[n*w + b] = f[b];
        n++;
      end
      @(negedge clk);
      cyc++;
      if (rdy[j] && n > 0) break;
    end
    on[j] = 1'b1;
    hf = (72 + w - 1) / w;
    checks++;
    if (n != exp_n || bad) begin
      failures++; $display("w=%0d long=%0b: %0d flits (want %0d) marks_bad=%0b", w, is_long, n, exp_n, bad);
    end
    checks++;
    if (acc[71:0] != hdr) begin failures++; $display("w=%0d header mismatch", w); end
    if (is_long) begin
      checks++;
      if (acc[hf*w +: BLOCK_BITS] != data) begin failures++; $display("w=%0d block mismatch", w); end
    end
  endtask

  initial begin
    go = '0; on = '1; hdr = '0; data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      hdr = {$urandom, $urandom, $urandom};
      for (int b = 0; b < BLOCK_BITS / 32; b++) data[b*32 +: 32] = $urandom;
      send_and_check(0, 48,  1'b0, 2);
      send_and_check(0, 48,  1'b1, 13);
      send_and_check(1, 128, 1'b0, 1);
      send_and_check(1, 128, 1'b1, 5);
      send_and_check(2, 176, 1'b0, 1);
      send_and_check(2, 176, 1'b1, 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

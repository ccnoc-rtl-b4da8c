// tb_ni_depacketizer: flits of random short and long messages, cut by the
// testbench (header first, block on the next flit boundary), are fed to
// depacketizers at 48 and 128 bits while the consumer is randomly slow.
// Every message must come out whole and in order, with a zero block for
// short messages, the right class, and `off` while a message is held.
module tb_ni_depacketizer;
  import ccnoc_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic         v48, on48, mv48, mr48;
  logic [49:0]  f48;
  msg_t         m48;
  logic         v128, on128, mv128, mr128;
  logic [129:0] f128;
  msg_t         m128;

  ni_depacketizer #(.FLIT_W(48), .CLS(CLS_REQ)) u48 (.clk, .rst_n, .in_valid(v48),
    .in_flit(f48), .in_on(on48), .msg_valid(mv48), .msg_ready(mr48), .msg(m48));
  ni_depacketizer #(.FLIT_W(128), .CLS(CLS_RESP)) u128 (.clk, .rst_n, .in_valid(v128),
    .in_flit(f128), .in_on(on128), .msg_valid(mv128), .msg_ready(mr128), .msg(m128));

  msg_t q48 [$], q128 [$];
  int done48 = 0, done128 = 0;
  localparam int NMSG = 60;

  function automatic msg_t rand_msg(msg_class_e c);
    msg_t m;
    m.cls = c;
    m.hdr = {$urandom, $urandom, $urandom};
    m.data = '0;
    if (m.hdr.is_long) for (int b = 0; b < BLOCK_BITS / 32; b++) m.data[b*32 +: 32] = $urandom;
    return m;
  endfunction

  task automatic feed48();
    for (int i = 0; i < NMSG; i++) begin
      msg_t m;
      logic [13*48-1:0] bits;
      int n;
      m = rand_msg(CLS_REQ);
      bits = {m.data, 24'b0, m.hdr};
      n = m.hdr.is_long ? 13 : 2;
      q48.push_back(m);
      for (int k = 0; k < n; k++) begin
        do @(negedge clk); while (!on48 || $urandom_range(0, 3) == 0);
        v48 = 1; f48 = {k == n - 1, k == 0, bits[k*48 +: 48]};
        @(negedge clk); v48 = 0;
      end
    end
  endtask

  task automatic feed128();
    for (int i = 0; i < NMSG; i++) begin
      msg_t m;
      logic [5*128-1:0] bits;
      int n;
      m = rand_msg(CLS_RESP);
      bits = {m.data, 56'b0, m.hdr};
      n = m.hdr.is_long ? 5 : 1;
      q128.push_back(m);
      for (int k = 0; k < n; k++) begin
        do @(negedge clk); while (!on128);
        v128 = 1; f128 = {k == n - 1, k == 0, bits[k*128 +: 128]};
        @(negedge clk); v128 = 0;
      end
    end
  endtask

  always @(negedge clk) begin
    mr48  = $urandom_range(0, 2) == 0;
    mr128 = $urandom_range(0, 2) == 0;
  end

  always @(posedge clk) if (rst_n) begin
    if (mv48) begin
      checks++;
      if (on48) begin failures++; $display("48: on while holding"); end
    end
    if (mv48 && mr48) begin
      checks++;
      if (q48.size() == 0 || m48 != q48[0]) begin failures++; $display("48: message %0d wrong", done48); end
      else void'(q48.pop_front());
      done48++;
    end
    if (mv128 && mr128) begin
      checks++;
      if (q128.size() == 0 || m128 != q128[0]) begin failures++; $display("128: message %0d wrong", done128); end
      else void'(q128.pop_front());
      done128++;
    end
  end

  initial begin
    v48 = 0; v128 = 0; f48 = '0; f128 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork feed48(); feed128(); join
    repeat (50) @(posedge clk);
    checks++;
    if (done48 != NMSG || done128 != NMSG) begin
      failures++; $display("delivered %0d/%0d", done48, done128);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

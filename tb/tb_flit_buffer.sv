// tb_flit_buffer: random pushes (only while `on`) and pops against a queue
// model; checks the on/off signal, the valid flag and the data order.
module tb_flit_buffer;
  localparam int FW = 50, DEPTH = 2;
  logic clk = 0, rst_n = 0;
  logic in_valid, on, out_valid, pop;
  logic [FW-1:0] in_flit, out_flit;
  int checks = 0, failures = 0, full_seen = 0;
  logic [FW-1:0] q [$];

  flit_buffer #(.FW(FW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; pop = 0; in_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // compare state with model
      checks++;
      if (on !== (q.size() < DEPTH)) begin
        failures++; $display("on mismatch size=%0d on=%0b", q.size(), on);
      end
      checks++;
      if (out_valid !== (q.size() > 0)) begin
        failures++; $display("valid mismatch");
      end
      if (q.size() > 0) begin
        checks++;
        if (out_flit !== q[0]) begin failures++; $display("data mismatch"); end
      end
      if (q.size() == DEPTH) full_seen++;
      // drive: bursts of writes with slow reads, then the reverse
      in_valid = on && ($urandom_range(0, 99) < ((cyc / 500) % 2 ? 80 : 30));
      in_flit  = {$urandom, $urandom};
      pop      = $urandom_range(0, 99) < ((cyc / 500) % 2 ? 30 : 80);
      @(posedge clk);
      #1;
    end
    // model update happens below
    checks++;
    if (full_seen == 0) begin failures++; $display("buffer never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (pop && q.size() > 0) void'(q.pop_front());
    if (in_valid && on) q.push_back(in_flit);
  end
endmodule

// tb_rr_arbiter: random request patterns; the grant must be the first
// requester after the last one served (model kept in the testbench), and the
// pointer must not move when `advance` is low.
module tb_rr_arbiter;
  localparam int N = 6;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  logic advance;
  int checks = 0, failures = 0, last = N - 1;

  rr_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; advance = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      req     = N'($urandom);
      advance = $urandom_range(0, 3) != 0;
      #1;
      begin
        logic [N-1:0] exp;
        exp = '0;
        for (int k = 1; k <= N; k++)
          if (exp == '0 && req[(last + k) % N]) exp[(last + k) % N] = 1'b1;
        checks++;
        if (grant !== exp) begin
          failures++;
          $display("req=%b last=%0d grant=%b want=%b", req, last, grant, exp);
        end
        if (advance && exp != '0)
          for (int i = 0; i < N; i++) if (exp[i]) last = i;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

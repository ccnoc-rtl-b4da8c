// tb_crossbar: random flits, selects and enables; every output must carry
// the selected input's flit, or zero when disabled.
module tb_crossbar;
  localparam int N = 6, FW = 50;
  logic [N-1:0][FW-1:0] in_flit, out_flit;
  logic [N-1:0][2:0] sel;
  logic [N-1:0] en;
  int checks = 0, failures = 0;

  crossbar #(.N(N), .FW(FW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N; i++) begin
        in_flit[i] = {$urandom, $urandom};
        sel[i]     = 3'($urandom_range(0, N - 1));
      end
      en = N'($urandom);
      #1;
      for (int o = 0; o < N; o++) begin
        checks++;
        if (out_flit[o] !== (en[o] ? in_flit[sel[o]] : '0)) begin
          failures++;
          $display("output %0d wrong", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// rr_arbiter: round-robin arbiter for one switch output port.
//
// Grants one of N requesters combinationally, searching from the requester
// after the last one served. The priority pointer moves only when `advance`
// is high (the granted flit actually left), so a requester that was granted
// but stalled by flow control keeps its turn. The published switch only says
// that arbitration and allocation take one clock cycle; round-robin is this
// implementation's choice.
module rr_arbiter #(
  parameter int unsigned N = ccnoc_pkg::NPORTS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);

  logic [N-1:0] last;   // one-hot: requester served last

  always_comb begin
    grant = '0;
    // Search positions last+1 .. last+N (mod N); take the first request.
    for (int k = 1; k <= N; k++) begin
      for (int i = 0; i < N; i++) begin
        if (last[i] && grant == '0 && req[(i + k) % N])
          grant[(i + k) % N] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                     last <= N'(1) << (N - 1);
    else if (advance && grant != '0) last <= grant;
  end

  always_ff @(posedge clk) begin
    if (rst_n) a_onehot: assert ($onehot0(grant)) else $error("rr_arbiter: several grants");
  end

endmodule

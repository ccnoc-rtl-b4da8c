// crossbar: N x N flit crossbar of a switch.
//
// Every output takes the flit of the input named by its select index when
// its enable is high, and drives an invalid (all-zero) flit otherwise.
// Combinational; the flit is FW bits wide.
module crossbar #(
  parameter int unsigned N  = ccnoc_pkg::NPORTS,
  parameter int unsigned FW = 50
) (
  input  logic [N-1:0][FW-1:0]         in_flit,
  input  logic [N-1:0][$clog2(N)-1:0]  sel,
  input  logic [N-1:0]                 en,
  output logic [N-1:0][FW-1:0]         out_flit
);

  always_comb begin
    for (int o = 0; o < N; o++)
      out_flit[o] = en[o] ? in_flit[sel[o]] : '0;
  end

endmodule

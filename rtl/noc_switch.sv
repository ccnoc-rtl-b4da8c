// noc_switch: six-port wormhole switch of one sub-network.
//
// Ports 0..5 are North, East, South, West, NI1 (core network interface) and
// NI2 (L2/directory network interface), as drawn in the published switch.
// Every input has a two-flit buffer (flit_buffer) with on/off flow control.
// The head flit at the front of a buffer is routed statically (xy_route) and
// competes for its output in a round-robin arbiter (rr_arbiter); winning and
// crossing the crossbar happen in the same cycle, so a flit moves one hop per
// cycle when nothing blocks it. Wormhole flow control: once a head flit has
// left through an output, that output stays reserved for the same input until
// the packet's tail flit has left. A flit leaves only while the downstream
// buffer signals `on`. There are no virtual channels: the request and
// response message classes travel on physically separate networks.
//
// Flit format (FW = FLIT_W + 2 bits): bit FLIT_W+1 = tail, bit FLIT_W = head,
// bits FLIT_W-1:0 = payload; the first flit of a packet carries the
// destination endpoint in its low EP_W bits. The buffer depth, the six ports,
// wormhole and on/off flow control and one-cycle arbitration follow the
// published design; XY routing, round-robin priority and the flit sideband
// bits are this implementation's choices.
module noc_switch #(
  parameter int unsigned FLIT_W = ccnoc_pkg::REQ_FLIT_W,
  parameter int unsigned MESH_X = ccnoc_pkg::MESH_X,
  parameter int unsigned MESH_Y = ccnoc_pkg::MESH_Y,
  parameter int unsigned X      = 0,
  parameter int unsigned Y      = 0,
  parameter int unsigned DEPTH  = ccnoc_pkg::BUF_DEPTH
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  // inputs (from neighbours / network interfaces)
  input  logic [ccnoc_pkg::NPORTS-1:0]              in_valid,
  input  logic [ccnoc_pkg::NPORTS-1:0][FLIT_W+1:0]  in_flit,
  output logic [ccnoc_pkg::NPORTS-1:0]              in_on,
  // outputs (to neighbours / network interfaces)
  output logic [ccnoc_pkg::NPORTS-1:0]              out_valid,
  output logic [ccnoc_pkg::NPORTS-1:0][FLIT_W+1:0]  out_flit,
  input  logic [ccnoc_pkg::NPORTS-1:0]              out_on
);
  import ccnoc_pkg::*;

  localparam int unsigned N  = NPORTS;
  localparam int unsigned FW = FLIT_W + 2;
  localparam int unsigned SW = $clog2(N);

  logic [N-1:0]          buf_valid, buf_pop;
  logic [N-1:0][FW-1:0]  buf_flit;
  port_e                 route [N];

  logic [N-1:0][N-1:0]   arb_req, arb_grant;   // [output][input]
  logic [N-1:0]          owner_valid, go;
  logic [N-1:0][SW-1:0]  owner, sel;
  logic [N-1:0]          sel_valid;

  for (genvar i = 0; i < N; i++) begin : g_in
    flit_buffer #(.FW(FW), .DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .in_valid (in_valid[i]),
      .in_flit  (in_flit[i]),
      .on       (in_on[i]),
      .out_valid(buf_valid[i]),
      .out_flit (buf_flit[i]),
      .pop      (buf_pop[i])
    );

    xy_route #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .X(X), .Y(Y)) u_route (
      .dst (buf_flit[i][EP_W-1:0]),
      .port(route[i])
    );
  end

  for (genvar o = 0; o < N; o++) begin : g_out
    always_comb begin
      for (int i = 0; i < N; i++)
        arb_req[o][i] = buf_valid[i] && buf_flit[i][FLIT_W] &&
                        (route[i] == port_e'(o)) && !owner_valid[o];
    end

    rr_arbiter #(.N(N)) u_arb (
      .clk, .rst_n,
      .req    (arb_req[o]),
      .advance(go[o]),
      .grant  (arb_grant[o])
    );

    always_comb begin
      sel[o] = owner[o];
      for (int i = 0; i < N; i++)
        if (!owner_valid[o] && arb_grant[o][i]) sel[o] = SW'(i);
      sel_valid[o] = owner_valid[o] ? buf_valid[owner[o]] : (arb_grant[o] != '0);
      go[o]        = sel_valid[o] && out_on[o];
    end

    // Wormhole reservation of the output.
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        owner_valid[o] <= 1'b0;
        owner[o]       <= '0;
      end else if (go[o]) begin
        owner_valid[o] <= !buf_flit[sel[o]][FLIT_W+1];
        owner[o]       <= sel[o];
      end
    end
  end

  crossbar #(.N(N), .FW(FW)) u_xbar (
    .in_flit (buf_flit),
    .sel     (sel),
    .en      (go),
    .out_flit(out_flit)
  );

  assign out_valid = go;

  always_comb begin
    buf_pop = '0;
    for (int o = 0; o < N; o++)
      if (go[o]) buf_pop[sel[o]] = 1'b1;
  end

  // An input is never served by two outputs at once.
  always_ff @(posedge clk) begin
    if (rst_n)
      a_single_pop: assert ($countones(go) == $countones(buf_pop))
        else $error("noc_switch: one input served by two outputs");
  end

endmodule

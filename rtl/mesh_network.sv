// mesh_network: one sub-network, a MESH_X x MESH_Y mesh of noc_switch.
//
// Switch t = y*MESH_X + x sits below tile t (tile 0 north-west). Neighbouring
// switches are joined by one channel in each direction: a flit bus with its
// valid bit one way and the on/off bit the other way. Ports on the border of
// the mesh are left unconnected (no flit enters, `off` towards them). Each
// switch's two network-interface ports are brought out as endpoints
// 2t (port NI1, core) and 2t+1 (port NI2, L2/directory). The same module, with
// FLIT_W = 48 or 128, builds the request and the response network; both are
// meshes in the published design. A flit crosses one switch per cycle.
module mesh_network #(
  parameter int unsigned FLIT_W = ccnoc_pkg::REQ_FLIT_W,
  parameter int unsigned MESH_X = ccnoc_pkg::MESH_X,
  parameter int unsigned MESH_Y = ccnoc_pkg::MESH_Y,
  parameter int unsigned DEPTH  = ccnoc_pkg::BUF_DEPTH,
  localparam int unsigned NEP   = MESH_X * MESH_Y * 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // endpoint -> network
  input  logic [NEP-1:0]              ep_in_valid,
  input  logic [NEP-1:0][FLIT_W+1:0]  ep_in_flit,
  output logic [NEP-1:0]              ep_in_on,
  // network -> endpoint
  output logic [NEP-1:0]              ep_out_valid,
  output logic [NEP-1:0][FLIT_W+1:0]  ep_out_flit,
  input  logic [NEP-1:0]              ep_out_on
);
  import ccnoc_pkg::*;

  localparam int unsigned NT = MESH_X * MESH_Y;

  logic [NT-1:0][NPORTS-1:0]             si_valid, si_on, so_valid, so_on;
  logic [NT-1:0][NPORTS-1:0][FLIT_W+1:0] si_flit, so_flit;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned T = y * MESH_X + x;

      noc_switch #(.FLIT_W(FLIT_W), .MESH_X(MESH_X), .MESH_Y(MESH_Y),
                   .X(x), .Y(y), .DEPTH(DEPTH)) u_sw (
        .clk, .rst_n,
        .in_valid (si_valid[T]),
        .in_flit  (si_flit[T]),
        .in_on    (si_on[T]),
        .out_valid(so_valid[T]),
        .out_flit (so_flit[T]),
        .out_on   (so_on[T])
      );

      // North port <-> south port of the switch above.
      if (y > 0) begin : g_n
        assign si_valid[T][P_N] = so_valid[T-MESH_X][P_S];
        assign si_flit[T][P_N]  = so_flit[T-MESH_X][P_S];
        assign so_on[T][P_N]    = si_on[T-MESH_X][P_S];
      end else begin : g_n_edge
        assign si_valid[T][P_N] = 1'b0;
        assign si_flit[T][P_N]  = '0;
        assign so_on[T][P_N]    = 1'b0;
      end
      // South port <-> north port of the switch below.
      if (y < MESH_Y - 1) begin : g_s
        assign si_valid[T][P_S] = so_valid[T+MESH_X][P_N];
        assign si_flit[T][P_S]  = so_flit[T+MESH_X][P_N];
        assign so_on[T][P_S]    = si_on[T+MESH_X][P_N];
      end else begin : g_s_edge
        assign si_valid[T][P_S] = 1'b0;
        assign si_flit[T][P_S]  = '0;
        assign so_on[T][P_S]    = 1'b0;
      end
      // East port <-> west port of the switch to the right.
      if (x < MESH_X - 1) begin : g_e
        assign si_valid[T][P_E] = so_valid[T+1][P_W];
        assign si_flit[T][P_E]  = so_flit[T+1][P_W];
        assign so_on[T][P_E]    = si_on[T+1][P_W];
      end else begin : g_e_edge
        assign si_valid[T][P_E] = 1'b0;
        assign si_flit[T][P_E]  = '0;
        assign so_on[T][P_E]    = 1'b0;
      end
      // West port <-> east port of the switch to the left.
      if (x > 0) begin : g_w
        assign si_valid[T][P_W] = so_valid[T-1][P_E];
        assign si_flit[T][P_W]  = so_flit[T-1][P_E];
        assign so_on[T][P_W]    = si_on[T-1][P_E];
      end else begin : g_w_edge
        assign si_valid[T][P_W] = 1'b0;
        assign si_flit[T][P_W]  = '0;
        assign so_on[T][P_W]    = 1'b0;
      end

      // Network-interface ports.
      for (genvar k = 0; k < 2; k++) begin : g_ni
        assign si_valid[T][P_NI1+k] = ep_in_valid[2*T+k];
        assign si_flit[T][P_NI1+k]  = ep_in_flit[2*T+k];
        assign ep_in_on[2*T+k]      = si_on[T][P_NI1+k];
        assign ep_out_valid[2*T+k]  = so_valid[T][P_NI1+k];
        assign ep_out_flit[2*T+k]   = so_flit[T][P_NI1+k];
        assign so_on[T][P_NI1+k]    = ep_out_on[2*T+k];
      end
    end
  end

endmodule

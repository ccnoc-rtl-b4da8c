// ccnoc_top: the dual-network interconnect of a 4x4 tiled cache-coherent CMP.
//
// Every tile owns a routing node of two asymmetric switches: one in a narrow
// request mesh (48-bit flits) for the mostly short control messages, and one
// in a wide response mesh (128-bit flits) for the mostly block-carrying
// responses. Because the two message classes never share a channel, neither
// network needs virtual channels to avoid protocol deadlock. Every tile has
// two network interfaces, endpoint 2t for the core (L1 controllers) and
// endpoint 2t+1 for the L2 slice and directory slice; each is connected to
// both switches of its tile, sends each message on the network of its class
// and delivers received messages in the order their source sent them.
//
// Ports: one message-level send and one receive port per endpoint (arrays
// indexed by endpoint id), carrying ccnoc_pkg::msg_t with valid/ready
// handshakes. The cores, caches and directories that use those ports are
// outside this design. `parked` pulses when an endpoint had to hold back a
// message that overtook an earlier one on the other network.
// Sizes, flit widths and two-flit buffers follow the published design.
module ccnoc_top #(
  parameter int unsigned MESH_X      = ccnoc_pkg::MESH_X,
  parameter int unsigned MESH_Y      = ccnoc_pkg::MESH_Y,
  parameter int unsigned REQ_FLIT_W  = ccnoc_pkg::REQ_FLIT_W,
  parameter int unsigned RESP_FLIT_W = ccnoc_pkg::RESP_FLIT_W,
  parameter int unsigned DEPTH       = ccnoc_pkg::BUF_DEPTH,
  parameter int unsigned PARK_DEPTH  = 4,
  localparam int unsigned NEP        = MESH_X * MESH_Y * 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NEP-1:0]          tx_valid,
  output logic [NEP-1:0]          tx_ready,
  input  ccnoc_pkg::msg_t         tx_msg [NEP],
  output logic [NEP-1:0]          rx_valid,
  input  logic [NEP-1:0]          rx_ready,
  output ccnoc_pkg::msg_t         rx_msg [NEP],
  output logic [NEP-1:0]          parked
);
  import ccnoc_pkg::*;

  logic [NEP-1:0]                  rq_in_valid, rq_in_on, rq_out_valid, rq_out_on;
  logic [NEP-1:0][REQ_FLIT_W+1:0]  rq_in_flit, rq_out_flit;
  logic [NEP-1:0]                  rs_in_valid, rs_in_on, rs_out_valid, rs_out_on;
  logic [NEP-1:0][RESP_FLIT_W+1:0] rs_in_flit, rs_out_flit;

  mesh_network #(.FLIT_W(REQ_FLIT_W), .MESH_X(MESH_X), .MESH_Y(MESH_Y),
                 .DEPTH(DEPTH)) u_req_net (
    .clk, .rst_n,
    .ep_in_valid (rq_in_valid),
    .ep_in_flit  (rq_in_flit),
    .ep_in_on    (rq_in_on),
    .ep_out_valid(rq_out_valid),
    .ep_out_flit (rq_out_flit),
    .ep_out_on   (rq_out_on)
  );

  mesh_network #(.FLIT_W(RESP_FLIT_W), .MESH_X(MESH_X), .MESH_Y(MESH_Y),
                 .DEPTH(DEPTH)) u_resp_net (
    .clk, .rst_n,
    .ep_in_valid (rs_in_valid),
    .ep_in_flit  (rs_in_flit),
    .ep_in_on    (rs_in_on),
    .ep_out_valid(rs_out_valid),
    .ep_out_flit (rs_out_flit),
    .ep_out_on   (rs_out_on)
  );

  for (genvar e = 0; e < NEP; e++) begin : g_ni
    network_interface #(.EP_ID(e), .REQ_FLIT_W(REQ_FLIT_W),
                        .RESP_FLIT_W(RESP_FLIT_W), .PARK_DEPTH(PARK_DEPTH),
                        .NUM_EP(NEP)) u_ni (
      .clk, .rst_n,
      .tx_valid      (tx_valid[e]),
      .tx_ready      (tx_ready[e]),
      .tx_msg        (tx_msg[e]),
      .rx_valid      (rx_valid[e]),
      .rx_ready      (rx_ready[e]),
      .rx_msg        (rx_msg[e]),
      .req_out_valid (rq_in_valid[e]),
      .req_out_flit  (rq_in_flit[e]),
      .req_out_on    (rq_in_on[e]),
      .req_in_valid  (rq_out_valid[e]),
      .req_in_flit   (rq_out_flit[e]),
      .req_in_on     (rq_out_on[e]),
      .resp_out_valid(rs_in_valid[e]),
      .resp_out_flit (rs_in_flit[e]),
      .resp_out_on   (rs_in_on[e]),
      .resp_in_valid (rs_out_valid[e]),
      .resp_in_flit  (rs_out_flit[e]),
      .resp_in_on    (rs_out_on[e]),
      .parked        (parked[e])
    );
  end

endmodule

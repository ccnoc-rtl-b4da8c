// network_interface: attaches one tile client (core L1 controllers, or the L2
// slice with its directory slice) to both sub-networks of its tile.
//
// Send side: the client offers one message at a time (tx_valid/tx_ready).
// Requests (cls = CLS_REQ) go to the packetizer of the narrow request
// network, responses to the packetizer of the wide response network; the two
// packetizers run in parallel, so a request and a response can be on the
// wires at once. The interface fills in the source id (its own EP_ID) and a
// sequence number counted per destination over both classes; the client's
// values of those two header fields are ignored.
// Receive side: a depacketizer per network rebuilds messages and ni_order
// hands them to the client (rx_valid/rx_ready) in the order each source sent
// them. The split of traffic by class and the receive-side ordering follow
// the published design; the sequence numbering is this implementation's way
// of keeping that order.
module network_interface #(
  parameter int unsigned EP_ID       = 0,
  parameter int unsigned REQ_FLIT_W  = ccnoc_pkg::REQ_FLIT_W,
  parameter int unsigned RESP_FLIT_W = ccnoc_pkg::RESP_FLIT_W,
  parameter int unsigned PARK_DEPTH  = 4,
  parameter int unsigned NUM_EP      = ccnoc_pkg::NUM_EP
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // client send
  input  logic                   tx_valid,
  output logic                   tx_ready,
  input  ccnoc_pkg::msg_t        tx_msg,
  // client receive
  output logic                   rx_valid,
  input  logic                   rx_ready,
  output ccnoc_pkg::msg_t        rx_msg,
  // request network: to the switch, from the switch
  output logic                   req_out_valid,
  output logic [REQ_FLIT_W+1:0]  req_out_flit,
  input  logic                   req_out_on,
  input  logic                   req_in_valid,
  input  logic [REQ_FLIT_W+1:0]  req_in_flit,
  output logic                   req_in_on,
  // response network: to the switch, from the switch
  output logic                   resp_out_valid,
  output logic [RESP_FLIT_W+1:0] resp_out_flit,
  input  logic                   resp_out_on,
  input  logic                   resp_in_valid,
  input  logic [RESP_FLIT_W+1:0] resp_in_flit,
  output logic                   resp_in_on,
  // event: a message was parked while being reordered
  output logic                   parked
);
  import ccnoc_pkg::*;

  // ---------------- send ----------------
  logic [SEQ_W-1:0] tx_seq [NUM_EP];
  msg_hdr_t         hdr;
  logic             req_rdy, resp_rdy, accept;

  always_comb begin
    hdr     = tx_msg.hdr;
    hdr.src = EP_W'(EP_ID);
    hdr.seq = tx_seq[tx_msg.hdr.dst];
  end

  assign tx_ready = (tx_msg.cls == CLS_REQ) ? req_rdy : resp_rdy;
  assign accept   = tx_valid && tx_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int e = 0; e < NUM_EP; e++) tx_seq[e] <= '0;
    end else if (accept) begin
      tx_seq[tx_msg.hdr.dst] <= tx_seq[tx_msg.hdr.dst] + 1'b1;
    end
  end

  ni_packetizer #(.FLIT_W(REQ_FLIT_W)) u_req_tx (
    .clk, .rst_n,
    .msg_valid(tx_valid && tx_msg.cls == CLS_REQ),
    .msg_ready(req_rdy),
    .msg_hdr  (hdr),
    .msg_data (tx_msg.data),
    .out_valid(req_out_valid),
    .out_flit (req_out_flit),
    .out_on   (req_out_on)
  );

  ni_packetizer #(.FLIT_W(RESP_FLIT_W)) u_resp_tx (
    .clk, .rst_n,
    .msg_valid(tx_valid && tx_msg.cls == CLS_RESP),
    .msg_ready(resp_rdy),
    .msg_hdr  (hdr),
    .msg_data (tx_msg.data),
    .out_valid(resp_out_valid),
    .out_flit (resp_out_flit),
    .out_on   (resp_out_on)
  );

  // ---------------- receive ----------------
  logic rq_valid, rq_ready, rs_valid, rs_ready;
  msg_t rq_msg, rs_msg;

  ni_depacketizer #(.FLIT_W(REQ_FLIT_W), .CLS(CLS_REQ)) u_req_rx (
    .clk, .rst_n,
    .in_valid (req_in_valid),
    .in_flit  (req_in_flit),
    .in_on    (req_in_on),
    .msg_valid(rq_valid),
    .msg_ready(rq_ready),
    .msg      (rq_msg)
  );

  ni_depacketizer #(.FLIT_W(RESP_FLIT_W), .CLS(CLS_RESP)) u_resp_rx (
    .clk, .rst_n,
    .in_valid (resp_in_valid),
    .in_flit  (resp_in_flit),
    .in_on    (resp_in_on),
    .msg_valid(rs_valid),
    .msg_ready(rs_ready),
    .msg      (rs_msg)
  );

  ni_order #(.PARK_DEPTH(PARK_DEPTH), .NUM_EP(NUM_EP)) u_order (
    .clk, .rst_n,
    .req_valid (rq_valid),
    .req_ready (rq_ready),
    .req_msg   (rq_msg),
    .resp_valid(rs_valid),
    .resp_ready(rs_ready),
    .resp_msg  (rs_msg),
    .out_valid (rx_valid),
    .out_ready (rx_ready),
    .out_msg   (rx_msg),
    .parked    (parked)
  );

endmodule

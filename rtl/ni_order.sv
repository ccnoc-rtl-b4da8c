// ni_order: keeps messages from each source in the order they were sent.
//
// Requests and responses travel on separate sub-networks, so a request and a
// response from the same source can overtake each other. The sending network
// interface numbers its messages per destination, over both classes
// (msg_hdr_t.seq); this unit delivers a message only when its number is the
// next expected one from its source. Each sub-network is in order per
// source/destination pair (static routing, FIFO buffers), so only the front
// message of each network can be the next one. A front message that is not
// yet due is moved into a small parking store (PARK_DEPTH entries) so that
// the network behind it keeps draining; a parked message leaves as soon as it
// becomes due. If the store is full, a front message that is not due waits.
// The published design states the ordering requirement only; sequence
// numbers, the parking store and its depth are this implementation's choices.
//
// Priority each cycle: a due parked message, then a due request, then a due
// response; one message is delivered per cycle (out_valid/out_ready) and at
// most one front message is parked per cycle.
module ni_order #(
  parameter int unsigned PARK_DEPTH = 4,
  parameter int unsigned NUM_EP     = ccnoc_pkg::NUM_EP
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  ccnoc_pkg::msg_t  req_msg,
  input  logic             resp_valid,
  output logic             resp_ready,
  input  ccnoc_pkg::msg_t  resp_msg,
  output logic             out_valid,
  input  logic             out_ready,
  output ccnoc_pkg::msg_t  out_msg,
  output logic             parked      // a message was parked this cycle
);
  import ccnoc_pkg::*;

  localparam int unsigned PW = (PARK_DEPTH > 1) ? $clog2(PARK_DEPTH) : 1;

  logic [SEQ_W-1:0] exp_seq [NUM_EP];
  logic [PARK_DEPTH-1:0] park_v;
  msg_t                  park_m [PARK_DEPTH];

  function automatic logic due(msg_t m, logic [SEQ_W-1:0] e);
    return m.hdr.seq == e;
  endfunction

  logic [PARK_DEPTH-1:0] park_due;
  logic                  req_due, resp_due;
  logic                  from_park, from_req, from_resp;
  logic [PW-1:0]         park_sel, free_sel;
  logic                  free_found;
  logic                  deliver, park_req, park_resp;

  always_comb begin
    for (int p = 0; p < PARK_DEPTH; p++)
      park_due[p] = park_v[p] && due(park_m[p], exp_seq[park_m[p].hdr.src]);
    req_due  = req_valid  && due(req_msg,  exp_seq[req_msg.hdr.src]);
    resp_due = resp_valid && due(resp_msg, exp_seq[resp_msg.hdr.src]);

    park_sel = '0;
    for (int p = PARK_DEPTH - 1; p >= 0; p--)
      if (park_due[p]) park_sel = PW'(p);
    free_found = 1'b0;
    free_sel   = '0;
    for (int p = PARK_DEPTH - 1; p >= 0; p--)
      if (!park_v[p]) begin
        free_found = 1'b1;
        free_sel   = PW'(p);
      end

    from_park = (park_due != '0);
    from_req  = !from_park && req_due;
    from_resp = !from_park && !req_due && resp_due;

    out_valid = from_park || req_due || resp_due;
    out_msg   = from_park ? park_m[park_sel] : (req_due ? req_msg : resp_msg);
    deliver   = out_valid && out_ready;

    park_req  = req_valid && !req_due && free_found;
    park_resp = resp_valid && !resp_due && free_found && !park_req;

    req_ready  = (deliver && from_req)  || park_req;
    resp_ready = (deliver && from_resp) || park_resp;
    parked     = park_req || park_resp;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      park_v <= '0;
      for (int e = 0; e < NUM_EP; e++) exp_seq[e] <= '0;
    end else begin
      if (deliver) begin
        exp_seq[out_msg.hdr.src] <= exp_seq[out_msg.hdr.src] + 1'b1;
        if (from_park) park_v[park_sel] <= 1'b0;
      end
      if (park_req || park_resp) park_v[free_sel] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (park_req)       park_m[free_sel] <= req_msg;
    else if (park_resp) park_m[free_sel] <= resp_msg;
  end

endmodule

// ni_depacketizer: reassembles the flits of one sub-network into a message.
//
// Flits from the switch's network-interface output are written, in arrival
// order, into an assembly register; the tail flit completes the message,
// which is then held on msg_valid until msg_ready takes it. While a complete
// message is held the unit signals `off` to the switch (in_on low), so the
// next packet waits in the switch buffer. Layout is the inverse of
// ni_packetizer: header flits first, then (long messages) the cache block;
// the block reads as zero for a short message. The message class is fixed by
// the CLS parameter, since each sub-network carries a single class.
module ni_depacketizer #(
  parameter int unsigned         FLIT_W = ccnoc_pkg::REQ_FLIT_W,
  parameter ccnoc_pkg::msg_class_e CLS  = ccnoc_pkg::CLS_REQ
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [FLIT_W+1:0]     in_flit,
  output logic                  in_on,
  output logic                  msg_valid,
  input  logic                  msg_ready,
  output ccnoc_pkg::msg_t       msg
);
  import ccnoc_pkg::*;

  localparam int unsigned HF  = hdr_flits(FLIT_W);
  localparam int unsigned DF  = data_flits(FLIT_W);
  localparam int unsigned TOT = HF + DF;
  localparam int unsigned CW  = $clog2(TOT + 1);

  logic [TOT*FLIT_W-1:0] asm_q;
  logic [CW-1:0]         cnt;
  logic                  done;

  assign in_on     = !done;
  assign msg_valid = done;

  always_comb begin
    msg.cls  = CLS;
    msg.hdr  = asm_q[HDR_W-1:0];
    msg.data = asm_q[HF*FLIT_W +: BLOCK_BITS];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt   <= '0;
      done  <= 1'b0;
      asm_q <= '0;
    end else if (done) begin
      if (msg_ready) begin
        done <= 1'b0;
        cnt  <= '0;
      end
    end else if (in_valid) begin
      if (in_flit[FLIT_W]) begin
        // head flit: start a new message with an empty block
        asm_q                <= '0;
        asm_q[FLIT_W-1:0]    <= in_flit[FLIT_W-1:0];
        cnt                  <= CW'(1);
      end else begin
        asm_q[cnt*FLIT_W +: FLIT_W] <= in_flit[FLIT_W-1:0];
        cnt                         <= cnt + 1'b1;
      end
      done <= in_flit[FLIT_W+1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && !done && in_valid && !in_flit[FLIT_W])
      a_len: assert (cnt < CW'(TOT))
        else $error("ni_depacketizer: packet longer than a long message");
  end

endmodule

// ni_packetizer: splits one message into the flits of one sub-network.
//
// A message is a 72-bit header (ccnoc_pkg::msg_hdr_t) and, for long messages,
// a 512-bit cache block. The header is cut into ceil(72/FLIT_W) flits and the
// block into ceil(512/FLIT_W) flits, each part starting on a flit boundary.
// At 48 bits this gives 2 flits for a short and 13 for a long message; at
// 128 bits 1 and 5, matching the flit counts of the published design. The
// first flit is marked head, the last tail (one flit can be both).
//
// Interface: msg_valid/msg_ready accept a message when the unit is idle; the
// flits then leave on out_valid/out_flit, one per cycle while the switch
// input buffer signals out_on (out_valid is never raised while it is off). Flit format as in noc_switch.
module ni_packetizer #(
  parameter int unsigned FLIT_W = ccnoc_pkg::REQ_FLIT_W
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                msg_valid,
  output logic                                msg_ready,
  input  ccnoc_pkg::msg_hdr_t                 msg_hdr,
  input  logic [ccnoc_pkg::BLOCK_BITS-1:0]    msg_data,
  output logic                                out_valid,
  output logic [FLIT_W+1:0]                   out_flit,
  input  logic                                out_on
);
  import ccnoc_pkg::*;

  localparam int unsigned HF  = hdr_flits(FLIT_W);
  localparam int unsigned DF  = data_flits(FLIT_W);
  localparam int unsigned TOT = HF + DF;
  localparam int unsigned CW  = $clog2(TOT + 1);

  logic [TOT*FLIT_W-1:0] sr;       // flits still to send, next one in the LSBs
  logic [CW-1:0]         left;     // flits still to send
  logic                  first;

  logic [HF*FLIT_W-1:0]  hdr_pad;
  logic [DF*FLIT_W-1:0]  data_pad;
  assign hdr_pad  = (HF*FLIT_W)'(msg_hdr);
  assign data_pad = (DF*FLIT_W)'(msg_data);

  logic fire;
  assign msg_ready = (left == '0);
  // A flit is presented only while the switch buffer is on.
  assign out_valid = (left != '0) && out_on;
  assign fire      = out_valid;
  assign out_flit  = {left == CW'(1), first, sr[FLIT_W-1:0]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left  <= '0;
      first <= 1'b0;
      sr    <= '0;
    end else if (msg_valid && msg_ready) begin
      sr    <= {data_pad, hdr_pad};
      left  <= msg_hdr.is_long ? CW'(TOT) : CW'(HF);
      first <= 1'b1;
    end else if (fire) begin
      sr    <= sr >> FLIT_W;
      left  <= left - 1'b1;
      first <= 1'b0;
    end
  end

endmodule

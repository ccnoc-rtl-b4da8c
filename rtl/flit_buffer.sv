// flit_buffer: switch input buffer with on/off flow control.
//
// A small FIFO (two flits deep by default, as in the published switch) that
// holds flits arriving on one input port. It raises `on` towards the upstream
// sender while it has a free slot and drops it ("off") when it is full; the
// sender may present a flit only while `on` is high. `on` is taken from the
// registered fill level, so the sender sees it in the same cycle and two slots
// already sustain one flit per cycle. That zero-delay on/off timing is this
// implementation's choice.
//
// Interface: in_valid/in_flit write a flit; out_valid/out_flit show the oldest
// flit; pop removes it in the same cycle. A flit written into an empty buffer
// can be read in the next cycle. Flits are FW bits wide and opaque here.
module flit_buffer #(
  parameter int unsigned FW    = 50,
  parameter int unsigned DEPTH = ccnoc_pkg::BUF_DEPTH
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [FW-1:0] in_flit,
  output logic          on,
  output logic          out_valid,
  output logic [FW-1:0] out_flit,
  input  logic          pop
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [FW-1:0] mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] count;

  logic push, do_pop;
  assign push   = in_valid && on;
  assign do_pop = pop && out_valid;

  assign on        = (count != CW'(DEPTH));
  assign out_valid = (count != '0);
  assign out_flit  = mem[rd_ptr];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push)   wr_ptr <= incr(wr_ptr);
      if (do_pop) rd_ptr <= incr(rd_ptr);
      count <= count + CW'(push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_flit;
  end

  // The sender must respect the off state.
  always_ff @(posedge clk) begin
    if (rst_n && in_valid)
      a_no_overflow: assert (on) else $error("flit_buffer: flit sent while off");
  end

endmodule

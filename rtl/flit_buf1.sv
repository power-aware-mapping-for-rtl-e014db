// flit_buf1: the one-flit buffer placed at the end of every wire segment
// inside a switch box.
//
// It registers the flit that arrives on a segment, so a long wire built by
// chaining several segments through switch boxes is cut into one-segment
// pipeline stages and every segment is driven afresh (the buffer acts as a
// repeater). Placing one buffer per segment end follows the design
// description; the valid/ready handshake is this design's own choice.
//
// Interface: in_valid/in_flit/in_ready from the segment, out_valid/out_flit/
// out_ready towards the switch connection. A flit is taken when in_valid and
// in_ready are both high at a rising clock edge and is offered on the next
// cycle. in_ready is simply "buffer empty", a register output, so no
// combinational path runs backwards through a chain of switch boxes; the
// price is that one buffer passes at most one flit every two cycles.
// busy is high while a flit is held.
module flit_buf1
  import noc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  flit_t in_flit,
  output logic  in_ready,
  output logic  out_valid,
  output flit_t out_flit,
  input  logic  out_ready,
  output logic  busy
);

  logic  full_q;
  flit_t flit_q;

  assign in_ready  = !full_q;
  assign out_valid = full_q;
  assign out_flit  = flit_q;
  assign busy      = full_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q <= 1'b0;
      flit_q <= '0;
    end else begin
      if (in_valid && in_ready) begin
        full_q <= 1'b1;
        flit_q <= in_flit;
      end else if (out_ready) begin
        full_q <= 1'b0;
      end
    end
  end

endmodule

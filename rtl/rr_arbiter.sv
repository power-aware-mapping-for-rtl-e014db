// rr_arbiter: round-robin arbiter over N requesters.
//
// grant is one-hot (or zero when nothing requests) and is a combinational
// function of req and a priority mask. The mask marks the requesters that
// come after the last winner; the lowest requester inside the mask wins,
// and if none requests there the lowest requester overall wins. When
// advance is high at a clock edge the mask moves to the requesters after
// the current winner, so the winner has lowest priority next time. Used by
// the router's output ports; the round-robin policy is this design's own
// choice.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);

  logic [N-1:0] mask_q;
  logic [N-1:0] masked, mask_next;

  // Lowest set bit of a vector, one-hot.
  function automatic logic [N-1:0] lowest(logic [N-1:0] v);
    logic [N-1:0] g;
    logic         found;
    g = '0;
    found = 1'b0;
    for (int k = 0; k < int'(N); k++) begin
      if (v[k] && !found) begin
        g[k]  = 1'b1;
        found = 1'b1;
      end
    end
    return g;
  endfunction

  assign masked = req & mask_q;
  assign grant  = (masked != '0) ? lowest(masked) : lowest(req);

  // Requesters strictly after the winner.
  always_comb begin
    mask_next = '0;
    for (int i = 1; i < int'(N); i++) mask_next[i] = mask_next[i-1] | grant[i-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mask_q <= '1;
    else if (advance && (req != '0)) mask_q <= mask_next;
  end

endmodule

// cfg_shift_reg: one segment of the configuration memory of the soft PLC.
//
// A soft core has no SRAM configuration cells; its configuration bits are
// ordinary flip-flops that the standard-cell flow synthesizes with the rest of
// the core. Each PTB, interconnect switch and register array owns one segment;
// the segments are chained into a single serial path that loads the
// programming bitstream. The serial loading scheme, the shift direction and the
// reset are this design's choices: the architecture only says that the core's
// function is set by a configuration bitstream.
//
// Interface: while cfg_en is 1 the segment shifts one bit per rising clk edge,
// cfg_in enters at bit W-1 and bit 0 leaves on cfg_out (which feeds the next
// segment's cfg_in). While cfg_en is 0 the bits hold. rst_n (asynchronous,
// active low) clears every bit, which leaves the fabric driving constant 0.
// q presents all bits in parallel to the logic they configure.
module cfg_shift_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_en,
  input  logic         cfg_in,
  output logic         cfg_out,
  output logic [W-1:0] q
);

  logic [W-1:0] q_next;

  if (W > 1) begin : g_wide
    assign q_next = {cfg_in, q[W-1:1]};
  end else begin : g_one
    assign q_next = cfg_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (cfg_en) q <= q_next;
  end

  assign cfg_out = q[0];

endmodule

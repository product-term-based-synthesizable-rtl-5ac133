// ptb_reg_array: global register array of the decoupled sequential
// architecture.
//
// In the decoupled method the flip-flops are not attached to the PTBs. They
// form one shared bank; each register's D input is chosen from the
// unregistered PTB outputs of every level, and the register outputs are
// offered to every interconnect switch, including the first level and the
// output switch, which is how the core closes state feedback loops without a
// combinational loop. The architecture gives the idea; the input multiplexer
// (reused from ptb_switch, with its constant-0 code), the capture rule and the
// reset are this design's choices.
//
// Timing: while cfg_en is 0 every register captures its selected source on
// each rising clk edge; while cfg_en is 1 (configuration being loaded) the
// registers hold. rst_n (asynchronous, active low) clears them.
// Configuration: one ptb_switch segment, N_REG select codes of
// sel_width(N_SRC) bits, register r in bits [r*SW +: SW].
module ptb_reg_array
  import ptb_pkg::*;
#(
  parameter int unsigned N_SRC = 24,
  parameter int unsigned N_REG = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_en,
  input  logic             cfg_in,
  output logic             cfg_out,
  input  logic [N_SRC-1:0] src,
  output logic [N_REG-1:0] q
);

  logic [N_REG-1:0] d;

  ptb_switch #(.N_SRC(N_SRC), .N_DST(N_REG)) u_sel (
    .clk, .rst_n, .cfg_en, .cfg_in, .cfg_out, .src, .dst(d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (!cfg_en) q <= d;
  end

endmodule

// ptb: product-term block, the basic logic element of the PLC.
//
// A PTB is a small PLA. The programmable AND plane forms P product terms, each
// the AND of any chosen subset of the I inputs and their complements; the
// programmable OR plane forms each of the O outputs as the OR of any chosen
// subset of the product terms. The block structure (i inputs with inverters,
// p AND gates, o OR gates) is the architecture's; the configuration bit
// layout and the rules for empty terms are this design's choices:
//   - a product term with no literal selected is 1 (a PLA AND line with
//     nothing pulling it down), and one that selects both polarities of an
//     input is 0;
//   - an output with no product term selected is 0.
//
// Configuration (one cfg_shift_reg segment, CFG_W = 2*I*P + P*O bits):
//   bit t*2*I + 2*j     : term t uses input j           (true literal)
//   bit t*2*I + 2*j + 1 : term t uses NOT input j       (complement literal)
//   bit 2*I*P + k*P + t : output k includes term t
// Interface: din/dout are the user signals; the block is purely
// combinational from din to dout. clk, rst_n, cfg_en, cfg_in and cfg_out only
// load the configuration (see cfg_shift_reg).
// Defaults: I = 10 is where the architecture's area and area-delay curves
// have their minimum; P = 12 and O = 3 are this design's choices.
module ptb #(
  parameter int unsigned I = 10,
  parameter int unsigned P = 12,
  parameter int unsigned O = 3,
  localparam int unsigned CFG_W = 2 * I * P + P * O
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_en,
  input  logic         cfg_in,
  output logic         cfg_out,
  input  logic [I-1:0] din,
  output logic [O-1:0] dout
);

  logic [CFG_W-1:0] cfg;

  cfg_shift_reg #(.W(CFG_W)) u_cfg (
    .clk, .rst_n, .cfg_en, .cfg_in, .cfg_out, .q(cfg)
  );

  // AND plane: a literal selected for a term forces the term low when false.
  logic [P-1:0] pterm;

  always_comb begin
    for (int t = 0; t < P; t++) begin
      pterm[t] = 1'b1;
      for (int j = 0; j < I; j++) begin
        if (cfg[t*2*I + 2*j]     && !din[j]) pterm[t] = 1'b0;
        if (cfg[t*2*I + 2*j + 1] &&  din[j]) pterm[t] = 1'b0;
      end
    end
  end

  // OR plane.
  always_comb begin
    for (int k = 0; k < O; k++) begin
      dout[k] = |(pterm & cfg[2*I*P + k*P +: P]);
    end
  end

endmodule

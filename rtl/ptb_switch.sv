// ptb_switch: interconnect switch of the PLC (a level switch or the output
// switch).
//
// Every destination pin (a PTB input of the level, or a primary output) is
// driven by its own multiplexer that can pick any of the N_SRC signals
// offered to the switch, so placement and routing never run out of routes
// ("full connectivity"). Which signals a switch is offered decides the
// architecture: the core only offers primary inputs, registered signals and
// the outputs of earlier levels, so an unprogrammed fabric has no
// combinational loop. That is arranged by the top level, not here.
//
// Select encoding (this design's choice): code 0 gives a constant 0, code s
// in 1..N_SRC gives src[s-1], codes above N_SRC give 0.
// Configuration (one cfg_shift_reg segment, CFG_W = N_DST*SW bits):
//   bits [d*SW +: SW] : select code of destination d
// Interface: src to dst is purely combinational. clk, rst_n, cfg_en, cfg_in
// and cfg_out only load the configuration.
module ptb_switch
  import ptb_pkg::*;
#(
  parameter int unsigned N_SRC = 16,
  parameter int unsigned N_DST = 10,
  localparam int unsigned SW    = sel_width(N_SRC),
  localparam int unsigned CFG_W = N_DST * SW,
  localparam int unsigned NCH   = 1 << SW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_en,
  input  logic             cfg_in,
  output logic             cfg_out,
  input  logic [N_SRC-1:0] src,
  output logic [N_DST-1:0] dst
);

  logic [CFG_W-1:0] cfg;

  cfg_shift_reg #(.W(CFG_W)) u_cfg (
    .clk, .rst_n, .cfg_en, .cfg_in, .cfg_out, .q(cfg)
  );

  // Source list with the constant-0 entry prepended, padded to 2**SW entries
  // so that every select code indexes a defined bit.
  logic [NCH-1:0] choices;
  assign choices = NCH'({src, 1'b0});

  always_comb begin
    for (int d = 0; d < N_DST; d++) begin
      dst[d] = choices[cfg[d*SW +: SW]];
    end
  end

endmodule

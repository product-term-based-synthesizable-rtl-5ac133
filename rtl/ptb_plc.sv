// ptb_plc: synthesizable product-term programmable logic core (top level).
//
// The core is written as ordinary RTL so that an SoC team can synthesize,
// place and route it together with the rest of the chip; what it computes is
// set afterwards by loading a configuration bitstream. Its logic elements are
// product-term blocks (ptb), arranged in LEVELS levels. Level l has NPTB[l]
// PTBs, and every PTB input is driven by that level's interconnect switch
// (ptb_switch). A final output switch drives the primary outputs.
//
// Signal flow is one-way. The switch of level l is offered
//   - the primary inputs,
//   - the registered signals (see SEQ_MODE),
//   - the unregistered outputs of all PTBs in levels 0..l-1;
// the output switch is offered all of these for every level. An unprogrammed
// fabric therefore cannot form a combinational loop. Choosing NPTB equal in
// every level gives the rectangular architecture; a count that shrinks level
// by level gives the triangular one. The defaults follow the proof-of-concept
// core: 5 PTBs in the first level, 3 in the second, and the switches M1, M2
// and Mout (g_lvl[0].u_sw, g_lvl[1].u_sw and u_osw here).
//
// NPTB has MAX_LEVELS (8, from ptb_pkg) entries so that its type does not
// depend on LEVELS; entries from LEVELS on are ignored.
//
// Sequential support (SEQ_MODE):
//   SEQ_DUAL      every PTB output also has a flip-flop; the flip-flop outputs
//                 (the registered network) reach every switch, including the
//                 first level and the output switch.
//   SEQ_DECOUPLED a global register array (ptb_reg_array) of N_REG registers
//                 takes its inputs from any PTB output and offers its outputs
//                 to every switch.
//   SEQ_NONE      combinational only (this design's addition).
// Dual-network flip-flops, like the register array, capture on every rising
// clk edge while cfg_en is 0 and hold while a bitstream is being loaded.
//
// Signal bus seen by the switches (bit 0 first):
//   [0 .. N_IN-1]                primary inputs pi
//   [N_IN .. N_IN+N_REGSIG-1]    registered signals (dual: PTB g output k is
//                                entry g*PTB_O+k; decoupled: register r)
//   then PTB g output k, g counting PTBs level by level from level 0.
// Switch l uses the first n_src(l) entries; its select code s picks entry s-1
// (code 0 gives constant 0).
//
// Configuration chain, in shift order from cfg_in: switch of level 0, the
// PTBs of level 0 (PTB 0 first), switch of level 1, its PTBs, ..., the output
// switch, then (SEQ_DECOUPLED only) the register array; cfg_out is the far
// end. Hold cfg_en high for CFG_BITS clocks and feed the whole bitstream,
// last segment's bit 0 first. The number of primary pins, P, O, N_REG, the
// serial configuration scheme and all encodings are this design's choices.
module ptb_plc
  import ptb_pkg::*;
#(
  parameter int unsigned N_IN  = 16,
  parameter int unsigned N_OUT = 8,
  parameter int unsigned LEVELS = 2,
  parameter int unsigned NPTB [MAX_LEVELS] = '{5, 3, 0, 0, 0, 0, 0, 0},
  parameter int unsigned PTB_I = 10,
  parameter int unsigned PTB_P = 12,
  parameter int unsigned PTB_O = 3,
  parameter seq_mode_e   SEQ_MODE = SEQ_DUAL,
  parameter int unsigned N_REG = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_en,
  input  logic             cfg_in,
  output logic             cfg_out,
  input  logic [N_IN-1:0]  pi,
  output logic [N_OUT-1:0] po
);

  // Number of PTBs in the levels before level l.
  function automatic int unsigned ptb_before(int unsigned l);
    int unsigned n = 0;
    for (int unsigned m = 0; m < l; m++) n += NPTB[m];
    return n;
  endfunction

  localparam int unsigned N_PTB    = ptb_before(LEVELS);
  localparam int unsigned N_PTBOUT = N_PTB * PTB_O;
  localparam int unsigned N_REGSIG = (SEQ_MODE == SEQ_DUAL)      ? N_PTBOUT :
                                     (SEQ_MODE == SEQ_DECOUPLED) ? N_REG : 0;
  localparam int unsigned COMB_BASE = N_IN + N_REGSIG;
  localparam int unsigned BUS_W     = COMB_BASE + N_PTBOUT;
  localparam int unsigned NSEG      = N_PTB + LEVELS + 1 +
                                      ((SEQ_MODE == SEQ_DECOUPLED) ? 1 : 0);

  // Sources offered to the switch of level l (l == LEVELS: output switch).
  function automatic int unsigned n_src(int unsigned l);
    return COMB_BASE + ptb_before(l) * PTB_O;
  endfunction

  // Elaboration-time parameter checks.
  if (LEVELS < 1 || LEVELS > MAX_LEVELS) begin : g_bad_levels
    $error("ptb_plc: LEVELS must be 1..%0d", MAX_LEVELS);
  end
  for (genvar l = 0; l < LEVELS; l++) begin : g_chk
    if (NPTB[l] < 1) begin : g_bad_nptb
      $error("ptb_plc: level %0d has no PTB", l);
    end
  end

  // Length of the configuration chain: the number of clocks cfg_en must be
  // held high to load one complete bitstream.
  function automatic int unsigned cfg_bits();
    int unsigned n = N_PTB * (2 * PTB_I * PTB_P + PTB_P * PTB_O);
    for (int unsigned l = 0; l < LEVELS; l++)
      n += NPTB[l] * PTB_I * sel_width(n_src(l));
    n += N_OUT * sel_width(BUS_W);
    if (SEQ_MODE == SEQ_DECOUPLED) n += N_REG * sel_width(N_PTBOUT);
    return n;
  endfunction

  localparam int unsigned CFG_BITS = cfg_bits();

  logic [BUS_W-1:0] bus;
  logic [NSEG:0]    chain;

  assign chain[0] = cfg_in;
  assign cfg_out  = chain[NSEG];

  assign bus[N_IN-1:0] = pi;

  // Logic levels: switch plus PTBs.
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned NP    = NPTB[l];
    localparam int unsigned FIRST = ptb_before(l);   // global index of PTB 0
    localparam int unsigned SEG   = FIRST + l;       // chain index of switch
    localparam int unsigned NS    = n_src(l);

    logic [NP*PTB_I-1:0] pin;

    ptb_switch #(.N_SRC(NS), .N_DST(NP * PTB_I)) u_sw (
      .clk, .rst_n, .cfg_en,
      .cfg_in(chain[SEG]), .cfg_out(chain[SEG+1]),
      .src(bus[NS-1:0]), .dst(pin)
    );

    for (genvar k = 0; k < NP; k++) begin : g_ptb
      ptb #(.I(PTB_I), .P(PTB_P), .O(PTB_O)) u_ptb (
        .clk, .rst_n, .cfg_en,
        .cfg_in(chain[SEG+1+k]), .cfg_out(chain[SEG+2+k]),
        .din(pin[k*PTB_I +: PTB_I]),
        .dout(bus[COMB_BASE + (FIRST + k)*PTB_O +: PTB_O])
      );
    end
  end

  // Output switch.
  localparam int unsigned OSEG = N_PTB + LEVELS;

  ptb_switch #(.N_SRC(BUS_W), .N_DST(N_OUT)) u_osw (
    .clk, .rst_n, .cfg_en,
    .cfg_in(chain[OSEG]), .cfg_out(chain[OSEG+1]),
    .src(bus), .dst(po)
  );

  // Sequential support.
  if (SEQ_MODE == SEQ_DUAL) begin : g_dual
    logic [N_PTBOUT-1:0] ff;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)       ff <= '0;
      else if (!cfg_en) ff <= bus[COMB_BASE +: N_PTBOUT];
    end

    assign bus[N_IN +: N_PTBOUT] = ff;
  end else if (SEQ_MODE == SEQ_DECOUPLED) begin : g_dec
    ptb_reg_array #(.N_SRC(N_PTBOUT), .N_REG(N_REG)) u_regs (
      .clk, .rst_n, .cfg_en,
      .cfg_in(chain[OSEG+1]), .cfg_out(chain[OSEG+2]),
      .src(bus[COMB_BASE +: N_PTBOUT]), .q(bus[N_IN +: N_REG])
    );
  end

endmodule

// viterbi_top: low-power systolic Viterbi decoder.
//
// Decodes a rate-1/2 convolutional code of constraint length K from
// hard-decision symbols, one symbol per cycle in which sym_valid is high. The
// selection unit (vit_selection_unit) updates the path metrics, produces the
// decision vector of the stage and the state with the smallest metric; the
// low-power trace-back array (vit_lp_tbu) traces back DEPTH stages from that
// state, reusing routes found earlier and gating the clock of units that have
// nothing to trace, and puts out one decoded bit per symbol.
//
// Interface: sym[1] is the code bit of generator G0, sym[0] that of G1.
// dec_bit/dec_valid give the decoded information bits in order: the bit of
// the symbol accepted at one clock edge is output (dec_valid high for one
// cycle) after the edge that accepts the 2*DEPTH+1-th symbol after it, i.e.
// a latency of 2*DEPTH+1 accepted symbols (21 at the defaults). merge and
// trace_en show, per trace-back unit, route reuse and clocked route
// registers. sym_valid low stalls the whole pipeline.
//
// The SU-then-trace-back-array structure, the 4-state K = 3 example with ten
// trace-back units and the route reuse with clock gating follow the design
// description; the code generators and the handshake are this
// implementation's choices.
module viterbi_top #(
  parameter int unsigned K     = vit_pkg::K_DEFAULT,
  parameter int unsigned DEPTH = vit_pkg::DEPTH_DEFAULT,
  parameter int unsigned G0    = vit_pkg::G0_DEFAULT,
  parameter int unsigned G1    = vit_pkg::G1_DEFAULT,
  parameter int unsigned PM_W  = vit_pkg::PM_W_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sym_valid,
  input  logic [1:0]       sym,
  output logic             dec_bit,
  output logic             dec_valid,
  output logic [DEPTH-1:0] merge,
  output logic [DEPTH-1:0] trace_en
);

  localparam int unsigned NS  = 1 << (K - 1);
  localparam int unsigned S_W = K - 1;

  logic [NS-1:0]  dv;
  logic [S_W-1:0] min_state;
  logic           stage_valid;

  vit_selection_unit #(.K(K), .PM_W(PM_W), .G0(G0), .G1(G1)) u_su (
    .clk         (clk),
    .rst_n       (rst_n),
    .sym_valid   (sym_valid),
    .sym         (sym),
    .dv          (dv),
    .min_state   (min_state),
    .stage_valid (stage_valid)
  );

  vit_lp_tbu #(.K(K), .DEPTH(DEPTH)) u_tbu (
    .clk         (clk),
    .rst_n       (rst_n),
    .sym_valid   (sym_valid),
    .dv          (dv),
    .min_state   (min_state),
    .stage_valid (stage_valid),
    .dec_bit     (dec_bit),
    .dec_valid   (dec_valid),
    .merge       (merge),
    .trace_en    (trace_en)
  );

endmodule

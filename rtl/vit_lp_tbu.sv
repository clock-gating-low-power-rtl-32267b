// vit_lp_tbu: low-power systolic trace-back array.
//
// DEPTH trace-back units (vit_lp_tbu_cell) in a chain. Every accepted symbol
// starts one trace-back route at the smallest-metric state of the newest stage
// and pushes that stage's decision vector into the chain. A route moves one
// unit per symbol while the stage data moves one unit per two symbols, so
// after DEPTH symbols a route started at stage r has reached stage r - DEPTH,
// where its state gives the decoded bit of that stage (the state's MSB is the
// input bit that entered it).
//
// Route reuse: each stage carries a history register with the state of the
// last route that passed it. A route stops as soon as it reaches a stage
// where the history equals its own state, because from there back it would
// retrace the same path; its units are then clock-gated. The first routes,
// with nothing to compare against, run the full DEPTH. When a route has
// stopped, the history of the stage it would have ended at already holds its
// state there, so the output takes the route's own state if it is still
// active and the history otherwise.
//
// Interface: dv/min_state/stage_valid from the selection unit, advancing with
// sym_valid. dec_bit/dec_valid: one decoded bit per accepted symbol,
// registered; the bit of the stage accepted at symbol t appears 2*DEPTH+1
// accepted symbols later with dec_valid high for one cycle. merge and
// trace_en show, per unit, a convergent point found and a clocked route
// register in the current cycle. merge[0] is always 0: unit 0 sees the newest
// stage, which no route has passed yet.
//
// The chain of units, the extra history registers, the route comparison and
// the clock gating follow the design description; the output rule and the
// registered output are this implementation's.
module vit_lp_tbu #(
  parameter int unsigned K     = vit_pkg::K_DEFAULT,
  parameter int unsigned DEPTH = vit_pkg::DEPTH_DEFAULT,
  localparam int unsigned NS   = 1 << (K - 1),
  localparam int unsigned S_W  = K - 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sym_valid,
  input  logic [NS-1:0]    dv,
  input  logic [S_W-1:0]   min_state,
  input  logic             stage_valid,
  output logic             dec_bit,
  output logic             dec_valid,
  output logic [DEPTH-1:0] merge,
  output logic [DEPTH-1:0] trace_en
);

  // Links between units; index j is the input of unit j.
  logic [NS-1:0]  dv_l [DEPTH+1];
  logic           hv_l [DEPTH+1];
  logic [S_W-1:0] hs_l [DEPTH+1];
  logic           sv_l [DEPTH+1];
  logic [S_W-1:0] p_l  [DEPTH+1];
  logic           a_l  [DEPTH+1];

  // Unit 0 sees the newest stage with empty history and a new route
  // starting at its smallest-metric state.
  assign dv_l[0] = dv;
  assign hv_l[0] = 1'b0;
  assign hs_l[0] = '0;
  assign sv_l[0] = stage_valid;
  assign p_l[0]  = min_state;
  assign a_l[0]  = stage_valid;

  for (genvar j = 0; j < DEPTH; j++) begin : g_unit
    vit_lp_tbu_cell #(.K(K)) u_unit (
      .clk      (clk),
      .rst_n    (rst_n),
      .sym_valid(sym_valid),
      .dv_i     (dv_l[j]),
      .hv_i     (hv_l[j]),
      .hs_i     (hs_l[j]),
      .sv_i     (sv_l[j]),
      .p_i      (p_l[j]),
      .a_i      (a_l[j]),
      .dv_o     (dv_l[j+1]),
      .hv_o     (hv_l[j+1]),
      .hs_o     (hs_l[j+1]),
      .sv_o     (sv_l[j+1]),
      .p_o      (p_l[j+1]),
      .a_o      (a_l[j+1]),
      .merge    (merge[j]),
      .trace_en (trace_en[j])
    );
  end

  logic [S_W-1:0] final_state;
  assign final_state = a_l[DEPTH] ? p_l[DEPTH] : hs_l[DEPTH];

  // A route that stopped early relies on the history of its final stage,
  // which an earlier route must have written.
  a_stopped_route_has_history: assert property (
    @(posedge clk) disable iff (!rst_n)
      (sym_valid && sv_l[DEPTH] && !a_l[DEPTH]) |-> hv_l[DEPTH]
  ) else $error("stopped route found no history at the output stage");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_bit   <= 1'b0;
      dec_valid <= 1'b0;
    end else begin
      dec_valid <= sym_valid && sv_l[DEPTH];
      if (sym_valid) dec_bit <= final_state[S_W-1];
    end
  end

endmodule

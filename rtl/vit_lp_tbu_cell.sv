// vit_lp_tbu_cell: one low-power trace-back unit of the systolic array.
//
// Two things flow through a chain of these cells. The stage data of one trellis
// stage moves one register per accepted symbol: its decision vector, its
// stage-valid flag and an extra "history" register (valid flag + state) that
// holds the state at that stage of the most recent trace-back route that ran
// through it. Each cell holds two stage registers, so a stage advances one
// cell every two symbols. A trace-back route moves one cell, and one stage
// back in time, per symbol, so each route meets, in every cell, the stage it
// must step through next.
//
// In each cell the arriving route (state p_i, active flag a_i) is compared with
// the history of the stage it reached:
//   * history valid and equal: the route has met the route before it, and
//     everything older is already in the history. The route stops here
//     (a_o = 0, merge = 1) and the history is left as it is.
//   * otherwise the route writes its state into the history and steps back one
//     stage: p_o = {p_i[K-3:0], dv_i[p_i]} (the predecessor chosen by the
//     decision bit of its state).
// An inactive route passes through as a_o = 0. The route-state register p_o is
// clocked through a vit_clock_gate that is enabled only when this cell traces
// (sym_valid & active & no match), so cells beyond the point where the route
// converged get no clock edges.
//
// Interface: stage inputs (dv_i, hv_i, hs_i, sv_i) come from the previous
// cell's stage outputs (or the selection unit); route inputs (p_i, a_i) from
// the previous cell's route outputs (or the selection unit's smallest-metric
// state). Everything advances on a rising clk edge with sym_valid high. Stage
// outputs are two registers behind the inputs, route outputs one. Reset
// (rst_n low) is asynchronous and clears all registers.
//
// Route reuse by comparing with the stored route and clock gating of the
// converged region follow the design description; the two-register stage
// pipeline that lines up routes with stages, and the exact enable
// condition, are this implementation's.
module vit_lp_tbu_cell #(
  parameter int unsigned K    = vit_pkg::K_DEFAULT,
  localparam int unsigned NS  = 1 << (K - 1),
  localparam int unsigned S_W = K - 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sym_valid,
  // stage data in
  input  logic [NS-1:0]  dv_i,
  input  logic           hv_i,
  input  logic [S_W-1:0] hs_i,
  input  logic           sv_i,
  // route in
  input  logic [S_W-1:0] p_i,
  input  logic           a_i,
  // stage data out (two symbols later)
  output logic [NS-1:0]  dv_o,
  output logic           hv_o,
  output logic [S_W-1:0] hs_o,
  output logic           sv_o,
  // route out (one symbol later)
  output logic [S_W-1:0] p_o,
  output logic           a_o,
  // observation: this cell found a convergent point in this cycle
  output logic           merge,
  // observation: this cell's route register is clocked in this cycle
  output logic           trace_en
);

  logic           match, trace;
  logic [S_W-1:0] p_nxt;
  logic           gclk;

  // first stage register of this cell
  logic [NS-1:0]  dv_m;
  logic           hv_m;
  logic [S_W-1:0] hs_m;
  logic           sv_m;

  always_comb begin
    match    = a_i && hv_i && (hs_i == p_i);
    trace    = a_i && !match;
    merge    = sym_valid && match;
    trace_en = sym_valid && trace;
    p_nxt    = S_W'({p_i, dv_i[p_i]});
  end

  vit_clock_gate u_cg (
    .clk  (clk),
    .en   (trace_en),
    .gclk (gclk)
  );

  // Stage data and route-active flag: advance with every accepted symbol.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dv_m <= '0; hv_m <= 1'b0; hs_m <= '0; sv_m <= 1'b0;
      dv_o <= '0; hv_o <= 1'b0; hs_o <= '0; sv_o <= 1'b0;
      a_o  <= 1'b0;
    end else if (sym_valid) begin
      dv_m <= dv_i;
      sv_m <= sv_i;
      hv_m <= trace ? 1'b1 : hv_i;
      hs_m <= trace ? p_i  : hs_i;
      dv_o <= dv_m; hv_o <= hv_m; hs_o <= hs_m; sv_o <= sv_m;
      a_o  <= trace;
    end
  end

  // Route state: only clocked while this cell is tracing.
  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) p_o <= '0;
    else        p_o <= p_nxt;
  end

endmodule

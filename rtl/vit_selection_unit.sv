// vit_selection_unit: selection unit (SU) of the systolic Viterbi decoder.
//
// Holds one path metric per trellis state. For every accepted symbol each
// state's branch metric process unit (vit_bmpu) adds the Hamming branch
// metrics to its two predecessors' metrics and keeps the smaller; the NS
// decision bits form the decision vector of that stage. The min-selection unit
// (vit_msu) looks at the registered metrics and names the state with the
// smallest metric, which is where the trace-back for that stage starts; its
// metric is subtracted from all metrics at the next update.
//
// Timing: on a rising clock edge with sym_valid high the metrics, decision
// vector and stage_valid register; from then until the next accepted symbol
// dv and min_state describe that stage (combinational from the registers).
// Reset (rst_n low, asynchronous) puts the decoder in state 0: its metric is
// 0 and every other state starts at INIT_BIAS, so paths from the all-zero start
// state win, as the encoder starts there.
//
// The split into per-state processing units and a min-selection unit follows
// the design description; metric width, reset values and tie rules are
// choices of this implementation.
module vit_selection_unit #(
  parameter int unsigned K     = vit_pkg::K_DEFAULT,
  parameter int unsigned PM_W  = vit_pkg::PM_W_DEFAULT,
  parameter int unsigned G0    = vit_pkg::G0_DEFAULT,
  parameter int unsigned G1    = vit_pkg::G1_DEFAULT,
  localparam int unsigned NS   = 1 << (K - 1),
  localparam int unsigned S_W  = K - 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sym_valid,
  input  logic [1:0]      sym,
  output logic [NS-1:0]   dv,
  output logic [S_W-1:0]  min_state,
  output logic            stage_valid
);

  localparam logic [PM_W-1:0] INIT_BIAS = PM_W'(1 << (PM_W - 2));

  logic [PM_W-1:0] pm_q   [NS];
  logic [PM_W-1:0] pm_nxt [NS];
  logic [NS-1:0]   dec;
  logic [PM_W-1:0] min_pm;

  vit_msu #(.NS(NS), .PM_W(PM_W)) u_msu (
    .pm        (pm_q),
    .min_state (min_state),
    .min_pm    (min_pm)
  );

  for (genvar s = 0; s < NS; s++) begin : g_bmpu
    // Predecessors of state s are {s[K-3:0], 0} and {s[K-3:0], 1}.
    localparam int unsigned P0 = ((s << 1) & (NS - 1));
    localparam int unsigned P1 = P0 | 1;
    vit_bmpu #(.K(K), .PM_W(PM_W), .G0(G0), .G1(G1), .STATE(s)) u_bmpu (
      .rx     (sym),
      .pm0    (pm_q[P0]),
      .pm1    (pm_q[P1]),
      .norm   (min_pm),
      .pm_new (pm_nxt[s]),
      .dec    (dec[s])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < NS; s++) pm_q[s] <= (s == 0) ? '0 : INIT_BIAS;
      dv          <= '0;
      stage_valid <= 1'b0;
    end else if (sym_valid) begin
      pm_q        <= pm_nxt;
      dv          <= dec;
      stage_valid <= 1'b1;
    end
  end

endmodule

// vit_msu: min-selection unit.
//
// Scans the path metrics of all NS states and returns the state with the
// smallest metric together with that metric. The state it returns is where a
// new trace-back starts; the metric is used by the branch metric process units
// to normalise the next stage. On equal metrics the lowest-numbered state wins.
//
// Interface: purely combinational; pm is indexed by state number.
// Finding the smallest-metric state is the unit's documented job; the
// linear scan and the tie rule are this implementation's choices.
module vit_msu #(
  parameter int unsigned NS   = 4,
  parameter int unsigned PM_W = vit_pkg::PM_W_DEFAULT,
  localparam int unsigned S_W = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic [PM_W-1:0] pm [NS],
  output logic [S_W-1:0]  min_state,
  output logic [PM_W-1:0] min_pm
);

  always_comb begin
    min_state = '0;
    min_pm    = pm[0];
    for (int unsigned s = 1; s < NS; s++) begin
      if (pm[s] < min_pm) begin
        min_pm    = pm[s];
        min_state = S_W'(s);
      end
    end
  end

endmodule

// vit_bmpu: branch metric process unit of one trellis state.
//
// One instance exists per state of the selection unit. It forms the Hamming
// distance between the received hard-decision symbol and the code symbol of
// each of the two branches entering its state, adds it to the predecessor's
// path metric, keeps the smaller sum (add-compare-select) and reports which
// predecessor won as the decision bit. The metric of the best state of the
// previous stage (`norm`, from the min-selection unit) is subtracted so the
// metrics stay small.
//
// Interface: purely combinational. pm0/pm1 are the metrics of predecessors
// {STATE[K-3:0],0} and {STATE[K-3:0],1}; rx is the received symbol, rx[1] the
// first code bit (generator G0) and rx[0] the second (G1). dec = 1 means the
// predecessor ending in 1 won; ties go to predecessor 0.
//
// Hamming-distance branch metrics follow the design description; the
// tie rule, the normalisation by subtraction and the generators are this
// implementation's choices.
module vit_bmpu #(
  parameter int unsigned K     = vit_pkg::K_DEFAULT,
  parameter int unsigned PM_W  = vit_pkg::PM_W_DEFAULT,
  parameter int unsigned G0    = vit_pkg::G0_DEFAULT,
  parameter int unsigned G1    = vit_pkg::G1_DEFAULT,
  parameter int unsigned STATE = 0
) (
  input  logic [1:0]      rx,
  input  logic [PM_W-1:0] pm0,
  input  logic [PM_W-1:0] pm1,
  input  logic [PM_W-1:0] norm,
  output logic [PM_W-1:0] pm_new,
  output logic            dec
);

  localparam logic [K-2:0] S = STATE[K-2:0];

  logic [1:0]      code0, code1;
  logic [1:0]      bm0, bm1;
  logic [PM_W-1:0] cand0, cand1;

  always_comb begin
    // Encoder register of the branch from predecessor d is {S, d}.
    code0 = {vit_pkg::code_bit(32'({S, 1'b0}), G0), vit_pkg::code_bit(32'({S, 1'b0}), G1)};
    code1 = {vit_pkg::code_bit(32'({S, 1'b1}), G0), vit_pkg::code_bit(32'({S, 1'b1}), G1)};
    bm0   = {1'b0, code0[1] ^ rx[1]} + {1'b0, code0[0] ^ rx[0]};
    bm1   = {1'b0, code1[1] ^ rx[1]} + {1'b0, code1[0] ^ rx[0]};
    cand0 = pm0 + PM_W'(bm0);
    cand1 = pm1 + PM_W'(bm1);
    dec   = (cand1 < cand0);
    pm_new = (dec ? cand1 : cand0) - norm;
  end

endmodule

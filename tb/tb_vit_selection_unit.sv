// tb_vit_selection_unit: self-checking testbench of the selection unit.
//
// Encodes random bits with the K = 3, (7,5 octal) code, flips some code bits,
// and feeds the symbols with random stalls. A reference add-compare-select on
// unbounded integer metrics, written here from the trellis definition (no
// normalisation), predicts the decision vector and the smallest-metric state
// of every stage; both are compared after each accepted symbol.
module tb_vit_selection_unit;
  localparam int unsigned K    = 3;
  localparam int unsigned NS   = 4;
  localparam int unsigned S_W  = 2;
  localparam int unsigned PM_W = 8;
  localparam int          BIAS = 1 << (PM_W - 2);

  logic clk = 1'b0, rst_n = 1'b0, sym_valid = 1'b0;
  logic [1:0] sym = '0;
  logic [NS-1:0] dv;
  logic [S_W-1:0] min_state;
  logic stage_valid;

  int checks = 0, failures = 0, stalls = 0;
  int pm [NS];
  logic [NS-1:0] exp_dv;
  int exp_min;
  logic [S_W-1:0] enc_state = '0;

  vit_selection_unit #(.K(K), .PM_W(PM_W), .G0('o7), .G1('o5)) u_dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pm[0] = 0; for (int s = 1; s < NS; s++) pm[s] = BIAS;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (stage_valid !== 1'b0) failures++;
    for (int n = 0; n < 4000; n++) begin
      logic u;
      logic [1:0] c;
      int npm [NS];
      if ($urandom_range(0, 6) == 0) begin
        sym_valid = 1'b0; stalls++;
        @(negedge clk);
      end
      u = 1'($urandom);
      // encoder register {u, s1, s0}: outputs u^s1^s0 and u^s0
      c = {u ^ enc_state[1] ^ enc_state[0], u ^ enc_state[0]};
      enc_state = {u, enc_state[1]};
      if ($urandom_range(0, 9) == 0) c[$urandom_range(0, 1)] ^= 1'b1;
      sym = c; sym_valid = 1'b1;
      // reference ACS
      for (int s = 0; s < NS; s++) begin
        int c0, c1;
        logic [1:0] b0, b1;
        b0 = {s[1] ^ s[0] ^ 1'b0, s[1] ^ 1'b0};
        b1 = {s[1] ^ s[0] ^ 1'b1, s[1] ^ 1'b1};
        c0 = pm[(s << 1) & 3]     + int'(b0[1] ^ c[1]) + int'(b0[0] ^ c[0]);
        c1 = pm[((s << 1) & 3) | 1] + int'(b1[1] ^ c[1]) + int'(b1[0] ^ c[0]);
        exp_dv[s] = (c1 < c0);
        npm[s]    = exp_dv[s] ? c1 : c0;
      end
      pm = npm;
      exp_min = 0;
      for (int s = 1; s < NS; s++) if (pm[s] < pm[exp_min]) exp_min = s;
      @(negedge clk);
      checks += 3;
      if (dv !== exp_dv) begin failures++; $display("stage %0d dv %b expected %b", n, dv, exp_dv); end
      if (min_state !== S_W'(exp_min)) begin failures++; $display("stage %0d min %0d expected %0d", n, min_state, exp_min); end
      if (stage_valid !== 1'b1) failures++;
    end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

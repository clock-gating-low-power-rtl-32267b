// tb_vit_lp_tbu_example: directed test of the trace-back array on a four-state
// worked example.
//
// The survivor path used is, by stage 1..20 (state bits s1 s0):
//   00 00 10 01 10 01 00 00 10 11 01 10 01 00 10 01 00 10 11 01
// Each new stage's smallest-metric state is the path's state there, so every
// route after the first meets the previous route one unit after it starts
// (the convergent point). The path is then continued with random input bits.
// Decision vectors hold, for the path state, the predecessor bit the path
// uses; the other decision bits are random.
// Checks: every decoded bit is the MSB of the path state; only the first route
// runs through all ten units; every later route stops in unit 1; units 2 and
// beyond are clocked only for the first route.
module tb_vit_lp_tbu_example;
  localparam int unsigned K     = 3;
  localparam int unsigned DEPTH = 10;
  localparam int unsigned NS    = 4;
  localparam int unsigned S_W   = 2;
  localparam int unsigned N     = 80;

  logic             clk = 1'b0, rst_n = 1'b0, sym_valid = 1'b0;
  logic [NS-1:0]    dv = '0;
  logic [S_W-1:0]   min_state = '0;
  logic             stage_valid = 1'b0;
  logic             dec_bit, dec_valid;
  logic [DEPTH-1:0] merge, trace_en;

  logic [S_W-1:0] path [N];
  logic [NS-1:0]  dvs  [N];
  localparam logic [S_W-1:0] EXAMPLE [20] = '{2'b00, 2'b00, 2'b10, 2'b01, 2'b10, 2'b01, 2'b00,
    2'b00, 2'b10, 2'b11, 2'b01, 2'b10, 2'b01, 2'b00, 2'b10, 2'b01, 2'b00, 2'b10, 2'b11, 2'b01};

  int checks = 0, failures = 0, outs = 0, acc = 0;
  int merges_u1 = 0, merges_other = 0, deep_clocks = 0, u1_clocks = 0;

  vit_lp_tbu #(.K(K), .DEPTH(DEPTH)) u_dut (
    .clk, .rst_n, .sym_valid, .dv, .min_state, .stage_valid,
    .dec_bit, .dec_valid, .merge, .trace_en
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (sym_valid) begin
      merges_u1    += int'(merge[1]);
      merges_other += $countones(merge) - int'(merge[1]);
      u1_clocks    += int'(trace_en[1]);
      deep_clocks  += $countones(trace_en[DEPTH-1:2]);
    end
  end

  always @(negedge clk) begin
    if (dec_valid) begin
      int t;
      t = acc - 2 * DEPTH - 2;
      checks += 2;
      if (t != outs) begin failures++; $display("output %0d arrived as stage %0d", outs, t); end
      if (dec_bit !== path[t][1]) begin
        failures++;
        $display("stage %0d decoded %0b, path state %b", t + 1, dec_bit, path[t]);
      end
      outs++;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      path[i] = (i < 20) ? EXAMPLE[i] : S_W'({1'($urandom), path[i-1][1]});
      dvs[i]  = NS'($urandom);
      if (i > 0) dvs[i][path[i]] = path[i-1][0];
    end
    // the example's path must itself be a trellis path
    for (int i = 1; i < 20; i++) begin
      checks++;
      if (path[i][0] !== path[i-1][1]) begin failures++; $display("example path broken at %0d", i); end
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      sym_valid = 1'b1;
      @(posedge clk);
      dv <= dvs[i]; min_state <= path[i]; stage_valid <= 1'b1;
      acc++;
    end
    @(negedge clk);
    sym_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks += 4;
    // routes start at every stage; the first has nothing to meet, and the
    // last two have not reached unit 1 when the input stops
    if (merges_u1 != N - 3) begin failures++; $display("unit-1 convergences %0d, expected %0d", merges_u1, N - 3); end
    if (merges_other != 0)  begin failures++; $display("%0d convergences outside unit 1", merges_other); end
    if (u1_clocks != 1)     begin failures++; $display("unit 1 clocked %0d times, expected 1", u1_clocks); end
    if (deep_clocks != DEPTH - 2) begin failures++; $display("units 2.. clocked %0d times, expected %0d", deep_clocks, DEPTH - 2); end
    $display("decoded %0d bits; convergences in unit 1: %0d; route clocks in units 2..%0d: %0d",
             outs, merges_u1, DEPTH - 1, deep_clocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

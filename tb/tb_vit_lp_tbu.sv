// tb_vit_lp_tbu: self-checking testbench of the low-power trace-back array.
//
// Feeds random decision vectors and random start states (standing in for the
// selection unit), with random one-cycle stalls, and compares every decoded
// bit with a conventional full-depth trace-back computed here from the same
// data. Also checks the output latency (2*DEPTH+1 accepted symbols), that
// every accepted stage yields one bit, and that route reuse, clock gating,
// full-depth routes and stalls all occur.
module tb_vit_lp_tbu;
  localparam int unsigned K      = 3;
  localparam int unsigned DEPTH  = 10;
  localparam int unsigned NS     = 1 << (K - 1);
  localparam int unsigned S_W    = K - 1;
  localparam int unsigned NSTAGE = 3000;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             sym_valid = 1'b0;
  logic [NS-1:0]    dv = '0;
  logic [S_W-1:0]   min_state = '0;
  logic             stage_valid = 1'b0;
  logic             dec_bit, dec_valid;
  logic [DEPTH-1:0] merge, trace_en;

  int checks = 0, failures = 0;
  int acc = 0;            // accepted symbols so far
  int outs = 0;           // decoded bits seen
  int merges = 0, gated = 0, full_routes = 0, stalls = 0;

  logic [NS-1:0]  dv_hist [NSTAGE + 4*DEPTH];
  logic [S_W-1:0] m_hist  [NSTAGE + 4*DEPTH];

  vit_lp_tbu #(.K(K), .DEPTH(DEPTH)) u_dut (
    .clk, .rst_n, .sym_valid, .dv, .min_state, .stage_valid,
    .dec_bit, .dec_valid, .merge, .trace_en
  );

  always #5 clk = ~clk;

  // Conventional trace-back of DEPTH steps from the start state of stage t+DEPTH.
  function automatic logic ref_bit(input int t);
    logic [S_W-1:0] st;
    int r;
    r  = t + DEPTH;
    st = m_hist[r];
    for (int i = 0; i < DEPTH; i++) st = S_W'({st, dv_hist[r - i][st]});
    return st[S_W-1];
  endfunction

  // Stimulus: acts like the selection unit's output registers.
  always @(posedge clk) begin
    if (rst_n && sym_valid) begin
      logic [NS-1:0]  ndv;
      logic [S_W-1:0] nm;
      ndv = NS'($urandom);
      nm  = S_W'($urandom);
      dv_hist[acc] = ndv;
      m_hist[acc]  = nm;
      dv          <= ndv;
      min_state   <= nm;
      stage_valid <= 1'b1;
      acc++;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (dec_valid) begin
        int t;
        t = acc - 2*DEPTH - 2;
        checks++;
        if (t != outs) begin
          failures++;
          $display("latency/order error: output %0d arrived as stage %0d", outs, t);
        end
        checks++;
        if (dec_bit !== ref_bit(t)) begin
          failures++;
          $display("bit error at stage %0d: got %0b expected %0b", t, dec_bit, ref_bit(t));
        end
        outs++;
      end
    end
    // drive next cycle's handshake
    sym_valid <= rst_n && ($urandom_range(0, 7) != 0);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (!sym_valid) stalls++;
      if (sym_valid) begin
        merges += $countones(merge);
        gated += DEPTH - $countones(trace_en);
        if (trace_en[DEPTH-1]) full_routes++;
      end
    end
  end

  initial begin : watchdog
    repeat (20 * NSTAGE) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (acc == NSTAGE);
    @(negedge clk);
    sym_valid <= 1'b0;
    force sym_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (outs != acc - 2*DEPTH - 1) begin
      failures++;
      $display("expected %0d outputs, saw %0d", acc - 2*DEPTH - 1, outs);
    end
    checks += 4;
    if (merges == 0)      begin failures++; $display("no route reuse happened"); end
    if (gated == 0)       begin failures++; $display("no clock gating happened"); end
    if (full_routes == 0) begin failures++; $display("no full-depth route happened"); end
    if (stalls == 0)      begin failures++; $display("no stall happened"); end
    $display("merges=%0d gated_unit_cycles=%0d full_depth_routes=%0d stalls=%0d",
             merges, gated, full_routes, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

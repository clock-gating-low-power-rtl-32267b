// vit_e2e_harness: end-to-end check of the decoder for one code configuration.
//
// Encodes NSYM random bits with the rate-1/2 code (K, G0, G1), flips single
// code bits at random spacings of two to three trace-back depths, and feeds
// the symbols to viterbi_top with random stalls. Two independent predictions
// are compared with every decoded bit:
//   * a reference decoder written here (integer add-compare-select and a
//     conventional full-depth trace-back from the smallest-metric state),
//     which the design must match bit for bit, and
//   * the original information bit, which must come back, as every channel
//     error is isolated.
// It also checks the output order and latency (2*DEPTH+1 accepted symbols),
// and counts route reuse, gated trace-back units, full-depth routes, stalls
// and corrected channel errors, each of which must occur.
// Results are reported through the ports once `done` is high.
module vit_e2e_harness #(
  parameter int unsigned K     = 3,
  parameter int unsigned DEPTH = 10,
  parameter int unsigned G0    = 'o7,
  parameter int unsigned G1    = 'o5,
  parameter int unsigned NSYM  = 2000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned NS   = 1 << (K - 1);
  localparam int unsigned S_W  = K - 1;
  localparam int unsigned PM_W = 8;
  localparam int          BIAS = 1 << (PM_W - 2);
  localparam int          NTOT = NSYM + 2 * DEPTH + 8;

  logic rst_n = 1'b0, sym_valid = 1'b0;
  logic [1:0] sym = '0;
  logic dec_bit, dec_valid;
  logic [DEPTH-1:0] merge, trace_en;

  viterbi_top #(.K(K), .DEPTH(DEPTH), .G0(G0), .G1(G1), .PM_W(PM_W)) u_dut (
    .clk, .rst_n, .sym_valid, .sym, .dec_bit, .dec_valid, .merge, .trace_en
  );

  logic           src   [NTOT];
  logic [NS-1:0]  dvh   [NTOT];
  logic [S_W-1:0] mh    [NTOT];
  int acc = 0, outs = 0;
  int merges = 0, gated = 0, full_routes = 0, stalls = 0, flips = 0;

  function automatic logic [1:0] code(input logic [K-1:0] r);
    return {^(r & K'(G0)), ^(r & K'(G1))};
  endfunction

  function automatic logic ref_bit(input int t);
    logic [S_W-1:0] st;
    int r;
    r  = t + DEPTH;
    st = mh[r];
    for (int i = 0; i < DEPTH; i++) st = S_W'({st, dvh[r - i][st]});
    return st[S_W-1];
  endfunction

  initial begin
    done = 1'b0; checks = 0; failures = 0;
  end

  always @(negedge clk) begin
    if (dec_valid) begin
      int t;
      t = acc - 2 * DEPTH - 2;
      checks += 3;
      if (t != outs) begin
        failures++;
        $display("K=%0d: output %0d arrived as stage %0d", K, outs, t);
      end
      if (dec_bit !== ref_bit(t)) begin
        failures++;
        $display("K=%0d: stage %0d decoded %0b, reference decoder %0b", K, t, dec_bit, ref_bit(t));
      end
      if (dec_bit !== src[t]) begin
        failures++;
        $display("K=%0d: stage %0d decoded %0b, sent %0b", K, t, dec_bit, src[t]);
      end
      outs++;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (!sym_valid) stalls++;
      else begin
        merges += $countones(merge);
        gated  += DEPTH - $countones(trace_en);
        if (trace_en[DEPTH-1]) full_routes++;
      end
    end
  end

  initial begin
    int pm [NS];
    logic [S_W-1:0] enc = '0;
    int next_err;
    pm[0] = 0;
    for (int s = 1; s < NS; s++) pm[s] = BIAS;
    next_err = $urandom_range(2 * DEPTH, 3 * DEPTH);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NTOT; n++) begin
      logic u;
      logic [1:0] c;
      int npm [NS];
      int mn;
      if ($urandom_range(0, 7) == 0) begin
        sym_valid = 1'b0;
        @(negedge clk);
      end
      u = (n < NSYM) ? 1'($urandom) : 1'b0;
      src[n] = u;
      c   = code({u, enc});
      enc = S_W'({u, enc} >> 1);
      if (n == next_err && n < NSYM) begin
        c[$urandom_range(0, 1)] ^= 1'b1;
        flips++;
        next_err = n + $urandom_range(2 * DEPTH, 3 * DEPTH);
      end
      // reference add-compare-select
      for (int s = 0; s < NS; s++) begin
        int c0, c1;
        logic [1:0] b0, b1;
        b0 = code(K'((s << 1) | 0));
        b1 = code(K'((s << 1) | 1));
        c0 = pm[(s << 1) & (NS - 1)]       + int'(b0[1] ^ c[1]) + int'(b0[0] ^ c[0]);
        c1 = pm[((s << 1) & (NS - 1)) | 1] + int'(b1[1] ^ c[1]) + int'(b1[0] ^ c[0]);
        dvh[n][s] = (c1 < c0);
        npm[s]    = (c1 < c0) ? c1 : c0;
      end
      pm = npm;
      mn = 0;
      for (int s = 1; s < NS; s++) if (pm[s] < pm[mn]) mn = s;
      mh[n] = S_W'(mn);
      sym = c;
      sym_valid = 1'b1;
      @(negedge clk);
      acc++;
    end
    sym_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks += 6;
    if (outs != NTOT - 2 * DEPTH - 1) begin
      failures++;
      $display("K=%0d: %0d outputs, expected %0d", K, outs, NTOT - 2 * DEPTH - 1);
    end
    if (merges == 0)      begin failures++; $display("K=%0d: no route reuse", K); end
    if (gated == 0)       begin failures++; $display("K=%0d: no gated unit", K); end
    if (full_routes == 0) begin failures++; $display("K=%0d: no full-depth route", K); end
    if (stalls == 0)      begin failures++; $display("K=%0d: no stall", K); end
    if (flips == 0)       begin failures++; $display("K=%0d: no channel error", K); end
    $display("K=%0d DEPTH=%0d: %0d bits decoded, %0d channel errors corrected, route reuse %0d, gated unit-cycles %0d of %0d, full-depth routes %0d, stalls %0d",
             K, DEPTH, outs, flips, merges, gated, DEPTH * (acc), full_routes, stalls);
    done = 1'b1;
  end
endmodule

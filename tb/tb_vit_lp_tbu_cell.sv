// tb_vit_lp_tbu_cell: self-checking testbench of one low-power trace-back unit.
//
// Drives random stage data and routes, with the stored history often set equal
// to the arriving route so that both the compare-hit (route stops) and the
// compare-miss (route traces one step and updates the history) cases occur,
// plus random stalls. A register-level reference of the unit kept here predicts
// every output each cycle. It also checks that the route register keeps its
// value in cycles whose clock is gated.
module tb_vit_lp_tbu_cell;
  localparam int unsigned K   = 3;
  localparam int unsigned NS  = 4;
  localparam int unsigned S_W = 2;

  logic clk = 1'b0, rst_n = 1'b0, sym_valid = 1'b0;
  logic [NS-1:0] dv_i = '0;  logic hv_i = 1'b0;  logic [S_W-1:0] hs_i = '0;  logic sv_i = 1'b0;
  logic [S_W-1:0] p_i = '0;  logic a_i = 1'b0;
  logic [NS-1:0] dv_o; logic hv_o; logic [S_W-1:0] hs_o; logic sv_o;
  logic [S_W-1:0] p_o; logic a_o, merge, trace_en;

  // reference registers
  logic [NS-1:0] r_dv_m, r_dv_o; logic r_hv_m, r_hv_o; logic [S_W-1:0] r_hs_m, r_hs_o;
  logic r_sv_m, r_sv_o; logic [S_W-1:0] r_p; logic r_a;

  int checks = 0, failures = 0, hits = 0, misses = 0, holds = 0;

  vit_lp_tbu_cell #(.K(K)) u_dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%0t %s: got %0h expected %0h", $time, what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {r_dv_m, r_dv_o, r_hv_m, r_hv_o, r_hs_m, r_hs_o, r_sv_m, r_sv_o, r_p, r_a} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 5000; c++) begin
      logic m, t;
      @(negedge clk);
      // compare against the reference state reached after the last edge
      chk("dv_o", 8'(dv_o), 8'(r_dv_o));
      chk("hv_o", 8'(hv_o), 8'(r_hv_o));
      chk("hs_o", 8'(hs_o), 8'(r_hs_o));
      chk("sv_o", 8'(sv_o), 8'(r_sv_o));
      chk("a_o",  8'(a_o),  8'(r_a));
      chk("p_o",  8'(p_o),  8'(r_p));
      // new inputs
      sym_valid = ($urandom_range(0, 5) != 0);
      dv_i = NS'($urandom); sv_i = 1'($urandom); p_i = S_W'($urandom);
      a_i  = ($urandom_range(0, 3) != 0); hv_i = 1'($urandom);
      hs_i = $urandom_range(0, 1) ? p_i : S_W'($urandom);
      #1;
      m = a_i && hv_i && (hs_i == p_i);
      t = a_i && !m;
      chk("merge",    8'(merge),    8'(sym_valid && m));
      chk("trace_en", 8'(trace_en), 8'(sym_valid && t));
      if (sym_valid && m) hits++;
      if (sym_valid && t) misses++;
      if (!(sym_valid && t)) holds++;
      // reference update at the coming edge
      if (sym_valid) begin
        r_dv_o = r_dv_m; r_hv_o = r_hv_m; r_hs_o = r_hs_m; r_sv_o = r_sv_m;
        r_dv_m = dv_i; r_sv_m = sv_i;
        r_hv_m = t ? 1'b1 : hv_i;
        r_hs_m = t ? p_i : hs_i;
        r_a    = t;
        if (t) r_p = {p_i[0], dv_i[p_i]};
      end
    end
    checks += 3;
    if (hits == 0)   failures++;
    if (misses == 0) failures++;
    if (holds == 0)  failures++;
    $display("compare hits=%0d misses=%0d gated cycles=%0d", hits, misses, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

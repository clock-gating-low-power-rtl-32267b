// tb_vit_bmpu: self-checking testbench of the branch metric process unit.
//
// Instantiates one unit for every state of a K = 3 code with generators 7 and
// 5 (octal) and drives random predecessor metrics, normalisation values and
// received symbols. Expected metrics and decisions come from an explicit table
// of the four-state trellis written out here.
module tb_vit_bmpu;
  localparam int unsigned K    = 3;
  localparam int unsigned PM_W = 8;
  localparam int unsigned NS   = 4;

  logic [1:0]      rx;
  logic [PM_W-1:0] pm0, pm1, norm;
  logic [PM_W-1:0] pm_new [NS];
  logic [NS-1:0]   dec;

  int checks = 0, failures = 0;

  for (genvar s = 0; s < NS; s++) begin : g_dut
    vit_bmpu #(.K(K), .PM_W(PM_W), .G0('o7), .G1('o5), .STATE(s)) u_dut (
      .rx, .pm0, .pm1, .norm, .pm_new(pm_new[s]), .dec(dec[s])
    );
  end

  // Code symbols of the branch into state s from the predecessor ending in d,
  // for generators 111 and 101 with register {u, s1, s0}: new state (u, s1).
  // Branch (d) into state (n1 n0): register = n1 n0 d.
  function automatic logic [1:0] code(input int s, input int d);
    logic u, a, b;
    u = s[1]; a = s[0]; b = d[0];
    return {u ^ a ^ b, u ^ b};
  endfunction

  function automatic int hd(input logic [1:0] x, input logic [1:0] y);
    return int'(x[0] ^ y[0]) + int'(x[1] ^ y[1]);
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      rx   = 2'($urandom);
      norm = PM_W'($urandom_range(0, 20));
      pm0  = norm + PM_W'($urandom_range(0, 40));
      pm1  = (it % 5 == 0) ? pm0 : norm + PM_W'($urandom_range(0, 40));
      #1;
      for (int s = 0; s < NS; s++) begin
        int c0, c1, best;
        logic d;
        c0 = int'(pm0) + hd(code(s, 0), rx);
        c1 = int'(pm1) + hd(code(s, 1), rx);
        d  = (c1 < c0);
        best = d ? c1 : c0;
        checks += 2;
        if (dec[s] !== d) begin
          failures++;
          $display("state %0d rx=%b pm0=%0d pm1=%0d: dec %0b expected %0b", s, rx, pm0, pm1, dec[s], d);
        end
        if (pm_new[s] !== PM_W'(best - int'(norm))) begin
          failures++;
          $display("state %0d: metric %0d expected %0d", s, pm_new[s], best - int'(norm));
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

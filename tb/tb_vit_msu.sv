// tb_vit_msu: self-checking testbench of the min-selection unit.
//
// Drives random path metrics for eight states (many ties included) and checks
// the returned state and metric against a reference scan written here: the
// smallest metric, and among equal ones the lowest state number.
module tb_vit_msu;
  localparam int unsigned NS   = 8;
  localparam int unsigned PM_W = 8;

  logic [PM_W-1:0] pm [NS];
  logic [2:0]      min_state;
  logic [PM_W-1:0] min_pm;

  int checks = 0, failures = 0;

  vit_msu #(.NS(NS), .PM_W(PM_W)) u_dut (.pm, .min_state, .min_pm);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int best, bs;
      for (int s = 0; s < NS; s++) pm[s] = PM_W'($urandom_range(0, (it % 2) ? 6 : 255));
      #1;
      best = 1000; bs = 0;
      for (int s = NS - 1; s >= 0; s--) if (int'(pm[s]) <= best) begin best = pm[s]; bs = s; end
      checks += 2;
      if (min_state !== 3'(bs)) begin failures++; $display("state %0d expected %0d", min_state, bs); end
      if (min_pm !== PM_W'(best)) begin failures++; $display("metric %0d expected %0d", min_pm, best); end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

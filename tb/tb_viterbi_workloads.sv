// tb_viterbi_workloads: the decoder at the three constraint lengths it is
// evaluated at, K = 3, 4 and 5, each with a trace-back depth of five
// constraint lengths, run end to end side by side. Generators: 7/5 (K = 3),
// 15/17 (K = 4) and 23/35 (K = 5), all octal.
module tb_viterbi_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic d3, d4, d5;
  int c3, c4, c5, f3, f4, f5;

  vit_e2e_harness #(.K(3), .DEPTH(15), .G0('o7),  .G1('o5),  .NSYM(3000)) u_k3 (.clk, .done(d3), .checks(c3), .failures(f3));
  vit_e2e_harness #(.K(4), .DEPTH(20), .G0('o15), .G1('o17), .NSYM(3000)) u_k4 (.clk, .done(d4), .checks(c4), .failures(f4));
  vit_e2e_harness #(.K(5), .DEPTH(25), .G0('o23), .G1('o35), .NSYM(3000)) u_k5 (.clk, .done(d5), .checks(c5), .failures(f5));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c3 + c4 + c5, f3 + f4 + f5 + 1);
    $finish;
  end

  initial begin
    wait (d3 && d4 && d5);
    $display("TB_RESULT checks=%0d failures=%0d", c3 + c4 + c5, f3 + f4 + f5);
    $finish;
  end
endmodule

// tb_fp_exp: self-checking test of the single-precision exponential.
//
// Random arguments in (-88, 88), including tiny ones, are compared against the
// double-precision exp rounded to single precision, allowing 2 units in the
// last place. Directed cases: exp(0) = 1, exp(1), overflow to +inf, underflow
// to +0, +inf, -inf and NaN. Every operation must take exactly 35 clocks from
// start to done.
module tb_fp_exp;
  import fp_ref_pkg::*;

  localparam int LATENCY = 35;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [31:0] a, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp_exp dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .busy(busy), .done(done), .y(y));

  task automatic run(input logic [31:0] ta, input logic [31:0] want, input int unsigned tol);
    int cycles;
    @(negedge clk);
    a = ta; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks += 2;
    if (ulp_dist(y, want) > tol) begin
      failures++;
      if (failures < 10) $display("FAIL exp(%h) = %h, want %h", ta, y, want);
    end
    if (cycles != LATENCY) begin
      failures++;
      $display("FAIL exp latency %0d, want %0d", cycles, LATENCY);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(32'h0000_0000, 32'h3F80_0000, 0);           // e^0 = 1
    run(32'h3F80_0000, r2f($exp(1.0)), 1);          // e^1
    run(32'h42C8_0000, 32'h7F80_0000, 0);           // e^100 = inf
    run(32'hC2C8_0000, 32'h0000_0000, 0);           // e^-100 flushed
    run(32'h7F80_0000, 32'h7F80_0000, 0);           // e^inf
    run(32'hFF80_0000, 32'h0000_0000, 0);           // e^-inf
    run(32'h7FC0_0000, 32'h7FC0_0000, 0);           // NaN
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] ra;
      real         want;
      ra   = (i % 4 == 0) ? rand_fp(90, 126) : rand_fp(120, 133);
      if (f2r(ra) > 88.0 || f2r(ra) < -87.0) ra[30:23] = 8'd130;
      want = $exp(f2r(ra));
      run(ra, r2f(want), 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

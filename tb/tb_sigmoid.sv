// tb_sigmoid: self-checking test of the floating-point sigmoid.
//
// Random inputs from -100 to 100 (both saturation regions and the transition)
// are compared with 1/(1+exp(-x)) computed in double precision and rounded to
// single precision; up to 4 units in the last place are allowed, which keeps
// the absolute error far below 1e-5. Directed: sigmoid(0) = 0.5 exactly,
// sigmoid(-100) = 0, sigmoid(100) = 1. The latency from start to done is
// checked on every operation.
module tb_sigmoid;
  import fp_ref_pkg::*;

  localparam int LATENCY = 66;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [31:0] x, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sigmoid dut (.clk(clk), .rst_n(rst_n), .start(start), .x(x), .busy(busy), .done(done), .y(y));

  task automatic run(input logic [31:0] tx, input logic [31:0] want, input int unsigned tol);
    int cycles;
    @(negedge clk);
    x = tx; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    x = $urandom;                     // input is buffered at start
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks += 2;
    if (ulp_dist(y, want) > tol) begin
      failures++;
      if (failures < 10) $display("FAIL sigmoid(%h) = %h, want %h", tx, y, want);
    end
    if (cycles != LATENCY) begin
      failures++;
      $display("FAIL sigmoid latency %0d, want %0d", cycles, LATENCY);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(32'h0000_0000, 32'h3F00_0000, 0);     // 0.5
    run(32'hC2C8_0000, 32'h0000_0000, 0);     // -100 -> 0
    run(32'h42C8_0000, 32'h3F80_0000, 0);     // 100 -> 1
    for (int i = 0; i < 1500; i++) begin
      real xr;
      xr = (real'($urandom_range(2000000)) - 1000000.0) / 10000.0;   // -100..100
      if (i % 3 == 0) xr = xr / 10.0;
      run(r2f(xr), r2f(1.0 / (1.0 + $exp(-f2r(r2f(xr))))), 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

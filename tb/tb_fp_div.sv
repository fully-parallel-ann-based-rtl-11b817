// tb_fp_div: self-checking test of the single-precision divider.
//
// Random operands are divided and compared with the double-precision quotient
// rounded to single precision. The match must be bit-exact: a 53-bit quotient
// rounded again to 24 bits cannot suffer a double-rounding error. Directed
// cases cover x/0, 0/0, inf/inf, 0/x, exact quotients and overflow. Every
// operation must take exactly 28 clocks from start to done.
module tb_fp_div;
  import fp_ref_pkg::*;

  localparam int LATENCY = 28;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp_div dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b), .busy(busy), .done(done), .y(y));

  task automatic run(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] want,
                     input int unsigned tol);
    int cycles;
    @(negedge clk);
    a = ta; b = tb_; start = 1'b1;
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
      if (failures < 10) $display("FAIL %h / %h = %h, want %h", ta, tb_, y, want);
    end
    if (cycles != LATENCY) begin
      failures++;
      $display("FAIL div latency %0d, want %0d", cycles, LATENCY);
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
    a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(32'h3F80_0000, 32'h4000_0000, 32'h3F00_0000, 0);   // 1/2
    run(32'h4040_0000, 32'hC000_0000, 32'hBFC0_0000, 0);   // 3/-2
    run(32'h3F80_0000, 32'h4040_0000, 32'h3EAA_AAAB, 0);   // 1/3
    run(32'h3F80_0000, 32'h0000_0000, 32'h7F80_0000, 0);   // 1/0
    run(32'h0000_0000, 32'h0000_0000, 32'h7FC0_0000, 0);   // 0/0
    run(32'h7F80_0000, 32'h7F80_0000, 32'h7FC0_0000, 0);   // inf/inf
    run(32'h0000_0000, 32'h4000_0000, 32'h0000_0000, 0);   // 0/2
    run(32'h3F80_0000, 32'h7F80_0000, 32'h0000_0000, 0);   // 1/inf
    run(32'h7F00_0000, 32'h3E80_0000, 32'h7F80_0000, 0);   // overflow
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] ra, rb;
      ra = rand_fp(60, 190);
      rb = rand_fp(60, 190);
      run(ra, rb, r2f(f2r(ra) / f2r(rb)), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

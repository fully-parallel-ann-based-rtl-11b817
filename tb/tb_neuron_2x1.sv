// tb_neuron_2x1: self-checking test of the output (purelin) neuron.
//
// Inputs in [0, 1] (sigmoid outputs), weights and bias in [-4, 4]. The
// reference applies single-precision rounding after each multiply and add;
// the output must match within 2 units in the last place (or 1e-6 absolute
// near an exact cancellation) and must appear in the clock after en.bias.
module tb_neuron_2x1;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  fp32_t x [N_HID], w [N_HID], bias, y;
  out_en_t en;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  neuron_2x1 dut (.clk(clk), .rst_n(rst_n), .x(x), .w(w), .bias(bias), .en(en), .y(y));

  function automatic fp32_t fadd(input fp32_t a, input fp32_t b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = '0; bias = '0;
    x = '{default: '0}; w = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      fp32_t want, prev_y;
      for (int i = 0; i < N_HID; i++) begin
        x[i] = r2f(real'($urandom_range(1000000)) / 1000000.0);
        w[i] = r2f((real'($urandom_range(800000)) - 400000.0) / 100000.0);
      end
      bias = r2f((real'($urandom_range(800000)) - 400000.0) / 100000.0);
      want = fadd(fadd(r2f(f2r(x[0]) * f2r(w[0])), r2f(f2r(x[1]) * f2r(w[1]))), bias);
      en = '0; en.mul = 1'b1;
      @(negedge clk);
      x = '{default: '0};                        // products are held
      en = '0; en.add = 1'b1;
      @(negedge clk);
      en = '0; en.bias = 1'b1;
      prev_y = y;
      #1;
      checks++;
      if (y != prev_y) begin
        failures++;
        $display("FAIL output changed before en.bias");
      end
      @(negedge clk);
      en = '0;
      checks++;
      if (ulp_dist(y, want) > 2 && (f2r(y) - f2r(want) > 1e-6 || f2r(want) - f2r(y) > 1e-6)) begin
        failures++;
        if (failures < 10) $display("FAIL out %h want %h", y, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

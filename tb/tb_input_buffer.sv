// tb_input_buffer: self-checking test of the input registers I0..I7.
//
// Writes the eight registers in random order (sometimes rewriting one, and
// sometimes writing two at once), checks the stored words, and checks that the
// completed-beat counter steps and beat_done pulses exactly in the clock that
// completes a beat, and never before. Checks also that the output registers keep the
// previous complete beat, unchanged, while the next one is being written.
module tb_input_buffer;
  import fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  fp32_t data;
  logic [N_IN-1:0] en;
  fp32_t regs [N_IN];
  logic [BEAT_CNT_W-1:0] beat_cnt;
  logic beat_done;
  fp32_t model [N_IN];
  fp32_t shown [N_IN];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  input_buffer dut (.clk(clk), .rst_n(rst_n), .data(data), .en(en), .regs(regs),
                    .beat_cnt(beat_cnt), .beat_done(beat_done));

  task automatic expect_(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = '0; en = '0;
    model = '{default: '0};
    shown = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int beat = 0; beat < 50; beat++) begin
      logic [N_IN-1:0] done_mask;
      logic [BEAT_CNT_W-1:0] cnt_before;
      done_mask  = '0;
      cnt_before = beat_cnt;
      while (done_mask != '1) begin
        logic [N_IN-1:0] sel;
        sel  = N_IN'(1) << $urandom_range(N_IN - 1);
        if ($urandom_range(4) == 0) sel = sel | (N_IN'(1) << $urandom_range(N_IN - 1));
        data = $urandom;
        en   = sel;
        for (int i = 0; i < N_IN; i++) if (sel[i]) model[i] = data;
        done_mask = done_mask | sel;
        @(negedge clk);
        en = '0;
        expect_(beat_done == (done_mask == '1), "beat_done only on completion");
        expect_(beat_cnt == cnt_before + BEAT_CNT_W'(done_mask == '1), "beat_cnt steps on completion");
        if (done_mask != '1)
          for (int i = 0; i < N_IN; i++) expect_(regs[i] == shown[i], "previous beat held while writing");
        if ($urandom_range(2) == 0) begin
          @(negedge clk);
          expect_(!beat_done, "beat_done is a pulse");
        end
      end
      for (int i = 0; i < N_IN; i++) expect_(regs[i] == model[i], "register contents");
      shown = model;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

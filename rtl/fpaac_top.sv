// fpaac_top: fully parallel 8x2x1 multilayer-perceptron classifier for ECG
// heartbeats in IEEE-754 single precision.
//
// A host computes 8 principal components per heartbeat and writes them, one
// 32-bit word at a time, into the input registers I0..I7 (data32 with the
// one-hot register address en8). Two hidden neurons each multiply all eight
// inputs by their own weights in parallel (W0..W7 and W8..W15), sum them in an
// adder tree, add their bias (B0, B1) and apply the sigmoid; the output neuron
// weights the two sigmoid outputs (W16, W17), adds B2 and passes the result
// unchanged (linear activation) to out_val. The class rule then maps
// out_val <= 1.5 to F (fusion), <= 2.5 to V (PVC) and above to N (normal).
//
// Blocks: pll_2x makes the 100 MHz buffering clock from clk_50; input_buffer,
// mem_init and weight_mem run at 100 MHz; the neurons, sigmoids and
// clock_manager run at 50 MHz. Reset is held while rst_n is low or the PLL is
// unlocked and released 4 clk_50 cycles after both are good. mem_init then
// copies the 21 trained words into the weight registers and raises `ready`.
//
// Timing: `beat_done` pulses for one clk_100 cycle on the write that completes
// a beat (all eight input registers written since the previous beat). Each
// completed beat starts one classification; out_valid pulses 77 to 78 clk_50
// cycles after the write that completes the beat. out_val and out_class then
// hold until the next result. The two hidden outputs (hid_out) and their net
// inputs (hid_net) belong to the same beat at out_valid, but change while the
// next beat is processed. `busy` is high while a classification runs. A beat
// that completes while one is running is held and processed afterwards;
// `beat_lost` pulses when a held beat was overwritten by a newer one before it
// could start.
//
// Synthesis note: pll_2x is a behavioural model built from delays. A synthesis
// tool that ignores delays sees its clk_100 as constant 0, so the whole
// 100 MHz side (input registers, weight loading) and the outputs that depend
// on it (clk_100, ready, beat_done, hid_net, beat_lost) fold to constants.
// For an FPGA, replace pll_2x with the device's PLL primitive.
//
// Parameter WEIGHTS is the weight memory's content (W0..W17, B0..B2); its
// default is the trained network. The clocking scheme, the network and its
// weights follow the document; the handshakes, the stage registers, the reset
// and the observation outputs beat_done and hid_net are this design's choices.
module fpaac_top
  import fp_pkg::*;
#(
  parameter weight_set_t WEIGHTS = TRAINED_WEIGHTS
) (
  input  logic            clk_50,
  input  logic            rst_n,
  input  fp32_t           data32,
  input  logic [N_IN-1:0] en8,
  output logic            clk_100,
  output logic            ready,
  output fp32_t           out_val,
  output beat_class_e     out_class,
  output logic            out_valid,
  output fp32_t           hid_out [N_HID],
  output fp32_t           hid_net [N_HID],
  output logic            beat_done,
  output logic            busy,
  output logic            beat_lost
);

  logic             locked, rst_int_n;
  fp32_t            in_regs [N_IN];
  logic [BEAT_CNT_W-1:0] beat_cnt;
  logic [AD_W-1:0]  ad;
  logic             rd, init_done;
  fp32_t            w [N_W];
  fp32_t            b [N_B];
  hid_en_t          hid_en;
  out_en_t          out_en;
  logic [N_HID-1:0] sig_done;
  fp32_t            hid_y [N_HID];
  fp32_t            w_out [N_HID];

  // ---- clock unit ----
  pll_2x u_pll (.clk_in(clk_50), .areset(!rst_n), .clk_out(clk_100), .locked(locked));
  reset_sync u_rst (.clk(clk_50), .arst_n(rst_n & locked), .rst_n(rst_int_n));

  // ---- buffering side, 100 MHz ----
  input_buffer u_buf (
    .clk(clk_100), .rst_n(rst_int_n), .data(data32), .en(en8),
    .regs(in_regs), .beat_cnt(beat_cnt), .beat_done(beat_done)
  );

  mem_init u_init (.clk(clk_100), .rst_n(rst_int_n), .ad(ad), .rd(rd), .done(init_done));

  weight_mem #(.INIT(WEIGHTS)) u_mem (
    .clk(clk_100), .rst_n(rst_int_n), .ad(ad), .rd(rd), .w(w), .b(b)
  );

  // ---- arithmetic side, 50 MHz ----
  clock_manager u_cm (
    .clk(clk_50), .rst_n(rst_int_n), .init_done(init_done), .beat_cnt(beat_cnt),
    .sig_done(sig_done), .hid_en(hid_en), .out_en(out_en),
    .out_valid(out_valid), .busy(busy), .beat_lost(beat_lost)
  );

  for (genvar j = 0; j < N_HID; j++) begin : g_hid
    neuron_8x1 u_neuron (
      .clk(clk_50), .rst_n(rst_int_n),
      .x(in_regs), .w(w[j*N_IN +: N_IN]), .bias(b[j]), .en(hid_en),
      .net(hid_net[j]), .sig_done(sig_done[j]), .y(hid_y[j])
    );
    assign w_out[j] = w[N_IN*N_HID + j];
  end

  neuron_2x1 u_out (
    .clk(clk_50), .rst_n(rst_int_n),
    .x(hid_y), .w(w_out), .bias(b[N_HID]), .en(out_en), .y(out_val)
  );

  class_decide u_class (.out_val(out_val), .beat_class(out_class));

  assign ready   = init_done;
  assign hid_out = hid_y;

endmodule

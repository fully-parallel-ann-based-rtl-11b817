// fp_pkg: types and constants shared by the FPAAC classifier.
//
// Every arithmetic value in the classifier is an IEEE-754 single-precision
// number (fp32_t). The package also fixes the network shape (8 inputs, 2 hidden
// neurons, 1 output neuron), the layout of the weight memory (W0..W17 followed
// by B0..B2), the trained weights and biases used as the memory's power-up
// contents, the class encoding of the decision rule and the stage-enable
// bundles that the clock manager drives into the neurons.
//
// The network shape, the weight names and the trained values are those of the
// published classifier; the numeric encodings (class codes, memory addresses,
// enable bundles) are this design's own choices.
//
// Lint note: a module that imports the package but uses only some of its
// constants (for example fp_mul, which needs none of the class boundaries or
// the weights) makes a linter report the others as unused parameters. They
// are used elsewhere in the design.
package fp_pkg;

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] man;
  } fp32_s;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_INF  = 32'h7F80_0000;
  localparam fp32_t FP_QNAN = 32'h7FC0_0000;
  localparam fp32_t FP_1P5  = 32'h3FC0_0000;  // 1.5, F/V boundary
  localparam fp32_t FP_2P5  = 32'h4020_0000;  // 2.5, V/N boundary

  // Network shape
  localparam int unsigned N_IN   = 8;              // principal components per beat
  localparam int unsigned N_HID  = 2;              // hidden (sigmoid) neurons
  localparam int unsigned N_W    = N_IN * N_HID + N_HID;  // W0..W17
  localparam int unsigned N_B    = N_HID + 1;      // B0..B2
  localparam int unsigned N_WORDS = N_W + N_B;     // 21 memory words
  localparam int unsigned AD_W   = 5;              // width of the AD bus
  localparam int unsigned BEAT_CNT_W = 8;          // completed-beat counter

  typedef fp32_t weight_set_t [N_WORDS];

  // Trained weights and biases (single-precision encodings of the values of
  // the reference model). Address order: W0..W17 at 0..17, B0..B2 at 18..20.
  localparam weight_set_t TRAINED_WEIGHTS = '{
    32'hBF20346D,  // W0   -0.62579995
    32'h41BBF909,  // W1   23.4966
    32'h422FBF2E,  // W2   43.9367
    32'hC0D50481,  // W3   -6.6568
    32'hC26070F2,  // W4   -56.1103
    32'h412B19CE,  // W5   10.6938
    32'hC1C461E4,  // W6   -24.547798
    32'hC254C1F2,  // W7   -53.1894
    32'h43132D97,  // W8   147.17809
    32'h42A909EE,  // W9   84.519394
    32'h42DFD9A6,  // W10  111.925095
    32'h425EB717,  // W11  55.6788
    32'hC25BB645,  // W12  -54.927998
    32'hC25825FD,  // W13  -54.037098
    32'h428D21BD,  // W14  70.565895
    32'h42EB16FD,  // W15  117.5449
    32'hBF741893,  // W16  -0.9535
    32'hBF80E8A7,  // W17  -1.0071
    32'hC23F7D8A,  // B0   -47.872597
    32'h421163F1,  // B1   36.3476
    32'h3F7CA57A   // B2   0.9869
  };

  // Beat classes of the decision rule
  typedef enum logic [1:0] {
    CLASS_F = 2'd0,   // fusion beat,               OUT <= 1.5
    CLASS_V = 2'd1,   // premature ventricular,     1.5 < OUT <= 2.5
    CLASS_N = 2'd2    // normal beat,               2.5 < OUT
  } beat_class_e;

  // Stage enables of one hidden (8x1) neuron, one cycle each
  typedef struct packed {
    logic mul;    // load the 8 products
    logic add1;   // load the 4 first-level sums
    logic add2;   // load the 2 second-level sums
    logic add3;   // load the weighted sum
    logic bias;   // load net = sum + bias
    logic sig;    // start the sigmoid
  } hid_en_t;

  // Stage enables of the output (2x1) neuron
  typedef struct packed {
    logic mul;    // load the 2 products
    logic add;    // load their sum
    logic bias;   // load OUT = sum + bias (purelin)
  } out_en_t;

endpackage

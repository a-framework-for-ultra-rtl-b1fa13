// Shared types and constants of the AFib classification accelerator.
//
// Parameters are stored as ternary values ("trits") in RRAM cells. A trit is
// carried in two bits {neg, nz}: 2'b00 = 0, 2'b01 = +1, 2'b11 = -1. Values
// that need more than three states (the batch-norm exponent and bias) use n
// trits read as a balanced-ternary number, least significant trit first, so
// n trits give 3^n states as the architecture prescribes (2 trits for the
// exponent, 4 for the bias). The encoding and the trit order are choices of
// this design.
//
// The network sizes are those of the ECG network: a 1614-sample input, four
// 15-tap convolutions with stride 3 (1 -> 2 -> 4 -> 6 -> 8 channels), global
// max pooling and two fully connected layers (8 -> 8 -> 2). Layer result
// widths follow the per-layer quantization table of the design.
package afib_pkg;

  typedef logic [1:0] trit_t;

  // RRAM block operation codes (3-bit "operation" bus of a memory block).
  typedef enum logic [2:0] {
    OP_IDLE   = 3'd0,
    OP_READ_A = 3'd1,  // comparator threshold between HRS and the LRS states
    OP_READ_B = 3'd2,  // comparator threshold between LRS1 and LRS2
    OP_WR_HRS = 3'd3,
    OP_WR_LRS1 = 3'd4,
    OP_WR_LRS2 = 3'd5
  } rram_op_e;

  // Commands broadcast by the RRAM manager to every block controller.
  typedef enum logic [1:0] {
    BC_LOAD    = 2'd0,  // read cells into the parameter latches
    BC_PROGRAM = 2'd1,  // write the chain contents into the cells
    BC_CAPTURE = 2'd2,  // copy the latches into the chain for read-back
    BC_NONE    = 2'd3
  } blk_cmd_e;

  localparam int unsigned N_CELLS    = 32;    // cells per RRAM block
  localparam int unsigned N_BLOCKS   = 47;    // RRAM blocks in the Processing Core
  localparam int unsigned N_TRITS    = N_CELLS * N_BLOCKS;
  localparam int unsigned RAW_W      = 12;    // sensor resolution
  localparam int unsigned Q_W        = 8;     // resolution after input quantization
  localparam int unsigned X_W        = 7;     // NN input width (signed)
  localparam int unsigned ACT_W      = 4;     // ReLU N output width (N = 15)
  localparam int unsigned NN_IN_LEN  = 1614;  // NN input samples per window
  localparam int unsigned WINDOW_RAW = 6479;  // raw samples per window (12.65 s at 512 Hz)

  // Network layout: index 0..5 = Conv1..Conv4, FC1, FC2.
  localparam int unsigned N_LAYERS = 6;
  typedef int unsigned lay_arr_t [N_LAYERS];
  localparam lay_arr_t L_CIN  = '{1, 2, 4, 6, 8, 8};
  localparam lay_arr_t L_COUT = '{2, 4, 6, 8, 8, 2};
  localparam lay_arr_t L_K    = '{15, 15, 15, 15, 1, 1};
  localparam lay_arr_t L_S    = '{3, 3, 3, 3, 1, 1};
  localparam lay_arr_t L_ACCW = '{11, 10, 11, 12, 8, 8};
  localparam lay_arr_t L_INW  = '{7, 5, 5, 5, 5, 5};   // 4-bit activations, zero-extended
  localparam int unsigned BN_GROW  = 8;   // SBBN result = layer result + 8 bits
  localparam int unsigned RELU_RSH = 8;   // fractional bits dropped by ReLU N

  // Trits per layer: weights, then 2 exponent trits and 4 bias trits per output.
  function automatic int unsigned layer_trits(int unsigned l);
    return L_COUT[l] * L_CIN[l] * L_K[l] + L_COUT[l] * 6;
  endfunction

  function automatic int unsigned layer_base(int unsigned l);
    int unsigned b = 0;
    for (int unsigned i = 0; i < l; i++) b += layer_trits(i);
    return b;
  endfunction

  // Value of a trit: -1, 0 or +1.
  function automatic int trit_val(trit_t t);
    return t[0] ? (t[1] ? -1 : 1) : 0;
  endfunction

  // Balanced ternary value of 2 and 4 trits (least significant trit first).
  function automatic int bt2(logic [3:0] t);
    return trit_val(t[1:0]) + 3 * trit_val(t[3:2]);
  endfunction

  function automatic int bt4(logic [7:0] t);
    return trit_val(t[1:0]) + 3 * trit_val(t[3:2]) + 9 * trit_val(t[5:4])
         + 27 * trit_val(t[7:6]);
  endfunction

endpackage

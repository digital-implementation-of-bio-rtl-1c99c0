// snn_pkg: constants and types shared by the ECG spiking neural network.
//
// The network has 39 neurons on one address space: neurons 0..34 form the
// input layer (one per bit of the 35-bit binarised ECG record), neurons 35
// and 36 are the training neurons, and neurons 37 and 38 are the output
// neurons for the "normal" and "abnormal" classes. These numbers follow the
// document. The fixed-point formats below are this design's own choice:
// membrane potential v and recovery variable u are signed Q15.8 values in
// millivolt units, synaptic weights are signed 8-bit integers in the same
// unit as the input current I.
package snn_pkg;

  localparam int unsigned N_INPUT   = 35;                 // input-layer neurons
  localparam int unsigned N_CLASS   = 2;                  // normal, abnormal
  localparam int unsigned N_NEURON  = N_INPUT + 2 * N_CLASS; // 39
  localparam int unsigned ADDR_W    = $clog2(N_NEURON);   // 6-bit AER address
  localparam int unsigned TRAIN_BASE = N_INPUT;           // neurons 35, 36
  localparam int unsigned OUT_BASE   = N_INPUT + N_CLASS; // neurons 37, 38

  localparam int unsigned WEIGHT_W  = 8;   // synaptic weight width
  localparam int unsigned STATE_W   = 24;  // v, u width
  localparam int unsigned FRAC      = 8;   // fractional bits of v, u
  localparam int unsigned CUR_W     = 16;  // accumulated input current width

  typedef logic [ADDR_W-1:0]          addr_t;
  typedef logic signed [WEIGHT_W-1:0] weight_t;
  typedef logic signed [STATE_W-1:0]  state_t;
  typedef logic signed [CUR_W-1:0]    current_t;

  // Class of an ECG record, also the index of its training/output neuron pair.
  typedef enum logic {CLASS_NORMAL = 1'b0, CLASS_ABNORMAL = 1'b1} ecg_class_e;

  // Largest and smallest weight a synapse may hold.
  localparam weight_t W_MAX = weight_t'((1 << (WEIGHT_W - 1)) - 1);
  localparam weight_t W_MIN = weight_t'(-(1 << (WEIGHT_W - 1)));

endpackage

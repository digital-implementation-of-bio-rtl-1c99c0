// snn_top: spiking neural network that classifies a binarised ECG record as
// normal or abnormal.
//
// Structure (neuron numbers are AER addresses):
//   0..34  input layer: one Izhikevich neuron per bit of the 35-bit record.
//          A neuron whose bit is 1 receives a constant bias I_STIM and fires
//          repeatedly; a neuron whose bit is 0 stays at rest.
//   35,36  training neurons for the normal and abnormal class, fired on
//          command (train_fire) with bias I_TRAIN.
//   37,38  output neurons for the normal and abnormal class. Their weight
//          RAMs hold the plastic synapses from the 35 input neurons, all 0
//          after reset.
// Every neuron spike goes through the AER bus, which delivers one address
// per cycle to all neurons; each neuron adds the weight its RAM holds for
// that address to its input current. When several neurons spike in the same
// step the bus raises halt and all neurons pause until the queue is empty.
// Two STDP modules, one per class, take the input-layer spikes as
// presynaptic and the class's training-neuron spike as postsynaptic events
// and write the learned weights into the RAM of the class's output neuron.
//
// Operation: in training (test_mode = 0) the record comes from the training
// sequencer, selected by image_signal; the correct training neuron is fired
// after the record is applied (potentiation) and the other training neuron
// just before it (depression), with learn_en and learn_addr_en high. In
// testing (test_mode = 1, learning off) the record is applied on
// digit_noise and the class is read from which output neuron spikes
// (out_spikes[0] = neuron 37 normal, out_spikes[1] = neuron 38 abnormal).
// One clock cycle is one 1 ms neuron step unless halt is high.
// The layer sizes, the neuron roles, the AER halt, the STDP wiring and the
// two input paths follow the document; the bias currents and the way input
// and training neurons are stimulated are this design's choices.
module snn_top
  import snn_pkg::*;
#(
  parameter int unsigned N_REC       = 9,    // training records per class
  parameter int          I_STIM      = 20,   // input-neuron bias for a 1 bit
  parameter int          I_TRAIN     = 40,   // training-neuron bias when fired
  parameter int unsigned STDP_WINDOW = 32,   // STDP gate length, cycles
  parameter int unsigned IDX_W       = (N_REC > 1) ? $clog2(N_REC) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // mode and learning control
  input  logic                test_mode,
  input  logic                learn_en,
  input  logic                learn_addr_en,
  input  logic [N_CLASS-1:0]  train_fire,
  // training data
  input  logic                load_we,
  input  ecg_class_e          load_class,
  input  logic [IDX_W-1:0]    load_idx,
  input  logic [N_INPUT-1:0]  load_data,
  input  logic [1:0]          image_signal,
  // test data
  input  logic [N_INPUT-1:0]  digit_noise,
  // observation
  output logic [N_NEURON-1:0] spikes,
  output logic [N_CLASS-1:0]  out_spikes,
  output logic                aer_valid,
  output addr_t               aer_addr,
  output logic                halt,
  output logic [N_NEURON-1:0] aer_queue,
  output state_t              out_v [N_CLASS],
  output logic [IDX_W-1:0]    n_counter,
  output logic [IDX_W-1:0]    a_counter,
  output logic [N_CLASS-1:0]  stdp_we,
  output logic [N_CLASS-1:0]  ltp_evt,
  output logic [N_CLASS-1:0]  ltd_evt
);

  // ---------------------------------------------------------------- input path
  logic [N_INPUT-1:0] seq_digit, digit;

  train_sequencer #(.N_BITS(N_INPUT), .N_REC(N_REC), .IDX_W(IDX_W)) u_seq (
    .clk          (clk),
    .rst_n        (rst_n),
    .load_we      (load_we),
    .load_class   (load_class),
    .load_idx     (load_idx),
    .load_data    (load_data),
    .image_signal (image_signal),
    .digit        (seq_digit),
    .n_counter    (n_counter),
    .a_counter    (a_counter)
  );

  assign digit = test_mode ? digit_noise : seq_digit;

  // ---------------------------------------------------------------- AER bus
  aer_bus #(.N(N_NEURON), .ADDR_W(ADDR_W)) u_aer (
    .clk       (clk),
    .rst_n     (rst_n),
    .spikes    (spikes),
    .aer_valid (aer_valid),
    .aer_addr  (aer_addr),
    .halt      (halt),
    .pending   (aer_queue)
  );

  // ---------------------------------------------------------------- STDP
  logic    [N_CLASS-1:0] s_we;
  addr_t   s_addr   [N_CLASS];
  weight_t s_weight [N_CLASS];

  for (genvar k = 0; k < int'(N_CLASS); k++) begin : g_stdp
    stdp #(
      .N_PRE     (N_INPUT),
      .ADDR_BASE (0),
      .WINDOW    (STDP_WINDOW)
    ) u_stdp (
      .clk        (clk),
      .rst_n      (rst_n),
      .en         (learn_en),
      .en_addr    (learn_addr_en),
      .pre_spikes (spikes[N_INPUT-1:0]),
      .post_spike (spikes[TRAIN_BASE + k]),
      .we         (s_we[k]),
      .addr       (s_addr[k]),
      .weight     (s_weight[k]),
      .inc_evt    (ltp_evt[k]),
      .dec_evt    (ltd_evt[k])
    );
  end

  assign stdp_we = s_we;

  // ---------------------------------------------------------------- neurons
  for (genvar n = 0; n < int'(N_NEURON); n++) begin : g_neuron
    current_t i_ext;
    logic     n_we;
    addr_t    n_waddr;
    weight_t  n_wdata;

    if (n < int'(N_INPUT)) begin : g_in
      assign i_ext   = digit[n] ? current_t'(I_STIM) : '0;
      assign n_we    = 1'b0;
      assign n_waddr = '0;
      assign n_wdata = '0;
    end else if (n < int'(OUT_BASE)) begin : g_train
      assign i_ext   = train_fire[n - TRAIN_BASE] ? current_t'(I_TRAIN) : '0;
      assign n_we    = 1'b0;
      assign n_waddr = '0;
      assign n_wdata = '0;
    end else begin : g_out
      assign i_ext   = '0;
      assign n_we    = s_we[n - OUT_BASE];
      assign n_waddr = s_addr[n - OUT_BASE];
      assign n_wdata = s_weight[n - OUT_BASE];
    end

    state_t v_n, u_n;

    izh_neuron #(.DEPTH(N_NEURON)) u_neuron (
      .clk       (clk),
      .rst_n     (rst_n),
      .en        (!halt),
      .we        (n_we),
      .waddr     (n_waddr),
      .wdata     (n_wdata),
      .aer_valid (aer_valid),
      .aer_addr  (aer_addr),
      .i_ext     (i_ext),
      .spike_out (spikes[n]),
      .v_out     (v_n),
      .u_out     (u_n)
    );

    if (n >= int'(OUT_BASE)) begin : g_vout
      assign out_v[n - OUT_BASE] = v_n;
    end
  end

  assign out_spikes = spikes[OUT_BASE +: N_CLASS];

endmodule

// train_sequencer: presents the training records to the network.
//
// The training set is held in two arrays of binarised ECG records, one for
// the normal class and one for the abnormal class (N_REC records of N_BITS
// bits each), written beforehand through the load port. The two-bit control
// image_signal selects what is presented on digit: bit 0 presents the
// normal record at position n_counter, bit 1 the abnormal record at
// position a_counter (bit 0 wins if both are set), and with neither bit set
// digit is all zeros. When a bit of image_signal falls, the presentation of
// that record has ended and its counter moves to the next position,
// wrapping after N_REC records. digit is combinational from image_signal
// and the counters; a counter changes on the clock edge that samples the
// falling bit. The two arrays, the two counters and the two-bit control
// follow the document; advancing on the falling edge and wrapping are this
// design's choices.
module train_sequencer
  import snn_pkg::*;
#(
  parameter int unsigned N_BITS = N_INPUT,
  parameter int unsigned N_REC  = 9,
  parameter int unsigned IDX_W  = (N_REC > 1) ? $clog2(N_REC) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // load port
  input  logic              load_we,
  input  ecg_class_e        load_class,
  input  logic [IDX_W-1:0]  load_idx,
  input  logic [N_BITS-1:0] load_data,
  // control
  input  logic [1:0]        image_signal,
  output logic [N_BITS-1:0] digit,
  output logic [IDX_W-1:0]  n_counter,
  output logic [IDX_W-1:0]  a_counter
);

  logic [N_BITS-1:0] normal_seq   [N_REC];
  logic [N_BITS-1:0] abnormal_seq [N_REC];
  logic [1:0]        img_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_REC); i++) begin
        normal_seq[i]   <= '0;
        abnormal_seq[i] <= '0;
      end
    end else if (load_we && (int'(load_idx) < int'(N_REC))) begin
      if (load_class == CLASS_NORMAL) normal_seq[load_idx]   <= load_data;
      else                            abnormal_seq[load_idx] <= load_data;
    end
  end

  function automatic logic [IDX_W-1:0] next_idx(input logic [IDX_W-1:0] i);
    return (int'(i) >= int'(N_REC) - 1) ? '0 : i + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      img_q     <= '0;
      n_counter <= '0;
      a_counter <= '0;
    end else begin
      img_q <= image_signal;
      if (img_q[0] && !image_signal[0]) n_counter <= next_idx(n_counter);
      if (img_q[1] && !image_signal[1]) a_counter <= next_idx(a_counter);
    end
  end

  always_comb begin
    if (image_signal[0])      digit = normal_seq[n_counter];
    else if (image_signal[1]) digit = abnormal_seq[a_counter];
    else                      digit = '0;
  end

endmodule

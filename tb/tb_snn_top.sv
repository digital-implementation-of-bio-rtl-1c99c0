// tb_snn_top: end-to-end test of the ECG spiking network at its default
// size (35 input, 2 training and 2 output neurons, 9 training records per
// class).
//
// The records are synthetic 35-bit binarised ECG strings made by the
// testbench: a normal record has regularly spaced R peaks (every third bit,
// about 0.86 s apart over a 10 s record) with one peak occasionally moved by
// one position; an abnormal record has irregular peaks at positions that
// are not multiples of three. Nine of each are loaded into the training
// sequencer.
//
// Before training, the whole input layer is driven for a while with learning
// off and the network is then left to return to rest; the output neurons,
// whose weights are all zero, must stay silent.
//
// Training, per record of class c: fire the training neuron of the other
// class, then present the record through image_signal (post before pre:
// the other output neuron's synapses from the active inputs are weakened);
// after the record has driven the input layer for a while, fire the
// training neuron of class c and withdraw the record (pre before post: the
// class's own output neuron's synapses are strengthened). Records alternate
// between the classes.
//
// Checks: the learned weights have the expected signs; three new records of
// each class, applied on digit_noise in test mode, make the correct output
// neuron spike and spike more often than the other one; every spike is
// delivered over the AER bus exactly once. The testbench also counts how
// often each mechanism occurred (AER halt on simultaneous spikes,
// potentiation, depression, weight write-back, Input Align clamping, the
// sequencer's counter wrap, both input modes) and fails if one never did.
module tb_snn_top;
  import snn_pkg::*;

  localparam int unsigned NR = 9;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               test_mode = 1'b0, learn_en = 1'b0, learn_addr_en = 1'b0;
  logic [1:0]         train_fire = '0;
  logic               load_we = 1'b0;
  ecg_class_e         load_class = CLASS_NORMAL;
  logic [3:0]         load_idx = '0;
  logic [N_INPUT-1:0] load_data = '0, digit_noise = '0;
  logic [1:0]         image_signal = '0;
  logic [N_NEURON-1:0] spikes, aer_queue;
  logic [1:0]         out_spikes, stdp_we, ltp_evt, ltd_evt;
  logic               aer_valid, halt;
  addr_t              aer_addr;
  logic [3:0]         n_counter, a_counter;
  state_t             out_v [N_CLASS];

  int checks = 0, failures = 0;

  snn_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ monitors
  int n_halt = 0, n_ltp = 0, n_ltd = 0, n_wb = 0, n_clamp = 0, n_wrap = 0;
  int n_spk_total = 0, n_aer_total = 0, n_test_cycles = 0, n_train_cycles = 0;
  int cnt_out [N_CLASS];
  logic [3:0] n_cnt_q = '0;

  always @(posedge clk) if (rst_n) begin
    if (halt) n_halt++;
    n_ltp += int'(ltp_evt[0]) + int'(ltp_evt[1]);
    n_ltd += int'(ltd_evt[0]) + int'(ltd_evt[1]);
    n_wb  += int'(stdp_we[0]) + int'(stdp_we[1]);
    if (dut.g_neuron[37].u_neuron.i_sum < -140 && !halt) n_clamp++;
    if (dut.g_neuron[38].u_neuron.i_sum < -140 && !halt) n_clamp++;
    if (n_cnt_q == 4'(NR - 1) && n_counter == 0) n_wrap++;
    n_cnt_q <= n_counter;
    n_spk_total += $countones(spikes);
    n_aer_total += int'(aer_valid);
    if (test_mode) n_test_cycles++; else n_train_cycles++;
    for (int k = 0; k < 2; k++) if (out_spikes[k]) cnt_out[k]++;
  end

  // ------------------------------------------------------------ records
  function automatic logic [N_INPUT-1:0] normal_rec(input int seed);
    logic [N_INPUT-1:0] r;
    int j;
    r = '0;
    for (int i = 0; i < int'(N_INPUT); i += 3) r[i] = 1'b1;
    j = 3 * ((seed * 7) % 12);
    if (seed % 2 == 1 && j + 1 < int'(N_INPUT)) begin
      r[j] = 1'b0; r[j + 1] = 1'b1;
    end
    return r;
  endfunction

  function automatic logic [N_INPUT-1:0] abnormal_rec(input int seed);
    logic [N_INPUT-1:0] r;
    logic [31:0] h;
    r = '0;
    h = 32'h2545F491 * (seed + 3);
    for (int i = 0; i < int'(N_INPUT); i++) begin
      h = h ^ (h << 13); h = h ^ (h >> 17); h = h ^ (h << 5);
      if (i % 3 != 0 && h[3:0] < 4'd8) r[i] = 1'b1;
    end
    return r;
  endfunction

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // fire a training neuron until it has spiked once
  task automatic fire_train(input int k);
    int t;
    train_fire[k] = 1'b1;
    t = 0;
    while (!spikes[TRAIN_BASE + k] && t < 50) begin
      @(posedge clk); #1; t++;
    end
    train_fire[k] = 1'b0;
    checks++;
    if (t >= 50) begin failures++; $display("FAIL training neuron %0d did not fire", k); end
  endtask

  task automatic train_record(input int c);
    fire_train(1 - c);                      // other class: post before pre
    image_signal = (c == 0) ? 2'b01 : 2'b10;
    idle(60);
    image_signal = 2'b00;                    // withdraw, then own class: pre before post
    fire_train(c);
    idle(120);                              // gates close, write-back completes
  endtask

  task automatic test_record(input logic [N_INPUT-1:0] r, input int c);
    int s0, s1;
    idle(100);
    cnt_out[0] = 0; cnt_out[1] = 0;
    digit_noise = r;
    idle(200);
    digit_noise = '0;
    idle(30);
    s0 = cnt_out[c]; s1 = cnt_out[1 - c];
    $display("test %s record: output spikes normal=%0d abnormal=%0d",
             c == 0 ? "normal" : "abnormal", cnt_out[0], cnt_out[1]);
    checks++;
    if (s0 < 1 || s0 <= s1) begin
      failures++;
      $display("FAIL record of class %0d misclassified", c);
    end
  endtask

  int w37, w38, bad;

  initial begin
    cnt_out[0] = 0; cnt_out[1] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // load the training arrays
    for (int i = 0; i < int'(NR); i++) begin
      load_we = 1'b1; load_class = CLASS_NORMAL;   load_idx = 4'(i); load_data = normal_rec(i);
      idle(1);
      load_class = CLASS_ABNORMAL; load_data = abnormal_rec(i);
      idle(1);
    end
    load_we = 1'b0;
    idle(50);

    // warm-up: drive the whole input layer for a while with learning off,
    // then let every neuron return to rest before training starts
    test_mode = 1'b1;
    digit_noise = '1;
    idle(150);
    digit_noise = '0;
    idle(300);
    test_mode = 1'b0;
    checks++;
    if (dut.g_neuron[37].u_neuron.u_ram.mem[0] != 0 || cnt_out[0] != 0 || cnt_out[1] != 0) begin
      failures++;
      $display("FAIL warm-up changed weights or fired an output neuron");
    end

    // training
    learn_en = 1'b1; learn_addr_en = 1'b1;
    for (int i = 0; i < int'(NR); i++) begin
      train_record(0);
      train_record(1);
    end
    idle(200);
    learn_en = 1'b0; learn_addr_en = 1'b0;

    // learned weights
    bad = 0;
    for (int i = 0; i < int'(N_INPUT); i += 3) begin
      w37 = int'(dut.g_neuron[37].u_neuron.u_ram.mem[i]);
      w38 = int'(dut.g_neuron[38].u_neuron.u_ram.mem[i]);
      checks++;
      if (!(w37 > 0 && w38 < 0)) begin
        bad++; failures++;
        $display("FAIL weights of periodic input %0d: %0d %0d", i, w37, w38);
      end
    end
    $display("weights from input 0: normal=%0d abnormal=%0d",
             dut.g_neuron[37].u_neuron.u_ram.mem[0],
             dut.g_neuron[38].u_neuron.u_ram.mem[0]);

    // testing with new records
    test_mode = 1'b1;
    for (int i = 0; i < 3; i++) begin
      test_record(normal_rec(20 + i), 0);
      test_record(abnormal_rec(40 + i), 1);
    end
    idle(50);

    // AER delivered every spike once
    checks++;
    if (n_spk_total != n_aer_total) begin
      failures++;
      $display("FAIL %0d spikes but %0d AER events", n_spk_total, n_aer_total);
    end

    $display("mechanisms: halt=%0d ltp=%0d ltd=%0d writeback=%0d clamp=%0d wrap=%0d train_cycles=%0d test_cycles=%0d",
             n_halt, n_ltp, n_ltd, n_wb, n_clamp, n_wrap, n_train_cycles, n_test_cycles);
    checks++; if (n_halt == 0)  begin failures++; $display("FAIL no AER halt"); end
    checks++; if (n_ltp == 0)   begin failures++; $display("FAIL no potentiation"); end
    checks++; if (n_ltd == 0)   begin failures++; $display("FAIL no depression"); end
    checks++; if (n_wb == 0)    begin failures++; $display("FAIL no weight write-back"); end
    checks++; if (n_clamp == 0) begin failures++; $display("FAIL Input Align never clamped"); end
    checks++; if (n_wrap == 0)  begin failures++; $display("FAIL sequencer never wrapped"); end
    checks++; if (n_test_cycles == 0 || n_train_cycles == 0) begin
      failures++; $display("FAIL a mode never used");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_izh_neuron: self-checking testbench for izh_neuron.
//
// A reference model of the Izhikevich update (forward Euler, 0.25 ms step,
// Q15.8 arithmetic, Input Align clamp at -140) runs beside the neuron and
// the membrane potential, recovery variable and spike output are compared
// after every step. The stimulus covers: rest with no input; a constant
// bias that makes the neuron fire repeatedly (the spike count is checked
// too); weights written into the RAM and delivered as AER events, also
// while the neuron is held (en = 0) so that several events add up; and a
// large negative input that the Input Align stage must clamp.
module tb_izh_neuron;
  import snn_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     en = 1'b0;
  logic     we = 1'b0;
  addr_t    waddr = '0;
  weight_t  wdata = '0;
  logic     aer_valid = 1'b0;
  addr_t    aer_addr = '0;
  current_t i_ext = '0;
  logic     spike_out;
  state_t   v_out, u_out;

  int checks = 0, failures = 0;

  izh_neuron dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference
  longint mv, mu, macc;
  logic   mspike;
  longint wtab [N_NEURON];

  function automatic longint clamp_st(input longint x);
    if (x > 64'sd8388607)  return 64'sd8388607;
    if (x < -64'sd8388608) return -64'sd8388608;
    return x;
  endfunction

  task automatic model_step(input longint iext);
    longint i, vn, un, sq;
    i = macc + iext;
    if (i < -140) i = -140;
    if (i > 32767) i = 32767;
    sq = ((mv * mv) * 2621) >>> 24;
    vn = clamp_st(mv + ((sq + 5 * mv + 140 * 256 - mu + i * 256) >>> 2));
    un = mu + ((((mv * 13107) >>> 16) - mu) * 1311 >>> 18);
    if (vn >= 30 * 256) begin
      mv = -65 * 256;
      mu = un + 8 * 256;
      mspike = 1'b1;
    end else begin
      mv = vn;
      mu = un;
      mspike = 1'b0;
    end
    macc = 0;
  endtask

  task automatic compare(input string what);
    checks++;
    if (longint'(v_out) != mv || longint'(u_out) != mu || spike_out != mspike) begin
      failures++;
      $display("FAIL %s: v=%0d/%0d u=%0d/%0d spike=%0b/%0b", what,
               v_out, mv, u_out, mu, spike_out, mspike);
    end
  endtask

  // one enabled step with the given bias; optional AER event in the same cycle
  task automatic step(input int iext, input string what);
    i_ext = current_t'(iext);
    en    = 1'b1;
    @(posedge clk);
    #1;
    en = 1'b0;
    model_step(iext);
    compare(what);
  endtask

  task automatic ram_write(input int a, input int w);
    we = 1'b1; waddr = addr_t'(a); wdata = weight_t'(w);
    @(posedge clk); #1;
    we = 1'b0;
    wtab[a] = w;
  endtask

  task automatic aer_event(input int a);
    aer_valid = 1'b1; aer_addr = addr_t'(a);
    @(posedge clk); #1;
    aer_valid = 1'b0;
    macc += wtab[a] * 4;
  endtask

  int nspk;

  initial begin
    for (int i = 0; i < int'(N_NEURON); i++) wtab[i] = 0;
    mv = -65 * 256;
    mu = (-65 * 256 * 13107) >>> 16;
    macc = 0;
    mspike = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    #1 compare("reset");

    // rest
    for (int t = 0; t < 50; t++) step(0, "rest");

    // constant bias 10: tonic spiking
    nspk = 0;
    for (int t = 0; t < 1200; t++) begin
      step(10, "bias");
      if (spike_out) nspk++;
    end
    checks++;
    if (nspk < 3) begin
      failures++;
      $display("FAIL expected repeated spikes with bias 10, got %0d", nspk);
    end
    for (int t = 0; t < 100; t++) step(0, "recover");

    // weights through the RAM and AER events (also accumulated while held)
    ram_write(3, 60);
    ram_write(7, -5);
    ram_write(20, 100);
    aer_event(3);
    step(0, "one event");
    aer_event(3);
    aer_event(7);
    aer_event(20);
    step(0, "three events");
    for (int t = 0; t < 40; t++) step(0, "after events");
    // unwritten synapse reads 0
    aer_event(11);
    step(0, "zero weight");

    // Input Align: strongly negative input is clamped at -140
    for (int t = 0; t < 5; t++) step(-1000, "negative clamp");
    for (int t = 0; t < 100; t++) step(0, "recover2");

    // random bias and events
    for (int t = 0; t < 1000; t++) begin
      if ($urandom_range(0, 3) == 0) aer_event($urandom_range(0, 38));
      step($urandom_range(0, 30) - 5, "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
